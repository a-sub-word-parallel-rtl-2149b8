// acs_queue: queue of Viterbi add-compare-select decision bits.
//
// Each ACS operation produces one decision bit, the sign of the difference of
// the two candidate path metrics. The bits are shifted in at bit 0, so after
// a run of pushes bit i holds the decision made i pushes ago; the traceback
// reads the whole word. The 32-bit length follows the document; shifting in
// at the low end and the synchronous reset to zero are this design's choice.
// Timing: q updates at the clock edge after push.
module acs_queue #(
  parameter int DEPTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic             din,
  output logic [DEPTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)    q <= '0;
    else if (push) q <= {q[DEPTH-2:0], din};
  end
endmodule
