// dag: data address generator producing two data addresses per cycle.
//
// Two address registers drive the address buses of the two data memory
// banks at the same time. Each has a modifier register; an increment request
// adds the modifier to the address (modulo the bank size). ld[i] loads
// address register i and md[i] modifier i from din; a load wins over an
// increment. Two addresses per cycle follow the document; the register set
// and post-modify scheme are this design's choice. The addresses are the
// register outputs, so they change at the clock edge after a load/increment.
module dag #(
  parameter int AW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [1:0]    ld,
  input  logic [1:0]    md,
  input  logic [1:0]    inc,
  input  logic [15:0]   din,
  output logic [AW-1:0] addr0,
  output logic [AW-1:0] addr1
);
  logic [AW-1:0] ar  [2];
  logic [AW-1:0] mod [2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 2; i++) begin
        ar[i]  <= '0;
        mod[i] <= AW'(1);
      end
    end else begin
      for (int i = 0; i < 2; i++) begin
        if (md[i])       mod[i] <= din[AW-1:0];
        if (ld[i])       ar[i]  <= din[AW-1:0];
        else if (inc[i]) ar[i]  <= ar[i] + mod[i];
      end
    end
  end

  assign addr0 = ar[0];
  assign addr1 = ar[1];
endmodule
