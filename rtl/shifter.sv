// shifter: W-bit barrel shifter.
//
// Shifts the operand left logically, right logically, right arithmetically
// or rotates it left by 0..W-1 places in one combinational step. The
// document only names the shifter; its operations are this design's choice.
module shifter
  import dsp_pkg::*;
#(
  parameter int W = 16,
  localparam int SW = $clog2(W)
) (
  input  shf_op_e       op,
  input  logic [W-1:0]  a,
  input  logic [SW-1:0] sh,
  output logic [W-1:0]  y
);
  always_comb begin
    unique case (op)
      SHF_SLL: y = a << sh;
      SHF_SRL: y = a >> sh;
      SHF_SRA: y = W'($signed(a) >>> sh);
      SHF_ROL: y = W'({a, a} >> (W - int'(sh)));
      default: y = a;
    endcase
  end
endmodule
