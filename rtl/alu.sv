// alu: W-bit arithmetic logic unit.
//
// Adds, subtracts, negates, passes and combines two's-complement operands
// bitwise, and reports the flags {Z, N, C, V} of the result: zero, negative,
// carry out (for SUB and NEG: no borrow) and signed overflow. Combinational.
// The document only names the ALU; its operation set and flags are this
// design's choice.
module alu
  import dsp_pkg::*;
#(
  parameter int W = 16
) (
  input  alu_op_e      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y,
  output logic [3:0]   flags
);
  logic [W:0] sum;
  logic       c, v;

  always_comb begin
    sum = '0;
    c   = 1'b0;
    v   = 1'b0;
    unique case (op)
      ALU_ADD: begin
        sum = {1'b0, a} + {1'b0, b};
        v   = (a[W-1] == b[W-1]) && (sum[W-1] != a[W-1]);
      end
      ALU_SUB: begin
        sum = {1'b0, a} + {1'b0, ~b} + (W+1)'(1);
        v   = (a[W-1] != b[W-1]) && (sum[W-1] != a[W-1]);
      end
      ALU_NEG: begin
        sum = {1'b0, ~a} + (W+1)'(1);
        v   = a[W-1] && (sum[W-1] == a[W-1]);
      end
      ALU_AND:   sum = {1'b0, a & b};
      ALU_OR:    sum = {1'b0, a | b};
      ALU_XOR:   sum = {1'b0, a ^ b};
      ALU_PASSA: sum = {1'b0, a};
      ALU_PASSB: sum = {1'b0, b};
      default:   ;
    endcase
    c = (op inside {ALU_ADD, ALU_SUB, ALU_NEG}) ? sum[W] : 1'b0;
    y = sum[W-1:0];
    flags = {y == '0, y[W-1], c, v};
  end
endmodule
