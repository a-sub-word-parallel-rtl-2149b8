// regfile: general register file of the core.
//
// NREG registers of W bits with two combinational read ports (qa, qb) and one
// write port written at the clock edge. A read of the register being written
// returns the old value. All registers reset to zero. The document only names
// the register file; its size and ports are this design's choice.
module regfile #(
  parameter int NREG = 16,
  parameter int W    = 16,
  localparam int RW  = $clog2(NREG)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [RW-1:0] ra,
  input  logic [RW-1:0] rb,
  input  logic          we,
  input  logic [RW-1:0] rw,
  input  logic [W-1:0]  wd,
  output logic [W-1:0]  qa,
  output logic [W-1:0]  qb
);
  logic [W-1:0] r [NREG];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) r[i] <= '0;
    end else if (we) begin
      r[rw] <= wd;
    end
  end

  assign qa = r[ra];
  assign qb = r[rb];
endmodule
