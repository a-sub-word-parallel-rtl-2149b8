// data_sram: one embedded data memory bank, DEPTH words of W bits.
//
// The core has two such banks with separate address spaces, one for the
// in-phase and one for the quadrature part of complex data, so a complex
// sample is read or written in one cycle. Single port, synchronous: a write
// happens at the clock edge when we is high; a read returns the word at addr
// one cycle later (write-first: a read of the word being written returns the
// new data). 1K words per bank follows the document; the port behaviour is
// this design's choice.
module data_sram #(
  parameter int DEPTH = 1024,
  parameter int W     = 16,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[addr] <= wdata;
      rdata     <= wdata;
    end else begin
      rdata     <= mem[addr];
    end
  end
endmodule
