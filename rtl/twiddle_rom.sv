// twiddle_rom: the two quadrature cos/sin ROMs.
//
// Entry i holds cos(2*pi*i/DEPTH) and sin(2*pi*i/DEPTH) as signed Q1.15
// numbers, rounded to nearest and scaled by 32767, so that both values stay
// within +-32767. The same table serves as FFT twiddle factors (W = cos - j sin
// is formed by the butterfly unit) and as the look-up table of the NCO. Two
// 1K-word ROMs follow the document; Q1.15 format and rounding are this
// design's choice. The contents are computed at elaboration. Synchronous read:
// cos_q/sin_q show the entry at addr one cycle after rd.
module twiddle_rom #(
  parameter int DEPTH = 1024,
  parameter int W     = 16,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                rd,
  input  logic [AW-1:0]       addr,
  output logic signed [W-1:0] cos_q,
  output logic signed [W-1:0] sin_q
);
  localparam real PI    = 3.14159265358979323846;
  localparam real SCALE = real'((1 << (W - 1)) - 1);

  logic signed [W-1:0] cos_tab [DEPTH];
  logic signed [W-1:0] sin_tab [DEPTH];

  function automatic logic signed [W-1:0] quant(real v);
    real s;
    s = v * SCALE;
    return W'($rtoi(s >= 0.0 ? s + 0.5 : s - 0.5));
  endfunction

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      cos_tab[i] = quant($cos(2.0 * PI * real'(i) / real'(DEPTH)));
      sin_tab[i] = quant($sin(2.0 * PI * real'(i) / real'(DEPTH)));
    end
  end

  always_ff @(posedge clk) begin
    if (rd) begin
      cos_q <= cos_tab[addr];
      sin_q <= sin_tab[addr];
    end
  end
endmodule
