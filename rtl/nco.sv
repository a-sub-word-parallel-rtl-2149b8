// nco: phase accumulator of the numerically controlled oscillator.
//
// A PHASE_W-bit phase register advances by a frequency word on each step; its
// top AW bits address the cos/sin ROM, which turns the phase into a phasor.
// The frequency word and the phase can be loaded from din (ld_freq, ld_phase;
// loading the phase wins over stepping). That the twiddle ROM doubles as the
// NCO table follows the document; the accumulator and its widths are this
// design's choice. Timing: rom_addr reflects the phase register, which updates
// at the clock edge.
module nco #(
  parameter int PHASE_W = 16,
  parameter int AW      = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ld_freq,
  input  logic               ld_phase,
  input  logic               step,
  input  logic [PHASE_W-1:0] din,
  output logic [AW-1:0]      rom_addr
);
  logic [PHASE_W-1:0] phase, freq;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0;
      freq  <= '0;
    end else begin
      if (ld_freq)       freq  <= din;
      if (ld_phase)      phase <= din;
      else if (step)     phase <= phase + freq;
    end
  end

  assign rom_addr = phase[PHASE_W-1 -: AW];
endmodule
