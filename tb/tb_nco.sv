// tb_nco: loads frequency words and phases and compares the ROM address with
// a modular phase-accumulator model over random step patterns.
module tb_nco;
  logic clk = 0, rst_n = 0, ld_freq = 0, ld_phase = 0, step = 0;
  logic [15:0] din = 0;
  logic [9:0] rom_addr;
  logic [15:0] phase, freq;
  int checks = 0, failures = 0;

  nco dut (.clk(clk), .rst_n(rst_n), .ld_freq(ld_freq), .ld_phase(ld_phase),
           .step(step), .din(din), .rom_addr(rom_addr));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    phase = 0; freq = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      checks++;
      if (rom_addr !== phase[15:6]) begin failures++; $display("FAIL %0d addr=%0d exp %0d", i, rom_addr, phase[15:6]); end
      ld_freq  = ($urandom % 50) == 0;
      ld_phase = ($urandom % 80) == 0;
      step     = ($urandom % 3) != 0;
      din      = 16'($urandom);
      // The step in the same cycle as a frequency load uses the old word.
      if (ld_phase) phase = din;
      else if (step) phase = phase + freq;
      if (ld_freq) freq = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
