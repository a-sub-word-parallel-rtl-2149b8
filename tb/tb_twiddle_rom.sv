// tb_twiddle_rom: checks known phasors (0, 45, 90, 180, 270 degrees) and
// that every entry is within one LSB of 32767*cos / 32767*sin and has a
// magnitude within 3 LSB of 32767.
module tb_twiddle_rom;
  logic clk = 0, rd = 0;
  logic [9:0] addr = 0;
  logic signed [15:0] c, s;
  int checks = 0, failures = 0;

  twiddle_rom dut (.clk(clk), .rd(rd), .addr(addr), .cos_q(c), .sin_q(s));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd_at(int i);
    @(negedge clk); rd = 1; addr = 10'(i);
    @(posedge clk); #1; rd = 0;
  endtask

  task automatic expect_cs(int i, int ec, int es);
    rd_at(i);
    checks++;
    if (int'(c) != ec || int'(s) != es) begin
      failures++; $display("FAIL %0d: %0d %0d exp %0d %0d", i, c, s, ec, es);
    end
  endtask

  initial begin
    real rc, rs, mag;
    expect_cs(0, 32767, 0);
    expect_cs(128, 23170, 23170);
    expect_cs(256, 0, 32767);
    expect_cs(512, -32767, 0);
    expect_cs(768, 0, -32767);
    for (int i = 0; i < 1024; i++) begin
      rd_at(i);
      rc = 32767.0 * $cos(6.283185307179586 * i / 1024.0);
      rs = 32767.0 * $sin(6.283185307179586 * i / 1024.0);
      mag = $sqrt(real'(c) * real'(c) + real'(s) * real'(s));
      checks++;
      if ((real'(c) - rc) > 1.0 || (rc - real'(c)) > 1.0 ||
          (real'(s) - rs) > 1.0 || (rs - real'(s)) > 1.0 ||
          mag > 32770.0 || mag < 32764.0) begin
        failures++; $display("FAIL entry %0d: %0d %0d", i, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
