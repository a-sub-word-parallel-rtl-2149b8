// tb_dag: loads address and modifier registers and post-modifies both
// address registers in random patterns; both addresses are compared with a
// modulo-1024 model every cycle.
module tb_dag;
  logic clk = 0, rst_n = 0;
  logic [1:0] ld = 0, md = 0, inc = 0;
  logic [15:0] din = 0;
  logic [9:0] addr0, addr1;
  logic [9:0] a [2], m [2];
  int checks = 0, failures = 0;

  dag dut (.clk(clk), .rst_n(rst_n), .ld(ld), .md(md), .inc(inc), .din(din),
           .addr0(addr0), .addr1(addr1));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a[0] = 0; a[1] = 0; m[0] = 1; m[1] = 1;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      checks++;
      if (addr0 !== a[0] || addr1 !== a[1]) begin
        failures++; $display("FAIL %0d: %0d %0d exp %0d %0d", i, addr0, addr1, a[0], a[1]);
      end
      ld  = 2'(($urandom % 20) == 0 ? $urandom : 0);
      md  = 2'(($urandom % 30) == 0 ? $urandom : 0);
      inc = 2'($urandom);
      din = 16'($urandom);
      for (int k = 0; k < 2; k++) begin
        if (ld[k]) a[k] = din[9:0];
        else if (inc[k]) a[k] = a[k] + m[k];
        if (md[k]) m[k] = din[9:0];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
