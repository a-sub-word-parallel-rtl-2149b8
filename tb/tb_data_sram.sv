// tb_data_sram: fills a 1K-word bank with random words, reads every word back
// with one cycle of read latency, and checks write-first behaviour.
module tb_data_sram;
  logic clk = 0, we = 0;
  logic [9:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [1024];
  int checks = 0, failures = 0;

  data_sram dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      we = 1; addr = 10'(i); wdata = 16'($urandom); model[i] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[i]) begin failures++; $display("FAIL write-first %0d", i); end
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      addr = 10'(1023 - i);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[1023 - i]) begin failures++; $display("FAIL read %0d: %h exp %h", 1023 - i, rdata, model[1023 - i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
