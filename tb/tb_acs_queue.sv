// tb_acs_queue: pushes random decision bits and compares the 32-bit queue
// with a shift-register model, including cycles without a push.
module tb_acs_queue;
  logic clk = 0, rst_n = 0, push = 0, din = 0;
  logic [31:0] q, model;
  int checks = 0, failures = 0;

  acs_queue dut (.clk(clk), .rst_n(rst_n), .push(push), .din(din), .q(q));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      checks++;
      if (q !== model) begin failures++; $display("FAIL %0d q=%h exp %h", i, q, model); end
      push = ($urandom % 4) != 0;
      din  = 1'($urandom);
      if (push) model = {model[30:0], din};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
