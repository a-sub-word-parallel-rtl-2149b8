// tb_subword_mult: checks the sub-word multiplier against integer products.
// Random and corner operands; split = 0 must give the signed 16x16 product,
// split = 1 the four signed 8x8 byte products.
module tb_subword_mult;
  logic [15:0] x, y;
  logic split;
  logic signed [31:0] p;
  logic signed [15:0] pp [4];
  int checks = 0, failures = 0;

  subword_mult dut (.x(x), .y(y), .split(split), .p(p), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [15:0] xv, logic [15:0] yv);
    int e;
    logic signed [7:0] b [4];
    x = xv; y = yv;
    split = 1'b0; #1;
    e = int'($signed(xv)) * int'($signed(yv));
    checks++;
    if (p !== e) begin failures++; $display("FAIL 16x16 %h*%h: %h exp %h", xv, yv, p, e); end
    split = 1'b1; #1;
    b[0] = xv[15:8]; b[1] = xv[7:0]; b[2] = yv[15:8]; b[3] = yv[7:0];
    for (int k = 0; k < 4; k++) begin
      e = int'(b[k < 2 ? 0 : 1]) * int'(b[(k % 2) == 0 ? 2 : 3]);
      checks++;
      if (int'(pp[k]) != e) begin failures++; $display("FAIL 8x8 %0d %h*%h: %0d exp %0d", k, xv, yv, pp[k], e); end
    end
  endtask

  initial begin
    check(16'h7fff, 16'h7fff);
    check(16'h8000, 16'h8000);
    check(16'h8000, 16'h7fff);
    check(16'hffff, 16'h0001);
    check(16'h8080, 16'h8080);
    check(16'h7f80, 16'h807f);
    for (int i = 0; i < 2000; i++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
