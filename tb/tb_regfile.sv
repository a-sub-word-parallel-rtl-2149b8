// tb_regfile: random writes and two random reads per cycle against an array
// model; a read of the register written in the same cycle sees the old value.
module tb_regfile;
  logic clk = 0, rst_n = 0, we = 0;
  logic [3:0] ra = 0, rb = 0, rw = 0;
  logic [15:0] wd = 0, qa, qb;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  regfile dut (.clk(clk), .rst_n(rst_n), .ra(ra), .rb(rb), .we(we), .rw(rw),
               .wd(wd), .qa(qa), .qb(qb));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we = 1'($urandom); rw = 4'($urandom); wd = 16'($urandom);
      ra = 4'($urandom); rb = 4'($urandom);
      #1;
      checks++;
      if (qa !== model[ra] || qb !== model[rb]) begin
        failures++; $display("FAIL %0d: r%0d=%h r%0d=%h", i, ra, qa, rb, qb);
      end
      @(posedge clk);
      if (we) model[rw] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
