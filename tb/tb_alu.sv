// tb_alu: every operation on random and corner operands, result and flags
// compared with integer arithmetic.
module tb_alu;
  import dsp_pkg::*;
  alu_op_e op;
  logic [15:0] a, b, y;
  logic [3:0] flags;
  int checks = 0, failures = 0;

  alu dut (.op(op), .a(a), .b(b), .y(y), .flags(flags));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(alu_op_e o, logic [15:0] av, logic [15:0] bv);
    int sa, sb, r;
    logic [15:0] ey;
    logic c, v;
    op = o; a = av; b = bv; #1;
    sa = int'($signed(av)); sb = int'($signed(bv));
    c = 0; v = 0;
    case (o)
      ALU_ADD: begin r = sa + sb; ey = 16'(r); c = (int'(av) + int'(bv)) > 65535; v = r > 32767 || r < -32768; end
      ALU_SUB: begin r = sa - sb; ey = 16'(r); c = int'(av) >= int'(bv); v = r > 32767 || r < -32768; end
      ALU_NEG: begin r = -sa; ey = 16'(r); c = av == 0; v = r > 32767; end
      ALU_AND: ey = av & bv;
      ALU_OR:  ey = av | bv;
      ALU_XOR: ey = av ^ bv;
      ALU_PASSA: ey = av;
      default: ey = bv;
    endcase
    checks++;
    if (y !== ey || flags !== {ey == 0, ey[15], c, v}) begin
      failures++; $display("FAIL %s %h %h: %h %b exp %h %b", o.name(), av, bv, y, flags, ey, {ey == 0, ey[15], c, v});
    end
  endtask

  initial begin
    alu_op_e o;
    for (int k = 0; k < 8; k++) begin
      o = alu_op_e'(k);
      check(o, 16'h7fff, 16'h0001);
      check(o, 16'h8000, 16'h0001);
      check(o, 16'h8000, 16'h8000);
      check(o, 16'h0000, 16'h0000);
      check(o, 16'hffff, 16'h0001);
      for (int i = 0; i < 300; i++) check(o, 16'($urandom), 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
