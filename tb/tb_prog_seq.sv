// tb_prog_seq: drives random sequencer operations, branch conditions and
// interrupt requests and compares the PC, the interrupt enable and the
// interrupt acknowledge with a queue-based model of the return stack
// (8 entries, the oldest dropped on overflow). Also counts that calls,
// returns, taken and untaken branches, interrupts and stack overflows all
// occurred.
module tb_prog_seq;
  import dsp_pkg::*;
  logic clk = 0, rst_n = 0, cond_ok = 0, irq = 0;
  seq_op_e op = SEQ_NEXT;
  logic [15:0] target = 0, pc, mpc, npc;
  logic irq_taken, int_en, mie;
  logic [15:0] stk [$];
  int checks = 0, failures = 0;
  int n_call = 0, n_ret = 0, n_taken = 0, n_untaken = 0, n_irq = 0, n_ovf = 0;

  prog_seq dut (.clk(clk), .rst_n(rst_n), .op(op), .cond_ok(cond_ok), .target(target),
                .irq(irq), .pc(pc), .irq_taken(irq_taken), .int_en(int_en));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void mpush(logic [15:0] v);
    if (stk.size() == 8) begin void'(stk.pop_front()); n_ovf++; end
    stk.push_back(v);
  endfunction

  initial begin
    int r;
    logic taken_irq;
    mpc = 0; mie = 1;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      r = $urandom % 16;
      op = r < 5 ? SEQ_NEXT : r < 7 ? SEQ_JUMP : r < 10 ? SEQ_BRANCH : r < 12 ? SEQ_CALL :
           r < 14 ? SEQ_RET : r < 15 ? SEQ_RTI : SEQ_HOLD;
      cond_ok = 1'($urandom);
      target = 16'($urandom);
      irq = ($urandom % 12) == 0;
      #1;
      taken_irq = irq && mie;
      checks++;
      if (pc !== mpc || int_en !== mie || irq_taken !== taken_irq) begin
        failures++; $display("FAIL %0d: pc=%h exp %h ie=%b exp %b", i, pc, mpc, int_en, mie);
      end
      npc = mpc + 1;
      case (op)
        SEQ_JUMP: npc = target;
        SEQ_BRANCH: begin
          if (cond_ok) begin npc = target; n_taken++; end
          else n_untaken++;
        end
        SEQ_CALL: begin npc = target; mpush(mpc + 1); n_call++; end
        SEQ_RET, SEQ_RTI: begin
          if (stk.size() > 0) begin npc = stk.pop_back(); n_ret++; end
          else npc = mpc;
        end
        SEQ_HOLD: npc = mpc;
        default: ;
      endcase
      if (taken_irq) begin
        mpush(npc);
        mpc = 16'h0004;
        mie = 0;
        n_irq++;
      end else begin
        mpc = npc;
        if (op == SEQ_RTI) mie = 1;
      end
    end
    $display("calls=%0d returns=%0d taken=%0d untaken=%0d irqs=%0d overflows=%0d",
             n_call, n_ret, n_taken, n_untaken, n_irq, n_ovf);
    if (n_call == 0 || n_ret == 0 || n_taken == 0 || n_untaken == 0 || n_irq == 0 || n_ovf == 0)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
