// prog_seq: program sequencer.
//
// Generates the program counter that drives the instruction address bus. Per
// cycle the decoded operation chooses the next PC: the next instruction, an
// unconditional jump, a conditional branch (taken when cond_ok), a subroutine
// call (pushes PC+1 on a return stack), a return (pops it), a return from
// interrupt (pops and re-enables interrupts) or a hold (stall). An interrupt
// request, when enabled, overrides the decoded operation's target: the
// address the program would have gone to next is pushed and the PC goes to
// IRQ_VECTOR, with further interrupts masked until the return from interrupt.
// Handling subroutines, interrupts and conditional branches follows the
// document; the stack depth, vector and masking are this design's choices.
// A push onto a full stack drops the oldest entry. The PC is a register that
// updates at the clock edge; after reset it is RESET_PC.
module prog_seq
  import dsp_pkg::*;
#(
  parameter int          PC_W        = 16,
  parameter int          STACK_DEPTH = 8,
  parameter logic [15:0] RESET_PC    = 16'h0000,
  parameter logic [15:0] IRQ_VECTOR  = 16'h0004
) (
  input  logic            clk,
  input  logic            rst_n,
  input  seq_op_e         op,
  input  logic            cond_ok,
  input  logic [PC_W-1:0] target,
  input  logic            irq,
  output logic [PC_W-1:0] pc,
  output logic            irq_taken,
  output logic            int_en
);
  localparam int SPW = $clog2(STACK_DEPTH + 1);
  localparam int IW  = $clog2(STACK_DEPTH);

  logic [PC_W-1:0] stack [STACK_DEPTH];
  logic [SPW-1:0]  sp;        // number of valid entries
  logic [PC_W-1:0] next_pc;
  logic            push, pop;
  logic [PC_W-1:0] push_val;

  always_comb begin
    next_pc   = pc + PC_W'(1);
    push      = 1'b0;
    pop       = 1'b0;
    unique case (op)
      SEQ_JUMP:   next_pc = target;
      SEQ_BRANCH: if (cond_ok) next_pc = target;
      SEQ_CALL:   begin next_pc = target; push = 1'b1; end
      SEQ_RET,
      SEQ_RTI:    begin next_pc = (sp != 0) ? stack[IW'(sp - SPW'(1))] : pc; pop = (sp != 0); end
      SEQ_HOLD:   next_pc = pc;
      default:    ;
    endcase
    push_val  = (op == SEQ_CALL) ? pc + PC_W'(1) : next_pc;
    irq_taken = irq && int_en;
  end

  // Next stack contents: an optional pop, then up to two pushes (a call's
  // return address and, on an interrupt, the address to resume at).
  logic [PC_W-1:0] stack_n [STACK_DEPTH];
  logic [SPW-1:0]  sp_n;

  function automatic void push_one(ref logic [PC_W-1:0] st [STACK_DEPTH],
                                   ref logic [SPW-1:0] n, input logic [PC_W-1:0] v);
    if (int'(n) == STACK_DEPTH) begin
      for (int i = 0; i < STACK_DEPTH - 1; i++) st[i] = st[i+1];
      st[STACK_DEPTH-1] = v;
    end else begin
      st[IW'(n)] = v;
      n = n + SPW'(1);
    end
  endfunction

  always_comb begin
    stack_n = stack;
    sp_n    = sp;
    if (pop)       sp_n = sp_n - SPW'(1);
    if (push)      push_one(stack_n, sp_n, push_val);
    if (irq_taken) push_one(stack_n, sp_n, next_pc);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc     <= RESET_PC[PC_W-1:0];
      sp     <= '0;
      int_en <= 1'b1;
      for (int i = 0; i < STACK_DEPTH; i++) stack[i] <= '0;
    end else begin
      pc    <= irq_taken ? IRQ_VECTOR[PC_W-1:0] : next_pc;
      stack <= stack_n;
      sp    <= sp_n;
      if (irq_taken)           int_en <= 1'b0;
      else if (op == SEQ_RTI)  int_en <= 1'b1;
    end
  end
endmodule
