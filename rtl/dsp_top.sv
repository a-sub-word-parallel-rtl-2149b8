// dsp_top: core of the sub-word parallel communication DSP.
//
// Wires the processor's units onto two data buses and two data address
// buses: the data address generator (dag) addresses both data memory banks
// in the same cycle, bank 0 holding the in-phase (real) half and bank 1 the
// quadrature (imaginary) half of complex data, so a complex word moves in one
// cycle. The butterfly / complex MAC processor (bfly_mac) takes its A and B
// operands from the two memory read buses, the register file or its own X/Y
// outputs, and its twiddle factor from the cos/sin ROM, which is addressed
// either by an immediate (FFT twiddles) or by the NCO phase accumulator.
// The ALU and shifter work on the register file; the ALU flags feed the
// program sequencer's conditional branches.
// Interface: the decoded control word ctrl (dsp_pkg::ctrl_t) arrives each
// cycle; the instruction address iaddr goes to the program memory, which,
// like the instruction decoder, lies outside this core. Butterfly outputs,
// latched MAC results and the ACS decision queue are brought out for
// observation.
// A MAC result reaches the register file as bits [shamt+15:shamt] of the
// chosen yout word (an arithmetic right shift by shamt), which turns a
// fixed-point sum of products back into a 16-bit sample.
// Timing: memory and ROM reads are synchronous, so data addressed in cycle t
// is on the read buses (and loadable into A/B or the register file) in cycle
// t+1. Everything else follows the units' own timing.
// From the document: the set of units, dual data/address buses, I/Q banks,
// 1K-word memories and ROMs, the ROM's double use as twiddle table and NCO
// table. This design's choices: the control word, the operand routing
// multiplexers and the branch conditions.
module dsp_top
  import dsp_pkg::*;
#(
  parameter int DMEM_DEPTH = 1024,
  parameter int ROM_DEPTH  = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  ctrl_t       ctrl,
  input  logic        irq,
  output logic [15:0] iaddr,
  output logic [3:0]  flags,
  output logic [31:0] xx,
  output logic [31:0] yy,
  output logic [39:0] yout [4],
  output logic        yvalid,
  output logic [31:0] acs_q,
  output logic [15:0] rd0,
  output logic [15:0] rd1,
  output logic        irq_ack,
  output logic        int_en
);
  localparam int DAW = $clog2(DMEM_DEPTH);
  localparam int RAW = $clog2(ROM_DEPTH);

  // ---------------------------------------------------------------- control
  logic cond_ok;
  logic irq_taken;
  assign irq_ack = irq_taken;

  always_comb begin
    unique case (ctrl.cond)
      CC_ALWAYS: cond_ok = 1'b1;
      CC_EQ:     cond_ok = flags[FLAG_Z];
      CC_NE:     cond_ok = !flags[FLAG_Z];
      CC_LT:     cond_ok = flags[FLAG_N] ^ flags[FLAG_V];
      CC_GE:     cond_ok = !(flags[FLAG_N] ^ flags[FLAG_V]);
      CC_CS:     cond_ok = flags[FLAG_C];
      CC_VS:     cond_ok = flags[FLAG_V];
      default:   cond_ok = 1'b0;
    endcase
  end

  prog_seq u_seq (
    .clk(clk), .rst_n(rst_n), .op(ctrl.seq_op), .cond_ok(cond_ok),
    .target(ctrl.target), .irq(irq), .pc(iaddr), .irq_taken(irq_taken),
    .int_en(int_en)
  );

  // -------------------------------------------------- address generation
  logic [DAW-1:0] addr0, addr1;
  dag #(.AW(DAW)) u_dag (
    .clk(clk), .rst_n(rst_n), .ld(ctrl.dag_ld), .md(ctrl.dag_md),
    .inc(ctrl.dag_inc), .din(ctrl.imm), .addr0(addr0), .addr1(addr1)
  );

  // ------------------------------------------------------- register file
  logic [15:0] qa, qb, rf_wd;
  regfile u_rf (
    .clk(clk), .rst_n(rst_n), .ra(ctrl.ra), .rb(ctrl.rb), .we(ctrl.rf_we),
    .rw(ctrl.rw), .wd(rf_wd), .qa(qa), .qb(qb)
  );

  // ------------------------------------------------------ ALU and shifter
  logic [15:0] alu_y, shf_y;
  logic [3:0]  alu_flags;
  alu u_alu (
    .op(ctrl.alu_op), .a(qa), .b(ctrl.alu_b_imm ? ctrl.imm : qb),
    .y(alu_y), .flags(alu_flags)
  );
  shifter u_shf (.op(ctrl.shf_op), .a(qa), .sh(ctrl.shamt), .y(shf_y));

  always_ff @(posedge clk) begin
    if (!rst_n)             flags <= '0;
    else if (ctrl.flags_we) flags <= alu_flags;
  end

  // ------------------------------------------------------- data memories
  logic [15:0] wd0, wd1;
  always_comb begin
    unique case (ctrl.mem_wsrc)
      MW_XX:   {wd0, wd1} = xx;
      MW_YY:   {wd0, wd1} = yy;
      default: {wd0, wd1} = {qa, qb};
    endcase
  end

  data_sram #(.DEPTH(DMEM_DEPTH)) u_mem0 (
    .clk(clk), .we(ctrl.mem_we[0]), .addr(addr0), .wdata(wd0), .rdata(rd0)
  );
  data_sram #(.DEPTH(DMEM_DEPTH)) u_mem1 (
    .clk(clk), .we(ctrl.mem_we[1]), .addr(addr1), .wdata(wd1), .rdata(rd1)
  );

  // ------------------------------------------------------ twiddle ROM, NCO
  logic [RAW-1:0]     nco_addr;
  logic signed [15:0] cos_q, sin_q;
  nco #(.AW(RAW)) u_nco (
    .clk(clk), .rst_n(rst_n), .ld_freq(ctrl.nco_ld_freq),
    .ld_phase(ctrl.nco_ld_phase), .step(ctrl.nco_step), .din(ctrl.imm),
    .rom_addr(nco_addr)
  );
  twiddle_rom #(.DEPTH(ROM_DEPTH)) u_rom (
    .clk(clk), .rd(ctrl.rom_rd),
    .addr(ctrl.rom_from_nco ? nco_addr : ctrl.imm[RAW-1:0]),
    .cos_q(cos_q), .sin_q(sin_q)
  );

  // --------------------------------------------- butterfly / complex MAC
  function automatic logic [31:0] opsel(opsrc_e s, logic [31:0] mem,
                                        logic [31:0] rf, logic [31:0] x,
                                        logic [31:0] y);
    unique case (s)
      OPS_MEM: return mem;
      OPS_RF:  return rf;
      OPS_XX:  return x;
      default: return y;
    endcase
  endfunction

  logic [31:0] a_in, b_in;
  always_comb begin
    a_in = opsel(ctrl.a_src, {rd0, rd1}, {qa, qb}, xx, yy);
    b_in = opsel(ctrl.b_src, {rd0, rd1}, {qa, qb}, xx, yy);
  end

  bfly_mac u_bm (
    .clk(clk), .rst_n(rst_n), .ld_a(ctrl.ld_a), .a_in(a_in),
    .ld_b(ctrl.ld_b), .b_in(b_in), .w({cos_q, sin_q}), .op(ctrl.bm_op),
    .first(ctrl.bm_first), .scale(ctrl.bm_scale), .conj_w(ctrl.bm_conj),
    .xx(xx), .yy(yy), .yout(yout), .yvalid(yvalid), .acs_q(acs_q)
  );

  // ------------------------------------------------- register write-back
  logic [15:0] bm_word;
  always_comb begin
    unique case (ctrl.bm_rsel)
      3'd0:    bm_word = xx[31:16];
      3'd1:    bm_word = xx[15:0];
      3'd2:    bm_word = yy[31:16];
      3'd3:    bm_word = yy[15:0];
      default: bm_word = 16'($signed(yout[ctrl.bm_rsel[1:0]]) >>> ctrl.shamt);
    endcase
    unique case (ctrl.rf_wsrc)
      RW_ALU:  rf_wd = alu_y;
      RW_SHF:  rf_wd = shf_y;
      RW_MEM0: rf_wd = rd0;
      RW_MEM1: rf_wd = rd1;
      RW_IMM:  rf_wd = ctrl.imm;
      RW_BM:   rf_wd = bm_word;
      default: rf_wd = ctrl.bm_rsel[0] ? acs_q[31:16] : acs_q[15:0];
    endcase
  end
endmodule
