// tb_dsp_top: end-to-end test of the DSP core at its default sizes.
//
// The testbench plays program memory and instruction decoder: it holds a
// program of decoded control words and presents prog[iaddr] to the core each
// cycle, so the core's own program sequencer steers it. The program
//   - jumps over the interrupt vector, runs a countdown loop (ALU, flags,
//     taken and untaken conditional branches) during which one interrupt is
//     raised; the interrupt routine writes a register and returns,
//   - calls a subroutine that uses the shifter and returns,
//   - runs an 8-point radix-2 DIF FFT in place on complex data held as I/Q
//     in the two data banks, with twiddles from the cos/sin ROM, one scaled
//     butterfly at a time (results in bit-reversed order),
//   - runs an 8-tap 8-bit real FIR with the sixteen-way 8x8 MAC mode, one MAC
//     step per cycle, coefficients from the register file and samples from
//     both banks,
//   - performs one add-compare-select, and
//   - steps the NCO and reads a phasor from the ROM through a butterfly.
// FFT results are compared bit-exactly with a fixed-point model and, within a
// tolerance, with a floating-point DFT; FIR outputs with a direct
// convolution; the rest with worked-out values. Each mechanism is counted
// and one that never happened counts as a failure.
module tb_dsp_top;
  import dsp_pkg::*;
  logic clk = 0, rst_n = 0, irq = 0;
  ctrl_t ctrl;
  logic [15:0] iaddr, rd0, rd1;
  logic [3:0] flags;
  logic [31:0] xx, yy, acs_q;
  logic [39:0] yout [4];
  logic yvalid, irq_ack, int_en;
  int checks = 0, failures = 0;

  dsp_top dut (.clk(clk), .rst_n(rst_n), .ctrl(ctrl), .irq(irq), .iaddr(iaddr),
               .flags(flags), .xx(xx), .yy(yy), .yout(yout), .yvalid(yvalid),
               .acs_q(acs_q), .rd0(rd0), .rd1(rd1), .irq_ack(irq_ack), .int_en(int_en));
  always #5 clk = ~clk;

  // ------------------------------------------------------ program memory
  ctrl_t prog [1024];
  int    pw;                                   // next address to emit at
  assign ctrl = prog[iaddr[9:0]];

  function automatic ctrl_t nop();
    ctrl_t c;
    c = '0;
    return c;
  endfunction
  function automatic void emit(ctrl_t c); prog[pw] = c; pw++; endfunction
  function automatic void emit_imm_reg(int r, logic [15:0] v);
    ctrl_t c;
    c = nop(); c.rf_we = 1; c.rw = 4'(r); c.rf_wsrc = RW_IMM; c.imm = v;
    emit(c);
  endfunction

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired at iaddr %0d", iaddr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------- mechanism counts
  int n_call, n_ret, n_taken, n_untaken, n_irq, n_rti, n_bfly, n_xxw, n_yyw;
  int n_mac8, n_latch, n_acs, n_nco, n_shf;
  initial begin
    n_call = 0; n_ret = 0; n_taken = 0; n_untaken = 0; n_irq = 0; n_rti = 0; n_bfly = 0;
    n_xxw = 0; n_yyw = 0; n_mac8 = 0; n_latch = 0; n_acs = 0; n_nco = 0; n_shf = 0;
  end
  always @(posedge clk) if (rst_n) begin
    if (ctrl.seq_op == SEQ_CALL) n_call++;
    if (ctrl.seq_op == SEQ_RET) n_ret++;
    if (ctrl.seq_op == SEQ_RTI) n_rti++;
    if (ctrl.seq_op == SEQ_BRANCH) begin
      if (dut.cond_ok) n_taken++; else n_untaken++;
    end
    if (irq_ack) n_irq++;
    if (ctrl.bm_op == BM_BFLY) n_bfly++;
    if (ctrl.mem_we != 0 && ctrl.mem_wsrc == MW_XX) n_xxw++;
    if (ctrl.mem_we != 0 && ctrl.mem_wsrc == MW_YY) n_yyw++;
    if (ctrl.bm_op == BM_RMAC8) n_mac8++;
    if (ctrl.bm_op == BM_ACS) n_acs++;
    if (ctrl.nco_step) n_nco++;
    if (ctrl.rf_we && ctrl.rf_wsrc == RW_SHF) n_shf++;
  end

  // FIR outputs captured from the latch port.
  logic [39:0] fir_res [$][4];
  int last_latch = -1, latch_gap_bad = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && yvalid) begin
      fir_res.push_back(yout);
      if (last_latch >= 0 && cyc - last_latch != 2) latch_gap_bad++;
      last_latch = cyc;
      n_latch++;
    end
  end

  // ------------------------------------------------------------ test data
  localparam int N = 8;
  logic signed [15:0] fr [N], fi [N];
  localparam int K = 8, T = 6;              // FIR taps, iterations
  logic [7:0] c8 [K];
  logic [7:0] x8 [4*T];
  localparam int FIR_BASE = 256;

  function automatic int bitrev3(int v); return {v[0], v[1], v[2]}; endfunction

  // Fixed-point model of one scaled DIF butterfly with conjugated twiddle.
  function automatic void bfly_model(inout logic signed [15:0] ar, inout logic signed [15:0] ai,
                                     inout logic signed [15:0] br, inout logic signed [15:0] bi,
                                     input int tw);
    longint sr, si, dr, di, c, s, pr, pi;
    real ang;
    ang = 6.283185307179586 * tw / 1024.0;
    c = $rtoi(32767.0 * $cos(ang) + ($cos(ang) >= 0 ? 0.5 : -0.5));
    s = $rtoi(32767.0 * $sin(ang) + ($sin(ang) >= 0 ? 0.5 : -0.5));
    sr = (longint'(ar) + longint'(br)) >>> 1; si = (longint'(ai) + longint'(bi)) >>> 1;
    dr = (longint'(ar) - longint'(br)) >>> 1; di = (longint'(ai) - longint'(bi)) >>> 1;
    pr = dr * c + di * s;          // (dr + j di)(c - j s)
    pi = di * c - dr * s;
    ar = 16'(sr); ai = 16'(si);
    br = 16'(pr >>> 15); bi = 16'(pi >>> 15);
  endfunction

  int end_pc;
  int loop_pc;

  initial begin
    ctrl_t c;
    logic signed [15:0] mr [N], mi [N];
    for (int i = 0; i < 1024; i++) prog[i] = nop();

    // ---------------------------------------------------- data (backdoor)
    for (int i = 0; i < N; i++) begin
      fr[i] = 16'($urandom % 16384 - 8192);
      fi[i] = 16'($urandom % 16384 - 8192);
    end
    for (int k = 0; k < K; k++) c8[k] = 8'($urandom);
    for (int m = 0; m < 4*T; m++) x8[m] = 8'($urandom);

    // ------------------------------------------------------- program
    pw = 0;
    c = nop(); c.seq_op = SEQ_JUMP; c.target = 16; emit(c);          // 0
    pw = 4;                                                           // interrupt vector
    emit_imm_reg(9, 16'hABCD);                                        // 4
    c = nop(); c.seq_op = SEQ_RTI; emit(c);                           // 5
    pw = 8;                                                           // subroutine
    c = nop(); c.ra = 5; c.shf_op = SHF_SLL; c.shamt = 3; c.rf_we = 1; c.rw = 6;
    c.rf_wsrc = RW_SHF; emit(c);                                      // r6 = r5 << 3
    c = nop(); c.seq_op = SEQ_RET; emit(c);
    pw = 16;
    // countdown loop: r5 = 6; do r5 = r5 - 1 while r5 != 0
    emit_imm_reg(5, 16'd6);
    loop_pc = pw;
    c = nop(); c.ra = 5; c.alu_op = ALU_SUB; c.alu_b_imm = 1; c.imm = 1; c.rf_we = 1;
    c.rw = 5; c.rf_wsrc = RW_ALU; c.flags_we = 1; emit(c);
    c = nop(); c.seq_op = SEQ_BRANCH; c.cond = CC_NE; c.target = 16'(loop_pc); emit(c);
    emit_imm_reg(5, 16'd5);
    c = nop(); c.seq_op = SEQ_CALL; c.target = 8; emit(c);            // r6 = 5 << 3

    // 8-point DIF FFT, three stages of scaled butterflies
    for (int h = N / 2; h >= 1; h = h / 2)
      for (int p = 0; p < N; p++)
        if ((p % (2 * h)) < h) begin
          int q, tw;
          q = p + h;
          tw = (p % h) * (1024 / (2 * h));
          c = nop(); c.dag_ld = 2'b11; c.imm = 16'(p); emit(c);
          c = nop(); c.dag_ld = 2'b11; c.imm = 16'(q); emit(c);
          c = nop(); c.ld_a = 1; c.a_src = OPS_MEM; c.rom_rd = 1; c.imm = 16'(tw); emit(c);
          c = nop(); c.ld_b = 1; c.b_src = OPS_MEM; emit(c);
          c = nop(); c.bm_op = BM_BFLY; c.bm_scale = 1; c.bm_conj = 1;
          c.dag_ld = 2'b11; c.imm = 16'(p); emit(c);
          c = nop(); c.mem_we = 2'b11; c.mem_wsrc = MW_XX; c.dag_ld = 2'b11; c.imm = 16'(q); emit(c);
          c = nop(); c.mem_we = 2'b11; c.mem_wsrc = MW_YY; emit(c);
        end

    // 8-tap 8-bit real FIR: r1..r4 hold coefficient pairs
    emit_imm_reg(1, {c8[0], c8[1]});
    emit_imm_reg(2, {c8[2], c8[3]});
    emit_imm_reg(3, {c8[4], c8[5]});
    emit_imm_reg(4, {c8[6], c8[7]});
    begin
      int S, base;
      S = 2 * (T + 1);                       // steps, iterations t = -1 .. T-1
      base = pw;
      for (int w = 0; w < S + 3; w++) prog[base + w] = nop();
      for (int s = 0; s < S; s++) begin
        int t, i;
        t = s / 2 - 1; i = s % 2;
        prog[base + s].dag_ld = 2'b11;
        prog[base + s].imm = 16'(FIR_BASE + t - i);
        prog[base + s + 2].ld_a = 1; prog[base + s + 2].a_src = OPS_RF;
        prog[base + s + 2].ra = 4'(1 + 2 * i); prog[base + s + 2].rb = 4'(2 + 2 * i);
        prog[base + s + 2].ld_b = 1; prog[base + s + 2].b_src = OPS_MEM;
        prog[base + s + 3].bm_op = BM_RMAC8; prog[base + s + 3].bm_first = (i == 0);
      end
      pw = base + S + 3;
      c = nop(); c.bm_op = BM_FLUSH; emit(c);
      emit(nop());
      c = nop(); c.rf_we = 1; c.rw = 15; c.rf_wsrc = RW_BM; c.bm_rsel = 3'd4; emit(c);  // r15 = Y low
    end

    // one add-compare-select: p0 = 100, p1 = 90, d0 = 3, d1 = 20
    emit_imm_reg(7, 16'd100); emit_imm_reg(8, 16'd90);
    emit_imm_reg(10, 16'd3);  emit_imm_reg(11, 16'd20);
    c = nop(); c.ld_a = 1; c.a_src = OPS_RF; c.ra = 7; c.rb = 8; emit(c);
    c = nop(); c.ld_b = 1; c.b_src = OPS_RF; c.ra = 10; c.rb = 11; emit(c);
    c = nop(); c.bm_op = BM_ACS; emit(c);
    emit(nop());
    c = nop(); c.rf_we = 1; c.rw = 12; c.rf_wsrc = RW_BM; c.bm_rsel = 3'd2; emit(c);  // survivor

    // NCO: frequency 0x0400 (16 ROM entries per step), three steps
    c = nop(); c.nco_ld_freq = 1; c.imm = 16'h0400; emit(c);
    c = nop(); c.nco_ld_phase = 1; c.imm = 16'h0000; emit(c);
    for (int i = 0; i < 3; i++) begin c = nop(); c.nco_step = 1; emit(c); end
    c = nop(); c.rom_rd = 1; c.rom_from_nco = 1; emit(c);
    emit_imm_reg(13, 16'd16383); emit_imm_reg(14, 16'hC000); emit_imm_reg(0, 16'd0);
    c = nop(); c.ld_a = 1; c.a_src = OPS_RF; c.ra = 13; c.rb = 0; emit(c);
    c = nop(); c.ld_b = 1; c.b_src = OPS_RF; c.ra = 14; c.rb = 0; emit(c);
    c = nop(); c.bm_op = BM_BFLY; emit(c);
    emit(nop());
    end_pc = pw;
    c = nop(); c.seq_op = SEQ_HOLD; emit(c);

    // ------------------------------------------------------------ run
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      dut.u_mem0.mem[i] = fr[i];
      dut.u_mem1.mem[i] = fi[i];
    end
    for (int j = -1; j < T; j++) begin
      int m;
      m = FIR_BASE + j;
      // bank 0 word j = {x(4j+3), x(4j+2)}, bank 1 word j = {x(4j+1), x(4j)}
      dut.u_mem0.mem[m] = (j < 0) ? 16'h0 : {x8[4*j+3], x8[4*j+2]};
      dut.u_mem1.mem[m] = (j < 0) ? 16'h0 : {x8[4*j+1], x8[4*j]};
    end
    dut.u_mem0.mem[FIR_BASE - 2] = 16'h0; dut.u_mem1.mem[FIR_BASE - 2] = 16'h0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // one interrupt during the countdown loop
    wait (iaddr == 16'(loop_pc + 1));
    @(negedge clk); irq = 1;
    @(negedge clk); irq = 0;
    wait (iaddr == 16'(end_pc));
    repeat (3) @(negedge clk);

    // ------------------------------------------------------------ checks
    chk("r5 after loop and call", dut.u_rf.r[5], 5);
    chk("r6 = r5 << 3", dut.u_rf.r[6], 40);
    chk("r9 written by interrupt routine", dut.u_rf.r[9], 16'hABCD);
    chk("interrupts re-enabled", int_en, 1);

    // FFT: bit-exact model and floating-point DFT
    for (int i = 0; i < N; i++) begin mr[i] = fr[i]; mi[i] = fi[i]; end
    for (int h = N / 2; h >= 1; h = h / 2)
      for (int p = 0; p < N; p++)
        if ((p % (2 * h)) < h)
          bfly_model(mr[p], mi[p], mr[p + h], mi[p + h], (p % h) * (1024 / (2 * h)));
    for (int k = 0; k < N; k++) begin
      real er, ei, ang;
      int b;
      b = bitrev3(k);
      chk($sformatf("FFT Re X(%0d) exact", k), $signed(dut.u_mem0.mem[b]), mr[b]);
      chk($sformatf("FFT Im X(%0d) exact", k), $signed(dut.u_mem1.mem[b]), mi[b]);
      er = 0; ei = 0;
      for (int n = 0; n < N; n++) begin
        ang = -6.283185307179586 * k * n / N;
        er += fr[n] * $cos(ang) - fi[n] * $sin(ang);
        ei += fr[n] * $sin(ang) + fi[n] * $cos(ang);
      end
      er = er / N; ei = ei / N;
      checks++;
      if ((real'($signed(dut.u_mem0.mem[b])) - er) > 4.0 || (er - real'($signed(dut.u_mem0.mem[b]))) > 4.0 ||
          (real'($signed(dut.u_mem1.mem[b])) - ei) > 4.0 || (ei - real'($signed(dut.u_mem1.mem[b]))) > 4.0) begin
        failures++;
        $display("FAIL FFT X(%0d) vs DFT: %0d %0d exp %f %f", k, $signed(dut.u_mem0.mem[b]),
                 $signed(dut.u_mem1.mem[b]), er, ei);
      end
    end

    // FIR: first latch is stale, second is the warm-up iteration
    chk("FIR latches", fir_res.size(), T + 2);
    for (int t = 0; t < T && t + 2 < fir_res.size(); t++)
      for (int j = 0; j < 4; j++) begin
        int m;
        longint e;
        logic [23:0] e24;
        m = 4 * t + 3 - j;
        e = 0;
        for (int k = 0; k < K; k++)
          if (m - k >= 0) e += longint'($signed(c8[k])) * longint'($signed(x8[m - k]));
        e24 = 24'(e);
        chk($sformatf("FIR Y(%0d)", m), $signed(fir_res[t + 2][j]), $signed(e24));
      end
    chk("FIR outputs every K/4 cycles", latch_gap_bad, 0);

    // ACS: s0 = 103, s1 = 110 -> survivor 103, decision 0
    chk("ACS survivor", dut.u_rf.r[12], 103);
    chk("ACS queue bit", acs_q[0], 0);

    // NCO phasor: index 48 of 1024, read through a butterfly with D = 32767
    begin
      real ang;
      longint er, ei;
      ang = 6.283185307179586 * 48 / 1024.0;
      er = $rtoi(32767.0 * $cos(ang) * 32767.0 / 32768.0);
      ei = $rtoi(32767.0 * $sin(ang) * 32767.0 / 32768.0);
      checks++;
      if ($signed(yy[31:16]) - er > 2 || er - $signed(yy[31:16]) > 2 ||
          $signed(yy[15:0]) - ei > 2 || ei - $signed(yy[15:0]) > 2) begin
        failures++; $display("FAIL NCO phasor %0d %0d exp %0d %0d", $signed(yy[31:16]), $signed(yy[15:0]), er, ei);
      end
    end
    chk("r15 from MAC result", dut.u_rf.r[15], 16'(fir_res[fir_res.size() - 1][0]));

    $display("mechanisms: call=%0d ret=%0d branch taken=%0d untaken=%0d irq=%0d rti=%0d bfly=%0d X writes=%0d Y writes=%0d rmac8=%0d latches=%0d acs=%0d nco steps=%0d shifts=%0d",
             n_call, n_ret, n_taken, n_untaken, n_irq, n_rti, n_bfly, n_xxw, n_yyw, n_mac8, n_latch, n_acs, n_nco, n_shf);
    if (n_call == 0) failures++;
    if (n_ret == 0) failures++;
    if (n_taken == 0) failures++;
    if (n_untaken == 0) failures++;
    if (n_irq == 0) failures++;
    if (n_rti == 0) failures++;
    if (n_bfly != 13) failures++;   // 12 FFT butterflies and the NCO read
    if (n_xxw == 0 || n_yyw == 0) failures++;
    if (n_mac8 != 2 * (T + 1)) failures++;
    if (n_acs == 0) failures++;
    if (n_nco == 0) failures++;
    if (n_shf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
