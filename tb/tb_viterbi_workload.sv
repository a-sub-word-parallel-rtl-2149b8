// tb_viterbi_workload: Viterbi decoding on the complete core, one
// add-compare-select per cycle.
//
// Code: rate 1/2, constraint length 4 (8 states), generators 15 and 17
// (octal). State s = {b(t-1), b(t-2), b(t-3)}; the new state after input u
// is ns = {u, s[2:1]} and its two predecessors are {ns[1:0], x}, x = 0, 1.
// A random message with a three-bit zero tail is encoded, sent as +-7 with
// noise, and every 17th symbol is hit by a sign flip.
//
// The testbench acts as instruction decoder. Branch metrics (sum of absolute
// soft distances) are placed in the I/Q banks: word 8t+ns of bank 0 holds
// the metric of the x = 0 branch into state ns at step t, bank 1 that of the
// x = 1 branch. Path metrics live in the register file, r0..r7 and r8..r15
// in turn (read one half, write the other). The control stream is a
// four-deep software pipeline, so the core completes one state per cycle:
//   cycle c:   DAG post-increments, memory reads branch metrics of ACS c-1
//   cycle c:   A <- {r[p0], r[p1]}, B <- {bank0, bank1} for ACS c-2
//   cycle c:   ACS for state c-3 (decision bit pushed into the queue)
//   cycle c:   survivor metric of ACS c-4 written back to the register file
// The 32-bit decision queue is read after every four trellis steps and the
// survivor path is traced back from state 0. Checked: every decision bit and
// the final path metrics against a model, the decoded message against the
// sent one, and the cycle count (eight cycles per trellis step, first to last ACS).
module tb_viterbi_workload;
  import dsp_pkg::*;
  localparam int T = 128;           // trellis steps (8*T words fill a bank)
  localparam int NACS = 8 * T;
  logic clk = 0, rst_n = 0;
  ctrl_t ctrl;
  logic [15:0] iaddr, rd0, rd1;
  logic [3:0] flags;
  logic [31:0] xx, yy, acs_q;
  logic [39:0] yout [4];
  logic yvalid, irq_ack, int_en;
  int checks = 0, failures = 0;

  dsp_top dut (.clk(clk), .rst_n(rst_n), .ctrl(ctrl), .irq(1'b0), .iaddr(iaddr),
               .flags(flags), .xx(xx), .yy(yy), .yout(yout), .yvalid(yvalid),
               .acs_q(acs_q), .rd0(rd0), .rd1(rd1), .irq_ack(irq_ack), .int_en(int_en));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic msg [T];
  int r0s [T], r1s [T];
  int bm0 [NACS], bm1 [NACS];
  logic dec_model [NACS], dec_hw [NACS];
  int pm [8], pm_n [8];
  int n_acs = 0, cyc = 0, first_acs = -1, last_acs = -1;
  logic [31:0] qsnap [NACS / 32];

  function automatic int absv(int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic int bmetric(int r0, int r1, logic c0, logic c1);
    return absv(r0 - (c0 ? -7 : 7)) + absv(r1 - (c1 ? -7 : 7));
  endfunction

  // capture the decision queue after every 32nd ACS
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && ctrl.bm_op == BM_ACS) begin
      if (first_acs < 0) first_acs <= cyc;
      last_acs <= cyc;
      n_acs <= n_acs + 1;
      if ((n_acs + 1) % 32 == 0) begin
        #1 qsnap[(n_acs + 1) / 32 - 1] = acs_q;
      end
    end
  end

  task automatic word(ctrl_t c);
    ctrl = c;
    @(negedge clk);
  endtask

  initial begin
    ctrl_t c;
    logic [2:0] st;
    int cycles, errs, pos;
    ctrl = '0;
    // message, encoder and channel
    st = 3'd0;
    for (int t = 0; t < T; t++) begin
      logic u, c0, c1;
      u = (t >= T - 3) ? 1'b0 : 1'($urandom);
      msg[t] = u;
      c0 = u ^ st[2] ^ st[0];
      c1 = u ^ st[2] ^ st[1] ^ st[0];
      r0s[t] = (c0 ? -7 : 7) + int'($urandom % 7) - 3;
      r1s[t] = (c1 ? -7 : 7) + int'($urandom % 7) - 3;
      if (t % 17 == 5) r0s[t] = -r0s[t];
      st = {u, st[2:1]};
    end
    // branch metrics and the decision model
    pm[0] = 0;
    for (int s = 1; s < 8; s++) pm[s] = 1000;
    for (int t = 0; t < T; t++) begin
      for (int ns = 0; ns < 8; ns++) begin
        logic [2:0] n3;
        logic c0, c1;
        int s0, s1;
        n3 = 3'(ns);
        c0 = n3[2] ^ n3[1];
        c1 = n3[2] ^ n3[1] ^ n3[0];
        bm0[8 * t + ns] = bmetric(r0s[t], r1s[t], c0, c1);
        bm1[8 * t + ns] = bmetric(r0s[t], r1s[t], ~c0, ~c1);
        s0 = pm[2 * (ns % 4)] + bm0[8 * t + ns];
        s1 = pm[2 * (ns % 4) + 1] + bm1[8 * t + ns];
        dec_model[8 * t + ns] = s1 < s0;
        pm_n[ns] = (s1 < s0) ? s1 : s0;
      end
      pm = pm_n;
    end
    for (int i = 0; i < NACS; i++) begin
      dut.u_mem0.mem[i] = 16'(bm0[i]);
      dut.u_mem1.mem[i] = 16'(bm1[i]);
    end

    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // initial path metrics: state 0 known
    for (int s = 0; s < 8; s++) begin
      c = '0; c.rf_we = 1; c.rf_wsrc = RW_IMM; c.rw = 4'(s); c.imm = (s == 0) ? 16'd0 : 16'd1000;
      word(c);
    end
    for (int cy = 0; cy < NACS + 4; cy++) begin
      int i;
      c = '0;
      if (cy == 0) begin c.dag_ld = 2'b11; c.imm = 16'd0; end
      if (cy >= 1 && cy <= NACS) c.dag_inc = 2'b11;
      i = cy - 2;
      if (i >= 0 && i < NACS) begin
        c.ld_a = 1; c.a_src = OPS_RF; c.ld_b = 1; c.b_src = OPS_MEM;
        c.ra = 4'(((i / 8) % 2 ? 8 : 0) + 2 * ((i % 8) % 4));
        c.rb = 4'(((i / 8) % 2 ? 8 : 0) + 2 * ((i % 8) % 4) + 1);
      end
      i = cy - 3;
      if (i >= 0 && i < NACS) c.bm_op = BM_ACS;
      i = cy - 4;
      if (i >= 0 && i < NACS) begin
        c.rf_we = 1; c.rf_wsrc = RW_BM; c.bm_rsel = 3'd2;
        c.rw = 4'(((i / 8) % 2 ? 0 : 8) + (i % 8));
      end
      word(c);
    end
    word('0);
    cycles = last_acs - first_acs + 1;
    $display("%0d trellis steps of 8 states: ACS issued over %0d cycles", T, cycles);
    checks++;
    if (cycles != NACS) begin
      failures++;
      $display("FAIL ACS span %0d cycles, expected %0d", cycles, NACS);
    end
    checks++;
    if (n_acs != NACS) begin failures++; $display("FAIL %0d ACS issued", n_acs); end

    // decision bits from the queue snapshots (newest at bit 0)
    errs = 0;
    for (int i = 0; i < NACS; i++) begin
      dec_hw[i] = qsnap[i / 32][31 - (i % 32)];
      checks++;
      if (dec_hw[i] != dec_model[i]) begin
        failures++;
        if (errs++ < 5) $display("FAIL decision %0d: %0b exp %0b", i, dec_hw[i], dec_model[i]);
      end
    end
    // final path metrics (T even: the last step wrote r0..r7)
    for (int s = 0; s < 8; s++) begin
      checks++;
      if (dut.u_rf.r[(T % 2 ? 8 : 0) + s] != 16'(pm[s])) begin
        failures++;
        $display("FAIL path metric %0d: %0d exp %0d", s, dut.u_rf.r[(T % 2 ? 8 : 0) + s], pm[s]);
      end
    end
    // traceback from state 0 using the hardware decisions
    st = 3'd0;
    errs = 0;
    for (int t = T - 1; t >= 0; t--) begin
      logic u;
      u = st[2];
      if (u != msg[t]) errs++;
      pos = 8 * t + int'(st);
      st = {st[1:0], dec_hw[pos]};
    end
    checks++;
    if (errs != 0) begin failures++; $display("FAIL %0d decoded bit errors", errs); end
    $display("decoded %0d bits, %0d errors, final metric of state 0 = %0d", T, errs, pm[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
