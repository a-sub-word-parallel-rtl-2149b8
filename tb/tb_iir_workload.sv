// tb_iir_workload: recursive (IIR) filter on the complete core at one output
// every K/2 + 1 cycles.
//
// y(i) = [b0 x(i) + b1 x(i-1) + b2 x(i-2) + b3 x(i-3)
//         + a1 y(i-1) + a2 y(i-2) + a3 y(i-3) + a4 y(i-4)] >>> 14,
// K = 8 taps in Q2.14, poles at radius 0.9 and angles 0.3*pi and 0.6*pi.
// RMAC16 adds two real products (AR*BR + AI*BI) to ACCR each cycle, so the
// eight taps take four MAC cycles; the fifth cycle of each output period is
// free. Operand placement: b0..b3 in r0..r3, the last eight outputs in
// r8..r15 (y(j) in r(8 + j mod 8)), the a coefficients as the pairs
// {a3, a4} and {a1, a2} in the I/Q banks, and the input as pairs
// {x(j), x(j-1)} in the banks (word j+4). Per output period, relative to the
// first MAC cycle F:
//   F-1: A <- {b0, b1}, B <- {x(i), x(i-1)}
//   F:   RMAC16 with first (latches y(i-1)); A <- {b2, b3}, B <- {x(i-2), x(i-3)}
//   F+1: RMAC16; y(i-1) >>> 14 written to the register file;
//        A <- {a3, a4}, B <- {y(i-3), y(i-4)}
//   F+2: RMAC16; A <- {a1, a2}, B <- {y(i-1), y(i-2)}
//   F+3: RMAC16
// and the DAG is loaded three cycles ahead of each memory operand. The
// newest output is needed last, which hides the two-cycle path from the
// accumulator back into the register file. The testbench acts as
// instruction decoder. Checked: every latched sum of products bit-exactly
// against an integer model, the output spacing of five cycles, the outputs
// left in the register file, and the deviation from a floating-point run of
// the same filter.
module tb_iir_workload;
  import dsp_pkg::*;
  localparam int N = 1000;          // output samples
  localparam int S = 14;            // coefficient fraction bits
  localparam int CA34 = 1020, CA12 = 1021;
  localparam int B0 = 3;
  localparam int TOTAL = B0 + 5 * N + 4;
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
    repeat (TOTAL + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  longint res [$];
  int res_cyc [$];
  always @(negedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && yvalid) begin
      res.push_back(longint'($signed(yout[0])));
      res_cyc.push_back(cyc);
    end
  end

  ctrl_t prog [TOTAL];
  logic signed [15:0] x [N], y [N], b [4], a [5];
  longint acc [N];

  function automatic int q14(real v);
    return $rtoi(v * 16384.0 + (v >= 0 ? 0.5 : -0.5));
  endfunction

  function automatic logic [3:0] yreg(int j);
    return (j < 0) ? 4'd4 : 4'(8 + j % 8);
  endfunction

  function automatic longint xv(int j);
    return (j < 0) ? 0 : longint'(x[j]);
  endfunction

  function automatic longint yv(int j);
    return (j < 0) ? 0 : longint'(y[j]);
  endfunction

  initial begin
    real r, c1, c2, yf [N], dev, maxdev;
    int maxy;
    // coefficients: denominator (1 - 2r c1 z^-1 + r^2 z^-2)(1 - 2r c2 z^-1 + r^2 z^-2)
    r = 0.9;
    c1 = $cos(0.3 * 3.141592653589793);
    c2 = $cos(0.6 * 3.141592653589793);
    a[1] = 16'(q14(2.0 * r * (c1 + c2)));
    a[2] = 16'(q14(-(2.0 * r * r + 4.0 * r * r * c1 * c2)));
    a[3] = 16'(q14(2.0 * r * r * r * (c1 + c2)));
    a[4] = 16'(q14(-(r * r * r * r)));
    a[0] = '0;
    for (int k = 0; k < 4; k++) b[k] = 16'(q14(0.05));
    // input and integer model
    maxy = 0;
    for (int i = 0; i < N; i++) begin
      x[i] = 16'(int'($urandom % 8001) - 4000);
      acc[i] = 0;
      for (int k = 0; k < 4; k++) acc[i] += longint'(b[k]) * xv(i - k);
      for (int k = 1; k <= 4; k++) acc[i] += longint'(a[k]) * yv(i - k);
      y[i] = 16'(acc[i] >>> S);
      if (y[i] > maxy) maxy = y[i];
      if (-y[i] > maxy) maxy = -y[i];
    end
    // data placement
    for (int w = 0; w < N + 4; w++) begin
      dut.u_mem0.mem[w] = 16'(xv(w - 4));
      dut.u_mem1.mem[w] = 16'(xv(w - 5));
    end
    dut.u_mem0.mem[CA34] = a[3]; dut.u_mem1.mem[CA34] = a[4];
    dut.u_mem0.mem[CA12] = a[1]; dut.u_mem1.mem[CA12] = a[2];
    // control stream
    for (int t = 0; t < TOTAL; t++) prog[t] = '0;
    for (int i = 0; i < N; i++) begin
      int f;
      f = B0 + 5 * i;
      prog[f - 3].dag_ld = 2'b11; prog[f - 3].imm = 16'(i + 4);
      prog[f - 2].dag_ld = 2'b11; prog[f - 2].imm = 16'(i + 2);
      prog[f - 1].dag_ld = 2'b11; prog[f - 1].imm = 16'(CA34);
      prog[f].dag_ld     = 2'b11; prog[f].imm     = 16'(CA12);
      prog[f - 1].ld_a = 1; prog[f - 1].a_src = OPS_RF; prog[f - 1].ra = 4'd0; prog[f - 1].rb = 4'd1;
      prog[f - 1].ld_b = 1; prog[f - 1].b_src = OPS_MEM;
      prog[f].ld_a = 1; prog[f].a_src = OPS_RF; prog[f].ra = 4'd2; prog[f].rb = 4'd3;
      prog[f].ld_b = 1; prog[f].b_src = OPS_MEM;
      prog[f + 1].ld_a = 1; prog[f + 1].a_src = OPS_MEM;
      prog[f + 1].ld_b = 1; prog[f + 1].b_src = OPS_RF; prog[f + 1].ra = yreg(i - 3); prog[f + 1].rb = yreg(i - 4);
      prog[f + 2].ld_a = 1; prog[f + 2].a_src = OPS_MEM;
      prog[f + 2].ld_b = 1; prog[f + 2].b_src = OPS_RF; prog[f + 2].ra = yreg(i - 1); prog[f + 2].rb = yreg(i - 2);
      for (int m = 0; m < 4; m++) prog[f + m].bm_op = BM_RMAC16;
      prog[f].bm_first = 1;
      if (i > 0) begin
        prog[f + 1].rf_we = 1; prog[f + 1].rf_wsrc = RW_BM; prog[f + 1].bm_rsel = 3'd4;
        prog[f + 1].shamt = 4'(S); prog[f + 1].rw = yreg(i - 1);
      end
    end
    prog[B0 + 5 * N].bm_op = BM_FLUSH;
    prog[B0 + 5 * N + 1].rf_we = 1; prog[B0 + 5 * N + 1].rf_wsrc = RW_BM;
    prog[B0 + 5 * N + 1].bm_rsel = 3'd4; prog[B0 + 5 * N + 1].shamt = 4'(S);
    prog[B0 + 5 * N + 1].rw = yreg(N - 1);

    ctrl = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 4; k++) begin
      ctrl = '0; ctrl.rf_we = 1; ctrl.rf_wsrc = RW_IMM; ctrl.rw = 4'(k); ctrl.imm = b[k];
      @(negedge clk);
    end
    for (int t = 0; t < TOTAL; t++) begin
      ctrl = prog[t];
      @(negedge clk);
    end
    ctrl = '0;
    @(negedge clk);

    // the first latch holds the accumulator from before the run
    checks++;
    if (res.size() != N + 1) begin
      failures++;
      $display("FAIL %0d results latched, expected %0d", res.size(), N + 1);
    end else begin
      void'(res.pop_front());
      void'(res_cyc.pop_front());
      for (int i = 0; i < N; i++) begin
        checks++;
        if (res[i] != acc[i]) begin
          failures++;
          if (failures < 6) $display("FAIL sum %0d: %0d exp %0d", i, res[i], acc[i]);
        end
        if (i > 0) begin
          checks++;
          if (res_cyc[i] - res_cyc[i - 1] != 5) begin
            failures++;
            $display("FAIL output %0d came %0d cycles after the previous one", i, res_cyc[i] - res_cyc[i - 1]);
          end
        end
      end
    end
    for (int j = N - 8; j < N; j++) begin
      checks++;
      if ($signed(dut.u_rf.r[yreg(j)]) != y[j]) begin
        failures++;
        $display("FAIL y(%0d) in r%0d: %0d exp %0d", j, yreg(j), $signed(dut.u_rf.r[yreg(j)]), y[j]);
      end
    end
    // floating-point run with the same quantised coefficients
    maxdev = 0.0;
    for (int i = 0; i < N; i++) begin
      yf[i] = 0.0;
      for (int k = 0; k < 4; k++) yf[i] += real'(b[k]) / 16384.0 * real'(xv(i - k));
      for (int k = 1; k <= 4 && k <= i; k++) yf[i] += real'(a[k]) / 16384.0 * yf[i - k];
      dev = yf[i] - real'(y[i]);
      if (dev < 0) dev = -dev;
      if (dev > maxdev) maxdev = dev;
    end
    checks++;
    if (maxdev > 64.0) begin failures++; $display("FAIL deviation from floating point %f", maxdev); end
    $display("%0d outputs, one every 5 cycles; largest |y| %0d, largest deviation from floating point %f",
             N, maxy, maxdev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
