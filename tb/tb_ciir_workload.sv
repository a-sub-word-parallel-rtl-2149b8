// tb_ciir_workload: complex recursive (IIR) filter on the complete core at
// one output every 2K + 1 cycles.
//
// y(i) = [sum_{k=0..3} b_k x(i-k) + sum_{k=1..4} a_k y(i-k)] >>> 14 with
// complex 16-bit samples and complex Q2.14 coefficients (poles at radius 0.7
// on uneven angles, so the feedback coefficients are truly complex). CMAC16
// adds one complex product to ACCR + j ACCI per cycle, so the 2K = 8 taps
// take eight cycles and the ninth is free. Operand placement: b0..b3 as
// (re, im) register pairs r0..r7; the last four outputs as pairs in r8..r15
// (y(j) in r(8 + 2(j mod 4)), r(9 + 2(j mod 4))); x(j) as an I/Q word in the
// two banks (word j+4); a1..a4 as I/Q words. Relative to the first MAC
// cycle F of output i:
//   F-1 .. F+2: A <- b_k (registers), B <- x(i-k) (banks), k = 0..3
//   F   .. F+7: CMAC16, first on F (latches y(i-1) into yout)
//   F+1, F+2:   Re and Im of y(i-1) >>> 14 written to the register file
//   F+3 .. F+6: A <- a_k (banks), B <- y(i-k) (registers), k = 4..1
// with the DAG loaded two cycles ahead of each memory operand. The
// testbench acts as instruction decoder and checks every latched complex
// sum bit-exactly against an integer model, the spacing of nine cycles, the
// outputs left in the register file, and the deviation from a floating-point
// run with the same coefficients.
module tb_ciir_workload;
  import dsp_pkg::*;
  localparam int N = 600;           // output samples
  localparam int S = 14;
  localparam int CA = 1000;         // a_k at word CA + k
  localparam int P = 9;             // cycles per output
  localparam int B0 = 3;
  localparam int TOTAL = B0 + P * N + 4;
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
  longint res_re [$], res_im [$];
  int res_cyc [$];
  always @(negedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && yvalid) begin
      res_re.push_back(longint'($signed(yout[0])));
      res_im.push_back(longint'($signed(yout[1])));
      res_cyc.push_back(cyc);
    end
  end

  ctrl_t prog [TOTAL];
  logic signed [15:0] xr [N], xi [N], yr [N], yi [N];
  logic signed [15:0] br [4], bi [4], ar [5], ai [5];
  longint accr [N], acci [N];

  function automatic int q14(real v);
    return $rtoi(v * 16384.0 + (v >= 0 ? 0.5 : -0.5));
  endfunction

  function automatic logic [3:0] yreg(int j, int part);
    // y(-k) shares the slot of y(4-k), still zero from reset when read
    return 4'(8 + 2 * (((j % 4) + 4) % 4) + part);
  endfunction

  function automatic longint xrv(int j); return (j < 0) ? 0 : longint'(xr[j]); endfunction
  function automatic longint xiv(int j); return (j < 0) ? 0 : longint'(xi[j]); endfunction
  function automatic longint yrv(int j); return (j < 0) ? 0 : longint'(yr[j]); endfunction
  function automatic longint yiv(int j); return (j < 0) ? 0 : longint'(yi[j]); endfunction

  initial begin
    real dre [5], dim [5], nre [5], nim [5], pr, pi, th [4];
    real fr [N], fi [N], dev, maxdev;
    int maxy;
    // denominator prod (1 - p_m z^-1), p_m = 0.7 exp(j th_m); a_k = -d_k
    th[0] = 0.15 * 3.141592653589793; th[1] = 0.8 * 3.141592653589793;
    th[2] = -0.45 * 3.141592653589793; th[3] = 1.3 * 3.141592653589793;
    dre = '{1.0, 0.0, 0.0, 0.0, 0.0};
    dim = '{0.0, 0.0, 0.0, 0.0, 0.0};
    for (int m = 0; m < 4; m++) begin
      pr = 0.7 * $cos(th[m]);
      pi = 0.7 * $sin(th[m]);
      nre = dre; nim = dim;
      for (int k = 1; k <= 4; k++) begin
        nre[k] = dre[k] - (pr * dre[k - 1] - pi * dim[k - 1]);
        nim[k] = dim[k] - (pr * dim[k - 1] + pi * dre[k - 1]);
      end
      dre = nre; dim = nim;
    end
    ar[0] = '0; ai[0] = '0;
    for (int k = 1; k <= 4; k++) begin
      ar[k] = 16'(q14(-dre[k]));
      ai[k] = 16'(q14(-dim[k]));
      checks++;
      if (dre[k] > 1.99 || dre[k] < -1.99 || dim[k] > 1.99 || dim[k] < -1.99) begin
        failures++;
        $display("FAIL coefficient a%0d out of the Q2.14 range", k);
      end
    end
    br[0] = 16'(q14(0.20)); bi[0] = 16'(q14(0.05));
    br[1] = 16'(q14(0.10)); bi[1] = 16'(q14(-0.10));
    br[2] = 16'(q14(-0.05)); bi[2] = 16'(q14(0.15));
    br[3] = 16'(q14(0.08)); bi[3] = 16'(q14(0.02));
    // input and integer model
    maxy = 0;
    for (int i = 0; i < N; i++) begin
      xr[i] = 16'(int'($urandom % 8001) - 4000);
      xi[i] = 16'(int'($urandom % 8001) - 4000);
      accr[i] = 0; acci[i] = 0;
      for (int k = 0; k < 4; k++) begin
        accr[i] += longint'(br[k]) * xrv(i - k) - longint'(bi[k]) * xiv(i - k);
        acci[i] += longint'(br[k]) * xiv(i - k) + longint'(bi[k]) * xrv(i - k);
      end
      for (int k = 1; k <= 4; k++) begin
        accr[i] += longint'(ar[k]) * yrv(i - k) - longint'(ai[k]) * yiv(i - k);
        acci[i] += longint'(ar[k]) * yiv(i - k) + longint'(ai[k]) * yrv(i - k);
      end
      yr[i] = 16'(accr[i] >>> S);
      yi[i] = 16'(acci[i] >>> S);
      if (yr[i] > maxy) maxy = yr[i];
      if (-yr[i] > maxy) maxy = -yr[i];
    end
    for (int w = 0; w < N + 4; w++) begin
      dut.u_mem0.mem[w] = 16'(xrv(w - 4));
      dut.u_mem1.mem[w] = 16'(xiv(w - 4));
    end
    for (int k = 1; k <= 4; k++) begin
      dut.u_mem0.mem[CA + k] = ar[k];
      dut.u_mem1.mem[CA + k] = ai[k];
    end
    // control stream
    for (int t = 0; t < TOTAL; t++) prog[t] = '0;
    for (int i = 0; i < N; i++) begin
      int f;
      f = B0 + P * i;
      for (int k = 0; k < 4; k++) begin
        // feed-forward tap k: load at f-1+k
        prog[f - 3 + k].dag_ld = 2'b11; prog[f - 3 + k].imm = 16'(i - k + 4);
        prog[f - 1 + k].ld_a = 1; prog[f - 1 + k].a_src = OPS_RF;
        prog[f - 1 + k].ra = 4'(2 * k); prog[f - 1 + k].rb = 4'(2 * k + 1);
        prog[f - 1 + k].ld_b = 1; prog[f - 1 + k].b_src = OPS_MEM;
      end
      for (int m = 0; m < 4; m++) begin
        // feedback tap k = 4 - m: load at f+3+m
        int k;
        k = 4 - m;
        prog[f + 1 + m].dag_ld = 2'b11; prog[f + 1 + m].imm = 16'(CA + k);
        prog[f + 3 + m].ld_a = 1; prog[f + 3 + m].a_src = OPS_MEM;
        prog[f + 3 + m].ld_b = 1; prog[f + 3 + m].b_src = OPS_RF;
        prog[f + 3 + m].ra = yreg(i - k, 0); prog[f + 3 + m].rb = yreg(i - k, 1);
      end
      for (int m = 0; m < 8; m++) prog[f + m].bm_op = BM_CMAC16;
      prog[f].bm_first = 1;
      if (i > 0) begin
        prog[f + 1].rf_we = 1; prog[f + 1].rf_wsrc = RW_BM; prog[f + 1].bm_rsel = 3'd4;
        prog[f + 1].shamt = 4'(S); prog[f + 1].rw = yreg(i - 1, 0);
        prog[f + 2].rf_we = 1; prog[f + 2].rf_wsrc = RW_BM; prog[f + 2].bm_rsel = 3'd5;
        prog[f + 2].shamt = 4'(S); prog[f + 2].rw = yreg(i - 1, 1);
      end
    end
    prog[B0 + P * N].bm_op = BM_FLUSH;
    prog[B0 + P * N + 1].rf_we = 1; prog[B0 + P * N + 1].rf_wsrc = RW_BM;
    prog[B0 + P * N + 1].bm_rsel = 3'd4; prog[B0 + P * N + 1].shamt = 4'(S);
    prog[B0 + P * N + 1].rw = yreg(N - 1, 0);
    prog[B0 + P * N + 2].rf_we = 1; prog[B0 + P * N + 2].rf_wsrc = RW_BM;
    prog[B0 + P * N + 2].bm_rsel = 3'd5; prog[B0 + P * N + 2].shamt = 4'(S);
    prog[B0 + P * N + 2].rw = yreg(N - 1, 1);

    ctrl = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 8; k++) begin
      ctrl = '0; ctrl.rf_we = 1; ctrl.rf_wsrc = RW_IMM; ctrl.rw = 4'(k);
      ctrl.imm = (k % 2) ? bi[k / 2] : br[k / 2];
      @(negedge clk);
    end
    for (int t = 0; t < TOTAL; t++) begin
      ctrl = prog[t];
      @(negedge clk);
    end
    ctrl = '0;
    @(negedge clk);

    // the first latch holds the accumulators from before the run
    checks++;
    if (res_re.size() != N + 1) begin
      failures++;
      $display("FAIL %0d results latched, expected %0d", res_re.size(), N + 1);
    end else begin
      void'(res_re.pop_front());
      void'(res_im.pop_front());
      void'(res_cyc.pop_front());
      for (int i = 0; i < N; i++) begin
        checks++;
        if (res_re[i] != accr[i] || res_im[i] != acci[i]) begin
          failures++;
          if (failures < 6)
            $display("FAIL sum %0d: %0d %0d exp %0d %0d", i, res_re[i], res_im[i], accr[i], acci[i]);
        end
        if (i > 0) begin
          checks++;
          if (res_cyc[i] - res_cyc[i - 1] != P) begin
            failures++;
            $display("FAIL output %0d came %0d cycles after the previous one", i, res_cyc[i] - res_cyc[i - 1]);
          end
        end
      end
    end
    for (int j = N - 4; j < N; j++) begin
      checks++;
      if ($signed(dut.u_rf.r[yreg(j, 0)]) != yr[j] || $signed(dut.u_rf.r[yreg(j, 1)]) != yi[j]) begin
        failures++;
        $display("FAIL y(%0d) in the register file", j);
      end
    end
    // floating-point run with the same quantised coefficients
    maxdev = 0.0;
    for (int i = 0; i < N; i++) begin
      fr[i] = 0.0; fi[i] = 0.0;
      for (int k = 0; k < 4; k++) begin
        fr[i] += (real'(br[k]) * real'(xrv(i - k)) - real'(bi[k]) * real'(xiv(i - k))) / 16384.0;
        fi[i] += (real'(br[k]) * real'(xiv(i - k)) + real'(bi[k]) * real'(xrv(i - k))) / 16384.0;
      end
      for (int k = 1; k <= 4 && k <= i; k++) begin
        fr[i] += (real'(ar[k]) * fr[i - k] - real'(ai[k]) * fi[i - k]) / 16384.0;
        fi[i] += (real'(ar[k]) * fi[i - k] + real'(ai[k]) * fr[i - k]) / 16384.0;
      end
      dev = fr[i] - real'(yr[i]); if (dev < 0) dev = -dev; if (dev > maxdev) maxdev = dev;
      dev = fi[i] - real'(yi[i]); if (dev < 0) dev = -dev; if (dev > maxdev) maxdev = dev;
    end
    checks++;
    if (maxdev > 64.0) begin failures++; $display("FAIL deviation from floating point %f", maxdev); end
    $display("%0d complex outputs, one every %0d cycles; largest |Re y| %0d, largest deviation from floating point %f",
             N, P, maxy, maxdev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
