// tb_fir_workloads: the single-precision FIR cases of the cycle-count table
// run on the complete core at its default sizes.
//
// The testbench acts as instruction decoder and streams one control word per
// cycle. Coefficients and samples both come from the two data banks, so each
// MAC step takes two cycles: one bus transfer loads A (coefficients), the next
// loads B (samples), and the MAC operation of the previous step runs
// alongside. Layouts (j = word address):
//   8x8 complex: bank 0 word j = x(2j+1), bank 1 word j = x(2j), each
//                {re, im}; coefficient word 512+i = {C(2i) | C(2i+1)}.
//   8x8 real:    bank 0 word j = {x(4j+3), x(4j+2)}, bank 1 word j =
//                {x(4j+1), x(4j)}; coefficient word 512+i =
//                {C(4i) C(4i+1) | C(4i+2) C(4i+3)}.
// Words below address 0 (wrapping to the top of the bank) are zero, so
// x(m) = 0 for m < 0. One warm-up iteration clears the carried partial sums.
// Cases: complex 4 taps x 8 samples, real 8 taps x 16 samples and real
// 256 taps x 2048 samples. Every output is compared with a direct
// convolution (24-bit wrap-around); the cycles spent are printed next to the
// ideal count of two cycles per MAC step.
module tb_fir_workloads;
  import dsp_pkg::*;
  logic clk = 0, rst_n = 0;
  ctrl_t ctrl;
  logic [15:0] iaddr, rd0, rd1;
  logic [3:0] flags;
  logic [31:0] xx, yy, acs_q;
  logic [39:0] yout [4];
  logic yvalid, irq_ack, int_en;
  int checks = 0, failures = 0;
  int n_cases = 0;

  dsp_top dut (.clk(clk), .rst_n(rst_n), .ctrl(ctrl), .irq(1'b0), .iaddr(iaddr),
               .flags(flags), .xx(xx), .yy(yy), .yout(yout), .yvalid(yvalid),
               .acs_q(acs_q), .rd0(rd0), .rd1(rd1), .irq_ack(irq_ack), .int_en(int_en));
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [39:0] res [$][4];
  int res_cyc [$];
  int tcyc = 0;
  always @(posedge clk) begin
    tcyc++;
    if (rst_n && yvalid) begin res.push_back(yout); res_cyc.push_back(tcyc); end
  end

  localparam int COEF_BASE = 512;
  logic [7:0] cr [256], ci [256], xr [2048], xi [2048];   // real cases use cr/xr

  function automatic longint sb(logic [7:0] v); return longint'($signed(v)); endfunction
  function automatic logic [7:0] xrv(int m); return (m < 0 || m > 2047) ? 8'h0 : xr[m]; endfunction
  function automatic logic [7:0] xiv(int m); return (m < 0 || m > 2047) ? 8'h0 : xi[m]; endfunction
  function automatic longint w24(longint v);
    logic [23:0] t;
    t = 24'(v);
    return longint'($signed(t));
  endfunction

  task automatic run_fir(bit cplx, int K, int NS);
    int spi, opi, nit, nsteps, cyc;
    ctrl_t c;
    spi = cplx ? K / 2 : K / 4;              // MAC steps per iteration
    opi = cplx ? 2 : 4;                      // outputs per iteration
    nit = NS / opi + 1;                      // plus one warm-up iteration
    nsteps = nit * spi;
    for (int k = 0; k < K; k++) begin cr[k] = 8'($urandom); ci[k] = 8'($urandom); end
    for (int m = 0; m < NS; m++) begin xr[m] = 8'($urandom); xi[m] = 8'($urandom); end
    // memory image (backdoor load, as a loader would)
    for (int j = -K; j < (cplx ? NS / 2 : NS / 4); j++) begin
      logic [15:0] w0, w1;
      if (cplx) begin
        w0 = {xrv(2*j+1), xiv(2*j+1)}; w1 = {xrv(2*j), xiv(2*j)};
      end else begin
        w0 = {xrv(4*j+3), xrv(4*j+2)}; w1 = {xrv(4*j+1), xrv(4*j)};
      end
      dut.u_mem0.mem[10'(j)] = w0;
      dut.u_mem1.mem[10'(j)] = w1;
    end
    for (int i = 0; i < spi; i++) begin
      if (cplx) begin
        dut.u_mem0.mem[COEF_BASE + i] = {cr[2*i], ci[2*i]};
        dut.u_mem1.mem[COEF_BASE + i] = {cr[2*i+1], ci[2*i+1]};
      end else begin
        dut.u_mem0.mem[COEF_BASE + i] = {cr[4*i], cr[4*i+1]};
        dut.u_mem1.mem[COEF_BASE + i] = {cr[4*i+2], cr[4*i+3]};
      end
    end
    res.delete();
    res_cyc.delete();
    cyc = 0;
    // stream: step s uses cycles 2s (coef address), 2s+1 (sample address),
    // 2s+2 (load A), 2s+3 (load B), 2s+4 (MAC)
    for (int cc = 0; cc < 2 * nsteps + 6; cc++) begin
      int s;
      c = '0;
      if (cc < 2 * nsteps) begin
        s = cc / 2;
        c.dag_ld = 2'b11;
        if (cc % 2 == 0) c.imm = 16'(COEF_BASE + s % spi);
        else c.imm = 16'(10'((s / spi - 1) - s % spi));
      end
      if (cc >= 2 && cc < 2 * nsteps + 2) begin
        if (cc % 2 == 0) begin c.ld_a = 1; c.a_src = OPS_MEM; end
        else begin c.ld_b = 1; c.b_src = OPS_MEM; end
      end
      if (cc >= 4 && cc % 2 == 0 && (cc - 4) / 2 < nsteps) begin
        s = (cc - 4) / 2;
        c.bm_op = cplx ? BM_CMAC8 : BM_RMAC8;
        c.bm_first = (s % spi) == 0;
        cyc = cc + 1 - 4;
      end
      if (cc == 2 * nsteps + 4) c.bm_op = BM_FLUSH;
      ctrl = c;
      @(negedge clk);
    end
    ctrl = '0;
    repeat (2) @(negedge clk);
    $display("%s FIR %0d taps x %0d samples: %0d MAC steps in %0d cycles (ideal %0d)",
             cplx ? "complex 8x8" : "real 8x8", K, NS, nsteps, cyc, 2 * nsteps - 1);
    // one iteration (spi MAC steps of two cycles) between result latches
    for (int r = 1; r + 1 < res_cyc.size(); r++) begin
      checks++;
      if (res_cyc[r] - res_cyc[r-1] != 2 * spi) begin
        failures++; $display("FAIL latch spacing %0d exp %0d", res_cyc[r] - res_cyc[r-1], 2 * spi);
      end
    end
    checks++;
    if (res.size() != nit + 1) begin failures++; $display("FAIL results %0d exp %0d", res.size(), nit + 1); end
    // res[0] is stale, res[1] the warm-up, res[t+2] iteration t
    for (int t = 0; t + 2 < res.size() && t < nit - 1; t++)
      for (int j = 0; j < (cplx ? 2 : 4); j++) begin
        int m;
        longint er, ei;
        m = cplx ? 2 * t + 1 - j : 4 * t + 3 - j;
        er = 0; ei = 0;
        for (int k = 0; k < K && k <= m; k++)
          if (cplx) begin
            er += sb(cr[k]) * sb(xr[m-k]) - sb(ci[k]) * sb(xi[m-k]);
            ei += sb(cr[k]) * sb(xi[m-k]) + sb(ci[k]) * sb(xr[m-k]);
          end else begin
            er += sb(cr[k]) * sb(xr[m-k]);
          end
        checks++;
        if (cplx) begin
          if ($signed(res[t+2][2*j]) != w24(er) || $signed(res[t+2][2*j+1]) != w24(ei)) begin
            failures++; $display("FAIL Y(%0d): %0d %0d exp %0d %0d", m, $signed(res[t+2][2*j]),
                                 $signed(res[t+2][2*j+1]), w24(er), w24(ei));
          end
        end else if ($signed(res[t+2][j]) != w24(er)) begin
          failures++; $display("FAIL Y(%0d): %0d exp %0d", m, $signed(res[t+2][j]), w24(er));
        end
      end
    n_cases++;
  endtask

  initial begin
    ctrl = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_fir(1'b1, 4, 8);
    run_fir(1'b0, 8, 16);
    run_fir(1'b0, 256, 2048);
    checks++;
    if (n_cases != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
