// tb_bfly_mac: self-checking test of the butterfly / complex MAC processor.
//
// Single operations (BFLY with and without scaling and conjugation, CADD,
// CMUL, RMUL, ACS with its decision queue) are compared with integer
// arithmetic. The four MAC modes each run a streaming FIR filter, one MAC
// step issued per clock with the operands for the next step loaded in the
// same cycle, following the processing schedules of the four modes:
//   CMAC16  K = 4 complex taps, one output per K cycles
//   RMAC16  K = 6 real taps, two outputs per K/2 cycles
//   CMAC8   K = 4 complex 8-bit taps, two outputs per K/2 cycles
//   RMAC8   K = 8 real 8-bit taps, four outputs per K/4 cycles
// Each output is compared with a direct convolution (24-bit wrap-around for
// the 8-bit modes) and the cycle count of each run is checked against the
// schedule. SQD is checked as a K-dimensional squared distance.
module tb_bfly_mac;
  import dsp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ld_a = 0, ld_b = 0, first = 0, scale = 0, conj_w = 0;
  logic [31:0] a_in = 0, b_in = 0, w = 0, xx, yy, acs_q;
  logic [39:0] yout [4];
  logic yvalid;
  bm_op_e op = BM_NOP;
  int checks = 0, failures = 0;

  bfly_mac dut (.clk(clk), .rst_n(rst_n), .ld_a(ld_a), .a_in(a_in), .ld_b(ld_b), .b_in(b_in),
                .w(w), .op(op), .first(first), .scale(scale), .conj_w(conj_w), .xx(xx),
                .yy(yy), .yout(yout), .yvalid(yvalid), .acs_q(acs_q));
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic chkb(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  function automatic longint s16(logic [15:0] v); return longint'($signed(v)); endfunction
  function automatic longint s40(logic [39:0] v); return longint'($signed(v)); endfunction
  function automatic longint w24(longint v);
    logic [23:0] t;
    t = 24'(v);
    return longint'($signed(t));
  endfunction
  function automatic logic [15:0] q15(longint v); return 16'(v >>> 15); endfunction

  // One operation: load A and B, then execute.
  task automatic single(bm_op_e o, logic [31:0] a, logic [31:0] b, logic [31:0] wv,
                        logic sc, logic cj);
    @(negedge clk);
    ld_a = 1; ld_b = 1; a_in = a; b_in = b; op = BM_NOP;
    @(negedge clk);
    ld_a = 0; ld_b = 0; op = o; first = 1; scale = sc; conj_w = cj; w = wv;
    @(negedge clk);
    op = BM_NOP; first = 0;
  endtask

  // ------------------------------------------------------------ FIR harness
  typedef struct { bm_op_e op; logic first; logic [31:0] a, b; } step_t;
  step_t steps [$];
  logic [39:0] res [$][4];
  int run_cycles;

  // Issue all queued steps back to back, then a flush; collect yout words.
  task automatic stream();
    int n;
    n = steps.size();
    res.delete();
    run_cycles = 0;
    for (int c = 0; c <= n + 2; c++) begin
      @(negedge clk);
      if (yvalid) res.push_back(yout);
      ld_a = c < n; ld_b = c < n;
      if (c < n) begin a_in = steps[c].a; b_in = steps[c].b; end
      if (c >= 1 && c <= n) begin
        op = steps[c-1].op; first = steps[c-1].first; run_cycles++;
      end else if (c == n + 1) begin
        op = BM_FLUSH; first = 0;
      end else begin
        op = BM_NOP; first = 0;
      end
    end
    @(negedge clk);
    if (yvalid) res.push_back(yout);
    op = BM_NOP;
    steps.delete();
    // The first latch of a run returns what the accumulators held before it.
    if (res.size() > 0) void'(res.pop_front());
  endtask

  logic [15:0] c16 [8];      // coefficients
  logic [15:0] x16 [64];     // samples, x(m) = 0 for m < 0
  function automatic logic [15:0] xs(int m); return m < 0 ? 16'h0 : x16[m]; endfunction

  // 8-bit helpers: a 16-bit word {hi, lo}.
  function automatic longint hi8(logic [15:0] v); return longint'($signed(v[15:8])); endfunction
  function automatic longint lo8(logic [15:0] v); return longint'($signed(v[7:0])); endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;

    // ---------------------------------------------------- butterfly family
    for (int t = 0; t < 200; t++) begin
      logic [15:0] ar_, ai_, br_, bi_, wc_, ws_;
      longint dr, di, sr, si, wsx, pr, pi;
      logic sc, cj;
      ar_ = 16'($urandom); ai_ = 16'($urandom); br_ = 16'($urandom); bi_ = 16'($urandom);
      wc_ = 16'($urandom % 65535 - 32767); ws_ = 16'($urandom % 65535 - 32767);
      sc = 1'($urandom); cj = 1'($urandom);
      single(BM_BFLY, {ar_, ai_}, {br_, bi_}, {wc_, ws_}, sc, cj);
      sr = s16(ar_) + s16(br_); si = s16(ai_) + s16(bi_);
      dr = s16(ar_) - s16(br_); di = s16(ai_) - s16(bi_);
      if (sc) begin sr = sr >>> 1; si = si >>> 1; dr = dr >>> 1; di = di >>> 1; end
      dr = s16(16'(dr)); di = s16(16'(di));
      wsx = cj ? -s16(ws_) : s16(ws_);
      pr = dr * s16(wc_) - di * wsx;
      pi = dr * wsx + di * s16(wc_);
      chkb("BFLY X", xx, {16'(sr), 16'(si)});
      chkb("BFLY Y", yy, {q15(pr), q15(pi)});

      single(BM_CADD, {ar_, ai_}, {br_, bi_}, 0, sc, 0);
      chkb("CADD X", xx, {16'(sr), 16'(si)});
      dr = s16(ar_) - s16(br_); di = s16(ai_) - s16(bi_);
      if (sc) begin dr = dr >>> 1; di = di >>> 1; end
      chkb("CADD Y", yy, {16'(dr), 16'(di)});

      single(BM_CMUL, {ar_, ai_}, {br_, bi_}, 0, 0, 0);
      pr = s16(ar_) * s16(br_) - s16(ai_) * s16(bi_);
      pi = s16(ar_) * s16(bi_) + s16(ai_) * s16(br_);
      chkb("CMUL Y", yy, {q15(pr), q15(pi)});

      single(BM_RMUL, {ar_, ai_}, {br_, bi_}, 0, 0, 0);
      chkb("RMUL X", xx, 32'(s16(ar_) * s16(br_)));
      chkb("RMUL Y", yy, 32'(s16(bi_) * s16(ai_)));
    end

    // ------------------------------------------------------------- ACS
    begin
      logic [31:0] qm;
      qm = acs_q;
      for (int t = 0; t < 64; t++) begin
        logic [15:0] p0, p1, d0, d1, m0, m1, diff;
        logic dec;
        p0 = 16'($urandom % 4000); p1 = 16'($urandom % 4000);
        d0 = 16'($urandom % 64);   d1 = 16'($urandom % 64);
        single(BM_ACS, {p0, p1}, {d0, d1}, 0, 0, 0);
        m0 = p0 + d0; m1 = p1 + d1;
        dec = s16(m1) < s16(m0);
        qm = {qm[30:0], dec};
        chkb("ACS X", xx, {m0, m1});
        chkb("ACS Y", yy, {dec ? m1 : m0, 15'b0, dec});
        chkb("ACS queue", acs_q, qm);
      end
    end

    // ------------------------------------------------------------- SQD
    begin
      longint e;
      e = 0;
      for (int i = 0; i < 8; i++) begin
        step_t s;
        logic [15:0] v [4];
        for (int k = 0; k < 4; k++) v[k] = 16'($urandom % 32768 - 16384);
        s.op = BM_SQD; s.first = (i == 0); s.a = {v[0], v[1]}; s.b = {v[2], v[3]};
        e += (s16(v[0]) - s16(v[2])) ** 2 + (s16(v[1]) - s16(v[3])) ** 2;
        steps.push_back(s);
      end
      stream();
      chk("SQD results", longint'(res.size()), 1);
      if (res.size() == 1) chk("SQD", s40(res[0][0]), e);
    end

    for (int i = 0; i < 8; i++) c16[i] = 16'($urandom);
    for (int i = 0; i < 64; i++) x16[i] = 16'($urandom);

    // -------------------------------------------- CMAC16: complex 16x16 FIR
    begin
      localparam int K = 4, NOUT = 12;
      for (int n = 0; n < NOUT; n++)
        for (int k = 0; k < K; k++) begin
          step_t s;
          s.op = BM_CMAC16; s.first = (k == 0);
          s.a = {c16[2*k], c16[2*k+1]};
          s.b = {xs(2*(n-k)), (n - k < 0) ? 16'h0 : x16[2*(n-k)+1]};
          steps.push_back(s);
        end
      stream();
      chk("CMAC16 cycles", run_cycles, NOUT * K);
      chk("CMAC16 results", res.size(), NOUT);
      for (int n = 0; n < NOUT && n < res.size(); n++) begin
        longint er, ei;
        er = 0; ei = 0;
        for (int k = 0; k <= n && k < K; k++) begin
          er += s16(c16[2*k]) * s16(x16[2*(n-k)]) - s16(c16[2*k+1]) * s16(x16[2*(n-k)+1]);
          ei += s16(c16[2*k]) * s16(x16[2*(n-k)+1]) + s16(c16[2*k+1]) * s16(x16[2*(n-k)]);
        end
        chk($sformatf("CMAC16 Re Y(%0d)", n), s40(res[n][0]), er);
        chk($sformatf("CMAC16 Im Y(%0d)", n), s40(res[n][1]), ei);
      end
    end

    // --------------------------------------------- RMAC16: real 16x16 FIR
    begin
      localparam int K = 6, NIT = 12;   // iterations n = -1, 1, 3, ...
      for (int it = 0; it < NIT; it++) begin
        int n;
        n = 2 * it - 1;
        for (int i = 0; i < K / 2; i++) begin
          step_t s;
          s.op = BM_RMAC16; s.first = (i == 0);
          s.a = {c16[2*i], c16[2*i+1]};
          s.b = {xs(n - 2*i), xs(n - 2*i - 1)};
          steps.push_back(s);
        end
      end
      stream();
      chk("RMAC16 cycles", run_cycles, NIT * K / 2);
      chk("RMAC16 results", res.size(), NIT);
      for (int it = 1; it < NIT && it < res.size(); it++) begin
        for (int j = 0; j < 2; j++) begin
          int m;
          longint e;
          m = 2 * it - 1 - j;
          e = 0;
          for (int k = 0; k < K; k++) e += s16(c16[k]) * s16(xs(m - k));
          chk($sformatf("RMAC16 Y(%0d)", m), s40(res[it][j]), e);
        end
      end
    end

    // ------------------------------------------ CMAC8: complex 8x8 FIR
    begin
      localparam int K = 4, NIT = 12;
      for (int it = 0; it < NIT; it++) begin
        int n;
        n = 2 * it - 1;
        for (int i = 0; i < K / 2; i++) begin
          step_t s;
          s.op = BM_CMAC8; s.first = (i == 0);
          s.a = {c16[2*i], c16[2*i+1]};
          s.b = {xs(n - 2*i), xs(n - 2*i - 1)};
          steps.push_back(s);
        end
      end
      stream();
      chk("CMAC8 cycles", run_cycles, NIT * K / 2);
      chk("CMAC8 results", res.size(), NIT);
      for (int it = 1; it < NIT && it < res.size(); it++) begin
        for (int j = 0; j < 2; j++) begin
          int m;
          longint er, ei;
          m = 2 * it - 1 - j;
          er = 0; ei = 0;
          for (int k = 0; k < K; k++) begin
            er += hi8(c16[k]) * hi8(xs(m - k)) - lo8(c16[k]) * lo8(xs(m - k));
            ei += hi8(c16[k]) * lo8(xs(m - k)) + lo8(c16[k]) * hi8(xs(m - k));
          end
          chk($sformatf("CMAC8 Re Y(%0d)", m), s40(res[it][2*j]), w24(er));
          chk($sformatf("CMAC8 Im Y(%0d)", m), s40(res[it][2*j+1]), w24(ei));
        end
      end
    end

    // --------------------------------------------- RMAC8: real 8x8 FIR
    begin
      localparam int K = 8, NIT = 10;   // iterations n = -1, 3, 7, ...
      logic [7:0] c8 [K];
      logic [7:0] x8 [64];
      for (int k = 0; k < K; k++) c8[k] = 8'($urandom);
      for (int m = 0; m < 64; m++) x8[m] = 8'($urandom);
      for (int it = 0; it < NIT; it++) begin
        int n;
        n = 4 * it - 1;
        for (int i = 0; i < K / 4; i++) begin
          step_t s;
          logic [7:0] xv [4];
          for (int q = 0; q < 4; q++) xv[q] = (n - 4*i - q < 0) ? 8'h0 : x8[n - 4*i - q];
          s.op = BM_RMAC8; s.first = (i == 0);
          s.a = {c8[4*i], c8[4*i+1], c8[4*i+2], c8[4*i+3]};
          s.b = {xv[0], xv[1], xv[2], xv[3]};
          steps.push_back(s);
        end
      end
      stream();
      chk("RMAC8 cycles", run_cycles, NIT * K / 4);
      chk("RMAC8 results", res.size(), NIT);
      for (int it = 1; it < NIT && it < res.size(); it++) begin
        for (int j = 0; j < 4; j++) begin
          int m;
          longint e;
          m = 4 * it - 1 - j;
          e = 0;
          for (int k = 0; k < K; k++)
            if (m - k >= 0) e += longint'($signed(c8[k])) * longint'($signed(x8[m - k]));
          chk($sformatf("RMAC8 Y(%0d)", m), s40(res[it][j]), w24(e));
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
