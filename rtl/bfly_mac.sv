// bfly_mac: reconfigurable butterfly / sub-word parallel complex MAC processor.
//
// One unit serves FFT butterflies, Viterbi add-compare-select, squared
// distances, plain complex/real arithmetic and four MAC modes. Operands come
// from the A = {AR, AI} and B = {BR, BI} registers (16 bits each, loaded with
// ld_a/ld_b) and from the twiddle input w = {cos, sin}. A complex adder forms
// A+B, a complex subtractor A-B, and four sub-word multipliers (subword_mult)
// form m0 = xr*yr, m1 = xi*yi, m2 = xr*yi, m3 = xi*yr, each either one 16x16
// product or four 8x8 products. Operations (dsp_pkg::bm_op_e):
//   BFLY    X = A+B, Y = (A-B)*W (Q1.15), W = cos + j sin, or its conjugate
//           when conj_w; with scale the sum and difference are halved first.
//   CADD    X = A+B, Y = A-B (halved with scale).
//   CMUL    Y = A*B (Q1.15 complex product).
//   RMUL    X = AR*BR, Y = AI*BI (full 32-bit products).
//   ACS     AR, AI = path metrics p0, p1; BR, BI = branch metrics d0, d1.
//           s0 = p0+d0, s1 = p1+d1, decision = sign(s1-s0) (1: s1 is the
//           smaller metric and survives). X = {s0, s1}, Y = {survivor,
//           15'b0, decision}; the decision is pushed into the ACS queue.
//   SQD     ACCR += (AR-BR)^2 + (AI-BI)^2.
//   CMAC16  ACCR + j ACCI += A*B (one 16x16 complex MAC).
//   RMAC16  four 16x16 real MACs, FIR schedule: A = {C(k), C(k+1)},
//           B = {X(n-k), X(n-k-1)}; ACCR collects Y(n), ACC-AUX Y(n-1),
//           ACCI half of Y(n+1).
//   CMAC8   four 8x8 complex MACs: each 16-bit word is {re, im} of 8 bits;
//           A = {C(k), C(k+1)}, B = {X(n-k), X(n-k-1)}; acc0 + acc1 = Y(n),
//           acc2 = Y(n-1), acc3 collects half of Y(n+1).
//   RMAC8   sixteen 8x8 real MACs: A = {C(k) C(k+1), C(k+2) C(k+3)},
//           B = {X(n-k) X(n-k-1), X(n-k-2) X(n-k-3)}; one iteration gives
//           Y(n)..Y(n-3) and starts Y(n+1)..Y(n+3).
//   FLUSH   latch the results of the iteration in progress.
// A MAC operation with first = 1 starts a new iteration: the finished
// results are latched into yout (yvalid pulses), the output accumulators are
// restarted and the partial sums of the coming outputs are moved into them in
// the same cycle, so the multipliers never idle between iterations. A MAC
// operation whose mode differs from the running one must carry first; an
// assertion reports a mode switch without it.
// yout holds, per mode: CMAC16 {ACCR, ACCI}; RMAC16 {Y(n), Y(n-1)}; SQD
// {ACCR}; CMAC8 {Re Y(n), Im Y(n), Re Y(n-1), Im Y(n-1)}; RMAC8
// {Y(n), Y(n-1), Y(n-2), Y(n-3)}, sign-extended to ACC_W.
// Timing: every operation takes one cycle and reads the A/B values held at
// the start of that cycle; X, Y, the accumulators and yout update at the
// clock edge that ends it, so one butterfly or one full MAC step is issued
// per cycle.
// From the document: the operand pairing of the four multipliers, the
// accumulator moves of each FIR schedule, the 40-bit double-precision and
// 24-bit single-precision accumulator widths, ACS via the subtractor sign bit
// and its 32-bit queue. This design's choices: the operation encoding, Q1.15
// scaling of twiddle products with truncation, two's-complement wrap-around
// (no saturation) in all accumulators, the decision-bit polarity and the
// result latch (yout).
module bfly_mac
  import dsp_pkg::*;
#(
  parameter int ACC_W  = 40,
  parameter int SACC_W = 24,
  parameter int QDEPTH = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ld_a,
  input  logic [31:0]       a_in,
  input  logic              ld_b,
  input  logic [31:0]       b_in,
  input  logic [31:0]       w,
  input  bm_op_e            op,
  input  logic              first,
  input  logic              scale,
  input  logic              conj_w,
  output logic [31:0]       xx,
  output logic [31:0]       yy,
  output logic [ACC_W-1:0]  yout [4],
  output logic              yvalid,
  output logic [QDEPTH-1:0] acs_q
);
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic signed [SACC_W-1:0] sacc_t;

  logic signed [15:0] ar, ai, br, bi;
  logic signed [15:0] wc, ws;

  // ---------------------------------------------------------------- operands
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {ar, ai} <= '0;
      {br, bi} <= '0;
    end else begin
      if (ld_a) {ar, ai} <= a_in;
      if (ld_b) {br, bi} <= b_in;
    end
  end
  assign {wc, ws} = w;

  // ------------------------------------------------ complex adder/subtractor
  logic signed [16:0] sum_r, sum_i, dif_r, dif_i;
  logic signed [15:0] xs_r, xs_i, ds_r, ds_i;

  always_comb begin
    sum_r = 17'(ar) + 17'(br);
    sum_i = 17'(ai) + 17'(bi);
    dif_r = 17'(ar) - 17'(br);
    dif_i = 17'(ai) - 17'(bi);
    xs_r  = scale ? sum_r[16:1] : sum_r[15:0];
    xs_i  = scale ? sum_i[16:1] : sum_i[15:0];
    ds_r  = scale ? dif_r[16:1] : dif_r[15:0];
    ds_i  = scale ? dif_i[16:1] : dif_i[15:0];
  end

  // --------------------------------------------------------- multipliers
  logic [15:0]        xr, xi, yr, yi;
  logic               split;
  logic signed [31:0] p  [4];
  logic signed [15:0] pp [4][4];

  always_comb begin
    split = (op == BM_CMAC8) || (op == BM_RMAC8);
    unique case (op)
      BM_BFLY: begin
        xr = ds_r; xi = ds_i;
        yr = wc;   yi = conj_w ? -ws : ws;
      end
      BM_SQD: begin
        xr = dif_r[15:0]; xi = dif_i[15:0];
        yr = dif_r[15:0]; yi = dif_i[15:0];
      end
      default: begin
        xr = ar; xi = ai;
        yr = br; yi = bi;
      end
    endcase
  end

  subword_mult u_m0 (.x(xr), .y(yr), .split(split), .p(p[0]), .pp(pp[0]));
  subword_mult u_m1 (.x(xi), .y(yi), .split(split), .p(p[1]), .pp(pp[1]));
  subword_mult u_m2 (.x(xr), .y(yi), .split(split), .p(p[2]), .pp(pp[2]));
  subword_mult u_m3 (.x(xi), .y(yr), .split(split), .p(p[3]), .pp(pp[3]));

  // Complex product of the 16x16 operands, full width and Q1.15.
  logic signed [32:0] cp_re, cp_im;
  always_comb begin
    cp_re = 33'(p[0]) - 33'(p[1]);
    cp_im = 33'(p[2]) + 33'(p[3]);
  end

  // ---------------------------------------------------------------- ACS
  logic signed [15:0] s0, s1, sdiff, surv;
  logic               dec;
  always_comb begin
    s0    = ar + br;
    s1    = ai + bi;
    sdiff = s1 - s0;
    dec   = sdiff[15];
    surv  = dec ? s1 : s0;
  end

  acs_queue #(.DEPTH(QDEPTH)) u_q (
    .clk(clk), .rst_n(rst_n), .push(op == BM_ACS), .din(dec), .q(acs_q)
  );

  // ------------------------------------------------------- butterfly outputs
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xx <= '0;
      yy <= '0;
    end else begin
      unique case (op)
        BM_BFLY: begin
          xx <= {xs_r, xs_i};
          yy <= {cp_re[30:15], cp_im[30:15]};
        end
        BM_CADD: begin
          xx <= {xs_r, xs_i};
          yy <= {ds_r, ds_i};
        end
        BM_CMUL: yy <= {cp_re[30:15], cp_im[30:15]};
        BM_RMUL: begin
          xx <= p[0];
          yy <= p[1];
        end
        BM_ACS: begin
          xx <= {s0, s1};
          yy <= {surv, 15'b0, dec};
        end
        default: ;
      endcase
    end
  end

  // ------------------------------------------------------------ MAC sums
  // Per-cycle contributions of each mode.
  acc_t  c16_re, c16_im, r16_0, r16_2, r16_3, sqd;
  sacc_t c8 [8];     // CMAC8: {re, im} of P0..P3
  sacc_t r8 [7];     // RMAC8: Y(n), Y(n-1), Y(n-2), Y(n-3), Y(n+1), Y(n+2), Y(n+3)

  function automatic sacc_t sx(logic signed [15:0] v);
    return sacc_t'(v);
  endfunction

  always_comb begin
    c16_re = acc_t'(cp_re);
    c16_im = acc_t'(cp_im);
    r16_0  = acc_t'(p[0]) + acc_t'(p[1]);
    r16_2  = acc_t'(p[2]);
    r16_3  = acc_t'(p[3]);
    sqd    = acc_t'(p[0]) + acc_t'(p[1]);
    for (int j = 0; j < 4; j++) begin
      c8[2*j]   = sx(pp[j][0]) - sx(pp[j][3]);   // hh - ll
      c8[2*j+1] = sx(pp[j][1]) + sx(pp[j][2]);   // hl + lh
    end
    r8[0] = sx(pp[0][0]) + sx(pp[0][3]) + sx(pp[1][0]) + sx(pp[1][3]);
    r8[1] = sx(pp[0][1]) + sx(pp[1][1]) + sx(pp[2][2]);
    r8[2] = sx(pp[2][0]) + sx(pp[2][3]);
    r8[3] = sx(pp[2][1]);
    r8[4] = sx(pp[0][2]) + sx(pp[1][2]) + sx(pp[3][1]);
    r8[5] = sx(pp[3][0]) + sx(pp[3][3]);
    r8[6] = sx(pp[3][2]);
  end

  // ------------------------------------------------------------ accumulators
  acc_t   accr, acci, accaux;   // 40-bit double-precision accumulators
  sacc_t  sacc [8];             // 24-bit single-precision accumulators
  bm_op_e mode_q;               // MAC mode whose results the accumulators hold
  logic   is_mac, latch;

  always_comb begin
    is_mac = op inside {BM_SQD, BM_CMAC16, BM_RMAC16, BM_CMAC8, BM_RMAC8};
    latch  = (is_mac && first) || (op == BM_FLUSH);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      accr   <= '0;
      acci   <= '0;
      accaux <= '0;
      for (int i = 0; i < 8; i++) sacc[i] <= '0;
      mode_q <= BM_NOP;
    end else begin
      if (is_mac) mode_q <= op;
      unique case (op)
        BM_SQD:    accr <= (first ? acc_t'(0) : accr) + sqd;
        BM_CMAC16: begin
          accr <= (first ? acc_t'(0) : accr) + c16_re;
          acci <= (first ? acc_t'(0) : acci) + c16_im;
        end
        BM_RMAC16: begin
          accr   <= (first ? acc_t'(0) : accr) + r16_0;
          accaux <= (first ? acci : accaux) + r16_2;
          acci   <= (first ? acc_t'(0) : acci) + r16_3;
        end
        BM_CMAC8: begin
          for (int i = 0; i < 4; i++) sacc[i] <= (first ? sacc_t'(0) : sacc[i]) + c8[i];
          sacc[4] <= (first ? sacc[6] : sacc[4]) + c8[4];
          sacc[5] <= (first ? sacc[7] : sacc[5]) + c8[5];
          sacc[6] <= (first ? sacc_t'(0) : sacc[6]) + c8[6];
          sacc[7] <= (first ? sacc_t'(0) : sacc[7]) + c8[7];
        end
        BM_RMAC8: begin
          sacc[0] <= (first ? sacc_t'(0) : sacc[0]) + r8[0];
          sacc[1] <= (first ? sacc[6]    : sacc[1]) + r8[1];
          sacc[2] <= (first ? sacc[5]    : sacc[2]) + r8[2];
          sacc[3] <= (first ? sacc[4]    : sacc[3]) + r8[3];
          sacc[4] <= (first ? sacc_t'(0) : sacc[4]) + r8[4];
          sacc[5] <= (first ? sacc_t'(0) : sacc[5]) + r8[5];
          sacc[6] <= (first ? sacc_t'(0) : sacc[6]) + r8[6];
        end
        default: ;
      endcase
    end
  end

  // A MAC run in a different mode from the one the accumulators hold must
  // start a new iteration, or the old partial sums would be mixed in.
  a_mode_switch_needs_first: assert property (
    @(posedge clk) disable iff (!rst_n) (is_mac && op != mode_q) |-> first
  ) else $error("MAC mode changed without first");

  // ------------------------------------------------------------ result latch
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) yout[i] <= '0;
      yvalid <= 1'b0;
    end else begin
      yvalid <= latch;
      if (latch) begin
        unique case (mode_q)
          BM_SQD: begin
            yout[0] <= accr;
            for (int i = 1; i < 4; i++) yout[i] <= '0;
          end
          BM_CMAC16: begin
            yout[0] <= accr;
            yout[1] <= acci;
            yout[2] <= '0;
            yout[3] <= '0;
          end
          BM_RMAC16: begin
            yout[0] <= accr;
            yout[1] <= accaux;
            yout[2] <= '0;
            yout[3] <= '0;
          end
          BM_CMAC8: begin
            yout[0] <= acc_t'(sacc_t'(sacc[0] + sacc[2]));
            yout[1] <= acc_t'(sacc_t'(sacc[1] + sacc[3]));
            yout[2] <= acc_t'(sacc[4]);
            yout[3] <= acc_t'(sacc[5]);
          end
          BM_RMAC8: begin
            for (int i = 0; i < 4; i++) yout[i] <= acc_t'(sacc[i]);
          end
          default: ;
        endcase
      end
    end
  end
endmodule
