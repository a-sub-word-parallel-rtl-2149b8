// tb_fft_workload: radix-2 DIF FFTs on the complete core at its default
// sizes, up to the largest length the 1K-word I/Q banks and the 1024-entry
// twiddle table allow.
//
// The testbench acts as instruction decoder and streams seven control words
// per butterfly: address the upper and lower points, load A and B from the
// two banks, read the twiddle (index (p mod h)*1024/(2h)) from the ROM, run a
// scaled butterfly with the conjugated twiddle, and write X and Y back in
// place. Lengths 64 and 1024 are run on a two-tone signal plus noise. The
// bit-reversed result is compared bit-exactly with a fixed-point model of the
// butterfly and, within a tolerance, with a floating-point DFT divided by N.
module tb_fft_workload;
  import dsp_pkg::*;
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [15:0] fr [1024], fi [1024], mr [1024], mi [1024];

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
    pr = dr * c + di * s;
    pi = di * c - dr * s;
    ar = 16'(sr); ai = 16'(si);
    br = 16'(pr >>> 15); bi = 16'(pi >>> 15);
  endfunction

  function automatic int bitrev(int v, int bits);
    int r;
    r = 0;
    for (int b = 0; b < bits; b++) r = (r << 1) | ((v >> b) & 1);
    return r;
  endfunction

  task automatic word(ctrl_t c);
    ctrl = c;
    @(negedge clk);
  endtask

  task automatic run_fft(int N, int LOGN);
    ctrl_t c;
    int nb, cyc0;
    real maxerr;
    for (int n = 0; n < N; n++) begin
      real v_r, v_i;
      v_r = 6000.0 * $cos(6.283185307179586 * 3 * n / N) + 2000.0 * $sin(6.283185307179586 * (N / 4 + 1) * n / N);
      v_i = 6000.0 * $sin(6.283185307179586 * 3 * n / N);
      fr[n] = 16'($rtoi(v_r) + int'($urandom % 512) - 256);
      fi[n] = 16'($rtoi(v_i) + int'($urandom % 512) - 256);
      dut.u_mem0.mem[n] = fr[n];
      dut.u_mem1.mem[n] = fi[n];
      mr[n] = fr[n]; mi[n] = fi[n];
    end
    nb = 0;
    cyc0 = $time;
    for (int h = N / 2; h >= 1; h = h / 2)
      for (int p = 0; p < N; p++)
        if ((p % (2 * h)) < h) begin
          int q, tw;
          q = p + h;
          tw = (p % h) * (1024 / (2 * h));
          c = '0; c.dag_ld = 2'b11; c.imm = 16'(p); word(c);
          c = '0; c.dag_ld = 2'b11; c.imm = 16'(q); word(c);
          c = '0; c.ld_a = 1; c.a_src = OPS_MEM; c.rom_rd = 1; c.imm = 16'(tw); word(c);
          c = '0; c.ld_b = 1; c.b_src = OPS_MEM; word(c);
          c = '0; c.bm_op = BM_BFLY; c.bm_scale = 1; c.bm_conj = 1;
          c.dag_ld = 2'b11; c.imm = 16'(p); word(c);
          c = '0; c.mem_we = 2'b11; c.mem_wsrc = MW_XX; c.dag_ld = 2'b11; c.imm = 16'(q); word(c);
          c = '0; c.mem_we = 2'b11; c.mem_wsrc = MW_YY; word(c);
          bfly_model(mr[p], mi[p], mr[q], mi[q], tw);
          nb++;
        end
    word('0);
    $display("%0d-point FFT: %0d butterflies in %0d cycles", N, nb, ($time - cyc0) / 10);
    checks++;
    if (nb != N / 2 * LOGN) failures++;
    maxerr = 0.0;
    for (int k = 0; k < N; k++) begin
      int b;
      real er, ei, ang, dr_, di_;
      b = bitrev(k, LOGN);
      checks++;
      if ($signed(dut.u_mem0.mem[b]) != mr[b] || $signed(dut.u_mem1.mem[b]) != mi[b]) begin
        failures++;
        $display("FAIL X(%0d): %0d %0d exp %0d %0d", k, $signed(dut.u_mem0.mem[b]),
                 $signed(dut.u_mem1.mem[b]), mr[b], mi[b]);
      end
      er = 0; ei = 0;
      for (int n = 0; n < N; n++) begin
        ang = -6.283185307179586 * ((k * n) % N) / N;
        er += fr[n] * $cos(ang) - fi[n] * $sin(ang);
        ei += fr[n] * $sin(ang) + fi[n] * $cos(ang);
      end
      dr_ = real'($signed(dut.u_mem0.mem[b])) - er / N;
      di_ = real'($signed(dut.u_mem1.mem[b])) - ei / N;
      if (dr_ < 0) dr_ = -dr_;
      if (di_ < 0) di_ = -di_;
      if (dr_ > maxerr) maxerr = dr_;
      if (di_ > maxerr) maxerr = di_;
    end
    $display("%0d-point FFT: largest deviation from DFT/N = %f LSB", N, maxerr);
    checks++;
    if (maxerr > 2.0 * LOGN) begin failures++; $display("FAIL DFT deviation"); end
  endtask

  initial begin
    ctrl = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_fft(64, 6);
    run_fft(1024, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
