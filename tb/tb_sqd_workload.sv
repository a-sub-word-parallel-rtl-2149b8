// tb_sqd_workload: nearest-codeword search with squared distances on the
// complete core.
//
// A 16-dimensional query vector sits in the register file (r0..r15) and 64
// codewords of 16 components in the I/Q banks: word 8m+j of bank 0 holds
// component 2j of codeword m, bank 1 component 2j+1. Every cycle the DAG
// steps on, A is loaded from the two banks and B from the register pair
// (r2j, r2j+1), and an SQD step adds two squared differences to ACCR. The
// first step of each codeword carries first, which latches the previous
// codeword's distance into yout; a final FLUSH latches the last one. So a
// K-dimensional distance takes K/2 cycles. The testbench acts as instruction
// decoder, collects the distances from yout, checks each against integer
// arithmetic, checks that they arrive every eight cycles, and picks the
// nearest codeword (one codeword is the query plus small noise).
module tb_sqd_workload;
  import dsp_pkg::*;
  localparam int M = 64;            // codewords
  localparam int D = 16;            // dimensions
  localparam int NS = M * D / 2;    // SQD steps
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
    repeat (2000) @(posedge clk);
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

  task automatic word(ctrl_t c);
    ctrl = c;
    @(negedge clk);
  endtask

  logic signed [15:0] q [D];
  logic signed [15:0] cb [M][D];
  longint edist [M];

  initial begin
    ctrl_t c;
    int target, best;
    target = int'($urandom % M);
    for (int k = 0; k < D; k++) q[k] = 16'(int'($urandom % 32768) - 16384);
    for (int m = 0; m < M; m++) begin
      edist[m] = 0;
      for (int k = 0; k < D; k++) begin
        if (m == target) cb[m][k] = 16'(int'(q[k]) + int'($urandom % 64) - 32);
        else             cb[m][k] = 16'(int'($urandom % 32768) - 16384);
        edist[m] += (longint'(cb[m][k]) - longint'(q[k])) ** 2;
      end
      for (int j = 0; j < D / 2; j++) begin
        dut.u_mem0.mem[8 * m + j] = cb[m][2 * j];
        dut.u_mem1.mem[8 * m + j] = cb[m][2 * j + 1];
      end
    end
    ctrl = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < D; k++) begin
      c = '0; c.rf_we = 1; c.rf_wsrc = RW_IMM; c.rw = 4'(k); c.imm = q[k];
      word(c);
    end
    for (int cy = 0; cy < NS + 4; cy++) begin
      int i;
      c = '0;
      if (cy == 0) begin c.dag_ld = 2'b11; c.imm = 16'd0; end
      if (cy >= 1 && cy <= NS) c.dag_inc = 2'b11;
      i = cy - 2;
      if (i >= 0 && i < NS) begin
        c.ld_a = 1; c.a_src = OPS_MEM; c.ld_b = 1; c.b_src = OPS_RF;
        c.ra = 4'(2 * (i % 8)); c.rb = 4'(2 * (i % 8) + 1);
      end
      i = cy - 3;
      if (i >= 0 && i < NS) begin c.bm_op = BM_SQD; c.bm_first = (i % 8 == 0); end
      if (i == NS) c.bm_op = BM_FLUSH;
      word(c);
    end
    word('0);
    word('0);
    // the first latch holds whatever the accumulator had before the run
    checks++;
    if (res.size() != M + 1) begin
      failures++;
      $display("FAIL %0d distances latched, expected %0d", res.size(), M + 1);
    end else begin
      void'(res.pop_front());
      void'(res_cyc.pop_front());
      best = 0;
      for (int m = 0; m < M; m++) begin
        checks++;
        if (res[m] != edist[m]) begin
          failures++;
          $display("FAIL distance %0d: %0d exp %0d", m, res[m], edist[m]);
        end
        if (m > 0) begin
          checks++;
          if (res_cyc[m] - res_cyc[m - 1] != D / 2) begin
            failures++;
            $display("FAIL distance %0d arrived %0d cycles after the previous one",
                     m, res_cyc[m] - res_cyc[m - 1]);
          end
        end
        if (res[m] < res[best]) best = m;
      end
      checks++;
      if (best != target) begin failures++; $display("FAIL nearest %0d, expected %0d", best, target); end
      $display("%0d distances of %0d dimensions, one every %0d cycles; nearest codeword %0d (distance %0d)",
               M, D, res_cyc[1] - res_cyc[0], best, res[best]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
