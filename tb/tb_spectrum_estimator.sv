// tb_spectrum_estimator: self-checking test of the spectrum estimator at
// N = 4096, P = 64, L = 8, KD = 32, S3 = 8 (eight FAM regions of four entries,
// so the adder tree has three levels).
// The testbench models the FAM regions and the eight transform-space memories
// (Re X[k] at k, Im X[k] at P - k), all with one clock of read latency, and
// fills them with random data and random region fill levels (including an
// empty region, bin 0 and mirrored entries). For every FAM entry it computes
//   Re = floor(sum_t X_t.re[bin_t] / L),
//   Im = floor(sum_t s_t * X_t.im[bin_t] / L), s_t = -1 for a mirrored set,
// with Im taken as 0 at bin 0, and compares the SSM writes (values, frequency
// and address order), the final count and the run time (at most two clocks
// per component plus a fixed tail).
module tb_spectrum_estimator;
  localparam int unsigned N = 4096, P = 64, L = 8, KD = 32, S3 = 8, W = 18;
  localparam int unsigned AW = $clog2(N), LP = $clog2(P), LB = $clog2(P / 2);
  localparam int unsigned SL = KD / S3, RA = $clog2(SL), FW = AW + L + L * LB;
  localparam int unsigned KA = $clog2(KD), SW = 2 * W + AW, RW = $clog2(S3);
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, busy, done, fam_re, tsm_en, ssm_we;
  logic [S3-1:0][RA:0] fam_count;
  logic [RW-1:0] fam_region;
  logic [RA-1:0] fam_raddr;
  logic [FW-1:0] fam_rdata;
  logic [L-1:0][LP-1:0] tsm_idx;
  logic [L-1:0][W-1:0] tsm_rdata;
  logic [KA-1:0] ssm_waddr;
  logic [SW-1:0] ssm_wdata;
  logic [KA:0] ssm_count;

  int checks = 0, failures = 0, cyc = 0, nw;
  logic [FW-1:0] fam [S3][SL];
  int tsm [L][P];
  logic [SW-1:0] expq [$];

  spectrum_estimator #(.N(N), .P(P), .L(L), .KD(KD), .S3(S3), .W(W)) dut (.*);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (fam_re) fam_rdata <= fam[fam_region][fam_raddr];
    if (tsm_en) for (int t = 0; t < L; t++) tsm_rdata[t] <= W'(tsm[t][tsm_idx[t]]);
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(negedge clk) begin
    if (ssm_we) begin
      check(int'(ssm_waddr) == nw, "SSM address order");
      if (expq.size() == 0) check(0, "unexpected SSM write");
      else begin
        logic [SW-1:0] e;
        logic signed [W-1:0] gr, gi, er, ei;
        e = expq.pop_front();
        {gr, gi} = ssm_wdata[SW-1:AW];
        {er, ei} = e[SW-1:AW];
        check(ssm_wdata == e, $sformatf("SSM word %0d: got re=%0d im=%0d f=%0d expected re=%0d im=%0d f=%0d",
              nw, gr, gi, ssm_wdata[AW-1:0], er, ei, e[AW-1:0]));
      end
      nw++;
    end
  end

  initial begin
    rst_n = 0; start = 0; fam_count = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      int k, t0;
      foreach (tsm[t, i]) tsm[t][i] = (run == 0) ? ((i % 2) ? 131071 : -131072)
                                                 : $urandom_range(0, 262143) - 131072;
      expq.delete();
      k = 0;
      for (int r = 0; r < S3; r++) begin
        fam_count[r] = (r == run % S3) ? 0 : (RA+1)'($urandom_range(1, SL));
        for (int e = 0; e < SL; e++) begin
          logic [AW-1:0] f;
          logic [L-1:0] cj;
          logic [L-1:0][LB-1:0] bn;
          int sr, si;
          f = AW'($urandom); cj = L'($urandom);
          for (int t = 0; t < L; t++) bn[t] = (e == 0 && t == 1) ? '0 : LB'($urandom);
          fam[r][e] = {f, cj, bn};
          sr = 0; si = 0;
          for (int t = 0; t < L; t++) begin
            sr += tsm[t][bn[t]];
            if (bn[t] != 0) si += cj[t] ? -tsm[t][P - bn[t]] : tsm[t][P - bn[t]];
          end
          if (e < fam_count[r]) begin
            expq.push_back({W'(sr >>> $clog2(L)), W'(si >>> $clog2(L)), f});
            k++;
          end
        end
      end
      nw = 0;
      @(negedge clk);
      start = 1; t0 = cyc;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
      check(expq.size() == 0, "SSM writes missing");
      check(int'(ssm_count) == k, $sformatf("count %0d expected %0d", ssm_count, k));
      check(cyc - t0 <= 2 * k + S3 + 12, $sformatf("run time %0d clocks for %0d components", cyc - t0, k));
      $display("run %0d: %0d components in %0d clocks", run, k, cyc - t0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
