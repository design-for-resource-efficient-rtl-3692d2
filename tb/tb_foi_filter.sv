// tb_foi_filter: self-checking test of one FOI generator and filter chain at
// N = 4096, P = 64 (32 PSD bn, 64 indices per bin), L = 4, KD = 16, S3 = 4
// (four bn per filter), filter index 1. Set t is taken to be built with
// sample index (sigma_t * n) mod N, so a frequency f lands in bin
// fold(sigma_t * f mod N) / (N/P) of set t. The generator is therefore given
// the inverse of sigma_1 and the stages are given sigma_t.
// The testbench models the dominant bin memory (combinational read) and the
// three BIA read ports (one clock latency; port m-1 serves set (1+m) mod 4).
// BIAs are filled with the bn of a few test tones plus random extra bn.
// The expected survivor list is computed here by brute force over every
// candidate index of every assigned bin; the FAM writes (frequency,
// conjugation flags, bn), the region fill count, the overflow count, the
// number of candidates and the run time are compared with it. Several runs use
// different multipliers and BIA densities so that both a partly filled
// region and an overflowing one occur.
module tb_foi_filter;
  localparam int unsigned N = 4096, P = 64, L = 4, KD = 16, S3 = 4, FIDX = 1;
  localparam int unsigned AW = $clog2(N), NBIN = P / 2, LB = $clog2(NBIN), KA = $clog2(KD);
  localparam int unsigned SL = KD / S3, RA = $clog2(SL), SH = $clog2(N / P), NJ = N / P;
  localparam int unsigned FW = AW + L + L * LB;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, busy, done, fam_we;
  logic [AW-1:0] unperm_mult;
  logic [L-1:0][AW-1:0] perm_mult;
  logic [KA-1:0] dbm_raddr;
  logic [LB-1:0] dbm_rdata;
  logic [L-2:0] bia_rd_en, bia_rd_val;
  logic [L-2:0][LB-1:0] bia_rd_bit;
  logic [RA-1:0] fam_waddr;
  logic [FW-1:0] fam_wdata;
  logic [RA:0] fam_count;
  logic [15:0] overflow_count;
  logic [31:0] foi_count;

  int checks = 0, failures = 0, cyc = 0;
  int dbm [KD];
  bit bia [L][NBIN];
  int sigma [L];
  logic [FW-1:0] exp_words [$];
  int nwrites;

  foi_filter #(.N(N), .P(P), .L(L), .KD(KD), .S3(S3), .FIDX(FIDX)) dut (.*);

  assign dbm_rdata = LB'(dbm[dbm_raddr]);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int m = 1; m < L; m++)
      if (bia_rd_en[m-1]) bia_rd_val[m-1] <= bia[(FIDX + m) % L][bia_rd_bit[m-1]];
  end

  initial begin
    #3000000;
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
    if (fam_we) begin
      check(int'(fam_waddr) == nwrites, "FAM address order");
      if (exp_words.size() == 0) check(0, "unexpected FAM write");
      else begin
        logic [FW-1:0] e;
        e = exp_words.pop_front();
        check(fam_wdata == e, $sformatf("FAM word %0d: got %h expected %h", nwrites, fam_wdata, e));
      end
      nwrites++;
    end
  end

  function automatic int inverse(input int a);
    for (int x = 1; x < N; x += 2) if ((a * x) % N == 1) return x;
    return 0;
  endfunction

  function automatic int fold(input int v, output bit cj);
    cj = (v > N / 2);
    return cj ? N - v : v;
  endfunction

  task automatic run_one(input int density);
    int tones [3];
    int survivors, t0;
    logic [FW-1:0] all [$];
    for (int t = 0; t < L; t++) sigma[t] = 2 * $urandom_range(0, N / 2 - 1) + 1;
    foreach (bia[t, b]) bia[t][b] = ($urandom_range(0, 99) < density);
    for (int k = 0; k < 3; k++) begin
      bit c;
      tones[k] = $urandom_range(1, N / 2 - 1);
      for (int t = 0; t < L; t++) bia[t][fold((sigma[t] * tones[k]) % N, c) >> SH] = 1;
    end
    for (int i = 0; i < KD; i++) dbm[i] = $urandom_range(0, NBIN - 1);
    for (int k = 0; k < 3; k++) begin
      bit c;
      dbm[FIDX * SL + k] = fold((sigma[FIDX] * tones[k]) % N, c) >> SH;
    end
    unperm_mult = AW'(inverse(sigma[FIDX]));
    for (int t = 0; t < L; t++) perm_mult[t] = AW'(sigma[t]);
    // brute-force reference
    all.delete();
    for (int i = 0; i < SL; i++)
      for (int j = 0; j < NJ; j++) begin
        int m, f;
        bit c, ok;
        logic [L-1:0] conj;
        logic [L-1:0][LB-1:0] bn;
        conj = '0; bn = '0;
        m = dbm[FIDX * SL + i] * NJ + j;
        f = fold((inverse(sigma[FIDX]) * m) % N, c);
        conj[FIDX] = c; bn[FIDX] = LB'(dbm[FIDX * SL + i]);
        ok = 1;
        for (int s = 1; s < L && ok; s++) begin
          int t, v;
          t = (FIDX + s) % L;
          v = fold((sigma[t] * f) % N, c);
          if (v == N / 2 || !bia[t][v >> SH]) ok = 0;
          conj[t] = c; bn[t] = LB'(v >> SH);
        end
        if (ok) all.push_back({AW'(f), conj, bn});
      end
    exp_words.delete();
    for (int i = 0; i < all.size() && i < SL; i++) exp_words.push_back(all[i]);
    nwrites = 0;
    @(negedge clk);
    start = 1; t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    // the pipe empties early when the last candidates are discarded early
    check(cyc - t0 <= SL * NJ + 3 * (L - 1) + 1 && cyc - t0 > SL * NJ,
          $sformatf("run time %0d clocks", cyc - t0));
    check(exp_words.size() == 0, "FAM writes missing");
    check(int'(fam_count) == ((all.size() < SL) ? all.size() : SL), "FAM count");
    check(int'(overflow_count) == ((all.size() > SL) ? all.size() - SL : 0),
          $sformatf("overflow count %0d, survivors %0d", overflow_count, all.size()));
    check(foi_count == SL * NJ, "candidate count");
    $display("density %0d%%: %0d survivors, %0d stored, %0d overflow, %0d clocks",
             density, all.size(), fam_count, overflow_count, cyc - t0);
  endtask

  initial begin
    rst_n = 0; start = 0; unperm_mult = '0; perm_mult = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_one(0);
    run_one(10);
    run_one(40);
    run_one(70);
    run_one(100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
