// tb_dominant_bin_locator: self-checking test of the min-heap dominant bin
// locator at P = 512 (256 PSD bins), KD = 16 and the default 20 % replacement
// cap (48). A power-spectrum memory model (one clock read latency) and a real
// bia_mem are attached. For each run the expected outcome is worked out here
// with a plain sorted list instead of a heap: scan the bins in order, keep the
// KD largest values, count a replacement whenever a value beats the smallest
// kept one, and stop after the replacement that reaches the cap. The test
// then compares the set of bins in the DBM, the heap count, the replacement
// count, the cap flag and every BIA bit with that outcome, and checks the
// run time against the bound P/2 + (KD + cap)(log2 KD + 2) + KD + few.
// Runs: random spectra (with a few strong peaks), a rising ramp (every bin
// replaces: the cap stops the scan), a falling ramp (no replacements), and a
// spectrum with equal values (ties are not replacements).
module tb_dominant_bin_locator;
  localparam int unsigned P = 512, KD = 16, PW = 36, BW = 16;
  localparam int unsigned NBIN = P / 2, LB = $clog2(NBIN), KA = $clog2(KD);
  localparam int unsigned NWD = NBIN / BW, WA = $clog2(NWD);
  localparam int unsigned LIMIT = (NBIN - KD) / 5;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, busy, done, psm_en;
  logic [LB-1:0] psm_idx;
  logic [PW-1:0] psm_rdata;
  logic bia_clr_en, bia_set_en;
  logic [WA-1:0] bia_clr_word;
  logic [LB-1:0] bia_set_bit;
  logic [KA-1:0] dbm_raddr;
  logic [LB-1:0] dbm_rdata;
  logic [KA:0] heap_count;
  logic [LB:0] repl_count;
  logic limit_hit;
  logic [2:0] rd_en, rd_val;
  logic [2:0][LB-1:0] rd_bit;

  longint psd [NBIN];
  int checks = 0, failures = 0, cyc = 0;

  dominant_bin_locator #(.P(P), .KD(KD), .PW(PW), .BW(BW)) dut (.*);
  bia_mem #(.NBIT(NBIN), .BW(BW), .NR(3)) u_bia (
    .clk, .clr_en(bia_clr_en), .clr_word(bia_clr_word), .set_en(bia_set_en),
    .set_bit(bia_set_bit), .rd_en, .rd_bit, .rd_val);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (psm_en) psm_rdata <= PW'(psd[psm_idx]);
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

  task automatic run_one(input string name);
    longint kv [$];
    int kb [$];
    int repl, t0;
    bit hit, inset [NBIN], got [NBIN];
    // reference: sorted list, smallest first
    repl = 0; hit = 0;
    for (int i = 0; i < NBIN && !hit; i++) begin
      if (kv.size() < KD) begin
        int p;
        p = 0;
        while (p < kv.size() && kv[p] <= psd[i]) p++;
        kv.insert(p, psd[i]); kb.insert(p, i);
      end else if (psd[i] > kv[0]) begin
        int p;
        void'(kv.pop_front()); void'(kb.pop_front());
        p = 0;
        while (p < kv.size() && kv[p] <= psd[i]) p++;
        kv.insert(p, psd[i]); kb.insert(p, i);
        repl++;
        if (repl == LIMIT) hit = 1;
      end
    end
    foreach (inset[i]) inset[i] = 0;
    foreach (kb[i]) inset[kb[i]] = 1;
    @(negedge clk);
    start = 1; t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    check(cyc - t0 <= NBIN + (KD + LIMIT) * (KA + 2) + KD + 8,
          $sformatf("%s: run time %0d clocks", name, cyc - t0));
    check(int'(heap_count) == KD, $sformatf("%s: heap count %0d", name, heap_count));
    check(int'(repl_count) == repl, $sformatf("%s: replacements %0d expected %0d", name, repl_count, repl));
    check(limit_hit == hit, $sformatf("%s: cap flag %0b expected %0b", name, limit_hit, hit));
    foreach (got[i]) got[i] = 0;
    for (int j = 0; j < KD; j++) begin
      dbm_raddr = KA'(j);
      #1;
      got[dbm_rdata] = 1;
    end
    for (int i = 0; i < NBIN; i++)
      check(got[i] == inset[i], $sformatf("%s: DBM holds bin %0d = %0b, expected %0b", name, i, got[i], inset[i]));
    @(negedge clk);
    for (int i = 0; i < NBIN; i += 3) begin
      for (int r = 0; r < 3; r++) rd_bit[r] = LB'((i + r) % NBIN);
      rd_en = '1;
      @(negedge clk);
      rd_en = '0;
      for (int r = 0; r < 3; r++)
        check(rd_val[r] == inset[(i + r) % NBIN], $sformatf("%s: BIA bit %0d", name, (i + r) % NBIN));
    end
    $display("%s: %0d clocks, %0d replacements, cap reached %0b", name, cyc - t0, repl_count, limit_hit);
  endtask

  initial begin
    rst_n = 0; start = 0; dbm_raddr = '0; rd_en = '0; rd_bit = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      foreach (psd[i]) psd[i] = {$urandom_range(0, 1 << 20), 8'(i)};
      for (int j = 0; j < 6; j++) psd[$urandom_range(0, NBIN - 1)] = longint'(1) << 34;
      run_one($sformatf("random %0d", r));
    end
    foreach (psd[i]) psd[i] = 1000 + 7 * i;
    run_one("rising ramp");
    foreach (psd[i]) psd[i] = 100000 - 7 * i;
    run_one("falling ramp");
    foreach (psd[i]) psd[i] = (i % 5 == 0) ? 5000 : 5000 - i;
    run_one("ties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
