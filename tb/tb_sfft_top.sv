// tb_sfft_top: end-to-end test of the sparse FFT processor at a reduced size
// (N = 4096 samples, P = 256-point short transforms, L = 4 sets, two FHT
// streams, KD = 16 dominant bins). The testbench owns the data-space memory
// (a model with one clock of read latency), fills it with a few real tones
// whose frequencies are multiples of N/P (each then falls exactly into one
// bin of every set) plus optional noise, loads the address, window and sine
// tables, runs complete operations and reads back the sparse spectrum.
// Checks: every tone is among the dominant bins of every set; every tone
// whose bin was handed to a filter is reported with the right frequency and
// with Re/Im within 3 % of (A/2)cos(phi), (A/2)sin(phi); the SSM count equals
// the number of filter survivors; each filter generated KD/L * N/P
// candidates; the run time stays under the sum of the stage schedules.
// A second instance with KD = 64 dominant bins runs on the same input: its
// bin indicator arrays are half full, so many false candidates survive and the
// frequency address memory overflows.
// Mechanisms counted (each must occur at least once): both FHT streams busy
// at the same time, heap replacements, the replacement cap ending a scan,
// candidates discarded by the filter, FAM overflow, mirrored (conjugated)
// set values.
module tb_sfft_top;
  localparam int unsigned N = 4096, P = 256, L = 4, S1 = 2, KD = 16, NT = 3;
  localparam int unsigned KD2 = 64;
  localparam int unsigned NB = 8, AW = $clog2(N), DSW = $clog2(N / NB), MSW = $clog2(L * P / NB);
  localparam int unsigned QA = $clog2(P / 4), KA = $clog2(KD), LB = $clog2(P / 2), W = 18, WC = 18;
  localparam int unsigned SW = 2 * W + AW, SL = KD / L, RA = (SL > 1) ? $clog2(SL) : 1;
  localparam int unsigned NJ = N / P, SH = $clog2(N / P);
  localparam real PI = 3.14159265358979323846;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, start, busy, done;
  logic dam_we, wcm_we, pcm_we;
  logic [MSW-1:0] dam_slot, wcm_slot;
  logic [NB-1:0][AW-1:0] dam_wdata;
  logic [NB-1:0][WC-1:0] wcm_wdata;
  logic [QA-1:0] pcm_addr;
  logic [WC-1:0] pcm_data;
  logic [L-1:0][AW-1:0] perm_mult, unperm_mult;
  logic dsm_en;
  logic [NB-1:0][DSW-1:0] dsm_addr;
  logic [NB-1:0][W-1:0] dsm_rdata;
  logic [KA-1:0] ssm_raddr;
  logic [SW-1:0] ssm_rdata;
  logic [KA:0] ssm_count;
  logic [L-1:0][LB:0] loc_repl;
  logic [L-1:0] loc_limit_hit;
  logic [L-1:0][RA:0] fam_count;
  logic [L-1:0][15:0] fam_overflow;
  logic [L-1:0][31:0] foi_count;

  // second instance (KD2 dominant bins)
  logic busy2, done2;
  logic [NB-1:0][DSW-1:0] dsm_addr2;
  logic [NB-1:0][W-1:0] dsm_rdata2;
  logic [SW-1:0] ssm_rdata2;
  logic [$clog2(KD2):0] ssm_count2;
  logic [L-1:0][LB:0] loc_repl2;
  logic [L-1:0] loc_limit_hit2;
  logic [L-1:0][$clog2(KD2 / L):0] fam_count2;
  logic [L-1:0][15:0] fam_overflow2;
  logic [L-1:0][31:0] foi_count2;
  logic dsm_en2;
  bit fin, d1, d2;
  int t_done;

  sfft_top #(.N(N), .P(P), .L(L), .S1(S1), .KD(KD)) dut (.*);
  sfft_top #(.N(N), .P(P), .L(L), .S1(S1), .KD(KD2)) dut2 (
    .clk, .rst_n, .start, .busy(busy2), .done(done2),
    .dam_we, .dam_slot, .dam_wdata, .wcm_we, .wcm_slot, .wcm_wdata, .pcm_we, .pcm_addr, .pcm_data,
    .perm_mult, .unperm_mult, .dsm_en(dsm_en2), .dsm_addr(dsm_addr2), .dsm_rdata(dsm_rdata2),
    .ssm_raddr('0), .ssm_rdata(ssm_rdata2), .ssm_count(ssm_count2),
    .loc_repl(loc_repl2), .loc_limit_hit(loc_limit_hit2), .fam_count(fam_count2),
    .fam_overflow(fam_overflow2), .foi_count(foi_count2));

  always @(posedge clk) begin
    if (dsm_en2) for (int b = 0; b < NB; b++) dsm_rdata2[b] <= W'(xs[int'(dsm_addr2[b]) * NB + b]);
    if (start) begin d1 = 0; d2 = 0; end
    else begin
      if (done && !d1) begin d1 = 1; t_done = cyc; end
      if (done2) d2 = 1;
    end
  end
  assign fin = d1 && d2;

  int checks = 0, failures = 0, cyc = 0;
  int xs [N];
  int sigma [L];
  int tone_f [NT], tone_a [NT];
  real tone_ph [NT];
  int dbm_peek [L][KD];
  bit do_peek = 0;
  // mechanism counters
  int n_overlap = 0, n_repl = 0, n_cap = 0, n_discard = 0, n_overflow = 0, n_conj = 0;
  int n_found = 0, n_expected = 0, n_spurious = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dsm_en) for (int b = 0; b < NB; b++) dsm_rdata[b] <= W'(xs[int'(dsm_addr[b]) * NB + b]);
  end

  // observation of internal events that have no port of their own
  always @(negedge clk) begin
    if (&dut.st_eng_busy) n_overlap++;
    for (int t = 0; t < L; t++)
      if (dut.f_we[t] && (dut.f_wdata[t][L * LB +: L] != '0)) n_conj++;
  end
  for (genvar t = 0; t < L; t++) begin : g_peek
    always @(posedge do_peek)
      for (int i = 0; i < KD; i++) dbm_peek[t][i] = int'(dut.g_locate[t].u_loc.ha[i]);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int inverse(input int a);
    // Newton iteration for the inverse of an odd number modulo 2^AW
    longint x;
    x = a;
    for (int i = 0; i < 6; i++) x = (x * (2 - longint'(a) * x)) & ((longint'(1) << AW) - 1);
    return int'(x);
  endfunction

  function automatic int bin_of(input int t, input int f);
    longint v;
    v = (longint'(sigma[t]) * f) % N;
    if (v > N / 2) v = N - v;
    return int'(v >> SH);
  endfunction

  task automatic load_tables();
    for (int i = 0; i < P / 4; i++) begin
      pcm_we = 1; pcm_addr = QA'(i);
      pcm_data = WC'($rtoi($floor($sin(2.0 * PI * i / P) * 65536.0 + 0.5)));
      @(negedge clk);
    end
    pcm_we = 0;
    for (int s = 0; s < L * P / NB; s++) begin
      dam_we = 1; wcm_we = 1; dam_slot = MSW'(s); wcm_slot = MSW'(s);
      for (int b = 0; b < NB; b++) begin
        int t, n;
        t = s / (P / NB); n = (s % (P / NB)) * NB + b;
        dam_wdata[b] = AW'((longint'(sigma[t]) * n) % N);
        wcm_wdata[b] = WC'(65536);                  // rectangular window, 1.0
      end
      @(negedge clk);
    end
    dam_we = 0; wcm_we = 0;
    for (int t = 0; t < L; t++) begin
      perm_mult[t] = AW'(sigma[t]);
      unperm_mult[t] = AW'(inverse(sigma[t]));
    end
  endtask

  // one complete operation; tones sit on multiples of N/P so that every set
  // sees each tone in a single bin; noise adds random samples
  task automatic run_one(input int noise, input bit check_tones);
    int t0, total, fams, tone_seen [NT];
    for (int t = 0; t < L; t++) sigma[t] = 2 * $urandom_range(0, N / 2 - 1) + 1;
    for (int k = 0; k < NT; k++) begin
      bit clash;
      do begin
        tone_f[k] = NJ * $urandom_range(1, P / 2 - 1);
        clash = 0;
        for (int j = 0; j < k; j++) if (tone_f[j] == tone_f[k]) clash = 1;
      end while (clash);
      tone_a[k] = 100000 / NT + 1000 * k;          // the sum stays inside 18 bits
      tone_ph[k] = 2.0 * PI * $urandom_range(0, 999) / 1000.0;
    end
    for (int i = 0; i < N; i++) begin
      real s;
      s = 0.0;
      for (int k = 0; k < NT; k++) s += tone_a[k] * $cos(2.0 * PI * real'(longint'(tone_f[k]) * i % N) / N + tone_ph[k]);
      xs[i] = $rtoi(s) + ((noise > 0) ? $urandom_range(0, 2 * noise) - noise : 0);
    end
    load_tables();
    @(negedge clk);
    start = 1; t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!fin) @(negedge clk);
    total = t_done - t0;
    do_peek = 1; #1; do_peek = 0;
    // mechanisms seen in this run
    fams = 0;
    for (int t = 0; t < L; t++) begin
      n_repl += int'(loc_repl[t]);
      n_cap += loc_limit_hit[t];
      n_overflow += int'(fam_overflow[t]);
      n_discard += int'(foi_count[t]) - int'(fam_count[t]) - int'(fam_overflow[t]);
      fams += int'(fam_count[t]);
      check(int'(foi_count[t]) == SL * NJ, "candidate count");
    end
    check(int'(ssm_count) == fams, $sformatf("SSM count %0d, FAM entries %0d", ssm_count, fams));
    check(total <= L * P / NB + (L / S1) * (P / 16 + (P / 8 + 8) * (QA / 2 + 2) + P / 4) + P / 2
                   + 3 * (KD + P / 10) * (KA + 2) + SL * NJ + 4 * KD + 100,
          $sformatf("run time %0d clocks", total));
    foreach (tone_seen[k]) tone_seen[k] = 0;
    // read the sparse spectrum
    for (int e = 0; e < int'(ssm_count); e++) begin
      int f, re, im, hit;
      ssm_raddr = KA'(e);
      @(negedge clk);
      re = int'($signed(ssm_rdata[SW-1 -: W]));
      im = int'($signed(ssm_rdata[AW +: W]));
      f = int'(ssm_rdata[AW-1:0]);
      hit = -1;
      for (int k = 0; k < NT; k++) if (tone_f[k] == f) hit = k;
      if (hit < 0) n_spurious++;
      else if (check_tones) begin
        real ar, ai, tol;
        ar = tone_a[hit] / 2.0 * $cos(tone_ph[hit]);
        ai = tone_a[hit] / 2.0 * $sin(tone_ph[hit]);
        tol = 0.03 * tone_a[hit] / 2.0 + 4.0;
        tone_seen[hit]++;
        check(re - ar < tol && ar - re < tol && im - ai < tol && ai - im < tol,
              $sformatf("tone %0d at f=%0d: got (%0d, %0d) expected (%f, %f)", hit, f, re, im, ar, ai));
      end
    end
    if (check_tones) begin
      for (int k = 0; k < NT; k++) begin
        bit exp_found;
        exp_found = 0;
        for (int t = 0; t < L; t++) begin
          bit in_dbm;
          in_dbm = 0;
          for (int i = 0; i < KD; i++) if (dbm_peek[t][i] == bin_of(t, tone_f[k])) begin
            in_dbm = 1;
            if (i / SL == t && fam_overflow[t] == 0) exp_found = 1;
          end
          check(in_dbm, $sformatf("tone %0d missing from the dominant bins of set %0d", k, t));
        end
        n_expected += exp_found;
        if (exp_found) check(tone_seen[k] > 0, $sformatf("tone %0d at f=%0d not reported", k, tone_f[k]));
        if (tone_seen[k] > 0) n_found++;
      end
    end
    $display("run (noise %0d): %0d clocks, %0d components, %0d FAM entries, cap hits %b",
             noise, total, ssm_count, fams, loc_limit_hit);
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ovf2;
    rst_n = 0; start = 0; dam_we = 0; wcm_we = 0; pcm_we = 0; dam_slot = '0; wcm_slot = '0;
    dam_wdata = '0; wcm_wdata = '0; pcm_addr = '0; pcm_data = '0; perm_mult = '0; unperm_mult = '0;
    ssm_raddr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    ovf2 = 0;
    for (int r = 0; r < 4; r++) begin
      run_one((r == 3) ? 8000 : 0, r < 3);
      for (int t = 0; t < L; t++) ovf2 += int'(fam_overflow2[t]);
    end
    n_overflow += ovf2;
    $display("mechanisms: stream overlap %0d clocks, heap replacements %0d, cap stops %0d, discarded candidates %0d, FAM overflows %0d, conjugated entries %0d",
             n_overlap, n_repl, n_cap, n_discard, n_overflow, n_conj);
    $display("tones: %0d reported of %0d handed to a filter, %0d other components", n_found, n_expected, n_spurious);
    check(n_overlap > 0, "the two FHT streams never overlapped");
    check(n_repl > 0, "no heap replacement");
    check(n_cap > 0, "the replacement cap never ended a scan");
    check(n_discard > 0, "no candidate discarded");
    check(n_overflow > 0, "no FAM overflow");
    check(n_conj > 0, "no conjugated entry");
    check(n_expected > 0, "no tone handed to a filter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
