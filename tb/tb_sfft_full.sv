// tb_sfft_full: one complete operation of the sparse FFT processor with every
// parameter at its default: N = 2^21 samples, L = 4 sets of P = 16384
// samples, two FHT streams, KD = 512 dominant bins, 18-bit data. The
// testbench models the 2M-sample data-space memory, fills it with four real
// tones on multiples of N/P = 128, loads the address (65536 words), window
// and sine tables, runs one operation and reads back the sparse spectrum.
// It checks that every tone is among the dominant bins of every set, that
// every tone whose bin was handed to a filter is reported at the right
// frequency with Re/Im within 3 % of (A/2)cos(phi), (A/2)sin(phi), the
// candidate and SSM counts, and that the clock count of the operation stays
// within the 104,858-clock update period of a 2 GHz input at a 100 MHz clock
// (2^21 new samples at 20 samples per clock). A second operation adds
// uniform noise of +/-20000 to the same kind of input: the noise fills every
// bin, so the heaps see many more replacements and the run comes closer to
// its worst-case length.
module tb_sfft_full;
  localparam int unsigned N = 2097152, P = 16384, L = 4, S1 = 2, KD = 512, NT = 4;
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

  bit fin, d1;
  int t_done;

  sfft_top dut (.*);

  always @(posedge clk) begin
    if (start) d1 = 0;
    else if (done && !d1) begin d1 = 1; t_done = cyc; end
  end
  assign fin = d1;

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
    check(total <= N / 20, $sformatf("run time %0d clocks within the update period of %0d", total, N / 20));
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
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; start = 0; dam_we = 0; wcm_we = 0; pcm_we = 0; dam_slot = '0; wcm_slot = '0;
    dam_wdata = '0; wcm_wdata = '0; pcm_addr = '0; pcm_data = '0; perm_mult = '0; unperm_mult = '0;
    ssm_raddr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_one(0, 1);
    run_one(20000, 1);
    $display("mechanisms: stream overlap %0d clocks, heap replacements %0d, cap stops %0d, discarded candidates %0d, FAM overflows %0d, conjugated entries %0d",
             n_overlap, n_repl, n_cap, n_discard, n_overflow, n_conj);
    $display("tones: %0d reported of %0d handed to a filter, %0d other components", n_found, n_expected, n_spurious);
    check(n_expected > 0 || n_found == 0, "tone accounting");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
