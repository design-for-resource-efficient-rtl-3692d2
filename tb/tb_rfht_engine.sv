// tb_rfht_engine: self-checking test of the complete Hartley transform engine
// at P = 256 (four radix-4 stages). The testbench loads the sine tables with
// round(2^16 sin(2 pi i / P)), models the transform-space memory (one clock
// read latency, two woctads per clock) and runs several transforms:
// random data, a single cosine tone, a single sine tone, an impulse and a
// full-scale constant. Each output H[k] is compared with the Hartley
// transform computed here straight from its definition,
//   H[k] = (1/P) * sum_n x[n] (cos(2 pi n k / P) + sin(2 pi n k / P)),
// to within a few LSB; hout_neg must carry H[(P - k) mod P]; the run time must
// match the engine's schedule (P/16 load clocks, P/8 + P/M clocks per stage
// after the first, P/8 unload clocks, fixed pipeline gaps).
module tb_rfht_engine;
  localparam int unsigned P = 256, W = 18, WC = 18, CF = 16, NB = 8;
  localparam int unsigned LP = $clog2(P), QA = LP - 2, TSW = $clog2(P / NB);
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 6.0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, busy, done, pcm_we, tsm_en, hout_valid;
  logic [QA-1:0] pcm_addr;
  logic [WC-1:0] pcm_data;
  logic [TSW-1:0] tsm_slot_a, tsm_slot_b;
  logic [NB-1:0][W-1:0] tsm_rdata_a, tsm_rdata_b;
  logic [LP-1:0] hout_k;
  logic [3:0][W-1:0] hout_pos, hout_neg;
  int checks = 0, failures = 0, cyc = 0;
  int xs [P];
  real href [P];
  int seen;
  real maxerr;

  rfht_engine #(.P(P), .W(W), .WC(WC), .CF(CF)) dut (.*);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (tsm_en)
      for (int b = 0; b < NB; b++) begin
        tsm_rdata_a[b] <= W'(xs[int'(tsm_slot_a) * NB + b]);
        tsm_rdata_b[b] <= W'(xs[int'(tsm_slot_b) * NB + b]);
      end
  end

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  always @(negedge clk) begin
    if (hout_valid) begin
      for (int i = 0; i < 4; i++) begin
        int k, kn;
        real ep, en;
        k = int'(hout_k) + i;
        kn = (P - k) % P;
        ep = href[k]; en = href[kn];
        checks += 2;
        if (absr(real'($signed(hout_pos[i])) - ep) > TOL) begin
          failures++; $display("FAIL H[%0d]: got %0d expected %f", k, $signed(hout_pos[i]), ep);
        end
        if (absr(real'($signed(hout_neg[i])) - en) > TOL) begin
          failures++; $display("FAIL H[%0d] (neg port): got %0d expected %f", kn, $signed(hout_neg[i]), en);
        end
        if (absr(real'($signed(hout_pos[i])) - ep) > maxerr) maxerr = absr(real'($signed(hout_pos[i])) - ep);
      end
      checks++;
      if (int'(hout_k) != 4 * seen) begin failures++; $display("FAIL order k=%0d", hout_k); end
      seen++;
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected_clocks();
    int n, m;
    n = 1 + P / 16 + P / 8;                          // start, load, unload
    for (int s = 0; s < LP / 2; s++) begin
      m = 4 ** (s + 1);
      n += (s == 0) ? P / 8 : P / 8 + P / m;
      n += 6;                                        // pipeline drain before the stage
    end
    return n + 6;                                    // drain after the last stage
  endfunction

  initial begin
    int t0;
    rst_n = 0; start = 0; pcm_we = 0; pcm_addr = '0; pcm_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < P / 4; i++) begin
      pcm_we = 1; pcm_addr = QA'(i);
      pcm_data = WC'($rtoi($floor($sin(2.0 * PI * i / P) * 65536.0 + 0.5)));
      @(negedge clk);
    end
    pcm_we = 0;
    for (int run = 0; run < 6; run++) begin
      for (int n = 0; n < P; n++) begin
        case (run)
          0, 5: xs[n] = $urandom_range(0, 200000) - 100000;
          1: xs[n] = $rtoi(120000.0 * $cos(2.0 * PI * 37 * n / P));
          2: xs[n] = $rtoi(120000.0 * $sin(2.0 * PI * 90 * n / P));
          3: xs[n] = (n == 5) ? 131071 : 0;
          default: xs[n] = 131071;
        endcase
      end
      for (int k = 0; k < P; k++) begin
        real s;
        s = 0.0;
        for (int n = 0; n < P; n++)
          s += xs[n] * ($cos(2.0 * PI * n * k / P) + $sin(2.0 * PI * n * k / P));
        href[k] = s / P;
      end
      seen = 0; maxerr = 0.0;
      start = 1; t0 = cyc;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      #1;
      checks++;
      if (seen != P / 8) begin failures++; $display("FAIL %0d output words", seen); end
      checks++;
      if (cyc - t0 != expected_clocks()) begin
        failures++; $display("FAIL run time %0d clocks, expected %0d", cyc - t0, expected_clocks());
      end
      $display("run %0d: %0d clocks, largest error %f LSB", run, cyc - t0, maxerr);
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL busy after done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
