// tb_srg_window_unit: self-checking test of the reorder-and-window stage at a
// reduced size (N=1024, P=64, L=2). The testbench models the address memory,
// the coefficient memory and the eight-bank sample memory, all with one clock
// of read latency. Set s holds sample indices (sigma_s * n) mod N with odd
// sigma_s, so each woctad hits eight distinct banks. Every written TSM word is
// compared with round-down((x * w) / 2^16) with saturation, computed here;
// the number of writes, the set_done pulses and the total run time
// (L*P/8 + 4 clocks) are checked as well. Coefficients include extreme values
// so that saturation is exercised.
module tb_srg_window_unit;
  localparam int unsigned N = 1024, P = 64, L = 2, W = 18, WC = 18, CF = 16, NB = 8;
  localparam int unsigned AW = $clog2(N), DSW = $clog2(N / NB), MSW = $clog2(L * P / NB);
  localparam int unsigned TSW = $clog2(P / NB), LW = 1;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, busy, done, set_done, mem_en, dsm_en, tsm_we;
  logic [LW-1:0] set_idx, tsm_set;
  logic [MSW-1:0] mem_slot;
  logic [NB-1:0][AW-1:0] dam_rdata;
  logic [NB-1:0][WC-1:0] wcm_rdata;
  logic [NB-1:0][DSW-1:0] dsm_addr;
  logic [NB-1:0][W-1:0] dsm_rdata, tsm_wdata;
  logic [TSW-1:0] tsm_slot;

  int checks = 0, failures = 0;
  int xs [N];
  int dam [L * P];
  int wcm [L * P];
  int sigma [L] = '{37, 301};
  int writes = 0, setdones = 0, cyc = 0, t_start = 0, t_done = -1;

  srg_window_unit #(.N(N), .P(P), .L(L), .W(W), .WC(WC), .CF(CF)) dut (.*);

  always @(posedge clk) cyc <= cyc + 1;

  // memory models
  always @(posedge clk) begin
    if (mem_en)
      for (int b = 0; b < NB; b++) begin
        dam_rdata[b] <= AW'(dam[int'(mem_slot) * NB + b]);
        wcm_rdata[b] <= WC'(wcm[int'(mem_slot) * NB + b]);
      end
    if (dsm_en)
      for (int b = 0; b < NB; b++) dsm_rdata[b] <= W'(xs[int'(dsm_addr[b]) * NB + b]);
  end

  function automatic int expected(input int x, input int w);
    longint p;
    p = longint'(x) * w;
    p = p >>> CF;
    if (p > 131071) p = 131071;
    if (p < -131072) p = -131072;
    return int'(p);
  endfunction

  always @(negedge clk) begin
    if (tsm_we) begin
      writes++;
      for (int b = 0; b < NB; b++) begin
        int n, e;
        n = int'(tsm_set) * P + int'(tsm_slot) * NB + b;
        e = expected(xs[dam[n]], wcm[n]);
        checks++;
        if ($signed(tsm_wdata[b]) != 18'(e)) begin
          failures++;
          $display("FAIL set %0d slot %0d lane %0d: got %0d expected %0d", tsm_set, tsm_slot, b,
                   $signed(tsm_wdata[b]), e);
        end
      end
    end
    if (set_done) begin
      checks++;
      if (int'(set_idx) != setdones || int'(tsm_slot) != P / NB - 1) begin
        failures++;
        $display("FAIL set_done order");
      end
      setdones++;
    end
    if (done) t_done = cyc;
  end

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (xs[i]) xs[i] = (i < 4) ? ((i % 2) ? 131071 : -131072) : $urandom_range(0, 262143) - 131072;
    for (int s = 0; s < L; s++)
      for (int n = 0; n < P; n++) begin
        dam[s * P + n] = (sigma[s] * n + 4 * s) % N;
        case ($urandom_range(0, 7))
          0: wcm[s * P + n] = 131071;           // ~2.0: saturates on large samples
          1: wcm[s * P + n] = -131072;
          default: wcm[s * P + n] = $urandom_range(0, 131071) - 65536;
        endcase
      end
    rst_n = 0; start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int run = 0; run < 2; run++) begin
      start = 1; t_start = cyc;
      @(negedge clk);
      start = 0;
      wait (t_done >= 0);
      @(negedge clk);
      checks++;
      if (t_done - t_start != L * P / NB + 4) begin
        failures++;
        $display("FAIL run time %0d clocks", t_done - t_start);
      end
      checks++;
      if (writes != (run + 1) * L * P / NB || setdones != L) begin
        failures++;
        $display("FAIL writes=%0d set_done=%0d", writes, setdones);
      end
      repeat (3) @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL still busy"); end
      setdones = 0; t_done = -1;
      for (int s = 0; s < L; s++) sigma[s] = 2 * $urandom_range(0, N / 2 - 1) + 1;
      for (int s = 0; s < L; s++)
        for (int n = 0; n < P; n++) dam[s * P + n] = (sigma[s] * n) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
