// tb_rfht_double_butterfly: self-checking test of the double butterfly.
// For random inputs and random angles theta = 2*pi*m/P it checks, to within
// 3 LSB, the radix-4 decimation-in-time Hartley step written straight from
// its definition:
//   yk[q]  = 1/4 * sum_r ( a_r cos(r(theta+q*pi/2)) + b_r sin(r(theta+q*pi/2)) )
//   ykp[q] = 1/4 * sum_r ( b_r cos(r(phi+q*pi/2))   + a_r sin(r(phi+q*pi/2)) )
// with phi = pi/2 - theta (the partner index k' = M/4 - k), saturated to
// 18 bits. Coefficients are given as round(2^16 c), c-s, c+s. The first-stage
// mode (two independent 4-point transforms) and the four-clock latency are
// checked as well.
module tb_rfht_double_butterfly;
  localparam int unsigned W = 18, WC = 18, CF = 16, P = 1024;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, mode_dht4, out_valid;
  logic [3:0][W-1:0] a, b, yk, ykp;
  logic [2:0][WC-1:0] c, cms, cps;
  int checks = 0, failures = 0, cyc = 0;
  real exp_y [$], exp_yp [$];
  int t_in [$];

  rfht_double_butterfly #(.W(W), .WC(WC), .CF(CF)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic real clamp(input real x);
    if (x > 131071.0) return 131071.0;
    if (x < -131072.0) return -131072.0;
    return x;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid) t_in.push_back(cyc);
  end

  always @(negedge clk) begin
    if (out_valid) begin
      checks++;
      if (cyc - t_in.pop_front() != 4) begin failures++; $display("FAIL latency"); end
      for (int q = 0; q < 4; q++) begin
        real e, ep;
        e = exp_y.pop_front(); ep = exp_yp.pop_front();
        checks += 2;
        if (absr(real'($signed(yk[q])) - e) > 3.0) begin
          failures++; $display("FAIL yk[%0d]: got %0d expected %f", q, $signed(yk[q]), e);
        end
        if (absr(real'($signed(ykp[q])) - ep) > 3.0) begin
          failures++; $display("FAIL ykp[%0d]: got %0d expected %f", q, $signed(ykp[q]), ep);
        end
      end
    end
  end

  initial begin
    rst_n = 0; in_valid = 0; mode_dht4 = 0; a = '0; b = '0; c = '0; cms = '0; cps = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      int m, amp;
      real th, ar [4], br [4];
      mode_dht4 = (it % 5 == 0);
      m = mode_dht4 ? 0 : $urandom_range(0, P / 8);
      th = 2.0 * PI * m / P;
      amp = (it < 40) ? 131071 : 40000;      // early inputs large enough to saturate
      for (int r = 0; r < 4; r++) begin
        int ai, bi;
        ai = $urandom_range(0, 2 * amp) - amp; bi = $urandom_range(0, 2 * amp) - amp;
        a[r] = W'(ai); b[r] = W'(bi); ar[r] = ai; br[r] = bi;
      end
      for (int r = 1; r <= 3; r++) begin
        int ci, si;
        ci = $rtoi($floor($cos(r * th) * 65536.0 + 0.5));
        si = $rtoi($floor($sin(r * th) * 65536.0 + 0.5));
        c[r-1] = WC'(ci); cms[r-1] = WC'(ci - si); cps[r-1] = WC'(ci + si);
      end
      for (int q = 0; q < 4; q++) begin
        real s, sp, ph;
        s = 0.0; sp = 0.0;
        ph = PI / 2.0 - th;
        for (int r = 0; r < 4; r++) begin
          if (mode_dht4) begin
            s  += ar[r] * ($cos(2.0 * PI * r * q / 4) + $sin(2.0 * PI * r * q / 4));
            sp += br[r] * ($cos(2.0 * PI * r * q / 4) + $sin(2.0 * PI * r * q / 4));
          end else begin
            s  += ar[r] * $cos(r * (th + q * PI / 2.0)) + br[r] * $sin(r * (th + q * PI / 2.0));
            sp += br[r] * $cos(r * (ph + q * PI / 2.0)) + ar[r] * $sin(r * (ph + q * PI / 2.0));
          end
        end
        exp_y.push_back(clamp(s / 4.0));
        exp_yp.push_back(clamp(sp / 4.0));
      end
      in_valid = 1;
      @(negedge clk);
      if ($urandom_range(0, 2) == 0) begin in_valid = 0; @(negedge clk); end
    end
    in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (exp_y.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
