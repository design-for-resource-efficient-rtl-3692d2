// tb_hs2fs_psd: self-checking test of the Hartley-to-Fourier converter and
// PSD estimator. Random Hartley values are streamed one group of four bins per
// clock; each result is checked against Re = (H[k]+H[-k])/2,
// Im = (H[-k]-H[k])/2 (floor division) and PSD = Re^2 + Im^2, computed here
// in plain integer arithmetic, and the latency must be three clocks.
module tb_hs2fs_psd;
  localparam int unsigned P = 64, W = 18, LP = $clog2(P), PW = 2 * W;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, out_valid;
  logic [LP-1:0] in_k, out_k;
  logic [3:0][W-1:0] hpos, hneg, re, im;
  logic [3:0][PW-1:0] psd;
  int checks = 0, failures = 0;
  int exp_re [$], exp_im [$];
  longint exp_psd [$];
  int exp_k [$];
  int sent_at [$];
  int cyc = 0;

  hs2fs_psd #(.P(P), .W(W)) dut (.*);

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int fdiv2(input int x);
    return (x >= 0) ? x / 2 : -((-x + 1) / 2);
  endfunction

  always @(negedge clk) begin
    if (out_valid) begin
      int k;
      k = exp_k.pop_front();
      checks++;
      if (int'(out_k) != k || cyc - sent_at.pop_front() != 3) begin
        failures++;
        $display("FAIL k/latency: got k=%0d expected %0d", out_k, k);
      end
      for (int i = 0; i < 4; i++) begin
        int er, ei;
        longint ep;
        er = exp_re.pop_front(); ei = exp_im.pop_front(); ep = exp_psd.pop_front();
        checks += 3;
        if ($signed(re[i]) != er) begin failures++; $display("FAIL re %0d: %0d vs %0d", k+i, $signed(re[i]), er); end
        if ($signed(im[i]) != ei) begin failures++; $display("FAIL im %0d: %0d vs %0d", k+i, $signed(im[i]), ei); end
        if (longint'(psd[i]) != ep) begin failures++; $display("FAIL psd %0d: %0d vs %0d", k+i, psd[i], ep); end
      end
    end
  end

  initial begin
    rst_n = 0; in_valid = 0; in_k = '0; hpos = '0; hneg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 100; it++) begin
      in_valid = ($urandom_range(0, 3) != 0);
      in_k = LP'(4 * $urandom_range(0, P / 8 - 1));
      for (int i = 0; i < 4; i++) begin
        int hp, hn;
        hp = (it < 5) ? ((i % 2) ? -131072 : 131071) : $urandom_range(0, 262143) - 131072;
        hn = (it < 5) ? -131072 : $urandom_range(0, 262143) - 131072;
        hpos[i] = W'(hp); hneg[i] = W'(hn);
        if (in_valid) begin
          exp_re.push_back(fdiv2(hn + hp));
          exp_im.push_back(fdiv2(hn - hp));
          exp_psd.push_back(longint'(fdiv2(hn + hp)) * fdiv2(hn + hp) + longint'(fdiv2(hn - hp)) * fdiv2(hn - hp));
        end
      end
      if (in_valid) begin exp_k.push_back(int'(in_k)); sent_at.push_back(cyc); end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (exp_k.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
