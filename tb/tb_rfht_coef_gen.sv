// tb_rfht_coef_gen: self-checking test of the twiddle generator together with
// the quarter-wave sine tables it reads. The tables are filled with
// round(2^16 * sin(2*pi*i/P)); then every twiddle index m1 = 0..P-1 is
// requested back-to-back and the three outputs c, c-s and c+s for the angles
// r*2*pi*m1/P (r = 1..3) are compared with values computed here with $cos and
// $sin, to within 2 LSB. The output latency of two clocks is checked too.
module tb_rfht_coef_gen;
  localparam int unsigned P = 256, WC = 18, CF = 16, LP = $clog2(P), QA = LP - 2;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, pcm_en, out_valid, load_we;
  logic [LP-1:0] m1;
  logic [2:0][QA-1:0] pcm_addr_s, pcm_addr_c;
  logic [2:0][WC-1:0] pcm_data_s, pcm_data_c, c, cms, cps;
  logic [QA-1:0] load_addr;
  logic [WC-1:0] load_data;
  int checks = 0, failures = 0;
  int sent [$];

  rfht_coef_gen #(.P(P), .WC(WC), .CF(CF)) dut (.*);
  rfht_pcm #(.P(P), .WC(WC)) u_pcm (
    .clk, .load_we, .load_addr, .load_data, .rd_en(pcm_en), .rd_addr_s(pcm_addr_s),
    .rd_addr_c(pcm_addr_c), .rd_data_s(pcm_data_s), .rd_data_c(pcm_data_c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic near(input logic [WC-1:0] got, input real exp, input string what, input int m, input int r);
    real d;
    d = real'($signed(got)) - exp;
    checks++;
    if (d > 2.0 || d < -2.0) begin
      failures++;
      $display("FAIL %s m1=%0d r=%0d: got %0d expected %f", what, m, r, $signed(got), exp);
    end
  endtask

  always @(negedge clk) begin
    if (out_valid) begin
      int m;
      m = sent.pop_front();
      for (int r = 1; r <= 3; r++) begin
        real ang, cv, sv;
        ang = 2.0 * PI * r * m / P;
        cv = $cos(ang) * 65536.0; sv = $sin(ang) * 65536.0;
        near(c[r-1], cv, "c", m, r);
        near(cms[r-1], cv - sv, "c-s", m, r);
        near(cps[r-1], cv + sv, "c+s", m, r);
      end
    end
  end

  int t_in [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid) t_in.push_back(cyc);
    if (out_valid) begin
      checks++;
      if (cyc - t_in.pop_front() != 2) begin failures++; $display("FAIL latency"); end
    end
  end

  initial begin
    rst_n = 0; in_valid = 0; m1 = '0; load_we = 0; load_addr = '0; load_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < P / 4; i++) begin
      load_we = 1; load_addr = QA'(i);
      load_data = WC'($rtoi($floor($sin(2.0 * PI * i / P) * 65536.0 + 0.5)));
      @(negedge clk);
    end
    load_we = 0;
    for (int m = 0; m < P; m++) begin
      in_valid = 1; m1 = LP'(m); sent.push_back(m);
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (sent.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
