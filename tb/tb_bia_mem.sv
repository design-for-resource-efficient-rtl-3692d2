// tb_bia_mem: self-checking test of the binary indicator array: clear all
// words (with a competing set in the same word, which must lose), set random bits, and read every bit through all read ports, checking
// the one-clock read latency.
module tb_bia_mem;
  localparam int unsigned NBIT = 512, BW = 16, NR = 3;
  localparam int unsigned NWD = NBIT / BW, BA = $clog2(NBIT), WA = $clog2(NWD);
  logic clk = 0;
  always #5 clk = ~clk;
  logic clr_en, set_en;
  logic [WA-1:0] clr_word;
  logic [BA-1:0] set_bit;
  logic [NR-1:0] rd_en, rd_val;
  logic [NR-1:0][BA-1:0] rd_bit;
  bit model [NBIT];
  int checks = 0, failures = 0;

  bia_mem #(.NBIT(NBIT), .BW(BW), .NR(NR)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr_en = 0; set_en = 0; rd_en = '0; clr_word = '0; set_bit = '0; rd_bit = '0;
    for (int rep = 0; rep < 2; rep++) begin
      @(negedge clk);
      // clear every word; a set of a bit in the word being cleared must lose
      for (int w = 0; w < NWD; w++) begin
        clr_en = 1; clr_word = WA'(w);
        set_en = 1; set_bit = BA'(w * BW + $urandom_range(0, BW - 1));
        @(negedge clk);
      end
      clr_en = 0; set_en = 0;
      foreach (model[i]) model[i] = 0;
      for (int i = 0; i < 60; i++) begin
        set_en = 1; set_bit = BA'($urandom); model[set_bit] = 1;
        @(negedge clk);
      end
      set_en = 0;
      for (int i = 0; i < NBIT; i += NR) begin
        for (int r = 0; r < NR; r++) rd_bit[r] = BA'((i + r * 37) % NBIT);
        rd_en = '1;
        @(negedge clk);
        rd_en = '0;
        for (int r = 0; r < NR; r++) begin
          checks++;
          if (rd_val[r] !== model[rd_bit[r]]) begin
            failures++;
            $display("FAIL bit %0d port %0d: got %b", rd_bit[r], r, rd_val[r]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
