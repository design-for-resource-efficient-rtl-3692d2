// tb_rfht_pcm: self-checking test of the coefficient table memory: loads
// random words (all three tables take the same load), then reads random
// addresses through all six read ports and checks them against a model,
// including that a read without rd_en keeps the previous output.
module tb_rfht_pcm;
  localparam int unsigned P = 256, WC = 18, QA = $clog2(P / 4);
  logic clk = 0;
  always #5 clk = ~clk;
  logic load_we, rd_en;
  logic [QA-1:0] load_addr;
  logic [WC-1:0] load_data;
  logic [2:0][QA-1:0] rd_addr_s, rd_addr_c;
  logic [2:0][WC-1:0] rd_data_s, rd_data_c, hold_s;
  logic [WC-1:0] model [P/4];
  int checks = 0, failures = 0;

  rfht_pcm #(.P(P), .WC(WC)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_we = 0; rd_en = 0; load_addr = '0; load_data = '0; rd_addr_s = '0; rd_addr_c = '0;
    @(negedge clk);
    for (int i = 0; i < P / 4; i++) begin
      load_we = 1; load_addr = QA'(i); load_data = WC'($urandom); model[i] = load_data;
      @(negedge clk);
    end
    load_we = 0;
    for (int it = 0; it < 100; it++) begin
      for (int r = 0; r < 3; r++) begin
        rd_addr_s[r] = QA'($urandom); rd_addr_c[r] = QA'($urandom);
      end
      rd_en = 1;
      @(negedge clk);
      rd_en = 0;
      for (int r = 0; r < 3; r++) begin
        checks += 2;
        if (rd_data_s[r] !== model[rd_addr_s[r]]) begin failures++; $display("FAIL s%0d", r); end
        if (rd_data_c[r] !== model[rd_addr_c[r]]) begin failures++; $display("FAIL c%0d", r); end
      end
      hold_s = rd_data_s;
      rd_addr_s = '0;
      @(negedge clk);
      checks++;
      if (rd_data_s !== hold_s) begin failures++; $display("FAIL output changed without rd_en"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
