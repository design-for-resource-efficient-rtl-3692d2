// tb_sdp_ram: self-checking test of the simple dual-port RAM: random writes
// and reads against a model, one-clock read latency, output held without re, old data on a
// same-clock read/write of one word.
module tb_sdp_ram;
  localparam int unsigned DEPTH = 64, W = 40, AW = $clog2(DEPTH);
  logic clk = 0;
  always #5 clk = ~clk;
  logic we, re;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  sdp_ram #(.DEPTH(DEPTH), .W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = '0; raddr = '0; wdata = '0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      we = 1; waddr = AW'(i); wdata = {$urandom, $urandom}; model[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int it = 0; it < 300; it++) begin
      logic [AW-1:0] a;
      logic [W-1:0] exp;
      a = AW'($urandom);
      re = 1; raddr = a; exp = model[a];
      we = $urandom_range(0, 1); waddr = ($urandom_range(0, 3) == 0) ? a : AW'($urandom);
      wdata = {$urandom, $urandom};
      @(negedge clk);
      if (we) model[waddr] = wdata;
      checks++;
      if (rdata !== exp) begin
        failures++;
        $display("FAIL read %0d: got %h expected %h", a, rdata, exp);
      end
      // without re the output register must hold
      re = 0; we = 0; raddr = AW'($urandom);
      @(negedge clk);
      checks++;
      if (rdata !== exp) begin
        failures++;
        $display("FAIL output changed without re");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
