// tb_woctad_ram: self-checking test of the eight-bank dual-port memory.
// Writes random woctads through both ports, reads them back through the other
// port, checks the one-clock read latency, read-before-write on one port and
// that port B wins a same-word write collision.
module tb_woctad_ram;
  localparam int unsigned DEPTH = 256, W = 18, NB = 8, SW = $clog2(DEPTH / NB);
  logic clk = 0;
  always #5 clk = ~clk;
  logic [NB-1:0] a_en, a_we, b_en, b_we;
  logic [NB-1:0][SW-1:0] a_addr, b_addr;
  logic [NB-1:0][W-1:0] a_wdata, b_wdata, a_rdata, b_rdata;
  int checks = 0, failures = 0;
  logic [W-1:0] model [NB][DEPTH/NB];

  woctad_ram #(.DEPTH(DEPTH), .W(W)) dut (.*);

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_en = '0; a_we = '0; b_en = '0; b_we = '0; a_addr = '0; b_addr = '0; a_wdata = '0; b_wdata = '0;
    @(negedge clk);
    // fill: port A writes even slots, port B odd slots
    for (int s = 0; s < DEPTH / NB; s += 2) begin
      for (int b = 0; b < NB; b++) begin
        a_addr[b] = SW'(s); b_addr[b] = SW'(s + 1);
        a_wdata[b] = W'($urandom); b_wdata[b] = W'($urandom);
        model[b][s] = a_wdata[b]; model[b][s+1] = b_wdata[b];
      end
      a_en = '1; a_we = '1; b_en = '1; b_we = '1;
      @(negedge clk);
    end
    a_en = '0; a_we = '0; b_en = '0; b_we = '0;
    // read back with random per-bank addresses on both ports
    for (int it = 0; it < 200; it++) begin
      logic [NB-1:0][SW-1:0] ra, rb;
      for (int b = 0; b < NB; b++) begin
        ra[b] = SW'($urandom_range(0, DEPTH / NB - 1));
        rb[b] = SW'($urandom_range(0, DEPTH / NB - 1));
      end
      a_addr = ra; b_addr = rb; a_en = '1; b_en = '1;
      @(negedge clk);
      a_en = '0; b_en = '0;
      for (int b = 0; b < NB; b++) begin
        check(a_rdata[b], model[b][ra[b]], "port A read");
        check(b_rdata[b], model[b][rb[b]], "port B read");
      end
    end
    // read-before-write on port A, collision with port B on bank 3
    a_addr = '0; b_addr = '0;
    a_addr[2] = 5; a_wdata[2] = 18'h1234; a_en = 8'h04; a_we = 8'h04;
    @(negedge clk);
    check(a_rdata[2], model[2][5], "read-before-write");
    model[2][5] = 18'h1234;
    a_addr[3] = 7; b_addr[3] = 7; a_wdata[3] = 18'h0AAAA; b_wdata[3] = 18'h15555;
    a_en = 8'h08; a_we = 8'h08; b_en = 8'h08; b_we = 8'h08;
    @(negedge clk);
    a_we = '0; b_en = '0; b_we = '0; a_en = 8'h0C; a_addr[2] = 5;
    @(negedge clk);
    a_en = '0;
    check(a_rdata[3], 18'h15555, "port B wins collision");
    check(a_rdata[2], 18'h1234, "written word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
