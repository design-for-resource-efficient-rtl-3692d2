// sdp_ram: simple dual-port RAM, one write port and one synchronous read port.
//
// Used for the frequency address memory (one region per multi-stage filter)
// and for the sparse spectrum memory that holds the final result. A write
// with we=1 stores wdata at waddr at the clock edge; rdata shows the word at
// raddr one clock after re=1 (old data if the same word is written in that
// clock). Depth and width are parameters; the organisation is this design's
// own choice, the document only names the two memories and their sizes.
module sdp_ram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned W     = 57,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
