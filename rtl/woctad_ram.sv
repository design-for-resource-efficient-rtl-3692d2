// woctad_ram: eight-bank partitioned memory built from true dual-port RAM.
//
// Every large store of the sparse FFT (data address memory, window coefficient
// memory, transform-space memory, power spectrum memory) is split into eight
// equal banks so that a woctad (eight words, at most two per bank) can be moved
// in a single clock. Word n of a data set lives in bank n mod 8 at slot n / 8.
// Each bank has two independent ports, A and B; a port reads or writes one word
// per clock. Reads are synchronous: the data for an address presented with
// en=1 appears on rdata one clock later (read-before-write on the same port).
// If both ports write the same word in the same clock, port B wins.
// The bank count and the per-bank dual-port organisation follow the document;
// the one-cycle read latency and the collision rule are this design's choice.
module woctad_ram #(
  parameter int unsigned DEPTH = 16384,   // total words (all banks)
  parameter int unsigned W     = 18,      // word width
  localparam int unsigned NB   = sfft_pkg::NBANK,
  localparam int unsigned SW   = $clog2(DEPTH / NB)
) (
  input  logic                   clk,
  input  logic [NB-1:0]          a_en,
  input  logic [NB-1:0]          a_we,
  input  logic [NB-1:0][SW-1:0]  a_addr,
  input  logic [NB-1:0][W-1:0]   a_wdata,
  output logic [NB-1:0][W-1:0]   a_rdata,
  input  logic [NB-1:0]          b_en,
  input  logic [NB-1:0]          b_we,
  input  logic [NB-1:0][SW-1:0]  b_addr,
  input  logic [NB-1:0][W-1:0]   b_wdata,
  output logic [NB-1:0][W-1:0]   b_rdata
);

  for (genvar b = 0; b < NB; b++) begin : g_bank
    logic [W-1:0] mem [DEPTH/NB];

    always_ff @(posedge clk) begin
      if (a_en[b]) begin
        a_rdata[b] <= mem[a_addr[b]];
        if (a_we[b]) mem[a_addr[b]] <= a_wdata[b];
      end
      if (b_en[b]) begin
        b_rdata[b] <= mem[b_addr[b]];
        if (b_we[b]) mem[b_addr[b]] <= b_wdata[b];
      end
    end
  end

endmodule
