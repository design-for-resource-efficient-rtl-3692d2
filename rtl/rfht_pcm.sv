// rfht_pcm: coefficient memory of the FHT processing element (PCM).
//
// Three identical one-level look-up tables, one per twiddle rotation of the
// double butterfly (angles theta, 2*theta, 3*theta), each holding one quadrant
// of the sine function: entry i = round(sin(2*pi*i/P) * 2^CF), i = 0..P/4-1,
// so the three tables hold 3P/4 words together. Each table is dual-port, so
// the sine and the cosine of its angle are read in the same clock: six reads
// per clock in all, with one clock of latency. The tables are loaded through a
// single write port that writes all three copies at once (load before use).
// The three quadrant tables and their size follow the document; the load port
// and the coefficient format are this design's choice.
module rfht_pcm #(
  parameter int unsigned P  = 16384,
  parameter int unsigned WC = 18,
  localparam int unsigned QA = $clog2(P / 4)
) (
  input  logic                 clk,
  input  logic                 load_we,
  input  logic [QA-1:0]        load_addr,
  input  logic [WC-1:0]        load_data,
  input  logic                 rd_en,
  input  logic [2:0][QA-1:0]   rd_addr_s,   // sine-port address of table r
  input  logic [2:0][QA-1:0]   rd_addr_c,   // cosine-port address of table r
  output logic [2:0][WC-1:0]   rd_data_s,
  output logic [2:0][WC-1:0]   rd_data_c
);
  for (genvar r = 0; r < 3; r++) begin : g_lut
    logic [WC-1:0] lut [P/4];
    always_ff @(posedge clk) begin
      if (load_we) lut[load_addr] <= load_data;
      if (rd_en) begin
        rd_data_s[r] <= lut[rd_addr_s[r]];
        rd_data_c[r] <= lut[rd_addr_c[r]];
      end
    end
  end
endmodule
