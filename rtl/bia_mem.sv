// bia_mem: binary indicator array (BIA) of one short dense FFT.
//
// One bit per Fourier bin (NBIT = P/2 bits): a 1 marks a dominant bin. The
// bits are stored in BW-bit words. The dominant-bin locator clears the array a
// word per clock (clr_en, clr_word) and then sets one bit per clock (set_en,
// set_bit; a read-modify-write of one word). NR read ports serve the stages
// of the multi-stage filters; each returns the bit at rd_bit one clock after
// rd_en. The rotation of the filters' set order makes each BIA the target of
// at most one stage of each column, so NR = L-1 read ports are enough.
// Bit array, its size and its use follow the document; the word width, the
// clear/set ports and the registered reads are this design's choice.
module bia_mem #(
  parameter int unsigned NBIT = 8192,
  parameter int unsigned BW   = 16,
  parameter int unsigned NR   = 3,
  localparam int unsigned NWD = (NBIT + BW - 1) / BW,
  localparam int unsigned BA  = $clog2(NBIT),
  localparam int unsigned WA  = (NWD > 1) ? $clog2(NWD) : 1
) (
  input  logic                  clk,
  input  logic                  clr_en,
  input  logic [WA-1:0]         clr_word,
  input  logic                  set_en,
  input  logic [BA-1:0]         set_bit,
  input  logic [NR-1:0]         rd_en,
  input  logic [NR-1:0][BA-1:0] rd_bit,
  output logic [NR-1:0]         rd_val
);
  localparam int unsigned SB = $clog2(BW);

  logic [BW-1:0] mem [NWD];

  always_ff @(posedge clk) begin
    if (clr_en) mem[clr_word] <= '0;
    else if (set_en) mem[set_bit[BA-1:SB]][set_bit[SB-1:0]] <= 1'b1;
    for (int r = 0; r < NR; r++) begin
      if (rd_en[r]) rd_val[r] <= mem[rd_bit[r][BA-1:SB]][rd_bit[r][SB-1:0]];
    end
  end
endmodule
