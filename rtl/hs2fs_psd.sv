// hs2fs_psd: Hartley-space to Fourier-space conversion and power spectral
// density estimation, four consecutive bins per clock.
//
// For a real-valued input the Fourier transform follows from the Hartley
// transform H: Re X[k] = (H[k] + H[-k]) / 2 and Im X[k] = (H[-k] - H[k]) / 2,
// and the power spectrum is PSD[k] = Re^2 + Im^2. Each clock takes four
// positive-index values H[k..k+3] and the matching negative-index values
// H[-k..-k-3] (index modulo P) and, through eight adders, eight squarers and
// four adders, returns Re, Im and PSD for bins k..k+3. Fed one woctad per
// clock it converts a P-point transform (P/2 bins) in P/8 clocks.
// Timing: inputs with in_valid at clock t, all outputs with out_valid at t+3
// (Re/Im registered at t+1 and delayed to line up with the PSD).
// The arithmetic (eight adders, eight multipliers, four adders for four bins
// per clock) follows the document. The halving by arithmetic shift and the
// 2W-bit unsigned PSD word are this design's choices.
module hs2fs_psd #(
  parameter int unsigned P  = 16384,
  parameter int unsigned W  = 18,
  localparam int unsigned LP = $clog2(P),
  localparam int unsigned PW = 2 * W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [LP-1:0]         in_k,
  input  logic [3:0][W-1:0]     hpos,
  input  logic [3:0][W-1:0]     hneg,
  output logic                  out_valid,
  output logic [LP-1:0]         out_k,
  output logic [3:0][W-1:0]     re,
  output logic [3:0][W-1:0]     im,
  output logic [3:0][PW-1:0]    psd
);
  typedef logic signed [W:0] sw_t;
  typedef logic signed [PW-1:0] sp_t;

  logic [2:0]           v;
  logic [LP-1:0]        k1, k2;
  logic signed [W-1:0]  re1 [4], im1 [4], re2 [4], im2 [4];
  logic [PW-1:0]        sqr2 [4], sqi2 [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else        v <= {v[1:0], in_valid};
  end
  assign out_valid = v[2];

  always_ff @(posedge clk) begin
    sw_t sr, si;
    k1 <= in_k;
    k2 <= k1;
    out_k <= k2;
    for (int i = 0; i < 4; i++) begin
      sr = sw_t'($signed(hneg[i])) + sw_t'($signed(hpos[i]));
      si = sw_t'($signed(hneg[i])) - sw_t'($signed(hpos[i]));
      re1[i] <= sr[W:1];
      im1[i] <= si[W:1];
      re2[i] <= re1[i];
      im2[i] <= im1[i];
      sqr2[i] <= PW'(sp_t'(re1[i]) * sp_t'(re1[i]));
      sqi2[i] <= PW'(sp_t'(im1[i]) * sp_t'(im1[i]));
      re[i]  <= re2[i];
      im[i]  <= im2[i];
      psd[i] <= sqr2[i] + sqi2[i];
    end
  end
endmodule
