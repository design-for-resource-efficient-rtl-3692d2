// rfht_coef_gen: trigonometric coefficient generator of the FHT processing
// element (the "Version II" arrangement: six table values in, nine
// coefficients out).
//
// Given the angle index m1 (angle theta = 2*pi*m1/P) it produces, for the
// three rotations r = 1,2,3 of the double butterfly (angle r*theta), the
// cosine c_r together with c_r - s_r and c_r + s_r, which is what the
// three-multiplier rotation of the butterfly needs. Sine and cosine are read
// from the quadrant tables in rfht_pcm: the generator folds each angle into the
// first quadrant (address P/4 - o in the odd quadrants, sign from the upper
// quadrant bit, exact 1.0 when the folded address would be P/4) and adds.
// Six adders, no multipliers. Timing: m1 presented with in_valid at clock t
// drives the table addresses combinationally, the table answers at t+1 and
// the nine coefficients are registered at t+2 (out_valid). Coefficients are
// signed WC-bit numbers with CF fractional bits (1.0 = 2^CF).
// The six-in/nine-out structure follows the document; the folding logic and
// the number format are this design's choice.
module rfht_coef_gen #(
  parameter int unsigned P  = 16384,
  parameter int unsigned WC = 18,
  parameter int unsigned CF = 16,
  localparam int unsigned LP = $clog2(P),
  localparam int unsigned QA = LP - 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [LP-1:0]        m1,
  // connection to rfht_pcm
  output logic                 pcm_en,
  output logic [2:0][QA-1:0]   pcm_addr_s,
  output logic [2:0][QA-1:0]   pcm_addr_c,
  input  logic [2:0][WC-1:0]   pcm_data_s,
  input  logic [2:0][WC-1:0]   pcm_data_c,
  // coefficients for rotations r = 1..3 (index r-1)
  output logic                 out_valid,
  output logic [2:0][WC-1:0]   c,
  output logic [2:0][WC-1:0]   cms,   // c - s
  output logic [2:0][WC-1:0]   cps    // c + s
);
  // fold flags registered alongside the table read
  logic [2:0] neg_s, one_s, neg_c, one_c;
  logic [2:0] neg_s_q, one_s_q, neg_c_q, one_c_q;
  logic       v1;

  always_comb begin
    logic [LP-1:0] ms, mc;
    logic [1:0]    qs, qc;
    logic [QA-1:0] os, oc;
    for (int r = 0; r < 3; r++) begin
      ms = LP'(m1 * (r + 1));
      mc = ms + LP'(P / 4);
      qs = ms[LP-1:LP-2];  os = ms[QA-1:0];
      qc = mc[LP-1:LP-2];  oc = mc[QA-1:0];
      pcm_addr_s[r] = qs[0] ? QA'(-os) : os;   // P/4 - o, modulo P/4
      pcm_addr_c[r] = qc[0] ? QA'(-oc) : oc;
      neg_s[r] = qs[1];
      neg_c[r] = qc[1];
      one_s[r] = qs[0] && (os == '0);
      one_c[r] = qc[0] && (oc == '0);
    end
  end
  assign pcm_en = in_valid;

  always_ff @(posedge clk) begin
    neg_s_q <= neg_s;  one_s_q <= one_s;
    neg_c_q <= neg_c;  one_c_q <= one_c;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1 <= in_valid;
      out_valid <= v1;
    end
  end

  always_ff @(posedge clk) begin
    logic signed [WC:0] s_v, c_v;
    for (int r = 0; r < 3; r++) begin
      s_v = one_s_q[r] ? (WC+1)'(2 ** CF) : (WC+1)'($signed(pcm_data_s[r]));
      c_v = one_c_q[r] ? (WC+1)'(2 ** CF) : (WC+1)'($signed(pcm_data_c[r]));
      if (neg_s_q[r]) s_v = -s_v;
      if (neg_c_q[r]) c_v = -c_v;
      c[r]   <= c_v[WC-1:0];
      cms[r] <= WC'(c_v - s_v);
      cps[r] <= WC'(c_v + s_v);
    end
  end
endmodule
