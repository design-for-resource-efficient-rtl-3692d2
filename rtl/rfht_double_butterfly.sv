// rfht_double_butterfly: generic radix-4 double butterfly of the regularized
// fast Hartley transform (nine-multiplier, twenty-five-adder form).
//
// One radix-4 decimation-in-time FHT step combines four length-M/4 Hartley
// transforms H_r (r = 0..3) into one of length M. For an index k and its
// partner k' = M/4 - k the eight inputs are a_r = H_r[k] and b_r = H_r[-k];
// the eight outputs are H[k + q*M/4] (yk[q]) and H[k' + q*M/4] (ykp[q]),
// q = 0..3. Datapath, one pass per clock:
//   rotation  (r = 1..3, angle r*theta, theta = 2*pi*k/M), three multipliers
//             and three adders each:  t = c*(a+b),  U = t - b*(c-s),
//             V = t - a*(c+s), i.e. U = c*a + s*b and V = c*b - s*a;
//   layer 1   eight adders:  A=U0+U2  B=U0-U2  C=U1+U3  D=V1-V3
//                            E0=b0-V2 F0=U1-U3 E1=b0+V2 F1=-(V1+V3)
//   layer 2   eight adders:  yk  = {A+C, B+D, A-C, B-D}
//                            ykp = {E0+F0, E1+F1, E0-F0, E1-F1}
// with U0 = a0. In the first FHT stage (mode_dht4 = 1, theta = 0) the unit
// instead computes two independent 4-point Hartley transforms, of a[] into yk
// and of b[] into ykp, by re-selecting four first-layer terms (so that the
// first stage also handles eight samples per clock).
// Every output is divided by 4 (arithmetic shift, one radix-4 stage's worth of
// growth) and saturated to W bits, so a full transform is scaled by 1/P.
// Timing: inputs with in_valid at clock t, outputs with out_valid at t+4;
// coefficients must be presented in the same clock as the data.
// The operation count (nine multipliers, three-multiplier rotations fed with
// c, c-s and c+s, sixteen butterfly adders) and the signal-flow structure
// follow the document; the exact equations, the first-stage mode, the scaling
// and the pipeline depth were derived for this design.
module rfht_double_butterfly #(
  parameter int unsigned W  = 18,
  parameter int unsigned WC = 18,
  parameter int unsigned CF = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic                   mode_dht4,
  input  logic [3:0][W-1:0]      a,
  input  logic [3:0][W-1:0]      b,
  input  logic [2:0][WC-1:0]     c,
  input  logic [2:0][WC-1:0]     cms,
  input  logic [2:0][WC-1:0]     cps,
  output logic                   out_valid,
  output logic [3:0][W-1:0]      yk,
  output logic [3:0][W-1:0]      ykp
);
  localparam int unsigned IW = W + 4;            // internal sum width
  localparam int unsigned PW = W + 1 + WC + 1;   // product width

  typedef logic signed [IW-1:0] iw_t;
  typedef logic signed [PW-1:0] pw_t;

  logic [3:0] vld;
  logic [1:0] mode_p;

  // stage 1: products
  pw_t t1 [3], p1 [3], q1 [3];
  iw_t a0_1, b0_1;
  // stage 2: rotated terms
  iw_t u2 [4], v2 [4];
  // stage 3: first adder layer
  iw_t A3, B3, C3, D3, E03, F03, E13, F13;

  function automatic logic [W-1:0] sat4(input iw_t x);
    iw_t s;
    s = x >>> 2;
    if (s > iw_t'(2 ** (W - 1) - 1))       return {1'b0, {(W-1){1'b1}}};
    else if (s < -iw_t'(2 ** (W - 1)))     return {1'b1, {(W-1){1'b0}}};
    else                                   return s[W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[2:0], in_valid};
  end
  assign out_valid = vld[3];

  always_ff @(posedge clk) begin
    mode_p <= {mode_p[0], mode_dht4};
    // stage 1
    a0_1 <= iw_t'($signed(a[0]));
    b0_1 <= iw_t'($signed(b[0]));
    for (int r = 0; r < 3; r++) begin
      t1[r] <= pw_t'($signed(c[r]))   * (pw_t'($signed(a[r+1])) + pw_t'($signed(b[r+1])));
      p1[r] <= pw_t'($signed(cms[r])) * pw_t'($signed(b[r+1]));
      q1[r] <= pw_t'($signed(cps[r])) * pw_t'($signed(a[r+1]));
    end
    // stage 2
    u2[0] <= a0_1;
    v2[0] <= b0_1;
    for (int r = 0; r < 3; r++) begin
      u2[r+1] <= iw_t'((t1[r] - p1[r]) >>> CF);
      v2[r+1] <= iw_t'((t1[r] - q1[r]) >>> CF);
    end
    // stage 3: first adder layer (v2[0] carries b0)
    A3 <= u2[0] + u2[2];
    B3 <= u2[0] - u2[2];
    C3 <= u2[1] + u2[3];
    if (mode_p[1]) begin
      D3  <= u2[1] - u2[3];
      E03 <= v2[0] + v2[2];
      F03 <= v2[1] + v2[3];
      E13 <= v2[0] - v2[2];
      F13 <= v2[1] - v2[3];
    end else begin
      D3  <= v2[1] - v2[3];
      E03 <= v2[0] - v2[2];
      F03 <= u2[1] - u2[3];
      E13 <= v2[0] + v2[2];
      F13 <= -(v2[1] + v2[3]);
    end
    // stage 4: second adder layer, scale and saturate
    yk[0]  <= sat4(A3 + C3);
    yk[1]  <= sat4(B3 + D3);
    yk[2]  <= sat4(A3 - C3);
    yk[3]  <= sat4(B3 - D3);
    ykp[0] <= sat4(E03 + F03);
    ykp[1] <= sat4(E13 + F13);
    ykp[2] <= sat4(E03 - F03);
    ykp[3] <= sat4(E13 - F13);
  end
endmodule
