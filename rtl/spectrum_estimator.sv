// spectrum_estimator: computes the sparse spectrum components by averaging
// the L short-FFT outputs that belong to each identified signal frequency.
//
// For every entry of the frequency address memory (FAM; S3 regions, entries
// 0..count-1 of each) the unit reads, from the transform-space memory (TSM) of
// each set t, the real part at bin[t] and one clock later the imaginary part
// at P - bin[t] (Fourier data are stored with Re X[k] at k and Im X[k] at
// P - k; Im X[0] is zero). Imaginary parts of sets whose conjugation flag is
// set are negated. The L values go through a pipelined adder tree of log2(L)
// stages (L-1 adders), are divided by L with an arithmetic shift, and the
// pair (Re, Im) is written with its frequency index to the sparse spectrum
// memory (SSM). One component is produced every two clocks, so the task takes
// about 2*K + log2(L) + 4 clocks for K components. ssm_count gives the number
// of components written. L must be a power of two.
// Follows the document: reading the L short-FFT outputs addressed by the FAM,
// averaging the real and the imaginary parts through the same log2(L)-stage
// adder tree on alternate clocks, SSM with (Re, Im, frequency). The
// conjugation of mirrored bins and the rounding are this design's choices.
module spectrum_estimator #(
  parameter int unsigned N  = 2097152,
  parameter int unsigned P  = 16384,
  parameter int unsigned L  = 4,
  parameter int unsigned KD = 512,
  parameter int unsigned S3 = 4,
  parameter int unsigned W  = 18,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned LP = $clog2(P),
  localparam int unsigned LB = $clog2(P / 2),
  localparam int unsigned SL = KD / S3,
  localparam int unsigned RA = (SL > 1) ? $clog2(SL) : 1,
  localparam int unsigned FW = AW + L + L * LB,
  localparam int unsigned KA = $clog2(KD),
  localparam int unsigned LL = $clog2(L),
  localparam int unsigned SW = 2 * W + AW,
  localparam int unsigned RW = (S3 > 1) ? $clog2(S3) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  output logic                       busy,
  output logic                       done,
  // FAM regions
  input  logic [S3-1:0][RA:0]        fam_count,
  output logic                       fam_re,
  output logic [RW-1:0]              fam_region,
  output logic [RA-1:0]              fam_raddr,
  input  logic [FW-1:0]              fam_rdata,   // data of the region read last clock
  // TSM reads, one per set
  output logic                       tsm_en,
  output logic [L-1:0][LP-1:0]       tsm_idx,
  input  logic [L-1:0][W-1:0]        tsm_rdata,
  // sparse spectrum memory write: {re, im, frequency}
  output logic                       ssm_we,
  output logic [KA-1:0]              ssm_waddr,
  output logic [SW-1:0]              ssm_wdata,
  output logic [KA:0]                ssm_count
);
  localparam int unsigned TW = W + LL;   // tree width

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_END} state_t;
  state_t state;

  logic [RW:0]   reg_r;
  logic [RA:0]   reg_e;
  logic          fam_pend;     // FAM data arrives this clock
  logic          im_pend;      // imaginary reads to issue this clock
  logic [L-1:0]         ent_conj;
  logic [L-1:0][LB-1:0] ent_bin;

  // tag of the TSM data arriving next clock
  logic          t_v, t_im;
  logic [L-1:0]  t_neg, t_zero;
  logic [AW-1:0] t_f;

  // unpacked FAM entry
  logic [AW-1:0]        fd_f;
  logic [L-1:0]         fd_conj;
  logic [L-1:0][LB-1:0] fd_bin;
  assign {fd_f, fd_conj, fd_bin} = fam_rdata;

  logic want_fam;
  assign want_fam = (state == S_RUN) && !fam_pend && (reg_r < (RW+1)'(S3)) &&
                    (reg_e < fam_count[reg_r[RW-1:0]]);
  assign fam_re     = want_fam;
  assign fam_region = reg_r[RW-1:0];
  assign fam_raddr  = reg_e[RA-1:0];

  always_comb begin
    tsm_en  = fam_pend | im_pend;
    tsm_idx = '0;
    for (int t = 0; t < L; t++) begin
      if (fam_pend) tsm_idx[t] = LP'(fd_bin[t]);
      else          tsm_idx[t] = LP'(P) - LP'(ent_bin[t]);
    end
  end

  logic tree_idle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; reg_r <= '0; reg_e <= '0; fam_pend <= 1'b0; im_pend <= 1'b0;
      t_v <= 1'b0; t_im <= 1'b0; t_neg <= '0; t_zero <= '0; t_f <= '0;
      ent_conj <= '0; ent_bin <= '0;
    end else begin
      fam_pend <= want_fam;
      im_pend  <= fam_pend;
      t_v  <= fam_pend | im_pend;
      t_im <= im_pend;
      if (fam_pend) begin
        ent_conj <= fd_conj; ent_bin <= fd_bin;
        t_f <= fd_f;
        t_neg <= '0;
        t_zero <= '0;
      end else begin
        t_neg <= ent_conj;
        for (int t = 0; t < L; t++) t_zero[t] <= (ent_bin[t] == '0);
      end
      case (state)
        S_IDLE: if (start) begin
          state <= S_RUN; reg_r <= '0; reg_e <= '0;
        end
        S_RUN: begin
          if (want_fam) reg_e <= reg_e + 1'b1;
          else if (!fam_pend && reg_r < (RW+1)'(S3)) begin
            reg_r <= reg_r + 1'b1; reg_e <= '0;
          end else if (!fam_pend && !im_pend && reg_r == (RW+1)'(S3)) begin
            state <= S_END;
          end
        end
        S_END: if (tree_idle) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // adder tree: level 0 holds the L (conditioned) inputs
  logic signed [TW-1:0] lvl [LL+1][L];
  logic [LL:0]          lv_v, lv_im;
  logic [AW-1:0]        lv_f [LL+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lv_v <= '0; lv_im <= '0;
    end else begin
      lv_v[0]  <= t_v;
      lv_im[0] <= t_im;
      for (int s = 1; s <= LL; s++) begin
        lv_v[s]  <= lv_v[s-1];
        lv_im[s] <= lv_im[s-1];
      end
    end
  end

  always_ff @(posedge clk) begin
    lv_f[0] <= t_f;
    for (int t = 0; t < L; t++) begin
      if (t_zero[t])     lvl[0][t] <= '0;
      else if (t_neg[t]) lvl[0][t] <= -TW'($signed(tsm_rdata[t]));
      else               lvl[0][t] <= TW'($signed(tsm_rdata[t]));
    end
    for (int s = 1; s <= LL; s++) begin
      lv_f[s] <= lv_f[s-1];
      for (int t = 0; t < L; t++) begin
        if (t < (L >> s)) lvl[s][t] <= lvl[s-1][2*t] + lvl[s-1][2*t+1];
        else              lvl[s][t] <= '0;
      end
    end
  end

  // pair real and imaginary results and write the SSM
  logic [W-1:0] re_hold;
  logic [W-1:0] avg;
  assign avg = W'(lvl[LL][0] >>> LL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ssm_count <= '0; re_hold <= '0;
      ssm_we <= 1'b0; ssm_waddr <= '0; ssm_wdata <= '0;
    end else begin
      ssm_we <= 1'b0;
      if (state == S_IDLE && start) ssm_count <= '0;
      if (lv_v[LL] && !lv_im[LL]) re_hold <= avg;
      if (lv_v[LL] && lv_im[LL]) begin
        ssm_we    <= 1'b1;
        ssm_waddr <= ssm_count[KA-1:0];
        ssm_wdata <= {re_hold, avg, lv_f[LL]};
        ssm_count <= ssm_count + 1'b1;
      end
    end
  end

  assign tree_idle = !t_v && (lv_v == '0) && !ssm_we;
  assign busy = (state != S_IDLE);
  assign done = (state == S_END) && tree_idle;
endmodule
