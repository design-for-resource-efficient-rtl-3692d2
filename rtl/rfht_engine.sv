// rfht_engine: single-processing-element regularized fast Hartley transform
// (RFHT) of one P-point real data set, with the dibit-reversal load and the
// read-out towards the Hartley-to-Fourier converter.
//
// The engine owns the PE data memory (PDM, P words) and coefficient memory
// (rfht_pcm), an address generator, the coefficient generator and one generic
// double butterfly. It runs in three phases after start:
//   LOAD   two woctads per clock are read from the transform-space memory
//          (port A slot 2c, port B slot 2c+1 of all eight banks, i.e. samples
//          16c..16c+15) and written to the PDM at their dibit-reversed
//          addresses: P/16 clocks.
//   STAGES log4(P) radix-4 stages, in place. Stage 0 feeds pairs of 4-point
//          groups (eight samples per clock, P/8 clocks). Stage s >= 1 works on
//          groups of M = 4^(s+1) samples; for each group it visits k = 0..M/8,
//          reading H_r[k] at g*M + r*M/4 + k and H_r[-k] at g*M + r*M/4 +
//          (M/4 - k) and writing both output quadruples back to the same
//          addresses (only the k outputs for k = 0 and k = M/8, which are their
//          own partners): P/8 + P/M clocks. The angle index of the twiddles is
//          k*P/M. Between stages the 6-clock pipeline is drained.
//   UNLOAD P/8 clocks: clock j presents H[4j..4j+3] on hout_pos and
//          H[P-4j-i] (i = 0..3, index taken modulo P) on hout_neg.
// done pulses in the clock that carries the last hout word. Output values are
// the Hartley transform divided by P (each stage divides by four).
// Follows the document: one PE with a generic double butterfly producing one
// output woctad per clock, dibit-reversed input, in-place stages, coefficient
// tables of three quadrant LUTs, P/16-clock load. This design's own choices:
// the PDM is a single multi-ported array rather than eight banks with the
// conflict-free bank mapping of the original RFHT (that mapping is not given),
// k = 0 and k = M/8 each take a clock of their own, and the per-stage scaling.
module rfht_engine #(
  parameter int unsigned P  = 16384,
  parameter int unsigned W  = 18,
  parameter int unsigned WC = 18,
  parameter int unsigned CF = 16,
  localparam int unsigned NB  = sfft_pkg::NBANK,
  localparam int unsigned LP  = $clog2(P),
  localparam int unsigned QA  = LP - 2,
  localparam int unsigned TSW = $clog2(P / NB)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  // coefficient table load
  input  logic                    pcm_we,
  input  logic [QA-1:0]           pcm_addr,
  input  logic [WC-1:0]           pcm_data,
  // transform-space memory read during LOAD
  output logic                    tsm_en,
  output logic [TSW-1:0]          tsm_slot_a,
  output logic [TSW-1:0]          tsm_slot_b,
  input  logic [NB-1:0][W-1:0]    tsm_rdata_a,
  input  logic [NB-1:0][W-1:0]    tsm_rdata_b,
  // Hartley outputs for the converter
  output logic                    hout_valid,
  output logic [LP-1:0]           hout_k,
  output logic [3:0][W-1:0]       hout_pos,
  output logic [3:0][W-1:0]       hout_neg
);
  import sfft_pkg::*;

  localparam int unsigned NSTG = LP / 2;
  localparam int unsigned SGW  = $clog2(NSTG + 1);
  localparam int unsigned PIPE = 6;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_STG, S_DRAIN, S_UNLD, S_FIN} state_t;
  state_t state;

  typedef struct packed {
    logic                 valid;
    logic                 both;
    logic                 mode;
    logic [3:0][LP-1:0]   aa;
    logic [3:0][LP-1:0]   ba;
  } ctrl_t;

  logic [W-1:0] pdm [P];

  // counters
  logic [TSW-1:0] lc;        // LOAD woctad-pair counter (P/16 used)
  logic [SGW-1:0] stg;
  logic [LP-1:0]  grp;
  logic [LP-1:0]  ii;
  logic [LP-1:0]  uj;

  // load pipeline
  logic           ld_v;
  logic [TSW-1:0] ld_c;

  // address generation for the current butterfly
  ctrl_t          cur;
  logic [LP-1:0]  cur_m1;
  logic           cur_last;
  ctrl_t          ctl [PIPE];

  logic [4:0]    lg;      // log2 of the group size M
  logic [LP:0]   ng4;     // M/4
  logic [LP-1:0] gbase, kp;

  always_comb begin
    cur = '0;
    gbase = 0;
    kp = 0;
    cur_m1 = '0;
    cur_last = 1'b0;
    lg    = 5'(2 * (int'(stg) + 1));
    ng4   = (LP+1)'(1) << (lg - 5'd2);
    if (stg == 0) begin
      for (int r = 0; r < 4; r++) begin
        cur.aa[r] = LP'(grp * 8 + r);
        cur.ba[r] = LP'(grp * 8 + 4 + r);
      end
      cur.mode = 1'b1;
      cur.both = 1'b1;
      cur_last = (grp == LP'(P / 8 - 1));
    end else begin
      gbase = grp << lg;
      kp    = (ii == 0) ? '0 : LP'(ng4 - (LP+1)'(ii));
      for (int r = 0; r < 4; r++) begin
        cur.aa[r] = gbase + LP'(r * int'(ng4)) + ii;
        cur.ba[r] = gbase + LP'(r * int'(ng4)) + kp;
      end
      cur.mode = 1'b0;
      cur.both = (ii != 0) && ((LP+1)'(ii) != (ng4 >> 1));
      cur_m1   = ii << (5'(LP) - lg);
      cur_last = ((LP+1)'(ii) == (ng4 >> 1)) && (grp == LP'((P >> lg) - 1));
    end
    cur.valid = (state == S_STG);
  end

  // coefficient path
  logic                 cg_valid;
  logic [2:0][QA-1:0]   pa_s, pa_c;
  logic [2:0][WC-1:0]   pd_s, pd_c;
  logic                 pcm_en;
  logic [2:0][WC-1:0]   co_c, co_cms, co_cps;

  rfht_pcm #(.P(P), .WC(WC)) u_pcm (
    .clk, .load_we(pcm_we), .load_addr(pcm_addr), .load_data(pcm_data),
    .rd_en(pcm_en), .rd_addr_s(pa_s), .rd_addr_c(pa_c),
    .rd_data_s(pd_s), .rd_data_c(pd_c)
  );

  rfht_coef_gen #(.P(P), .WC(WC), .CF(CF)) u_cgen (
    .clk, .rst_n, .in_valid(cur.valid), .m1(cur_m1),
    .pcm_en, .pcm_addr_s(pa_s), .pcm_addr_c(pa_c),
    .pcm_data_s(pd_s), .pcm_data_c(pd_c),
    .out_valid(cg_valid), .c(co_c), .cms(co_cms), .cps(co_cps)
  );

  // data read registers (shared by STAGES and UNLOAD) and alignment register
  logic [3:0][W-1:0] rd_a, rd_b, al_a, al_b;
  logic              un_v;
  logic [LP-1:0]     un_k;

  logic              bf_valid;
  logic [3:0][W-1:0] bf_yk, bf_ykp;

  rfht_double_butterfly #(.W(W), .WC(WC), .CF(CF)) u_bfly (
    .clk, .rst_n, .in_valid(ctl[1].valid), .mode_dht4(ctl[1].mode),
    .a(al_a), .b(al_b), .c(co_c), .cms(co_cms), .cps(co_cps),
    .out_valid(bf_valid), .yk(bf_yk), .ykp(bf_ykp)
  );

  logic pipe_busy;
  always_comb begin
    pipe_busy = ld_v;
    for (int i = 0; i < PIPE; i++) pipe_busy |= ctl[i].valid;
  end

  // control FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      lc <= '0; stg <= '0; grp <= '0; ii <= '0; uj <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state <= S_LOAD;
          lc <= '0;
        end
        S_LOAD: begin
          lc <= lc + 1'b1;
          if (lc == TSW'(P / 16 - 1)) begin
            state <= S_DRAIN;
            stg <= '0; grp <= '0; ii <= '0;
          end
        end
        S_STG: begin
          if (cur_last) begin
            state <= S_DRAIN;
            stg <= stg + 1'b1;
            grp <= '0; ii <= '0;
          end else if (stg == 0) begin
            grp <= grp + 1'b1;
          end else if (int'(ii) == (1 << (2 * int'(stg))) / 2) begin
            ii <= '0;
            grp <= grp + 1'b1;
          end else begin
            ii <= ii + 1'b1;
          end
        end
        S_DRAIN: if (!pipe_busy) begin
          if (int'(stg) < NSTG) state <= S_STG;
          else begin
            state <= S_UNLD;
            uj <= '0;
          end
        end
        S_UNLD: begin
          uj <= uj + 1'b1;
          if (uj == LP'(P / 8 - 1)) state <= S_FIN;
        end
        S_FIN: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy       = (state != S_IDLE);
  assign done       = (state == S_FIN);
  assign tsm_en     = (state == S_LOAD);
  assign tsm_slot_a = TSW'(2 * lc);
  assign tsm_slot_b = TSW'(2 * lc + 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_v <= 1'b0;
      un_v <= 1'b0;
      for (int i = 0; i < PIPE; i++) ctl[i] <= '0;
    end else begin
      ld_v <= (state == S_LOAD);
      un_v <= (state == S_UNLD);
      ctl[0] <= cur;
      for (int i = 1; i < PIPE; i++) ctl[i] <= ctl[i-1];
    end
  end

  // PDM: reads (registered) and writes
  always_ff @(posedge clk) begin
    ld_c <= lc;
    un_k <= LP'(4 * uj);
    if (state == S_STG) begin
      for (int r = 0; r < 4; r++) begin
        rd_a[r] <= pdm[cur.aa[r]];
        rd_b[r] <= pdm[cur.ba[r]];
      end
    end else if (state == S_UNLD) begin
      for (int i = 0; i < 4; i++) begin
        rd_a[i] <= pdm[LP'(4 * uj + i)];
        rd_b[i] <= pdm[LP'(P - 4 * uj - i)];
      end
    end
    al_a <= rd_a;
    al_b <= rd_b;
    if (ld_v) begin
      for (int b = 0; b < NB; b++) begin
        pdm[LP'(dbr(16 * ld_c + b, LP))]     <= tsm_rdata_a[b];
        pdm[LP'(dbr(16 * ld_c + 8 + b, LP))] <= tsm_rdata_b[b];
      end
    end
    if (ctl[PIPE-1].valid) begin
      for (int q = 0; q < 4; q++) begin
        pdm[ctl[PIPE-1].aa[q]] <= bf_yk[q];
        if (ctl[PIPE-1].both) pdm[ctl[PIPE-1].ba[q]] <= bf_ykp[q];
      end
    end
  end

  assign hout_valid = un_v;
  assign hout_k     = un_k;
  assign hout_pos   = rd_a;
  assign hout_neg   = rd_b;

endmodule
