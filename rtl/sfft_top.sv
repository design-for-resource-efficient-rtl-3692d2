// sfft_top: real-data sparse FFT processor.
//
// Finds the KD strongest spectral components of an N-sample real signal
// without an N-point FFT. The signal sits in an external eight-bank data-space
// memory (DSM). Processing chain, one pass per start pulse:
//   1. srg_window_unit builds L windowed, randomly permuted data sets of P
//      samples each (addresses from the DAM, window from the WCM) and writes
//      them to L transform-space memories (TSM), one woctad per clock.
//   2. S1 parallel streams, each a single-PE regularized FHT (rfht_engine)
//      followed by a Hartley-to-Fourier/PSD converter (hs2fs_psd); stream s
//      handles sets s, s+S1, ... and starts a set as soon as it is written.
//      Fourier data go back to that set's TSM (Re X[k] at k, Im X[k] at P-k),
//      the power spectrum to its power spectrum memory (PSM).
//   3. One dominant_bin_locator per set (S2 = L) keeps the KD largest PSD
//      values in a min-heap (the DBM) and marks them in that set's BIA.
//   4. L multi-stage filters (S3 = L) turn the dominant bins of set n into
//      candidate frequencies and keep those that fall into dominant bins of
//      every other set; each filter reads the BIAs in rotated order and writes
//      survivors to its own FAM region.
//   5. spectrum_estimator averages the L Fourier values of every survivor and
//      writes (Re, Im, frequency) to the sparse spectrum memory (SSM).
// Interface: load the DAM/WCM (woctad per clock) and the FHT sine table
// before start; give the per-set odd multipliers a_t (perm_mult; the DAM holds
// sample indices a_t*n + offset mod N) and their inverses mod N (unperm_mult).
// busy is high from start until the done pulse; the result is read from the
// SSM through ssm_raddr (one clock latency), ssm_count entries. Assertions
// check that each unit is active only in its own phase of the operation; their
// "disable iff (!rst_n)" is the only synchronous use of the asynchronous reset
// (lint reports it as a net used both ways), and it builds no logic.
// Follows the document's processing chain and parallelization (S1 streams for
// stages 1-2, one locator and one filter per set). Sequencing between steps,
// the mirror-spectrum handling and the status outputs are this design's own.
module sfft_top #(
  parameter int unsigned N          = 2097152,
  parameter int unsigned P          = 16384,
  parameter int unsigned L          = 4,
  parameter int unsigned S1         = 2,
  parameter int unsigned KD         = 512,
  parameter int unsigned W          = 18,
  parameter int unsigned WC         = 18,
  parameter int unsigned CF         = 16,
  parameter int unsigned REPL_LIMIT = (P / 2 - KD) / 5,
  localparam int unsigned NB   = sfft_pkg::NBANK,
  localparam int unsigned AW   = $clog2(N),
  localparam int unsigned DSW  = $clog2(N / NB),
  localparam int unsigned MSW  = $clog2(L * P / NB),
  localparam int unsigned QA   = $clog2(P / 4),
  localparam int unsigned KA   = $clog2(KD),
  localparam int unsigned LB   = $clog2(P / 2),
  localparam int unsigned SW   = 2 * W + AW,
  localparam int unsigned S3   = L,
  localparam int unsigned SL   = KD / S3,
  localparam int unsigned RA   = (SL > 1) ? $clog2(SL) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  output logic                       busy,
  output logic                       done,
  // table loading
  input  logic                       dam_we,
  input  logic [MSW-1:0]             dam_slot,
  input  logic [NB-1:0][AW-1:0]      dam_wdata,
  input  logic                       wcm_we,
  input  logic [MSW-1:0]             wcm_slot,
  input  logic [NB-1:0][WC-1:0]      wcm_wdata,
  input  logic                       pcm_we,
  input  logic [QA-1:0]              pcm_addr,
  input  logic [WC-1:0]              pcm_data,
  input  logic [L-1:0][AW-1:0]       perm_mult,
  input  logic [L-1:0][AW-1:0]       unperm_mult,
  // external data-space memory
  output logic                       dsm_en,
  output logic [NB-1:0][DSW-1:0]     dsm_addr,
  input  logic [NB-1:0][W-1:0]       dsm_rdata,
  // sparse spectrum memory read: {re, im, frequency}
  input  logic [KA-1:0]              ssm_raddr,
  output logic [SW-1:0]              ssm_rdata,
  output logic [KA:0]                ssm_count,
  // status
  output logic [L-1:0][LB:0]         loc_repl,
  output logic [L-1:0]               loc_limit_hit,
  output logic [L-1:0][RA:0]         fam_count,
  output logic [L-1:0][15:0]         fam_overflow,
  output logic [L-1:0][31:0]         foi_count
);
  localparam int unsigned LW  = (L > 1) ? $clog2(L) : 1;
  localparam int unsigned TSW = $clog2(P / NB);
  localparam int unsigned PSW = $clog2(P / 2 / NB);
  localparam int unsigned LP  = $clog2(P);
  localparam int unsigned PW  = 2 * W;
  localparam int unsigned FW  = AW + L + L * LB;
  localparam int unsigned BW  = 16;
  localparam int unsigned NWD = (P / 2 + BW - 1) / BW;
  localparam int unsigned WA  = (NWD > 1) ? $clog2(NWD) : 1;
  localparam int unsigned RW  = (S3 > 1) ? $clog2(S3) : 1;

  // ---------------------------------------------------------------- control
  typedef enum logic [2:0] {T_IDLE, T_FRONT, T_FILT, T_SPEC, T_DONE} tstate_t;
  tstate_t tstate;

  logic            srg_start, srg_busy, srg_done, srg_set_done;
  logic [LW-1:0]   srg_set_idx;
  logic [L-1:0]    ready, converted, conv_pulse, located;
  logic [L-1:0]    loc_done;
  logic [L-1:0]    filt_done_flag, filt_done, filt_busy;
  logic            filt_start, spec_start, spec_done, spec_busy;

  // ---------------------------------------------------------------- DAM, WCM
  logic                  mem_en;
  logic [MSW-1:0]        mem_slot;
  logic [NB-1:0][AW-1:0] dam_rdata;
  logic [NB-1:0][WC-1:0] wcm_rdata;
  logic [NB-1:0][AW-1:0] dam_unused;
  logic [NB-1:0][WC-1:0] wcm_unused;

  woctad_ram #(.DEPTH(L * P), .W(AW)) u_dam (
    .clk,
    .a_en({NB{dam_we}}), .a_we({NB{dam_we}}), .a_addr({NB{dam_slot}}),
    .a_wdata(dam_wdata), .a_rdata(dam_unused),
    .b_en({NB{mem_en}}), .b_we('0), .b_addr({NB{mem_slot}}),
    .b_wdata('0), .b_rdata(dam_rdata)
  );

  woctad_ram #(.DEPTH(L * P), .W(WC)) u_wcm (
    .clk,
    .a_en({NB{wcm_we}}), .a_we({NB{wcm_we}}), .a_addr({NB{wcm_slot}}),
    .a_wdata(wcm_wdata), .a_rdata(wcm_unused),
    .b_en({NB{mem_en}}), .b_we('0), .b_addr({NB{mem_slot}}),
    .b_wdata('0), .b_rdata(wcm_rdata)
  );

  // ---------------------------------------------------------------- stage 1
  logic                 srg_tsm_we;
  logic [LW-1:0]        srg_tsm_set;
  logic [TSW-1:0]       srg_tsm_slot;
  logic [NB-1:0][W-1:0] srg_tsm_wdata;

  srg_window_unit #(.N(N), .P(P), .L(L), .W(W), .WC(WC), .CF(CF)) u_srg (
    .clk, .rst_n, .start(srg_start), .busy(srg_busy), .done(srg_done),
    .set_done(srg_set_done), .set_idx(srg_set_idx),
    .mem_en, .mem_slot, .dam_rdata, .wcm_rdata,
    .dsm_en, .dsm_addr, .dsm_rdata,
    .tsm_we(srg_tsm_we), .tsm_set(srg_tsm_set), .tsm_slot(srg_tsm_slot),
    .tsm_wdata(srg_tsm_wdata)
  );

  // ---------------------------------------------------------------- TSM / PSM
  logic [L-1:0][NB-1:0]          ts_a_en, ts_a_we, ts_b_en, ts_b_we;
  logic [L-1:0][NB-1:0][TSW-1:0] ts_a_addr, ts_b_addr;
  logic [L-1:0][NB-1:0][W-1:0]   ts_a_wdata, ts_b_wdata, ts_a_rdata, ts_b_rdata;

  logic [L-1:0][NB-1:0]          ps_a_en, ps_b_en;
  logic [L-1:0][NB-1:0][PSW-1:0] ps_a_addr, ps_b_addr;
  logic [L-1:0][NB-1:0][PW-1:0]  ps_a_wdata, ps_b_rdata, ps_a_unused;

  for (genvar t = 0; t < L; t++) begin : g_set_mem
    woctad_ram #(.DEPTH(P), .W(W)) u_tsm (
      .clk,
      .a_en(ts_a_en[t]), .a_we(ts_a_we[t]), .a_addr(ts_a_addr[t]),
      .a_wdata(ts_a_wdata[t]), .a_rdata(ts_a_rdata[t]),
      .b_en(ts_b_en[t]), .b_we(ts_b_we[t]), .b_addr(ts_b_addr[t]),
      .b_wdata(ts_b_wdata[t]), .b_rdata(ts_b_rdata[t])
    );
    woctad_ram #(.DEPTH(P / 2), .W(PW)) u_psm (
      .clk,
      .a_en(ps_a_en[t]), .a_we(ps_a_en[t]), .a_addr(ps_a_addr[t]),
      .a_wdata(ps_a_wdata[t]), .a_rdata(ps_a_unused[t]),
      .b_en(ps_b_en[t]), .b_we('0), .b_addr(ps_b_addr[t]),
      .b_wdata('0), .b_rdata(ps_b_rdata[t])
    );
  end

  // ---------------------------------------------------------------- stage 2
  logic [S1-1:0]                 st_active, st_eng_start, st_eng_busy, st_eng_done;
  logic [S1-1:0][LW-1:0]         st_set;
  logic [S1-1:0][LW:0]           st_iter;
  logic [S1-1:0]                 st_tsm_en;
  logic [S1-1:0][TSW-1:0]        st_slot_a, st_slot_b;
  logic [S1-1:0][NB-1:0][W-1:0]  st_rdata_a, st_rdata_b;
  logic [S1-1:0]                 st_h_v;
  logic [S1-1:0][LP-1:0]         st_h_k;
  logic [S1-1:0][3:0][W-1:0]     st_h_pos, st_h_neg;
  logic [S1-1:0]                 st_c_v;
  logic [S1-1:0][LP-1:0]         st_c_k;
  logic [S1-1:0][3:0][W-1:0]     st_re, st_im;
  logic [S1-1:0][3:0][PW-1:0]    st_psd;
  logic [S1-1:0][3:0]            st_fin;      // engine done, delayed to cover the converter

  for (genvar s = 0; s < S1; s++) begin : g_stream
    rfht_engine #(.P(P), .W(W), .WC(WC), .CF(CF)) u_eng (
      .clk, .rst_n, .start(st_eng_start[s]), .busy(st_eng_busy[s]), .done(st_eng_done[s]),
      .pcm_we, .pcm_addr, .pcm_data,
      .tsm_en(st_tsm_en[s]), .tsm_slot_a(st_slot_a[s]), .tsm_slot_b(st_slot_b[s]),
      .tsm_rdata_a(st_rdata_a[s]), .tsm_rdata_b(st_rdata_b[s]),
      .hout_valid(st_h_v[s]), .hout_k(st_h_k[s]), .hout_pos(st_h_pos[s]), .hout_neg(st_h_neg[s])
    );
    hs2fs_psd #(.P(P), .W(W)) u_conv (
      .clk, .rst_n, .in_valid(st_h_v[s]), .in_k(st_h_k[s]),
      .hpos(st_h_pos[s]), .hneg(st_h_neg[s]),
      .out_valid(st_c_v[s]), .out_k(st_c_k[s]), .re(st_re[s]), .im(st_im[s]), .psd(st_psd[s])
    );

    assign st_rdata_a[s] = ts_a_rdata[st_set[s]];
    assign st_rdata_b[s] = ts_b_rdata[st_set[s]];
    assign st_eng_start[s] = st_active[s] && !st_eng_busy[s] && (st_fin[s] == '0) &&
                             ready[st_set[s]] && !converted[st_set[s]];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st_active[s] <= 1'b0;
        st_set[s]    <= LW'(s);
        st_iter[s]   <= '0;
        st_fin[s]    <= '0;
      end else begin
        st_fin[s] <= {st_fin[s][2:0], st_eng_done[s]};
        if (tstate == T_IDLE && start) begin
          st_active[s] <= 1'b1;
          st_set[s]    <= LW'(s);
          st_iter[s]   <= '0;
        end else if (st_fin[s][3]) begin
          if (int'(st_iter[s]) == L / S1 - 1) st_active[s] <= 1'b0;
          else begin
            st_iter[s] <= st_iter[s] + 1'b1;
            st_set[s]  <= LW'(int'(st_set[s]) + S1);
          end
        end
      end
    end
  end

  // TSM and PSM port multiplexing
  logic                 es_tsm_en;
  logic [L-1:0][LP-1:0] es_tsm_idx;
  logic [L-1:0][W-1:0]  es_tsm_rdata;
  logic [L-1:0][2:0]    es_bank_q;
  logic [L-1:0]         lc_psm_en;
  logic [L-1:0][LB-1:0] lc_psm_idx;
  logic [L-1:0][PW-1:0] lc_psm_rdata;
  logic [L-1:0][2:0]    lc_bank_q;

  always_comb begin
    logic [LP-1:0] kp, kn;
    kp = '0;
    kn = '0;
    ts_a_en = '0; ts_a_we = '0; ts_a_addr = '0; ts_a_wdata = '0;
    ts_b_en = '0; ts_b_we = '0; ts_b_addr = '0; ts_b_wdata = '0;
    ps_a_en = '0; ps_a_addr = '0; ps_a_wdata = '0;
    ps_b_en = '0; ps_b_addr = '0;
    for (int t = 0; t < L; t++) begin
      // stage 1 writes
      if (srg_tsm_we && int'(srg_tsm_set) == t) begin
        ts_a_en[t] = '1; ts_a_we[t] = '1;
        for (int b = 0; b < NB; b++) ts_a_addr[t][b] = srg_tsm_slot;
        ts_a_wdata[t] = srg_tsm_wdata;
      end
      // spectrum estimation reads (port A)
      if (es_tsm_en) begin
        ts_a_en[t][es_tsm_idx[t][2:0]]   = 1'b1;
        ts_a_addr[t][es_tsm_idx[t][2:0]] = es_tsm_idx[t][LP-1:3];
      end
      // dominant bin location reads of the PSM (port B)
      if (lc_psm_en[t]) begin
        ps_b_en[t][lc_psm_idx[t][2:0]]   = 1'b1;
        ps_b_addr[t][lc_psm_idx[t][2:0]] = lc_psm_idx[t][LB-1:3];
      end
      for (int s = 0; s < S1; s++) begin
        if (int'(st_set[s]) == t && st_active[s]) begin
          // FHT load: two woctads per clock
          if (st_tsm_en[s]) begin
            ts_a_en[t] = '1; ts_b_en[t] = '1;
            for (int b = 0; b < NB; b++) begin
              ts_a_addr[t][b] = st_slot_a[s];
              ts_b_addr[t][b] = st_slot_b[s];
            end
          end
          // converted data: Re to k (port A), Im to P-k (port B), PSD to PSM
          if (st_c_v[s]) begin
            for (int i = 0; i < 4; i++) begin
              kp = st_c_k[s] + LP'(i);
              kn = LP'(P) - kp;
              ts_a_en[t][kp[2:0]] = 1'b1;  ts_a_we[t][kp[2:0]] = 1'b1;
              ts_a_addr[t][kp[2:0]] = kp[LP-1:3];
              ts_a_wdata[t][kp[2:0]] = st_re[s][i];
              if (kp != '0) begin
                ts_b_en[t][kn[2:0]] = 1'b1;  ts_b_we[t][kn[2:0]] = 1'b1;
                ts_b_addr[t][kn[2:0]] = kn[LP-1:3];
                ts_b_wdata[t][kn[2:0]] = st_im[s][i];
              end
              ps_a_en[t][kp[2:0]] = 1'b1;
              ps_a_addr[t][kp[2:0]] = kp[LP-2:3];
              ps_a_wdata[t][kp[2:0]] = st_psd[s][i];
            end
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int t = 0; t < L; t++) begin
      es_bank_q[t] <= es_tsm_idx[t][2:0];
      lc_bank_q[t] <= lc_psm_idx[t][2:0];
    end
  end
  always_comb begin
    for (int t = 0; t < L; t++) begin
      es_tsm_rdata[t] = ts_a_rdata[t][es_bank_q[t]];
      lc_psm_rdata[t] = ps_b_rdata[t][lc_bank_q[t]];
    end
  end

  // ---------------------------------------------------------------- stage 3
  logic [L-1:0]                 bia_clr_en, bia_set_en;
  logic [L-1:0][WA-1:0]         bia_clr_word;
  logic [L-1:0][LB-1:0]         bia_set_bit;
  logic [L-1:0][L-2:0]          bia_rd_en;     // [set][port]
  logic [L-1:0][L-2:0][LB-1:0]  bia_rd_bit;
  logic [L-1:0][L-2:0]          bia_rd_val;
  logic [L-1:0][KA-1:0]         dbm_raddr;
  logic [L-1:0][LB-1:0]         dbm_rdata;
  logic [L-1:0][KA:0]           heap_count;
  logic [L-1:0]                 loc_busy;

  logic [L-1:0][L-2:0]          f_bia_en;      // [filter][stage-1]
  logic [L-1:0][L-2:0][LB-1:0]  f_bia_bit;
  logic [L-1:0][L-2:0]          f_bia_val;
  logic [L-1:0]                 f_we;
  logic [L-1:0][RA-1:0]         f_waddr;
  logic [L-1:0][FW-1:0]         f_wdata;
  logic [L-1:0][FW-1:0]         fam_rdata_r;

  logic                         es_fam_re;
  logic [RW-1:0]                es_fam_region, es_region_q;
  logic [RA-1:0]                es_fam_raddr;

  for (genvar t = 0; t < L; t++) begin : g_locate
    dominant_bin_locator #(.P(P), .KD(KD), .PW(PW), .BW(BW), .REPL_LIMIT(REPL_LIMIT)) u_loc (
      .clk, .rst_n, .start(conv_pulse[t]), .busy(loc_busy[t]), .done(loc_done[t]),
      .psm_en(lc_psm_en[t]), .psm_idx(lc_psm_idx[t]), .psm_rdata(lc_psm_rdata[t]),
      .bia_clr_en(bia_clr_en[t]), .bia_clr_word(bia_clr_word[t]),
      .bia_set_en(bia_set_en[t]), .bia_set_bit(bia_set_bit[t]),
      .dbm_raddr(dbm_raddr[t]), .dbm_rdata(dbm_rdata[t]),
      .heap_count(heap_count[t]), .repl_count(loc_repl[t]), .limit_hit(loc_limit_hit[t])
    );
    bia_mem #(.NBIT(P / 2), .BW(BW), .NR(L - 1)) u_bia (
      .clk, .clr_en(bia_clr_en[t]), .clr_word(bia_clr_word[t]),
      .set_en(bia_set_en[t]), .set_bit(bia_set_bit[t]),
      .rd_en(bia_rd_en[t]), .rd_bit(bia_rd_bit[t]), .rd_val(bia_rd_val[t])
    );
    // port m-1 of BIA t serves stage m of filter (t - m) mod L
    for (genvar m = 1; m < L; m++) begin : g_port
      localparam int unsigned F = (t + L - m) % L;
      assign bia_rd_en[t][m-1]  = f_bia_en[F][m-1];
      assign bia_rd_bit[t][m-1] = f_bia_bit[F][m-1];
      assign f_bia_val[F][m-1]  = bia_rd_val[t][m-1];
    end

    foi_filter #(.N(N), .P(P), .L(L), .KD(KD), .S3(S3), .FIDX(t)) u_filt (
      .clk, .rst_n, .start(filt_start), .busy(filt_busy[t]), .done(filt_done[t]),
      .unperm_mult(unperm_mult[t]), .perm_mult,
      .dbm_raddr(dbm_raddr[t]), .dbm_rdata(dbm_rdata[t]),
      .bia_rd_en(f_bia_en[t]), .bia_rd_bit(f_bia_bit[t]), .bia_rd_val(f_bia_val[t]),
      .fam_we(f_we[t]), .fam_waddr(f_waddr[t]), .fam_wdata(f_wdata[t]),
      .fam_count(fam_count[t]), .overflow_count(fam_overflow[t]), .foi_count(foi_count[t])
    );
    sdp_ram #(.DEPTH(SL), .W(FW)) u_fam (
      .clk, .we(f_we[t]), .waddr(f_waddr[t]), .wdata(f_wdata[t]),
      .re(es_fam_re), .raddr(es_fam_raddr), .rdata(fam_rdata_r[t])
    );
  end

  always_ff @(posedge clk) es_region_q <= es_fam_region;

  logic                 ssm_we;
  logic [KA-1:0]        ssm_waddr;
  logic [SW-1:0]        ssm_wdata;

  spectrum_estimator #(.N(N), .P(P), .L(L), .KD(KD), .S3(S3), .W(W)) u_spec (
    .clk, .rst_n, .start(spec_start), .busy(spec_busy), .done(spec_done),
    .fam_count, .fam_re(es_fam_re), .fam_region(es_fam_region), .fam_raddr(es_fam_raddr),
    .fam_rdata(fam_rdata_r[es_region_q]),
    .tsm_en(es_tsm_en), .tsm_idx(es_tsm_idx), .tsm_rdata(es_tsm_rdata),
    .ssm_we, .ssm_waddr, .ssm_wdata, .ssm_count
  );

  sdp_ram #(.DEPTH(KD), .W(SW)) u_ssm (
    .clk, .we(ssm_we), .waddr(ssm_waddr), .wdata(ssm_wdata),
    .re(1'b1), .raddr(ssm_raddr), .rdata(ssm_rdata)
  );

  // ---------------------------------------------------------------- sequencing
  always_comb begin
    conv_pulse = '0;
    for (int s = 0; s < S1; s++) begin
      if (st_fin[s][3]) conv_pulse[st_set[s]] = 1'b1;
    end
  end

  assign srg_start  = (tstate == T_IDLE) && start;
  assign filt_start = (tstate == T_FRONT) && (located == '1);
  assign spec_start = (tstate == T_FILT) && (filt_done_flag == '1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate <= T_IDLE;
      ready <= '0; converted <= '0; located <= '0; filt_done_flag <= '0;
    end else begin
      if (srg_set_done) ready[srg_set_idx] <= 1'b1;
      converted      <= converted | conv_pulse;
      located        <= located | loc_done;
      filt_done_flag <= filt_done_flag | filt_done;
      case (tstate)
        T_IDLE: if (start) begin
          tstate <= T_FRONT;
          ready <= '0; converted <= '0; located <= '0; filt_done_flag <= '0;
        end
        T_FRONT: if (located == '1) tstate <= T_FILT;
        T_FILT:  if (filt_done_flag == '1) tstate <= T_SPEC;
        T_SPEC:  if (spec_done) tstate <= T_DONE;
        T_DONE:  tstate <= T_IDLE;
        default: tstate <= T_IDLE;
      endcase
    end
  end

  assign busy = (tstate != T_IDLE);
  assign done = (tstate == T_DONE);

  // Sequencing rules: every unit works only inside its own phase, and no heap
  // holds more than KD entries.
  a_front: assert property (@(posedge clk) disable iff (!rst_n)
                            (srg_busy || srg_done) |-> tstate == T_FRONT)
    else $error("front end active outside the front phase");
  a_loc:   assert property (@(posedge clk) disable iff (!rst_n)
                            loc_busy != '0 |-> tstate == T_FRONT)
    else $error("locator active outside the front phase");
  a_filt:  assert property (@(posedge clk) disable iff (!rst_n)
                            filt_busy != '0 |-> tstate == T_FILT)
    else $error("filter active outside the filter phase");
  a_spec:  assert property (@(posedge clk) disable iff (!rst_n)
                            spec_busy |-> tstate == T_SPEC)
    else $error("spectrum estimator active outside its phase");
  for (genvar t = 0; t < L; t++) begin : g_heap_chk
    a_heap: assert property (@(posedge clk) disable iff (!rst_n) int'(heap_count[t]) <= KD)
      else $error("heap %0d over-full", t);
  end

endmodule
