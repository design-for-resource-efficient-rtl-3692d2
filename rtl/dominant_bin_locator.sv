// dominant_bin_locator: finds the KD largest power-spectrum values of one
// short dense FFT with a min-heap partial sort, and marks them in the BIA.
//
// The unit streams the P/2 PSD words out of the power spectrum memory (PSM)
// in bin order and keeps the dominant bin memory (DBM), a KD-entry min-heap of
// (PSD value, bin address) pairs with the smallest value at the root:
//   - the first KD values are inserted (sift-up, one level per clock);
//   - each later value is compared with the root: if it is not larger it is
//     dropped in the same clock; if it is larger the root is replaced by it and
//     sifted down (one level per clock, smaller child first);
//   - replacements are capped at REPL_LIMIT (by default 20% of the P/2 - KD
//     possible); when the cap is reached the scan stops early.
// While scanning, the unit clears the binary indicator array (BIA) a word per
// clock; afterwards it sets one BIA bit per heap entry. done pulses at the end.
// The DBM bin addresses can be read asynchronously through dbm_raddr (used by
// the FOI generator of the multi-stage filter).
// Timing: a dropped value costs one clock, an insertion or replacement costs
// one clock per heap level visited plus one; PSM reads have one clock of
// latency. Total <= P/2 + (KD + REPL_LIMIT) * (log2 KD + 2) + KD clocks.
// Follows the document: the min-heap, insert/delete operations, the 20 %
// early termination, DBM and BIA. This design's choices: sift loops of one
// level per clock, combined delete+insert as a root replacement, strict
// "greater than" test, clearing the BIA during the scan.
module dominant_bin_locator #(
  parameter int unsigned P          = 16384,
  parameter int unsigned KD         = 512,
  parameter int unsigned PW         = 36,
  parameter int unsigned BW         = 16,
  parameter int unsigned REPL_LIMIT = (P / 2 - KD) / 5,
  localparam int unsigned NBIN = P / 2,
  localparam int unsigned LB   = $clog2(NBIN),
  localparam int unsigned KA   = $clog2(KD),
  localparam int unsigned NWD  = (NBIN + BW - 1) / BW,
  localparam int unsigned WA   = (NWD > 1) ? $clog2(NWD) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            busy,
  output logic            done,
  // power spectrum memory read
  output logic            psm_en,
  output logic [LB-1:0]   psm_idx,
  input  logic [PW-1:0]   psm_rdata,
  // binary indicator array
  output logic            bia_clr_en,
  output logic [WA-1:0]   bia_clr_word,
  output logic            bia_set_en,
  output logic [LB-1:0]   bia_set_bit,
  // dominant bin memory read port
  input  logic [KA-1:0]   dbm_raddr,
  output logic [LB-1:0]   dbm_rdata,
  // status
  output logic [KA:0]     heap_count,
  output logic [LB:0]     repl_count,
  output logic            limit_hit
);
  typedef enum logic [2:0] {S_IDLE, S_ISSUE, S_DATA, S_UP, S_DN, S_CLRW, S_SET, S_FIN} state_t;
  state_t state;

  logic [PW-1:0] hv [KD];
  logic [LB-1:0] ha [KD];

  logic [LB:0]   nx;         // next PSM index to read
  logic [LB-1:0] didx;       // index of the value arriving in S_DATA
  logic [KA:0]   cnt;        // entries in the heap
  logic [LB:0]   repl;
  logic [KA:0]   pos;
  logic [PW-1:0] cv;         // value being sifted
  logic [LB-1:0] ca;         // its bin address
  logic [WA:0]   clr;        // BIA clear counter
  logic [KA:0]   sj;         // BIA set counter

  logic more;
  assign more = (nx < (LB+1)'(NBIN)) && (repl < (LB+1)'(REPL_LIMIT));

  // one sift step, evaluated combinationally
  logic          w_en;
  logic [KA-1:0] w_pos;
  logic [PW-1:0] w_v;
  logic [LB-1:0] w_a;
  logic          step_done;
  logic [KA:0]   next_pos;

  always_comb begin
    int unsigned p, par, l, r, ch;
    p = int'(pos);
    w_en = 1'b0; w_pos = KA'(p); w_v = cv; w_a = ca;
    step_done = 1'b0; next_pos = pos;
    par = 0; l = 0; r = 0; ch = 0;
    if (state == S_UP) begin
      w_en = 1'b1;
      if (p == 0) begin
        step_done = 1'b1;
      end else begin
        par = (p - 1) / 2;
        if (hv[par] > cv) begin
          w_v = hv[par]; w_a = ha[par]; next_pos = (KA+1)'(par);
        end else begin
          step_done = 1'b1;
        end
      end
    end else if (state == S_DN) begin
      w_en = 1'b1;
      l = 2 * p + 1;
      r = 2 * p + 2;
      if (l >= KD) begin
        step_done = 1'b1;
      end else begin
        ch = (r < KD && hv[r] < hv[l]) ? r : l;
        if (hv[ch] < cv) begin
          w_v = hv[ch]; w_a = ha[ch]; next_pos = (KA+1)'(ch);
        end else begin
          step_done = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (w_en) begin
      hv[w_pos] <= w_v;
      ha[w_pos] <= w_a;
    end
  end

  logic issue;
  always_comb begin
    issue = 1'b0;
    case (state)
      S_ISSUE: issue = more;
      S_DATA:  issue = more && !((cnt < (KA+1)'(KD)) || (psm_rdata > hv[0]));
      S_UP, S_DN: issue = step_done && more;
      default: issue = 1'b0;
    endcase
  end
  assign psm_en  = issue;
  assign psm_idx = nx[LB-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      nx <= '0; didx <= '0; cnt <= '0; repl <= '0; pos <= '0;
      cv <= '0; ca <= '0; clr <= '0; sj <= '0;
    end else begin
      if (issue) begin
        nx   <= nx + 1'b1;
        didx <= nx[LB-1:0];
      end
      if (state != S_IDLE && clr < (WA+1)'(NWD)) clr <= clr + 1'b1;
      case (state)
        S_IDLE: if (start) begin
          state <= S_ISSUE;
          nx <= '0; cnt <= '0; repl <= '0; clr <= '0; sj <= '0;
        end
        S_ISSUE: state <= more ? S_DATA : S_CLRW;
        S_DATA: begin
          if (cnt < (KA+1)'(KD)) begin
            state <= S_UP; pos <= cnt; cv <= psm_rdata; ca <= didx;
          end else if (psm_rdata > hv[0]) begin
            state <= S_DN; pos <= '0; cv <= psm_rdata; ca <= didx;
            repl <= repl + 1'b1;
          end else if (!more) begin
            state <= S_CLRW;
          end
        end
        S_UP, S_DN: begin
          pos <= next_pos;
          if (step_done) begin
            if (state == S_UP) cnt <= cnt + 1'b1;
            state <= more ? S_DATA : S_CLRW;
          end
        end
        S_CLRW: if (clr == (WA+1)'(NWD)) begin
          state <= S_SET; sj <= '0;
        end
        S_SET: begin
          if (sj == cnt) state <= S_FIN;
          else sj <= sj + 1'b1;
        end
        S_FIN: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign bia_clr_en   = (state != S_IDLE) && (clr < (WA+1)'(NWD));
  assign bia_clr_word = clr[WA-1:0];
  assign bia_set_en   = (state == S_SET) && (sj < cnt);
  assign bia_set_bit  = ha[sj[KA-1:0]];

  assign dbm_rdata  = ha[dbm_raddr];
  assign heap_count = cnt;
  assign repl_count = repl;
  assign limit_hit  = (repl == (LB+1)'(REPL_LIMIT));
  assign busy       = (state != S_IDLE);
  assign done       = (state == S_FIN);
endmodule
