// srg_window_unit: randomized data reordering plus windowing (data-space stage).
//
// Builds the L windowed short randomly-generated (WSRG) data sets, each of P
// samples, from the N-sample input held in the external eight-bank data-space
// memory (DSM). For every woctad j (0..P/8-1) of set s the unit
//   1. reads one woctad of precomputed sample addresses from the data address
//      memory (DAM) and one woctad of window coefficients from the window
//      coefficient memory (WCM), both at slot s*P/8 + j;
//   2. sends each address to the DSM bank it names (address bits [2:0] are
//      the bank, the rest the slot; a woctad always touches eight different
//      banks because the permutation multiplier is odd) and routes the eight
//      returned samples back to their lanes;
//   3. multiplies sample by coefficient in eight parallel multipliers, scales
//      by 2^-CF with saturation, and writes the woctad to slot j of the
//      transform-space memory (TSM) of set s.
// One woctad enters per clock, so a set takes P/8 clocks and all L sets take
// L*P/8 clocks plus a fixed 4-clock pipeline delay. set_done pulses (with
// set_idx) when the last woctad of a set has been written; done pulses after
// the last set. DAM, WCM and DSM reads have one clock of latency.
// Follows the document: the precomputed addresses, the eight multipliers, one
// woctad per clock and overlapping reads with multiplies. This design's own
// choices: the coefficient format (signed, CF fractional bits), saturation,
// and storing each address as the plain sample index.
module srg_window_unit #(
  parameter int unsigned N  = 2097152,
  parameter int unsigned P  = 16384,
  parameter int unsigned L  = 4,
  parameter int unsigned W  = 18,   // data sample width
  parameter int unsigned WC = 18,   // window coefficient width
  parameter int unsigned CF = 16,   // coefficient fractional bits
  localparam int unsigned NB  = sfft_pkg::NBANK,
  localparam int unsigned AW  = $clog2(N),          // sample index width
  localparam int unsigned DSW = $clog2(N / NB),     // DSM slot width
  localparam int unsigned MSW = $clog2(L * P / NB), // DAM/WCM slot width
  localparam int unsigned TSW = $clog2(P / NB),     // TSM slot width
  localparam int unsigned LW  = (L > 1) ? $clog2(L) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  output logic                        busy,
  output logic                        done,
  output logic                        set_done,
  output logic [LW-1:0]               set_idx,
  // DAM and WCM read (same slot for all banks)
  output logic                        mem_en,
  output logic [MSW-1:0]              mem_slot,
  input  logic [NB-1:0][AW-1:0]       dam_rdata,
  input  logic [NB-1:0][WC-1:0]       wcm_rdata,
  // external data-space memory read, one address per bank
  output logic                        dsm_en,
  output logic [NB-1:0][DSW-1:0]      dsm_addr,
  input  logic [NB-1:0][W-1:0]        dsm_rdata,
  // transform-space memory write (all eight banks, one slot)
  output logic                        tsm_we,
  output logic [LW-1:0]               tsm_set,
  output logic [TSW-1:0]              tsm_slot,
  output logic [NB-1:0][W-1:0]        tsm_wdata
);
  localparam int unsigned Q = P / NB;

  // issue counters
  logic          run;
  logic [LW-1:0] iset;
  logic [TSW-1:0] islot;
  logic          last_issue;

  assign last_issue = (islot == TSW'(Q - 1)) && (iset == LW'(L - 1));
  assign mem_en   = run;
  assign mem_slot = MSW'(iset) * MSW'(Q) + MSW'(islot);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run   <= 1'b0;
      iset  <= '0;
      islot <= '0;
    end else if (start && !busy) begin
      run   <= 1'b1;
      iset  <= '0;
      islot <= '0;
    end else if (run) begin
      if (islot == TSW'(Q - 1)) begin
        islot <= '0;
        iset  <= iset + 1'b1;
        if (last_issue) run <= 1'b0;
      end else begin
        islot <= islot + 1'b1;
      end
    end
  end

  // pipeline: c1 = DAM/WCM data valid, c2 = DSM data valid, c3 = product, c4 = TSM write
  logic [3:0]           v;
  logic [LW-1:0]        set_p [4];
  logic [TSW-1:0]       slot_p [4];
  logic [NB-1:0][2:0]   bank_of_lane;      // valid in c2
  logic [NB-1:0][WC-1:0] coef_c2;
  logic signed [W+WC-1:0] prod [NB];

  always_comb begin
    dsm_en   = v[0];
    dsm_addr = '0;
    for (int n = 0; n < NB; n++) begin
      dsm_addr[dam_rdata[n][2:0]] = dam_rdata[n][AW-1:3];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= '0;
    end else begin
      v <= {v[2:0], run};
    end
  end

  always_ff @(posedge clk) begin
    set_p[0]  <= iset;  slot_p[0] <= islot;
    for (int i = 1; i < 4; i++) begin
      set_p[i]  <= set_p[i-1];
      slot_p[i] <= slot_p[i-1];
    end
    for (int n = 0; n < NB; n++) begin
      bank_of_lane[n] <= dam_rdata[n][2:0];
      coef_c2[n]      <= wcm_rdata[n];
      prod[n]         <= $signed(dsm_rdata[bank_of_lane[n]]) * $signed(coef_c2[n]);
    end
  end

  // scale, saturate and write
  function automatic logic [W-1:0] sat_scale(input logic signed [W+WC-1:0] p);
    logic signed [W+WC-1:0] s;
    s = p >>> CF;
    if (s > $signed((W+WC)'(2 ** (W - 1) - 1)))      return {1'b0, {(W-1){1'b1}}};
    else if (s < -$signed((W+WC)'(2 ** (W - 1))))    return {1'b1, {(W-1){1'b0}}};
    else                                             return s[W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tsm_we   <= 1'b0;
      set_done <= 1'b0;
    end else begin
      tsm_we   <= v[2];
      set_done <= v[2] && (slot_p[2] == TSW'(Q - 1));
    end
  end

  always_ff @(posedge clk) begin
    tsm_set  <= set_p[2];
    tsm_slot <= slot_p[2];
    for (int n = 0; n < NB; n++) tsm_wdata[n] <= sat_scale(prod[n]);
  end

  assign set_idx = tsm_set;
  assign busy    = run | (|v) | tsm_we;
  assign done    = set_done && (tsm_set == LW'(L - 1));

endmodule
