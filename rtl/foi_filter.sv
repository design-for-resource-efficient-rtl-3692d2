// foi_filter: frequency-of-interest (FOI) generator and (L-1)-stage filter
// that turns dominant bins into signal frequencies.
//
// Filter number FIDX (0-based) takes its candidates from the dominant bins of
// short FFT number FIDX: entries FIDX*KD/S3 .. (FIDX+1)*KD/S3-1 of that FFT's
// dominant bin memory. A bin b covers the N/P permuted indices
// m = b*N/P + j; the generator turns each into a frequency with
// f = u*m mod N, where u (unperm_mult) is the inverse mod N of the odd
// sample-index multiplier that built that data set, stepping f by u per clock
// (one adder; one multiply per bin for the start value). Frequencies above N/2 are folded to N - f (real
// input: the mirror image), and the fold is recorded as a conjugation flag.
// Stage m (1..L-1) tests the FOI against short FFT t = (FIDX + m) mod L (the
// rotated assignment that lets L filters share the L BIAs): it maps the FOI
// to its permuted position with perm_mult[t] (the multiplier that built set
// t), folds again,
// shifts right by log2(N/P) to get the bin, and reads that bin's BIA bit; a 0
// discards the FOI. Each stage is 3 clocks (multiply; fold and BIA read; test).
// A survivor of all stages is written to this filter's region of the
// frequency address memory (FAM) as {FOI, L conjugation flags, L bins}, with
// the bins rotated back into set order. When the region is full further
// survivors are counted as overflow and dropped.
// Timing: KD/S3 * N/P clocks of generation plus 3*(L-1)+1 clocks of delay.
// Follows the document: recursive FOI generation, per-stage inverse mapping,
// BIA test, early discard, forwarding of bin addresses, FAM storage and the
// rotated BIA assignment. This design's choices: folding and conjugation flags
// for the real-data mirror spectrum, the slice of bins given to each filter,
// a FAM region per filter, and the three-clock stage.
module foi_filter #(
  parameter int unsigned N    = 2097152,
  parameter int unsigned P    = 16384,
  parameter int unsigned L    = 4,
  parameter int unsigned KD   = 512,
  parameter int unsigned S3   = 4,
  parameter int unsigned FIDX = 0,
  localparam int unsigned AW  = $clog2(N),
  localparam int unsigned LB  = $clog2(P / 2),
  localparam int unsigned KA  = $clog2(KD),
  localparam int unsigned SL  = KD / S3,
  localparam int unsigned RA  = (SL > 1) ? $clog2(SL) : 1,
  localparam int unsigned SH  = $clog2(N / P),
  localparam int unsigned FW  = AW + L + L * LB
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  output logic                        busy,
  output logic                        done,
  input  logic [AW-1:0]               unperm_mult,
  input  logic [L-1:0][AW-1:0]        perm_mult,
  // dominant bin memory of set FIDX
  output logic [KA-1:0]               dbm_raddr,
  input  logic [LB-1:0]               dbm_rdata,
  // BIA read, one port per stage (stage m uses index m-1)
  output logic [L-2:0]                bia_rd_en,
  output logic [L-2:0][LB-1:0]        bia_rd_bit,
  input  logic [L-2:0]                bia_rd_val,
  // FAM region write
  output logic                        fam_we,
  output logic [RA-1:0]               fam_waddr,
  output logic [FW-1:0]               fam_wdata,
  // status
  output logic [RA:0]                 fam_count,
  output logic [15:0]                 overflow_count,
  output logic [31:0]                 foi_count
);
  typedef struct packed {
    logic                 valid;
    logic [AW-1:0]        f;
    logic [L-1:0]         conj;
    logic [L-1:0][LB-1:0] bin;
  } tok_t;

  localparam int unsigned NJ = N / P;

  // generator
  logic                 gen_run;
  logic [RA:0]          gi;
  logic [SH:0]          gj;
  logic [AW-1:0]        facc;
  logic [AW-1:0]        fcur;
  tok_t                 gtok;

  assign dbm_raddr = KA'(FIDX * SL + int'(gi));

  always_comb begin
    logic [2*AW-1:0] pr;
    pr   = (2*AW)'(unperm_mult) * (2*AW)'(dbm_rdata);
    fcur = (gj == 0) ? AW'(pr << SH) : facc + unperm_mult;
    gtok = '0;
    gtok.valid = gen_run;
    gtok.conj[FIDX] = fcur[AW-1] && (fcur[AW-2:0] != '0);
    gtok.f = gtok.conj[FIDX] ? AW'(-fcur) : fcur;
    gtok.bin[FIDX] = dbm_rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gen_run <= 1'b0; gi <= '0; gj <= '0; facc <= '0; foi_count <= '0;
    end else if (start && !busy) begin
      gen_run <= 1'b1; gi <= '0; gj <= '0; foi_count <= '0;
    end else if (gen_run) begin
      facc <= fcur;
      foi_count <= foi_count + 1'b1;
      if (gj == (SH+1)'(NJ - 1)) begin
        gj <= '0;
        gi <= gi + 1'b1;
        if (gi == (RA+1)'(SL - 1)) gen_run <= 1'b0;
      end else begin
        gj <= gj + 1'b1;
      end
    end
  end

  // stages: sc_all[m-1] is the token leaving stage m
  tok_t sa_all [L-1];
  tok_t sb_all [L-1];
  tok_t sc_all [L-1];

  for (genvar m = 1; m < L; m++) begin : g_stage
    localparam int unsigned T = (FIDX + m) % L;
    tok_t tin, a_q, b_q, c_q;
    logic [AW-1:0] prod;
    logic [AW-1:0] mm;
    logic cj;
    if (m == 1) begin : g_first
      assign tin = gtok;
    end else begin : g_next
      assign tin = sc_all[m-2];
    end

    always_comb begin
      cj = prod[AW-1] && (prod[AW-2:0] != '0);
      mm = cj ? AW'(-prod) : prod;
    end
    assign bia_rd_en[m-1]  = a_q.valid;
    assign bia_rd_bit[m-1] = mm[SH +: LB];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        a_q <= '0;
        b_q <= '0;
        c_q <= '0;
        prod <= '0;
      end else begin
        prod <= AW'((2*AW)'(perm_mult[T]) * (2*AW)'(tin.f));
        a_q <= tin;
        b_q <= a_q;
        // an index of exactly N/2 maps to bin P/2, which has no BIA entry
        b_q.valid <= a_q.valid && !mm[AW-1];
        b_q.conj[T] <= cj;
        b_q.bin[T]  <= mm[SH +: LB];
        c_q <= b_q;
        c_q.valid <= b_q.valid && bia_rd_val[m-1];
      end
    end
    assign sa_all[m-1] = a_q;
    assign sb_all[m-1] = b_q;
    assign sc_all[m-1] = c_q;
  end

  // FAM write
  tok_t fin;
  assign fin = sc_all[L-2];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fam_count <= '0; overflow_count <= '0;
    end else if (start && !busy) begin
      fam_count <= '0; overflow_count <= '0;
    end else if (fin.valid) begin
      if (fam_count < (RA+1)'(SL)) fam_count <= fam_count + 1'b1;
      else overflow_count <= overflow_count + 1'b1;
    end
  end
  assign fam_we    = fin.valid && (fam_count < (RA+1)'(SL));
  assign fam_waddr = fam_count[RA-1:0];
  assign fam_wdata = {fin.f, fin.conj, fin.bin};

  logic pipe_busy;
  always_comb begin
    pipe_busy = 1'b0;
    for (int m = 0; m < L - 1; m++) pipe_busy |= sa_all[m].valid | sb_all[m].valid | sc_all[m].valid;
  end
  logic busy_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy_q <= 1'b0;
    else        busy_q <= busy;
  end
  assign busy = gen_run | pipe_busy;
  assign done = busy_q && !busy;
endmodule
