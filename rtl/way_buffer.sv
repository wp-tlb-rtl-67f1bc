// way_buffer: single-entry block buffer in front of the way table.
//
// It keeps a copy of the last way table entry that was read, tagged with its
// TLB entry number. On every lookup the TLB hit entry number is compared with
// the tag first: on a match the copy is used and `wt_rd_en` stays low, so the
// way table is not read; otherwise the way table entry (`wt_valid`/`wt_ways`,
// read combinationally at `req_idx`) is used and copied into the buffer at the
// clock edge. The buffer snoops way table writes and clears so that its copy
// never goes stale: a write to the buffered entry updates the copy, a clear of
// it drops the copy.
// Timing: `entry_*` and `buf_hit` are combinational; updates at the clock edge.
// The buffer and its purpose (saving way table read energy) follow the
// document; the snooping that keeps it consistent is this design's choice,
// since the document does not describe how it stays consistent.
module way_buffer #(
  parameter int unsigned ENTRIES = wp_pkg::TLB_ENTRIES,
  parameter int unsigned FIELDS  = wp_pkg::WT_FIELDS,
  parameter int unsigned WAY_W   = wp_pkg::WAY_W,
  localparam int unsigned IDX_W  = $clog2(ENTRIES),
  localparam int unsigned FI_W   = $clog2(FIELDS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // lookup with the TLB hit entry
  input  logic                    req_en,
  input  logic [IDX_W-1:0]        req_idx,
  output logic                    buf_hit,
  output logic                    wt_rd_en,   // way table read needed
  input  logic [FIELDS-1:0]       wt_valid,
  input  logic [FIELDS*WAY_W-1:0] wt_ways,
  output logic [FIELDS-1:0]       entry_valid,
  output logic [FIELDS*WAY_W-1:0] entry_ways,
  // snooped way table updates
  input  logic                    wr_en,
  input  logic [IDX_W-1:0]        wr_idx,
  input  logic [FI_W-1:0]         wr_field,
  input  logic [WAY_W-1:0]        wr_way,
  input  logic                    clr_en,
  input  logic [IDX_W-1:0]        clr_idx
);

  logic                    bvalid_q;
  logic [IDX_W-1:0]        bidx_q;
  logic [FIELDS-1:0]       bfv_q;
  logic [FIELDS*WAY_W-1:0] bways_q;

  always_comb begin
    buf_hit  = req_en && bvalid_q && (bidx_q == req_idx);
    wt_rd_en = req_en && !buf_hit;
    if (buf_hit) begin
      entry_valid = bfv_q;
      entry_ways  = bways_q;
    end else begin
      entry_valid = wt_valid;
      entry_ways  = wt_ways;
    end
  end

  // Next copy: the entry used this cycle, with same-cycle updates applied.
  logic [IDX_W-1:0]        nidx;
  logic [FIELDS-1:0]       nfv;
  logic [FIELDS*WAY_W-1:0] nways;
  logic                    nvalid;

  always_comb begin
    if (wt_rd_en) begin
      nvalid = 1'b1;
      nidx   = req_idx;
      nfv    = wt_valid;
      nways  = wt_ways;
    end else begin
      nvalid = bvalid_q;
      nidx   = bidx_q;
      nfv    = bfv_q;
      nways  = bways_q;
    end
    if (clr_en && clr_idx == nidx) nfv = '0;
    if (wr_en && wr_idx == nidx) begin
      nfv[wr_field]                 = 1'b1;
      nways[wr_field*WAY_W +: WAY_W] = wr_way;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid_q <= 1'b0;
      bidx_q   <= '0;
      bfv_q    <= '0;
      bways_q  <= '0;
    end else begin
      bvalid_q <= nvalid;
      bidx_q   <= nidx;
      bfv_q    <= nfv;
      bways_q  <= nways;
    end
  end

endmodule
