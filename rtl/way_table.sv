// way_table: the table attached to the TLB that records, for every L2 line of
// a page held in the TLB, the L2 way the line was placed in.
//
// There is one entry per TLB entry and no tag: the TLB hit entry number m
// addresses it. An entry holds FIELDS fields (page size / L2 line size, 32 for
// 4 KB pages and 128-byte lines); each field is a valid bit and a way index.
// A read returns the whole entry (the field is picked afterwards by the field
// multiplexer). A write records one way index in one field and sets its valid
// bit. A clear resets every valid bit of one entry; it is used when the TLB
// entry is refilled with another page, because the recorded way indices of the
// old page are not kept.
// Timing: read is combinational from `rd_idx`; write and clear act at the
// clock edge. A clear and a write in the same cycle to the same entry leave
// the written field valid (the write wins).
// Structure, sizes and the no-invalidate-on-L2-eviction rule follow the
// document. The clear on TLB refill follows its valid-bit reasoning; the
// write-wins ordering is this design's choice.
module way_table #(
  parameter int unsigned ENTRIES = wp_pkg::TLB_ENTRIES,
  parameter int unsigned FIELDS  = wp_pkg::WT_FIELDS,
  parameter int unsigned WAY_W   = wp_pkg::WAY_W,
  localparam int unsigned IDX_W  = $clog2(ENTRIES),
  localparam int unsigned FI_W   = $clog2(FIELDS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // read
  input  logic [IDX_W-1:0]        rd_idx,
  output logic [FIELDS-1:0]       rd_valid,
  output logic [FIELDS*WAY_W-1:0] rd_ways,
  // record a way index
  input  logic                    wr_en,
  input  logic [IDX_W-1:0]        wr_idx,
  input  logic [FI_W-1:0]         wr_field,
  input  logic [WAY_W-1:0]        wr_way,
  // clear an entry on TLB refill
  input  logic                    clr_en,
  input  logic [IDX_W-1:0]        clr_idx
);

  logic [FIELDS-1:0]       valid_q [ENTRIES];
  logic [FIELDS*WAY_W-1:0] ways_q  [ENTRIES];

  assign rd_valid = valid_q[rd_idx];
  assign rd_ways  = ways_q[rd_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned e = 0; e < ENTRIES; e++) valid_q[e] <= '0;
    end else begin
      if (clr_en) valid_q[clr_idx] <= '0;
      if (wr_en)  valid_q[wr_idx][wr_field] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) ways_q[wr_idx][wr_field*WAY_W +: WAY_W] <= wr_way;
  end

endmodule
