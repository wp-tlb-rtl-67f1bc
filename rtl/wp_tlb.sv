// wp_tlb: the Way Predicted TLB. A TLB whose entries carry a way table
// entry, with a one-entry way buffer in front of the way table and a field
// multiplexer behind it.
//
// Lookup (one cycle, in parallel with the L1 cache): the VPN of `lookup_va`
// is translated by the TLB; the TLB hit entry number m selects way table entry
// m, taken from the way buffer when it already holds entry m and read from the
// way table otherwise; the field index (address bits between the L2 line
// offset and the page size, [11:7] by default) then selects one field. Its
// valid bit is `wt_hit` and its way index is `pred_way`. A TLB miss is also a
// way table miss. `field_idx` is the field index brought out unchanged from
// the address, for the caller to keep with the access.
// Refill: after a page walk the TLB writes the new page into its FIFO victim
// entry and the way table entry of that victim is cleared in the same cycle,
// because the ways recorded for the old page do not belong to the new one.
// Record: `rec_*` writes a way index into entry `rec_idx`, field `rec_field`
// (the caller keeps m and the field index of the access that missed, which is
// possible because the L1 caches are blocking).
// Status strobes `tlb_buf_hit`, `tlb_cam`, `wt_buf_hit` and `wt_rd` tell which arrays a
// lookup touched.
// All of this follows the document except the FIFO TLB replacement and the
// clearing of the way table entry on refill, which this design makes explicit.
module wp_tlb #(
  parameter int unsigned ENTRIES    = wp_pkg::TLB_ENTRIES,
  parameter int unsigned ADDR_W     = wp_pkg::ADDR_W,
  parameter int unsigned PAGE_OFF_W = wp_pkg::PAGE_OFF_W,
  parameter int unsigned L2_LINE_B  = wp_pkg::L2_LINE_BYTES,
  parameter int unsigned L2_WAYS    = wp_pkg::L2_WAYS,
  localparam int unsigned VPN_W     = ADDR_W - PAGE_OFF_W,
  localparam int unsigned FIELDS    = (1 << PAGE_OFF_W) / L2_LINE_B,
  localparam int unsigned FI_W      = $clog2(FIELDS),
  localparam int unsigned LOFF_W    = $clog2(L2_LINE_B),
  localparam int unsigned WAY_W     = $clog2(L2_WAYS),
  localparam int unsigned IDX_W     = $clog2(ENTRIES)
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup
  input  logic              lookup_en,
  input  logic [ADDR_W-1:0] lookup_va,
  output logic              tlb_hit,
  output logic [VPN_W-1:0]  ppn,
  output logic [IDX_W-1:0]  hit_idx,
  output logic [FI_W-1:0]   field_idx,
  output logic              wt_hit,
  output logic [WAY_W-1:0]  pred_way,
  output logic              tlb_buf_hit,
  output logic              wt_buf_hit,
  output logic              tlb_cam,
  output logic              wt_rd,
  // refill
  input  logic              refill_en,
  input  logic [VPN_W-1:0]  refill_vpn,
  input  logic [VPN_W-1:0]  refill_ppn,
  // record a way index
  input  logic              rec_en,
  input  logic [IDX_W-1:0]  rec_idx,
  input  logic [FI_W-1:0]   rec_field,
  input  logic [WAY_W-1:0]  rec_way
);

  logic                    t_hit;
  logic [IDX_W-1:0]        victim;
  logic [FIELDS-1:0]       wt_valid, e_valid;
  logic [FIELDS*WAY_W-1:0] wt_ways, e_ways;
  logic                    f_valid;

  assign field_idx = lookup_va[LOFF_W +: FI_W];

  tlb #(.ENTRIES(ENTRIES), .VPN_W(VPN_W), .PPN_W(VPN_W)) u_tlb (
    .clk, .rst_n,
    .lookup_en, .lookup_vpn(lookup_va[ADDR_W-1:PAGE_OFF_W]),
    .hit(t_hit), .hit_idx, .hit_ppn(ppn), .buf_hit(tlb_buf_hit), .cam_search(tlb_cam),
    .refill_en, .refill_vpn, .refill_ppn, .victim_idx(victim)
  );

  way_table #(.ENTRIES(ENTRIES), .FIELDS(FIELDS), .WAY_W(WAY_W)) u_wt (
    .clk, .rst_n,
    .rd_idx(hit_idx), .rd_valid(wt_valid), .rd_ways(wt_ways),
    .wr_en(rec_en), .wr_idx(rec_idx), .wr_field(rec_field), .wr_way(rec_way),
    .clr_en(refill_en), .clr_idx(victim)
  );

  way_buffer #(.ENTRIES(ENTRIES), .FIELDS(FIELDS), .WAY_W(WAY_W)) u_wb (
    .clk, .rst_n,
    .req_en(t_hit), .req_idx(hit_idx), .buf_hit(wt_buf_hit), .wt_rd_en(wt_rd),
    .wt_valid, .wt_ways, .entry_valid(e_valid), .entry_ways(e_ways),
    .wr_en(rec_en), .wr_idx(rec_idx), .wr_field(rec_field), .wr_way(rec_way),
    .clr_en(refill_en), .clr_idx(victim)
  );

  wt_field_mux #(.FIELDS(FIELDS), .WAY_W(WAY_W)) u_mux (
    .entry_valid(e_valid), .entry_ways(e_ways), .field_idx,
    .field_valid(f_valid), .field_way(pred_way)
  );

  assign tlb_hit = t_hit;
  assign wt_hit  = t_hit && f_valid;

endmodule
