// wt_field_mux: picks one field of a way table entry.
//
// The field index is the part of the physical address between the page
// offset's top and the L2 line offset (address bits [11:7] for 4 KB pages and
// 128-byte lines); it names the L2 line within the page. The selected field's
// valid bit becomes the way table hit and its way index the predicted way sent
// to the L2 cache decoder. Purely combinational.
// The field index and the multiplexer follow the document.
module wt_field_mux #(
  parameter int unsigned FIELDS = wp_pkg::WT_FIELDS,
  parameter int unsigned WAY_W  = wp_pkg::WAY_W,
  localparam int unsigned FI_W  = $clog2(FIELDS)
) (
  input  logic [FIELDS-1:0]       entry_valid,
  input  logic [FIELDS*WAY_W-1:0] entry_ways,
  input  logic [FI_W-1:0]         field_idx,
  output logic                    field_valid,
  output logic [WAY_W-1:0]        field_way
);

  always_comb begin
    field_valid = entry_valid[field_idx];
    field_way   = entry_ways[field_idx*WAY_W +: WAY_W];
  end

endmodule
