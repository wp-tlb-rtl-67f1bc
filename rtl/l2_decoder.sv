// l2_decoder: the way-prediction part of the L2 cache decoder.
//
// For an L2 access (an L1 miss) it decides between the two access kinds:
//  * way table hit (`wt_hit` = the field's valid bit): a predicted access
//    that activates only way `pred_way`, whether the prediction turns out
//    right or wrong, and takes the single-way latency LAT_WAY;
//  * way table miss: a normal access that activates all ways in parallel and
//    takes the full-set latency LAT_SET.
// No way is activated when there is no L1 miss. Purely combinational.
// `lat` is 8 bits wide so other latencies can be set; at the default 6/4 its
// upper bits are constant zero by design.
// The decision rule follows the document; the latencies are its 6-cycle and
// 4-cycle figures for a full-set and a single-way access at a 0.5 ns cycle.
module l2_decoder #(
  parameter int unsigned WAYS    = wp_pkg::L2_WAYS,
  parameter int unsigned LAT_SET = wp_pkg::L2_LAT_SET,
  parameter int unsigned LAT_WAY = wp_pkg::L2_LAT_WAY,
  localparam int unsigned WAY_W  = $clog2(WAYS)
) (
  input  logic             l1_miss,
  input  logic             wt_hit,
  input  logic [WAY_W-1:0] pred_way,
  output logic [WAYS-1:0]  way_en,
  output logic             single,
  output logic [7:0]       lat
);

  always_comb begin
    single = l1_miss && wt_hit;
    if (!l1_miss) begin
      way_en = '0;
      lat    = 8'd0;
    end else if (wt_hit) begin
      way_en = WAYS'(1) << pred_way;
      lat    = 8'(LAT_WAY);
    end else begin
      way_en = '1;
      lat    = 8'(LAT_SET);
    end
  end

endmodule
