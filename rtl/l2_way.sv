// l2_way: tag and data arrays of one way of the L2 cache.
//
// Both arrays are single-port synchronous SRAMs: when `en` is high the tag
// and the whole line of set `set` are read and appear on `rd_tag`/`rd_data`
// after the clock edge; when `en` is low the way is not activated and the
// outputs hold their last value. This per-way enable is what a predicted
// access uses to activate one way only. A write (`we`, with `en`) stores a
// whole line, and the tag too when `tag_we` is set; partial (store) writes
// are merged into the line by the L2 controller beforehand. The line is 128
// bytes; the controller picks the 256-bit part an L1 refill needs.
// The organisation (tag and data read per way, one read/write port) follows
// the document; the whole-line write port is this design's choice.
module l2_way #(
  parameter int unsigned SETS       = wp_pkg::L2_SETS,
  parameter int unsigned TAG_W      = 16,
  parameter int unsigned LINE_BYTES = wp_pkg::L2_LINE_BYTES,
  localparam int unsigned SET_W     = $clog2(SETS),
  localparam int unsigned LINE_BITS = LINE_BYTES * 8
) (
  input  logic                  clk,
  input  logic                  en,
  input  logic [SET_W-1:0]      set,
  output logic [TAG_W-1:0]      rd_tag,
  output logic [LINE_BITS-1:0]  rd_data,
  input  logic                  we,
  input  logic                  tag_we,
  input  logic [TAG_W-1:0]      wtag,
  input  logic [LINE_BITS-1:0]  wdata
);

  logic [TAG_W-1:0]     tags [SETS];
  logic [LINE_BITS-1:0] data [SETS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        if (tag_we) tags[set] <= wtag;
        data[set] <= wdata;
      end else begin
        rd_tag  <= tags[set];
        rd_data <= data[set];
      end
    end
  end

endmodule
