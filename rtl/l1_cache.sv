// l1_cache: tag and data arrays of one blocking L1 cache (instruction or
// data), 8 KB, 2-way set-associative, 32-byte lines, 128 sets.
//
// The set index comes from page-offset bits of the virtual address
// ([11:5]), so the arrays can be read in the same cycle as the TLB; the tag is
// the physical page number delivered by the TLB in that cycle. Lookup is
// combinational and returns hit, the hitting way and the addressed 32-bit
// word. A one-bit LRU per set is updated on every hit (`touch`) and on refill.
// Refill writes a whole line, received from the L2, into the invalid way or
// else the LRU way of the set. A word write (store hit, data side) merges
// bytes into the line of a given way.
// Timing: lookup combinational; refill, word write and LRU update at the clock
// edge. Size, associativity and line size follow the document; the LRU policy
// and the word width are this design's choices.
module l1_cache #(
  parameter int unsigned SETS       = wp_pkg::L1_SETS,
  parameter int unsigned LINE_BYTES = wp_pkg::L1_LINE_BYTES,
  parameter int unsigned TAG_W      = wp_pkg::PPN_W,
  parameter int unsigned WORD_W     = wp_pkg::WORD_W,
  localparam int unsigned WAYS      = 2,
  localparam int unsigned SET_W     = $clog2(SETS),
  localparam int unsigned LINE_BITS = LINE_BYTES * 8,
  localparam int unsigned WPL       = LINE_BITS / WORD_W,
  localparam int unsigned WO_W      = $clog2(WPL),
  localparam int unsigned BE_W      = WORD_W / 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // lookup
  input  logic [SET_W-1:0]     lk_set,
  input  logic [TAG_W-1:0]     lk_tag,
  input  logic [WO_W-1:0]      lk_word,
  output logic                 lk_hit,
  output logic                 lk_way,
  output logic [WORD_W-1:0]    lk_rdata,
  input  logic                 touch,      // record a hit in the LRU bit
  // refill a whole line
  input  logic                 rf_en,
  input  logic [SET_W-1:0]     rf_set,
  input  logic [TAG_W-1:0]     rf_tag,
  input  logic [LINE_BITS-1:0] rf_data,
  // word write into a present line
  input  logic                 wr_en,
  input  logic [SET_W-1:0]     wr_set,
  input  logic                 wr_way,
  input  logic [WO_W-1:0]      wr_word,
  input  logic [WORD_W-1:0]    wr_data,
  input  logic [BE_W-1:0]      wr_be
);

  logic [WAYS-1:0]      valid_q [SETS];
  logic [SETS-1:0]      lru_q;                 // way to replace next
  logic [TAG_W-1:0]     tag_q   [WAYS][SETS];
  logic [LINE_BITS-1:0] data_q  [WAYS][SETS];

  logic [WAYS-1:0] match;
  logic [LINE_BITS-1:0] line;

  always_comb begin
    for (int w = 0; w < WAYS; w++)
      match[w] = valid_q[lk_set][w] && tag_q[w][lk_set] == lk_tag;
    lk_hit   = |match;
    lk_way   = match[1];
    line     = data_q[lk_way][lk_set];
    lk_rdata = line[lk_word*WORD_W +: WORD_W];
  end

  logic rf_way;
  always_comb begin
    if (!valid_q[rf_set][0])      rf_way = 1'b0;
    else if (!valid_q[rf_set][1]) rf_way = 1'b1;
    else                          rf_way = lru_q[rf_set];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) valid_q[s] <= '0;
      lru_q <= '0;
    end else begin
      if (rf_en) begin
        valid_q[rf_set][rf_way] <= 1'b1;
        lru_q[rf_set]           <= ~rf_way;
      end else if (touch && lk_hit) begin
        lru_q[lk_set] <= ~lk_way;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rf_en) begin
      tag_q[rf_way][rf_set]  <= rf_tag;
      data_q[rf_way][rf_set] <= rf_data;
    end else if (wr_en) begin
      for (int b = 0; b < BE_W; b++)
        if (wr_be[b]) data_q[wr_way][wr_set][wr_word*WORD_W + b*8 +: 8] <= wr_data[b*8 +: 8];
    end
  end

endmodule
