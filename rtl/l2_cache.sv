// l2_cache: unified set-associative L2 cache with way prediction.
//
// Default geometry: 512 KB, 8 ways, 128-byte lines, 512 sets, 32-bit physical
// address = tag [31:16] | set [15:7] | line offset [6:0]. An access returns
// the 256-bit part (one L1 line) selected by address bits [6:5].
//
// Every request carries the way table result of the WP-TLB. The decoder
// (l2_decoder) turns it into the ways to activate:
//  * way table hit: only the predicted way's tag and data are read (4 cycles).
//    A tag match is an L2 hit. A mismatch is treated as an L2 miss right away
//    and no other way is probed: the way table is updated on every fill, so a
//    line whose recorded way no longer holds it is not anywhere in the cache.
//  * way table miss: all ways are read in parallel (6 cycles), as in a
//    conventional cache.
// On a miss the victim is the first invalid way of the set, or else the way
// at the set's FIFO pointer; a dirty victim is read and written back to
// memory, then the line is fetched, filled and returned. Stores (from the
// write-through data L1) are write-allocate and mark the line dirty.
// The response reports the way that now holds the line (`rsp_way`) and
// whether the line was found (`rsp_hit`), which the L1 side uses to record or
// correct the way table. Evictions do not touch any way table.
//
// Interface: request valid/ready; one request in flight; `rsp_valid` is a
// one-cycle pulse. The arrays are busy for `lat` cycles after the accepting
// edge (LAT_WAY for a predicted access, LAT_SET for a normal one) and a hit's
// `rsp_valid` is high in the cycle that follows, so a hit is answered at the
// (lat+1)-th clock edge after acceptance. Memory: a
// line-wide valid/ready request (`mem_we` for a write-back, no response) and
// a one-cycle `mem_rsp_valid` with the line for a read.
// Way prediction, the single-way probe on a wrong prediction and the
// latencies follow the document; the replacement policy, write policy and
// memory interface are this design's choices.
module l2_cache #(
  parameter int unsigned ADDR_W     = wp_pkg::ADDR_W,
  parameter int unsigned WAYS       = wp_pkg::L2_WAYS,
  parameter int unsigned SETS       = wp_pkg::L2_SETS,
  parameter int unsigned LINE_BYTES = wp_pkg::L2_LINE_BYTES,
  parameter int unsigned RD_BITS    = wp_pkg::L1_LINE_BITS,
  parameter int unsigned WORD_W     = wp_pkg::WORD_W,
  parameter int unsigned LAT_SET    = wp_pkg::L2_LAT_SET,
  parameter int unsigned LAT_WAY    = wp_pkg::L2_LAT_WAY,
  localparam int unsigned WAY_W     = $clog2(WAYS),
  localparam int unsigned SET_W     = $clog2(SETS),
  localparam int unsigned OFF_W     = $clog2(LINE_BYTES),
  localparam int unsigned TAG_W     = ADDR_W - SET_W - OFF_W,
  localparam int unsigned LINE_BITS = LINE_BYTES * 8,
  localparam int unsigned SUBS      = LINE_BITS / RD_BITS,
  localparam int unsigned BE_W      = WORD_W / 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // request from the L1 side (an L1 miss or a write-through store)
  input  logic                 req_valid,
  output logic                 req_ready,
  input  logic [ADDR_W-1:0]    req_addr,
  input  wp_pkg::l2_op_e       req_op,
  input  logic [WORD_W-1:0]    req_wdata,
  input  logic [BE_W-1:0]      req_be,
  input  logic                 req_wt_hit,
  input  logic [WAY_W-1:0]     req_way,
  // response
  output logic                 rsp_valid,
  output logic [RD_BITS-1:0]   rsp_rdata,
  output logic [WAY_W-1:0]     rsp_way,
  output logic                 rsp_hit,
  // activity, one pulse per access start
  output logic [WAYS-1:0]      act_ways,   // ways activated for the lookup
  output logic                 act_single, // predicted (single-way) access
  // memory
  output logic                 mem_valid,
  input  logic                 mem_ready,
  output logic                 mem_we,
  output logic [ADDR_W-1:0]    mem_addr,   // line aligned
  output logic [LINE_BITS-1:0] mem_wdata,
  input  logic                 mem_rsp_valid,
  input  logic [LINE_BITS-1:0] mem_rsp_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_ACC, S_WBRD, S_WB, S_FETCH, S_WAIT} state_e;
  state_e state_q;

  // request registers
  logic [ADDR_W-1:0] addr_q;
  wp_pkg::l2_op_e    op_q;
  logic [WORD_W-1:0] wdata_q;
  logic [BE_W-1:0]   be_q;
  logic [WAYS-1:0]   en_q;
  logic [7:0]        lat_q, cnt_q;
  logic [WAY_W-1:0]  vic_q;

  logic [TAG_W-1:0] tag_r;
  logic [SET_W-1:0] set_r;
  assign tag_r = addr_q[ADDR_W-1 -: TAG_W];
  assign set_r = addr_q[OFF_W +: SET_W];

  // per-set state in flops
  logic [WAYS-1:0]  valid_q [SETS];
  logic [WAYS-1:0]  dirty_q [SETS];
  logic [WAY_W-1:0] fifo_q  [SETS];

  // decoder
  logic [WAYS-1:0] dec_en;
  logic            dec_single;
  logic [7:0]      dec_lat;
  l2_decoder #(.WAYS(WAYS), .LAT_SET(LAT_SET), .LAT_WAY(LAT_WAY)) u_dec (
    .l1_miss(req_valid && req_ready), .wt_hit(req_wt_hit), .pred_way(req_way),
    .way_en(dec_en), .single(dec_single), .lat(dec_lat)
  );
  assign act_ways   = dec_en;
  assign act_single = dec_single;

  // ways
  logic [WAYS-1:0]       w_en, w_we;
  logic [TAG_W-1:0]      w_rtag  [WAYS];
  logic [LINE_BITS-1:0]  w_rdata [WAYS];
  logic [LINE_BITS-1:0]  w_wdata;
  logic                  w_tag_we;

  for (genvar g = 0; g < WAYS; g++) begin : g_way
    l2_way #(.SETS(SETS), .TAG_W(TAG_W), .LINE_BYTES(LINE_BYTES)) u_way (
      .clk, .en(w_en[g]), .set(set_r), .rd_tag(w_rtag[g]), .rd_data(w_rdata[g]),
      .we(w_we[g]), .tag_we(w_tag_we), .wtag(tag_r), .wdata(w_wdata)
    );
  end

  // store bytes placed in a line
  logic [LINE_BITS-1:0]  st_line;
  logic [LINE_BYTES-1:0] st_be;
  logic [OFF_W-1:0]      boff;
  always_comb begin
    boff    = addr_q[OFF_W-1:0] & ~OFF_W'(BE_W - 1);
    st_line = LINE_BITS'(wdata_q) << {boff, 3'b000};
    st_be   = LINE_BYTES'(be_q) << boff;
  end

  // lookup result (valid in S_ACC once the arrays have been read)
  logic [WAYS-1:0]  match;
  logic             l_hit;
  logic [WAY_W-1:0] l_way;
  always_comb begin
    l_hit = 1'b0;
    l_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      match[w] = en_q[w] && valid_q[set_r][w] && w_rtag[w] == tag_r;
      if (match[w]) begin
        l_hit = 1'b1;
        l_way = WAY_W'(w);
      end
    end
  end

  // victim: first invalid way, else FIFO pointer
  logic [WAY_W-1:0] victim;
  always_comb begin
    victim = fifo_q[set_r];
    for (int w = WAYS - 1; w >= 0; w--)
      if (!valid_q[set_r][w]) victim = WAY_W'(w);
  end

  logic [$clog2(SUBS)-1:0] sub;
  assign sub = addr_q[OFF_W-1 -: $clog2(SUBS)];

  // store bytes merged into the line read on a hit, or into the fetched line
  logic [LINE_BITS-1:0] hit_line, fill_line;
  always_comb begin
    for (int b = 0; b < LINE_BYTES; b++) begin
      hit_line[b*8 +: 8]  = st_be[b] ? st_line[b*8 +: 8] : w_rdata[l_way][b*8 +: 8];
      fill_line[b*8 +: 8] = (op_q == wp_pkg::L2_WRITE && st_be[b]) ? st_line[b*8 +: 8]
                                                                  : mem_rsp_rdata[b*8 +: 8];
    end
  end

  // array controls
  logic acc_first, acc_done;
  assign acc_first = (state_q == S_ACC) && (cnt_q == 8'd1);
  assign acc_done  = (state_q == S_ACC) && (cnt_q == lat_q);

  always_comb begin
    w_en     = '0;
    w_we     = '0;
    w_tag_we = 1'b0;
    w_wdata  = hit_line;
    if (acc_first) w_en = en_q;
    if (acc_done && l_hit && op_q == wp_pkg::L2_WRITE) begin
      w_en[l_way] = 1'b1;
      w_we[l_way] = 1'b1;
    end
    if (state_q == S_WBRD) w_en[vic_q] = 1'b1;
    if (state_q == S_WAIT && mem_rsp_valid) begin
      w_en[vic_q] = 1'b1;
      w_we[vic_q] = 1'b1;
      w_tag_we    = 1'b1;
      w_wdata     = fill_line;
    end
  end

  assign req_ready = (state_q == S_IDLE);
  assign mem_valid = (state_q == S_WB) || (state_q == S_FETCH);
  assign mem_we    = (state_q == S_WB);
  assign mem_wdata = w_rdata[vic_q];
  always_comb begin
    if (state_q == S_WB) mem_addr = {w_rtag[vic_q], set_r, OFF_W'(0)};
    else                 mem_addr = {tag_r, set_r, OFF_W'(0)};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      rsp_valid <= 1'b0;
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        dirty_q[s] <= '0;
        fifo_q[s]  <= '0;
      end
      addr_q <= '0; op_q <= wp_pkg::L2_READ; wdata_q <= '0; be_q <= '0;
      en_q <= '0; lat_q <= 8'd0; cnt_q <= 8'd0; vic_q <= '0;
      rsp_rdata <= '0; rsp_way <= '0; rsp_hit <= 1'b0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (state_q)
        S_IDLE: if (req_valid) begin
          addr_q  <= req_addr;
          op_q    <= req_op;
          wdata_q <= req_wdata;
          be_q    <= req_be;
          en_q    <= dec_en;
          lat_q   <= dec_lat;
          cnt_q   <= 8'd1;
          state_q <= S_ACC;
        end
        S_ACC: begin
          cnt_q <= cnt_q + 8'd1;
          if (acc_done) begin
            if (l_hit) begin
              rsp_valid <= 1'b1;
              rsp_rdata <= w_rdata[l_way][sub*RD_BITS +: RD_BITS];
              rsp_way   <= l_way;
              rsp_hit   <= 1'b1;
              if (op_q == wp_pkg::L2_WRITE) dirty_q[set_r][l_way] <= 1'b1;
              state_q   <= S_IDLE;
            end else begin
              vic_q <= victim;
              if (valid_q[set_r][victim] && dirty_q[set_r][victim]) state_q <= S_WBRD;
              else                                                  state_q <= S_FETCH;
            end
          end
        end
        S_WBRD:  state_q <= S_WB;
        S_WB:    if (mem_ready) state_q <= S_FETCH;
        S_FETCH: if (mem_ready) state_q <= S_WAIT;
        S_WAIT: if (mem_rsp_valid) begin
          if (valid_q[set_r][vic_q]) fifo_q[set_r] <= WAY_W'((int'(vic_q) + 1) % WAYS);
          valid_q[set_r][vic_q] <= 1'b1;
          dirty_q[set_r][vic_q] <= (op_q == wp_pkg::L2_WRITE);
          rsp_valid <= 1'b1;
          rsp_rdata <= fill_line[sub*RD_BITS +: RD_BITS];
          rsp_way   <= vic_q;
          rsp_hit   <= 1'b0;
          state_q   <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The arrays must have been read before the lookup is evaluated.
  initial assert (LAT_WAY >= 2 && LAT_SET >= 2);
  // A predicted access activates exactly one way.
  assert property (@(posedge clk) disable iff (!rst_n)
                   act_single |-> $onehot(act_ways));

endmodule
