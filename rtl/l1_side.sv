// l1_side: one side (instruction or data) of the cache system: a WP-TLB, a
// blocking L1 cache and the controller that runs the access flow.
//
// Flow of a request (`req_*`, accepted when `req_ready`):
//  * Lookup, in the cycle the request is accepted: the WP-TLB translates the
//    address and reads the way prediction while the L1 arrays are read.
//  * TLB miss: the page is requested on the walk port (`walk_*`); when the
//    PPN returns, the TLB entry is refilled, its way table entry cleared, and
//    the lookup repeated.
//  * Load that hits in L1: the word is returned one cycle after acceptance.
//  * Load that misses in L1: the L2 is asked for the line with the way table
//    result (valid bit and way index). The L2 answers with the line, the way
//    that holds it and whether it was found. Per the way table update rules,
//    the way is recorded whenever the prediction could not be used as it was:
//    a way table miss (line newly placed, or found after the TLB entry had
//    been refilled) and a wrong prediction (line placed again). A correct
//    prediction writes nothing. The line is then put into the L1 and the word
//    returned.
//  * Store (data side): write-through. A hit updates the L1 word; the store
//    always goes to the L2, with the same way prediction and recording; no L1
//    allocation on a miss.
// The side is blocking: one request at a time, so the TLB entry number and
// field index of the access are kept in registers until the L2 answers.
// Status pulses (`st_*`) mark the events used for energy accounting.
// The flow follows the document's case analysis; the write-through store
// path, the one-cycle hit timing and the walk port are this design's choices.
module l1_side #(
  parameter int unsigned TLB_ENTRIES = wp_pkg::TLB_ENTRIES,
  parameter int unsigned L1_SETS     = wp_pkg::L1_SETS,
  parameter int unsigned L2_WAYS     = wp_pkg::L2_WAYS,
  localparam int unsigned ADDR_W     = wp_pkg::ADDR_W,
  localparam int unsigned PO_W       = wp_pkg::PAGE_OFF_W,
  localparam int unsigned VPN_W      = ADDR_W - PO_W,
  localparam int unsigned WORD_W     = wp_pkg::WORD_W,
  localparam int unsigned BE_W       = WORD_W / 8,
  localparam int unsigned L1_LB      = wp_pkg::L1_LINE_BYTES,
  localparam int unsigned L1_BITS    = L1_LB * 8,
  localparam int unsigned L1_OFF_W   = $clog2(L1_LB),
  localparam int unsigned SET_W      = $clog2(L1_SETS),
  localparam int unsigned WO_W       = $clog2(L1_BITS / WORD_W),
  localparam int unsigned WAY_W      = $clog2(L2_WAYS),
  localparam int unsigned IDX_W      = $clog2(TLB_ENTRIES),
  localparam int unsigned FI_W       = $clog2((1 << PO_W) / wp_pkg::L2_LINE_BYTES)
) (
  input  logic                clk,
  input  logic                rst_n,
  // CPU side
  input  logic                req_valid,
  output logic                req_ready,
  input  logic [ADDR_W-1:0]   req_va,
  input  logic                req_we,
  input  logic [WORD_W-1:0]   req_wdata,
  input  logic [BE_W-1:0]     req_be,
  output logic                rsp_valid,
  output logic [WORD_W-1:0]   rsp_rdata,
  // page walk
  output logic                walk_valid,
  output logic [VPN_W-1:0]    walk_vpn,
  input  logic                walk_rsp_valid,
  input  logic [VPN_W-1:0]    walk_ppn,
  // L2
  output logic                l2_valid,
  input  logic                l2_ready,
  output logic [ADDR_W-1:0]   l2_addr,
  output wp_pkg::l2_op_e      l2_op,
  output logic [WORD_W-1:0]   l2_wdata,
  output logic [BE_W-1:0]     l2_be,
  output logic                l2_wt_hit,
  output logic [WAY_W-1:0]    l2_way,
  input  logic                l2_rsp_valid,
  input  logic [L1_BITS-1:0]  l2_rsp_rdata,
  input  logic [WAY_W-1:0]    l2_rsp_way,
  input  logic                l2_rsp_hit,
  // status pulses
  output logic                st_lookup,    // L1 (and WP-TLB) access
  output logic                st_l1_miss,   // request sent to L2
  output logic                st_tlb_miss,
  output logic                st_tlb_cam,   // TLB CAM searched (TLB buffer missed)
  output logic                st_wt_rd,     // way table read (way buffer missed)
  output logic                st_wt_buf,    // way buffer hit
  output logic                st_wt_write,  // way index recorded
  output logic                st_mispred    // way table hit, line not in L2
);

  typedef enum logic [2:0] {S_IDLE, S_LOOK, S_WALK, S_L2, S_L2W} state_e;
  state_e state_q;

  logic [ADDR_W-1:0] va_q;
  logic              we_q;
  logic [WORD_W-1:0] wdata_q;
  logic [BE_W-1:0]   be_q;
  logic [VPN_W-1:0]  ppn_q;
  logic [IDX_W-1:0]  idx_q;
  logic [FI_W-1:0]   fi_q;
  logic              wth_q;
  logic [WAY_W-1:0]  way_q;

  // lookup address: the new request in S_IDLE, the held one on a retry
  logic              lk_en;
  logic [ADDR_W-1:0] lk_va;
  logic              lk_we;
  logic [WORD_W-1:0] lk_wdata;
  logic [BE_W-1:0]   lk_be;
  always_comb begin
    lk_en    = (state_q == S_IDLE && req_valid) || state_q == S_LOOK;
    lk_va    = (state_q == S_IDLE) ? req_va    : va_q;
    lk_we    = (state_q == S_IDLE) ? req_we    : we_q;
    lk_wdata = (state_q == S_IDLE) ? req_wdata : wdata_q;
    lk_be    = (state_q == S_IDLE) ? req_be    : be_q;
  end

  // WP-TLB
  logic             t_hit, t_cam, w_hit, w_bhit, w_rd;
  logic [VPN_W-1:0] t_ppn;
  logic [IDX_W-1:0] t_idx;
  logic [FI_W-1:0]  t_fi;
  logic [WAY_W-1:0] t_way;
  logic             rec_en, refill_en;

  wp_tlb #(.ENTRIES(TLB_ENTRIES), .L2_WAYS(L2_WAYS)) u_wptlb (
    .clk, .rst_n,
    .lookup_en(lk_en), .lookup_va(lk_va),
    .tlb_hit(t_hit), .ppn(t_ppn), .hit_idx(t_idx), .field_idx(t_fi),
    .wt_hit(w_hit), .pred_way(t_way),
    .tlb_buf_hit(), .tlb_cam(t_cam), .wt_buf_hit(w_bhit), .wt_rd(w_rd),
    .refill_en, .refill_vpn(va_q[ADDR_W-1:PO_W]), .refill_ppn(walk_ppn),
    .rec_en, .rec_idx(idx_q), .rec_field(fi_q), .rec_way(l2_rsp_way)
  );

  // L1 arrays
  logic              c_hit, c_way;
  logic [WORD_W-1:0] c_word;
  logic              l1_touch, l1_wr, l1_rf;

  l1_cache #(.SETS(L1_SETS), .LINE_BYTES(L1_LB), .TAG_W(VPN_W), .WORD_W(WORD_W)) u_l1 (
    .clk, .rst_n,
    .lk_set(lk_va[L1_OFF_W +: SET_W]), .lk_tag(t_ppn), .lk_word(lk_va[2 +: WO_W]),
    .lk_hit(c_hit), .lk_way(c_way), .lk_rdata(c_word), .touch(l1_touch),
    .rf_en(l1_rf), .rf_set(va_q[L1_OFF_W +: SET_W]), .rf_tag(ppn_q), .rf_data(l2_rsp_rdata),
    .wr_en(l1_wr), .wr_set(lk_va[L1_OFF_W +: SET_W]), .wr_way(c_way),
    .wr_word(lk_va[2 +: WO_W]), .wr_data(lk_wdata), .wr_be(lk_be)
  );

  logic l1_hit;
  assign l1_hit   = lk_en && t_hit && c_hit;
  assign l1_touch = l1_hit && !lk_we;
  assign l1_wr    = l1_hit && lk_we;
  assign l1_rf    = state_q == S_L2W && l2_rsp_valid && !we_q;
  assign rec_en   = state_q == S_L2W && l2_rsp_valid && !(wth_q && l2_rsp_hit);
  assign refill_en = state_q == S_WALK && walk_rsp_valid;

  // outputs
  assign req_ready  = state_q == S_IDLE;
  assign walk_valid = state_q == S_WALK;
  assign walk_vpn   = va_q[ADDR_W-1:PO_W];
  assign l2_valid   = state_q == S_L2;
  assign l2_addr    = {ppn_q, va_q[PO_W-1:0]};
  assign l2_op      = we_q ? wp_pkg::L2_WRITE : wp_pkg::L2_READ;
  assign l2_wdata   = wdata_q;
  assign l2_be      = be_q;
  assign l2_wt_hit  = wth_q;
  assign l2_way     = way_q;

  assign st_lookup   = lk_en;
  assign st_tlb_miss = lk_en && !t_hit;
  assign st_l1_miss  = l2_valid && l2_ready;
  assign st_tlb_cam  = t_cam;
  assign st_wt_rd    = w_rd;
  assign st_wt_buf   = w_bhit;
  assign st_wt_write = rec_en;
  assign st_mispred  = state_q == S_L2W && l2_rsp_valid && wth_q && !l2_rsp_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      rsp_valid <= 1'b0;
      rsp_rdata <= '0;
      va_q <= '0; we_q <= 1'b0; wdata_q <= '0; be_q <= '0; ppn_q <= '0;
      idx_q <= '0; fi_q <= '0; wth_q <= 1'b0; way_q <= '0;
    end else begin
      rsp_valid <= 1'b0;
      if (state_q == S_IDLE && req_valid) begin
        va_q    <= req_va;
        we_q    <= req_we;
        wdata_q <= req_wdata;
        be_q    <= req_be;
      end
      unique case (state_q)
        S_IDLE, S_LOOK: if (lk_en) begin
          if (!t_hit) begin
            state_q <= S_WALK;
          end else begin
            ppn_q <= t_ppn;
            idx_q <= t_idx;
            fi_q  <= t_fi;
            wth_q <= w_hit;
            way_q <= t_way;
            if (c_hit && !lk_we) begin
              rsp_valid <= 1'b1;
              rsp_rdata <= c_word;
              state_q   <= S_IDLE;
            end else begin
              state_q <= S_L2;
            end
          end
        end
        S_WALK: if (walk_rsp_valid) state_q <= S_LOOK;
        S_L2:   if (l2_ready) state_q <= S_L2W;
        S_L2W:  if (l2_rsp_valid) begin
          rsp_valid <= 1'b1;
          rsp_rdata <= l2_rsp_rdata[va_q[2 +: WO_W]*WORD_W +: WORD_W];
          state_q   <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The L2 is asked only while this side waits for it.
  assert property (@(posedge clk) disable iff (!rst_n)
                   l2_rsp_valid |-> state_q == S_L2W);

endmodule
