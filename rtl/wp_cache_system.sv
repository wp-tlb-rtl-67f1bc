// wp_cache_system: a two-level cache system whose L2 reads activate a single
// way whenever the TLB already knows where the line is.
//
// Structure: an instruction side and a data side (each an l1_side: WP-TLB +
// blocking 8 KB 2-way L1), a round-robin l2_arbiter, and a unified 512 KB
// 8-way l2_cache in front of main memory. Each TLB entry carries a way table
// entry recording in which L2 way each 128-byte line of that page was placed;
// it is read during the L1 lookup (through a one-entry way buffer), so an L1
// miss reaches the L2 with a way prediction. A predicted access reads one
// way's tag and data (4 cycles) and is never followed by a probe of the other
// ways: a wrong prediction means the line is not in the L2. Without a
// prediction the L2 reads all ways (6 cycles).
//
// Ports: per side a CPU request/response port (the instruction side only
// reads), a page walk port that supplies the PPN on a TLB miss, the L2's
// line-wide memory port, and status pulses (`*_st`, see l1_side for the bit
// order) plus the L2 way activation (`l2_act_ways`, `l2_act_single`).
// Assumes no physical line is reachable through both TLBs or through two
// virtual pages (no shared code/data pages, no synonyms), as the prediction
// guarantee requires.
module wp_cache_system #(
  parameter int unsigned TLB_ENTRIES = wp_pkg::TLB_ENTRIES,
  parameter int unsigned L2_WAYS     = wp_pkg::L2_WAYS,
  parameter int unsigned L2_SETS     = wp_pkg::L2_SETS,
  localparam int unsigned ADDR_W     = wp_pkg::ADDR_W,
  localparam int unsigned VPN_W      = ADDR_W - wp_pkg::PAGE_OFF_W,
  localparam int unsigned WORD_W     = wp_pkg::WORD_W,
  localparam int unsigned BE_W       = WORD_W / 8,
  localparam int unsigned L1_BITS    = wp_pkg::L1_LINE_BITS,
  localparam int unsigned LINE_BITS  = wp_pkg::L2_LINE_BITS,
  localparam int unsigned WAY_W      = $clog2(L2_WAYS),
  localparam int unsigned PAY_W      = ADDR_W + 1 + WORD_W + BE_W + 1 + WAY_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // instruction side
  input  logic                 i_req_valid,
  output logic                 i_req_ready,
  input  logic [ADDR_W-1:0]    i_req_va,
  output logic                 i_rsp_valid,
  output logic [WORD_W-1:0]    i_rsp_rdata,
  output logic                 i_walk_valid,
  output logic [VPN_W-1:0]     i_walk_vpn,
  input  logic                 i_walk_rsp_valid,
  input  logic [VPN_W-1:0]     i_walk_ppn,
  // data side
  input  logic                 d_req_valid,
  output logic                 d_req_ready,
  input  logic [ADDR_W-1:0]    d_req_va,
  input  logic                 d_req_we,
  input  logic [WORD_W-1:0]    d_req_wdata,
  input  logic [BE_W-1:0]      d_req_be,
  output logic                 d_rsp_valid,
  output logic [WORD_W-1:0]    d_rsp_rdata,
  output logic                 d_walk_valid,
  output logic [VPN_W-1:0]     d_walk_vpn,
  input  logic                 d_walk_rsp_valid,
  input  logic [VPN_W-1:0]     d_walk_ppn,
  // main memory
  output logic                 mem_valid,
  input  logic                 mem_ready,
  output logic                 mem_we,
  output logic [ADDR_W-1:0]    mem_addr,
  output logic [LINE_BITS-1:0] mem_wdata,
  input  logic                 mem_rsp_valid,
  input  logic [LINE_BITS-1:0] mem_rsp_rdata,
  // status: {mispred, wt_write, wt_buf, wt_rd, tlb_cam, tlb_miss, l1_miss, lookup}
  output logic [7:0]           i_st,
  output logic [7:0]           d_st,
  output logic [L2_WAYS-1:0]   l2_act_ways,
  output logic                 l2_act_single
);

  // side 0 = instruction, side 1 = data
  logic [1:0]          s_valid, s_ready, s_rsp_valid;
  logic [PAY_W-1:0]    s_pay [2];
  logic [ADDR_W-1:0]   s_addr [2];
  wp_pkg::l2_op_e      s_op [2];
  logic [WORD_W-1:0]   s_wdata [2];
  logic [BE_W-1:0]     s_be [2];
  logic [1:0]          s_wth;
  logic [WAY_W-1:0]    s_way [2];

  logic                 c_valid, c_ready, c_rsp_valid, c_rsp_hit;
  logic [PAY_W-1:0]     c_pay;
  logic [L1_BITS-1:0]   c_rsp_rdata;
  logic [WAY_W-1:0]     c_rsp_way;

  l1_side #(.TLB_ENTRIES(TLB_ENTRIES), .L2_WAYS(L2_WAYS)) u_iside (
    .clk, .rst_n,
    .req_valid(i_req_valid), .req_ready(i_req_ready), .req_va(i_req_va),
    .req_we(1'b0), .req_wdata('0), .req_be('0),
    .rsp_valid(i_rsp_valid), .rsp_rdata(i_rsp_rdata),
    .walk_valid(i_walk_valid), .walk_vpn(i_walk_vpn),
    .walk_rsp_valid(i_walk_rsp_valid), .walk_ppn(i_walk_ppn),
    .l2_valid(s_valid[0]), .l2_ready(s_ready[0]), .l2_addr(s_addr[0]), .l2_op(s_op[0]),
    .l2_wdata(s_wdata[0]), .l2_be(s_be[0]), .l2_wt_hit(s_wth[0]), .l2_way(s_way[0]),
    .l2_rsp_valid(s_rsp_valid[0]), .l2_rsp_rdata(c_rsp_rdata),
    .l2_rsp_way(c_rsp_way), .l2_rsp_hit(c_rsp_hit),
    .st_lookup(i_st[0]), .st_l1_miss(i_st[1]), .st_tlb_miss(i_st[2]), .st_tlb_cam(i_st[3]),
    .st_wt_rd(i_st[4]), .st_wt_buf(i_st[5]), .st_wt_write(i_st[6]), .st_mispred(i_st[7])
  );

  l1_side #(.TLB_ENTRIES(TLB_ENTRIES), .L2_WAYS(L2_WAYS)) u_dside (
    .clk, .rst_n,
    .req_valid(d_req_valid), .req_ready(d_req_ready), .req_va(d_req_va),
    .req_we(d_req_we), .req_wdata(d_req_wdata), .req_be(d_req_be),
    .rsp_valid(d_rsp_valid), .rsp_rdata(d_rsp_rdata),
    .walk_valid(d_walk_valid), .walk_vpn(d_walk_vpn),
    .walk_rsp_valid(d_walk_rsp_valid), .walk_ppn(d_walk_ppn),
    .l2_valid(s_valid[1]), .l2_ready(s_ready[1]), .l2_addr(s_addr[1]), .l2_op(s_op[1]),
    .l2_wdata(s_wdata[1]), .l2_be(s_be[1]), .l2_wt_hit(s_wth[1]), .l2_way(s_way[1]),
    .l2_rsp_valid(s_rsp_valid[1]), .l2_rsp_rdata(c_rsp_rdata),
    .l2_rsp_way(c_rsp_way), .l2_rsp_hit(c_rsp_hit),
    .st_lookup(d_st[0]), .st_l1_miss(d_st[1]), .st_tlb_miss(d_st[2]), .st_tlb_cam(d_st[3]),
    .st_wt_rd(d_st[4]), .st_wt_buf(d_st[5]), .st_wt_write(d_st[6]), .st_mispred(d_st[7])
  );

  always_comb begin
    for (int s = 0; s < 2; s++)
      s_pay[s] = {s_addr[s], s_op[s], s_wdata[s], s_be[s], s_wth[s], s_way[s]};
  end

  l2_arbiter #(.PAYLOAD_W(PAY_W)) u_arb (
    .clk, .rst_n,
    .in_valid(s_valid), .in_ready(s_ready), .in_payload(s_pay), .in_rsp_valid(s_rsp_valid),
    .out_valid(c_valid), .out_ready(c_ready), .out_payload(c_pay), .out_rsp_valid(c_rsp_valid)
  );

  logic [ADDR_W-1:0] c_addr;
  wp_pkg::l2_op_e    c_op;
  logic [WORD_W-1:0] c_wdata;
  logic [BE_W-1:0]   c_be;
  logic              c_wth;
  logic [WAY_W-1:0]  c_way;
  assign {c_addr, c_op, c_wdata, c_be, c_wth, c_way} = c_pay;

  l2_cache #(.WAYS(L2_WAYS), .SETS(L2_SETS)) u_l2 (
    .clk, .rst_n,
    .req_valid(c_valid), .req_ready(c_ready), .req_addr(c_addr), .req_op(c_op),
    .req_wdata(c_wdata), .req_be(c_be), .req_wt_hit(c_wth), .req_way(c_way),
    .rsp_valid(c_rsp_valid), .rsp_rdata(c_rsp_rdata), .rsp_way(c_rsp_way), .rsp_hit(c_rsp_hit),
    .act_ways(l2_act_ways), .act_single(l2_act_single),
    .mem_valid, .mem_ready, .mem_we, .mem_addr, .mem_wdata, .mem_rsp_valid, .mem_rsp_rdata
  );

endmodule
