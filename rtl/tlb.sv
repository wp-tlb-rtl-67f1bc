// tlb: fully associative translation lookaside buffer with a one-entry TLB
// buffer (block buffering).
//
// A lookup compares the virtual page number with every valid entry in the
// same cycle (combinational CAM) and returns the physical page number and the
// number m of the entry that hit; m selects the way table entry attached to
// this TLB. Before the CAM is searched the TLB buffer, which holds the last
// entry that hit, is compared; on a buffer hit `cam_search` stays low, which
// marks the lookup that did not spend CAM energy. The result is the same
// either way.
// A refill writes the entry at a FIFO pointer and reports that entry number
// (`victim_idx`, valid in the refill cycle) so that the attached way table can
// clear the fields that belonged to the evicted page.
// Timing: lookup results are combinational from `lookup_vpn`; refill and the
// buffer update take effect at the next clock edge.
// The entry count (128), the fully associative organisation and the TLB
// buffer follow the document; FIFO replacement is this design's choice (the
// document does not name a TLB replacement policy).
module tlb #(
  parameter int unsigned ENTRIES = wp_pkg::TLB_ENTRIES,
  parameter int unsigned VPN_W   = wp_pkg::VPN_W,
  parameter int unsigned PPN_W   = wp_pkg::PPN_W,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup
  input  logic             lookup_en,
  input  logic [VPN_W-1:0] lookup_vpn,
  output logic             hit,
  output logic [IDX_W-1:0] hit_idx,
  output logic [PPN_W-1:0] hit_ppn,
  output logic             buf_hit,     // served by the TLB buffer
  output logic             cam_search,  // CAM searched this cycle
  // refill after a page walk
  input  logic             refill_en,
  input  logic [VPN_W-1:0] refill_vpn,
  input  logic [PPN_W-1:0] refill_ppn,
  output logic [IDX_W-1:0] victim_idx
);

  logic [ENTRIES-1:0] valid_q;
  logic [VPN_W-1:0]   vpn_q [ENTRIES];
  logic [PPN_W-1:0]   ppn_q [ENTRIES];
  logic [IDX_W-1:0]   fifo_q;

  // TLB buffer: last entry that hit
  logic             bvalid_q;
  logic [VPN_W-1:0] bvpn_q;
  logic [PPN_W-1:0] bppn_q;
  logic [IDX_W-1:0] bidx_q;

  logic             cam_hit;
  logic [IDX_W-1:0] cam_idx;

  always_comb begin
    cam_hit = 1'b0;
    cam_idx = '0;
    for (int unsigned e = 0; e < ENTRIES; e++) begin
      if (valid_q[e] && vpn_q[e] == lookup_vpn) begin
        cam_hit = 1'b1;
        cam_idx = IDX_W'(e);
      end
    end
  end

  always_comb begin
    buf_hit    = lookup_en && bvalid_q && (bvpn_q == lookup_vpn);
    cam_search = lookup_en && !buf_hit;
    if (buf_hit) begin
      hit     = 1'b1;
      hit_idx = bidx_q;
      hit_ppn = bppn_q;
    end else begin
      hit     = lookup_en && cam_hit;
      hit_idx = cam_idx;
      hit_ppn = ppn_q[cam_idx];
    end
  end

  assign victim_idx = fifo_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q  <= '0;
      fifo_q   <= '0;
      bvalid_q <= 1'b0;
    end else begin
      if (refill_en) begin
        valid_q[fifo_q] <= 1'b1;
        fifo_q          <= IDX_W'((int'(fifo_q) + 1) % ENTRIES);
        if (bidx_q == fifo_q) bvalid_q <= 1'b0;
      end else if (cam_search && cam_hit) begin
        bvalid_q <= 1'b1;
      end
    end
  end

  // Arrays and buffer contents need no reset: valid bits guard them.
  always_ff @(posedge clk) begin
    if (refill_en) begin
      vpn_q[fifo_q] <= refill_vpn;
      ppn_q[fifo_q] <= refill_ppn;
    end else if (cam_search && cam_hit) begin
      bvpn_q <= lookup_vpn;
      bppn_q <= ppn_q[cam_idx];
      bidx_q <= cam_idx;
    end
  end

  // A refill is only requested for a page that missed.
  assert property (@(posedge clk) disable iff (!rst_n)
                   refill_en |-> !(lookup_en && hit && lookup_vpn == refill_vpn));

endmodule
