// l2_arbiter: shares the unified L2 cache between the instruction side and
// the data side.
//
// Each side presents one request at a time (the L1 caches are blocking) with
// a valid/ready handshake and a flat payload. When both are valid the side
// that was not served last wins (round robin); the winner's payload goes to
// the L2 and only the winner sees `ready`. The arbiter remembers which side's
// request the L2 accepted and steers the L2 response (`rsp_valid`) to that
// side; the response data is shared. Combinational request path, owner
// register updated when the L2 accepts.
// The unified L2 shared by both sides follows the document; the round-robin
// policy is this design's choice (the document does not describe the sharing).
module l2_arbiter #(
  parameter int unsigned PAYLOAD_W = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [1:0]           in_valid,
  output logic [1:0]           in_ready,
  input  logic [PAYLOAD_W-1:0] in_payload [2],
  output logic [1:0]           in_rsp_valid,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [PAYLOAD_W-1:0] out_payload,
  input  logic                 out_rsp_valid
);

  logic last_q;   // side served last
  logic owner_q;  // side whose request the L2 holds
  logic sel;

  always_comb begin
    if (in_valid == 2'b11) sel = ~last_q;
    else                   sel = in_valid[1];
    out_valid   = |in_valid;
    out_payload = in_payload[sel];
    in_ready    = '0;
    in_ready[sel] = out_ready;
    in_rsp_valid = '0;
    in_rsp_valid[owner_q] = out_rsp_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q  <= 1'b1;
      owner_q <= 1'b0;
    end else if (out_valid && out_ready) begin
      last_q  <= sel;
      owner_q <= sel;
    end
  end

endmodule
