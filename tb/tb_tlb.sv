// tb_tlb: fills the TLB with random pages, looks them up, and checks the
// translation, the hit entry number, FIFO replacement once full, and that the
// TLB buffer serves a repeated page without a CAM search.
module tb_tlb;
  localparam int E = wp_pkg::TLB_ENTRIES, VW = wp_pkg::VPN_W;
  int checks = 0, failures = 0, bufhits = 0;
  logic clk = 0, rst_n = 0;
  logic lookup_en = 0, refill_en = 0;
  logic [VW-1:0] lookup_vpn, refill_vpn, refill_ppn, hit_ppn;
  logic hit, buf_hit, cam_search;
  logic [$clog2(E)-1:0] hit_idx, victim_idx;
  int mvpn [E], mppn [E];
  bit mval [E];
  int fifo = 0;

  tlb dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int find(int vpn);
    for (int e = 0; e < E; e++) if (mval[e] && mvpn[e] == vpn) return e;
    return -1;
  endfunction

  task automatic look(int vpn, bit expect_buf);
    int e;
    @(negedge clk);
    lookup_en = 1; lookup_vpn = vpn[VW-1:0];
    #1;
    e = find(vpn);
    checks++;
    if (hit != (e >= 0) || (e >= 0 && (int'(hit_idx) != e || int'(hit_ppn) != mppn[e])) ||
        (expect_buf && !buf_hit) || cam_search == buf_hit) begin
      failures++;
      $display("lookup %h: hit=%0b idx=%0d ppn=%h buf=%0b, want e=%0d", vpn, hit, hit_idx, hit_ppn, buf_hit, e);
    end
    if (buf_hit) bufhits++;
    @(posedge clk); #1 lookup_en = 0;
  endtask

  task automatic fill(int vpn, int ppn);
    @(negedge clk);
    refill_en = 1; refill_vpn = vpn[VW-1:0]; refill_ppn = ppn[VW-1:0];
    #1;
    checks++;
    if (int'(victim_idx) != fifo) begin failures++; $display("victim %0d want %0d", victim_idx, fifo); end
    @(posedge clk); #1 refill_en = 0;
    mval[fifo] = 1; mvpn[fifo] = vpn; mppn[fifo] = ppn; fifo = (fifo + 1) % E;
  endtask

  initial begin
    foreach (mval[e]) mval[e] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    look(32'h12345, 0);                       // empty: miss
    for (int i = 0; i < E + E / 2; i++) begin
      int v;
      do v = $urandom_range(0, (1 << VW) - 1); while (find(v) >= 0);
      fill(v, $urandom_range(0, (1 << VW) - 1));
      look(v, 0);
      look(v, 1);                              // repeated page: TLB buffer
    end
    for (int t = 0; t < 1000; t++) begin
      automatic int e = $urandom_range(0, E - 1);
      look(mvpn[e], 0);
    end
    look(32'h0badd & ((1 << VW) - 1), 0);
    checks++;
    if (bufhits < E) begin failures++; $display("buffer hits %0d", bufhits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
