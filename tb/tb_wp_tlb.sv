// tb_wp_tlb: exercises the whole WP-TLB. Pages are refilled, way indices
// recorded for random lines, and lookups compared with a reference model of
// TLB + way table: translation, way table hit, predicted way. Also checks
// that refilling a TLB entry drops the ways of the evicted page (a page that
// comes back starts with all fields invalid) and that repeated lookups of one
// page are served by the way buffer.
module tb_wp_tlb;
  localparam int E = 8;                       // small TLB to force evictions
  localparam int F = wp_pkg::WT_FIELDS, VW = wp_pkg::VPN_W;
  int checks = 0, failures = 0, wbuf = 0, wrd = 0;
  logic clk = 0, rst_n = 0;
  logic lookup_en = 0, refill_en = 0, rec_en = 0;
  logic [31:0] lookup_va;
  logic tlb_hit, wt_hit, tlb_buf_hit, tlb_cam, wt_buf_hit, wt_rd;
  logic [VW-1:0] ppn, refill_vpn, refill_ppn;
  logic [$clog2(E)-1:0] hit_idx, rec_idx;
  logic [$clog2(F)-1:0] field_idx, rec_field;
  logic [2:0] pred_way, rec_way;
  // reference: per resident page, its ppn and field contents
  int pv [E], pp [E];
  bit pval [E];
  bit fv [E][F];
  int fw [E][F];
  int fifo = 0;

  wp_tlb #(.ENTRIES(E)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int find(int vpn);
    for (int e = 0; e < E; e++) if (pval[e] && pv[e] == vpn) return e;
    return -1;
  endfunction

  // look up va; if the page is missing, refill it. Then possibly record a way.
  task automatic access(int vpn, int f, bit do_rec, int way);
    int e;
    @(negedge clk);
    lookup_en = 1; lookup_va = {vpn[VW-1:0], f[4:0], 7'($urandom)};
    #1;
    e = find(vpn);
    checks++;
    if (tlb_hit != (e >= 0)) begin failures++; $display("tlb hit %0b for vpn %h", tlb_hit, vpn); end
    if (e >= 0) begin
      checks++;
      if (int'(ppn) != pp[e] || int'(hit_idx) != e || int'(field_idx) != f || wt_hit != fv[e][f] ||
          (fv[e][f] && int'(pred_way) != fw[e][f])) begin
        failures++;
        $display("vpn %h f %0d: ppn %h wt_hit %0b way %0d, want %h %0b %0d", vpn, f, ppn, wt_hit,
                 pred_way, pp[e], fv[e][f], fw[e][f]);
      end
      if (wt_buf_hit) wbuf++;
      if (wt_rd) wrd++;
    end
    @(posedge clk); #1 lookup_en = 0;
    if (e < 0) begin
      @(negedge clk);
      refill_en = 1; refill_vpn = vpn[VW-1:0]; refill_ppn = VW'(vpn * 7 + 3);
      @(posedge clk); #1 refill_en = 0;
      e = fifo; fifo = (fifo + 1) % E;
      pval[e] = 1; pv[e] = vpn; pp[e] = int'(VW'(vpn * 7 + 3));
      foreach (fv[e][ff]) fv[e][ff] = 0;
    end
    if (do_rec) begin
      @(negedge clk);
      rec_en = 1; rec_idx = e[$clog2(E)-1:0]; rec_field = f[4:0]; rec_way = way[2:0];
      @(posedge clk); #1 rec_en = 0;
      fv[e][f] = 1; fw[e][f] = way;
    end
  endtask

  initial begin
    foreach (pval[e]) pval[e] = 0;
    rec_idx = '0; rec_field = '0; rec_way = '0; refill_vpn = '0; refill_ppn = '0; lookup_va = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      automatic int vpn = 100 + $urandom_range(0, 11);  // 12 pages over 8 entries
      automatic int f = $urandom_range(0, F - 1);
      access(vpn, f, $urandom_range(0, 2) == 0, $urandom_range(0, 7));
      if (t % 5 == 0) access(vpn, $urandom_range(0, F - 1), 0, 0);   // same page again
    end
    checks++;
    if (wbuf == 0 || wrd == 0) begin failures++; $display("way buffer hits %0d reads %0d", wbuf, wrd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
