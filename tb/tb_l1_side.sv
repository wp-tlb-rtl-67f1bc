// tb_l1_side: one L1 side (WP-TLB + L1 + controller) against a behavioural
// page walker and a behavioural L2. The L2 model places missing lines in a
// random way and now and then drops lines, so recorded ways go stale. Checks:
// load data against a memory image that includes earlier stores; the walk
// request's page; the way prediction sent with every L2 request against a
// reference record (written when the L2 reports a way table miss or a wrong
// prediction, erased when the page's TLB entry is refilled); that a predicted
// line is never found in another way; that a load that hits in L1 answers one
// cycle after it is accepted. Counts L1 hits, TLB misses, predicted accesses,
// wrong predictions and way table writes, failing if any never happened.
module tb_l1_side;
  localparam int TE = 4;                      // small TLB to force refills
  int checks = 0, failures = 0;
  int n_l1hit = 0, n_tlbmiss = 0, n_pred = 0, n_mispred = 0, n_rec = 0, n_case2 = 0;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_we = 0, rsp_valid;
  logic [31:0] req_va = 0, req_wdata = 0, rsp_rdata;
  logic [3:0] req_be = 0;
  logic walk_valid, walk_rsp_valid = 0;
  logic [19:0] walk_vpn, walk_ppn = 0;
  logic l2_valid, l2_ready = 1, l2_wt_hit, l2_rsp_valid = 0, l2_rsp_hit = 0;
  logic [31:0] l2_addr, l2_wdata;
  wp_pkg::l2_op_e l2_op;
  logic [3:0] l2_be;
  logic [2:0] l2_way, l2_rsp_way = 0;
  logic [255:0] l2_rsp_rdata = '0;
  logic st_lookup, st_l1_miss, st_tlb_miss, st_tlb_cam, st_wt_rd, st_wt_buf, st_wt_write, st_mispred;

  l1_side #(.TLB_ENTRIES(TE)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int ppn_of(int vpn); return (vpn ^ 20'h5a5a5) & 20'hfffff; endfunction

  logic [31:0] img [int];                    // physical word address -> data
  function automatic logic [31:0] img_word(int a);
    if (img.exists(a)) return img[a];
    return a * 3 + 1;
  endfunction

  int tlbq [$];                              // resident pages, oldest first
  int rec [int];                             // physical line -> recorded way
  int l2w [int];                             // physical line -> way it is in (model L2)
  int l2_acts = 0, walks = 0;

  // page walker
  always @(posedge clk) if (walk_valid && !walk_rsp_valid) begin
    int v;
    v = int'(walk_vpn);
    walks++;
    repeat (2) @(posedge clk);
    #1;
    walk_rsp_valid = 1; walk_ppn = 20'(ppn_of(v));
    if (tlbq.size() == TE) begin
      int old;
      int gone [$];
      gone.delete();
      old = tlbq.pop_front();
      foreach (rec[la]) if ((la >>> 12) == ppn_of(old)) gone.push_back(la);
      foreach (gone[i]) rec.delete(gone[i]);
    end
    tlbq.push_back(v);
    @(posedge clk); #1 walk_rsp_valid = 0;
  end

  // L2 model
  always @(posedge clk) if (l2_valid && l2_ready) begin
    int la, pa, w;
    bit pred, hit;
    pa = int'(l2_addr); la = pa & ~127; pred = l2_wt_hit;
    l2_acts++;
    checks++;
    if (pred != rec.exists(la) || (pred && int'(l2_way) != rec[la])) begin
      failures++; $display("prediction for %h: %0b/%0d, record %0b", pa, pred, l2_way, rec.exists(la));
    end
    if (pred && l2w.exists(la) && l2w[la] != int'(l2_way)) begin
      failures++; $display("line %h in way %0d, predicted %0d", la, l2w[la], l2_way);
    end
    if (pred) n_pred++;
    hit = l2w.exists(la);
    if (!pred && hit && tlbq.size() > 0) n_case2++;
    if (pred && !hit) n_mispred++;
    if (!hit) begin
      int gone [$];
      gone.delete();
      w = $urandom_range(0, 7);
      foreach (l2w[o]) if (l2w[o] == w && ((o >> 7) & 511) == ((la >> 7) & 511)) gone.push_back(o);
      foreach (gone[i]) l2w.delete(gone[i]);
      l2w[la] = w;
    end
    w = l2w[la];
    if (l2_op == wp_pkg::L2_WRITE) begin
      logic [31:0] o;
      o = img_word(pa & ~3);
      for (int b = 0; b < 4; b++) if (l2_be[b]) o[b*8 +: 8] = l2_wdata[b*8 +: 8];
      img[pa & ~3] = o;
    end
    repeat ($urandom_range(2, 5)) @(posedge clk);
    #1;
    l2_rsp_valid = 1; l2_rsp_hit = hit; l2_rsp_way = 3'(w);
    for (int i = 0; i < 8; i++) l2_rsp_rdata[i*32 +: 32] = img_word((pa & ~31) + i * 4);
    if (!(pred && hit)) rec[la] = w;
    // the model L2 sometimes loses lines (evictions by other traffic)
    if ($urandom_range(0, 3) == 0) begin
      int gone [$];
      gone.delete();
      foreach (l2w[o]) if ($urandom_range(0, 7) == 0) gone.push_back(o);
      foreach (gone[i]) l2w.delete(gone[i]);
    end
    @(posedge clk); #1 l2_rsp_valid = 0;
  end

  always @(posedge clk) if (rst_n && st_wt_write) n_rec++;

  task automatic access(int va, bit st);
    int cyc = 0, a0 = l2_acts, w0 = walks, pa;
    logic [31:0] d = $urandom;
    @(negedge clk);
    req_valid = 1; req_va = va; req_we = st; req_wdata = d; req_be = 4'($urandom_range(1, 15));
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 req_valid = 0;
    while (!rsp_valid && cyc < 500) begin @(posedge clk); #1; cyc++; end
    pa = (ppn_of(va >>> 12) << 12) | (va & 4095);
    if (walks != w0) n_tlbmiss++;
    if (!st) begin
      checks++;
      if (rsp_rdata != img_word(pa & ~3)) begin
        failures++; $display("load %h: %h want %h", va, rsp_rdata, img_word(pa & ~3));
      end
      if (l2_acts == a0 && walks == w0) begin
        n_l1hit++;
        checks++;
        // the answer is registered at the edge that accepts the request:
        // a one-cycle lookup
        if (cyc != 0) begin failures++; $display("L1 hit took %0d cycles", cyc + 1); end
      end
    end else if (l2_acts == a0) begin
      failures++; $display("store not written through");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      automatic int page = $urandom_range(0, 5);      // 6 pages over 4 TLB entries
      automatic int off = $urandom_range(0, 3) * 128 + $urandom_range(0, 63) * 4 + $urandom_range(0, 1) * 2048;
      access((page + 16) << 12 | off, $urandom_range(0, 4) == 0);
    end
    checks++;
    if (!n_l1hit || !n_tlbmiss || !n_pred || !n_mispred || !n_rec || !n_case2) failures++;
    $display("L1 hits %0d, TLB misses %0d, predicted %0d, wrong %0d, way table writes %0d, wt miss + L2 hit %0d",
             n_l1hit, n_tlbmiss, n_pred, n_mispred, n_rec, n_case2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
