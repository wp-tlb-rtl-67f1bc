// tb_wp_cache_system: end-to-end test of the whole cache system at its
// default size (128-entry WP-TLBs, 8 KB L1s, 512 KB 8-way L2).
//
// An instruction stream (loops over a few code pages, occasionally jumping
// to other code) and a data stream (loads and stores to a hot working set,
// mixed with accesses that sweep many pages whose lines all fall into the same
// L2 sets) run at the same time against behavioural page walkers and a
// behavioural main memory with a fixed latency. Instruction and data pages
// map to disjoint physical pages.
// Checked: every returned word against a reference image of memory (stores
// included); at every L2 line fetch, that the line is in no way of its set,
// i.e. a wrong prediction never leaves a copy behind; the L2 hit latency
// (4 cycles predicted, 6 normal) and that a predicted access activates one
// way. Counted, and required to happen at least once: L1 hits, TLB misses,
// TLB buffer hits, way buffer hits, way table reads and writes, predicted
// accesses, correct and wrong predictions, normal accesses that hit (the
// line's way had been dropped with its TLB entry), L2 misses, dirty
// write-backs, stores, and both sides asking for the L2 in the same cycle.
// At the end the L2 dynamic read energy is estimated with the per-access
// energies of the 512 KB 8-way configuration (set 0.711 nJ, way 0.126 nJ,
// way table read 0.004 nJ, write 0.001 nJ, way buffer 0.0008 nJ).
module tb_wp_cache_system;
  localparam int N_I = 12000, N_D = 12000, MEM_LAT = 20;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic i_req_valid = 0, i_req_ready, i_rsp_valid;
  logic [31:0] i_req_va = 0, i_rsp_rdata;
  logic i_walk_valid, i_walk_rsp_valid = 0;
  logic [19:0] i_walk_vpn, i_walk_ppn = 0;
  logic d_req_valid = 0, d_req_ready, d_req_we = 0, d_rsp_valid;
  logic [31:0] d_req_va = 0, d_req_wdata = 0, d_rsp_rdata;
  logic [3:0] d_req_be = 0;
  logic d_walk_valid, d_walk_rsp_valid = 0;
  logic [19:0] d_walk_vpn, d_walk_ppn = 0;
  logic mem_valid, mem_ready = 0, mem_we, mem_rsp_valid = 0;
  logic [31:0] mem_addr;
  logic [1023:0] mem_wdata, mem_rsp_rdata = '0;
  logic [7:0] i_st, d_st;
  logic [7:0] l2_act_ways;
  logic l2_act_single;

  wp_cache_system dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- address maps and memory image
  function automatic int i_ppn(int vpn); return 32'h40000 | (vpn & 32'hfff); endfunction
  function automatic int d_ppn(int vpn); return 32'h80000 | ((vpn & 32'h1ff) << 4); endfunction
  logic [31:0] img [int];
  function automatic logic [31:0] img_word(int pa);
    if (img.exists(pa)) return img[pa];
    return pa * 7 ^ 32'h1234_5678;
  endfunction
  logic [1023:0] mem [int];

  // ---------------- behavioural memory
  int n_memrd = 0, n_memwr = 0;
  initial begin
    forever begin
      @(negedge clk);
      mem_ready = ($urandom_range(0, 3) != 0);
      if (mem_valid && mem_ready) begin
        automatic int la = int'(mem_addr);
        automatic logic we = mem_we;
        automatic logic [1023:0] wd = mem_wdata;
        automatic logic [1023:0] l;
        @(posedge clk); #1 mem_ready = 0;
        if (we) begin mem[la] = wd; n_memwr++; end
        else begin
          n_memrd++;
          if (mem.exists(la)) l = mem[la];
          else for (int w = 0; w < 32; w++) l[w*32 +: 32] = img_word(la + w * 4) ;
          repeat (MEM_LAT - 1) @(negedge clk);
          mem_rsp_valid = 1; mem_rsp_rdata = l;
          @(posedge clk); #1 mem_rsp_valid = 0;
        end
      end
    end
  end

  // ---------------- page walkers
  always @(negedge clk) if (i_walk_valid && !i_walk_rsp_valid) begin
    repeat (3) @(negedge clk);
    i_walk_rsp_valid = 1; i_walk_ppn = 20'(i_ppn(int'(i_walk_vpn)));
    @(posedge clk); #1 i_walk_rsp_valid = 0;
  end
  always @(negedge clk) if (d_walk_valid && !d_walk_rsp_valid) begin
    repeat (3) @(negedge clk);
    d_walk_rsp_valid = 1; d_walk_ppn = 20'(d_ppn(int'(d_walk_vpn)));
    @(posedge clk); #1 d_walk_rsp_valid = 0;
  end

  // ---------------- event counters
  int n_l1hit = 0, n_tlbmiss = 0, n_tlbbuf = 0, n_wtbuf = 0, n_wtrd = 0, n_wtwr = 0;
  int n_pred = 0, n_predhit = 0, n_mispred = 0, n_norm = 0, n_normhit = 0, n_conflict = 0, n_store = 0;
  int n_lookup = 0, n_l2acc = 0;
  bit cur_pred = 0;
  int acc_cyc = 0;
  always @(negedge clk) if (rst_n) begin
    for (int s = 0; s < 2; s++) begin
      automatic logic [7:0] st = s ? d_st : i_st;
      if (st[0]) n_lookup++;
      if (st[2]) n_tlbmiss++;
      if (st[0] && !st[2] && !st[3]) n_tlbbuf++;
      if (st[4]) n_wtrd++;
      if (st[5]) n_wtbuf++;
      if (st[6]) n_wtwr++;
    end
    if (dut.s_valid == 2'b11) n_conflict++;
    acc_cyc++;
    if (dut.u_l2.rsp_valid) begin
      if (dut.u_l2.rsp_hit) begin
        checks++;
        // accepted in cycle 0, looked up in cycles 1..LAT, answer in LAT+1
        if (acc_cyc != (cur_pred ? 4 : 6) + 1) begin failures++; $display("L2 hit after %0d cycles", acc_cyc); end
        if (cur_pred) n_predhit++; else n_normhit++;
      end else if (cur_pred) n_mispred++;
    end
    if (l2_act_single || l2_act_ways != 0) begin
      n_l2acc++;
      cur_pred = l2_act_single;
      acc_cyc = 0;
      checks++;
      if ($countones(l2_act_ways) != (l2_act_single ? 1 : 8)) begin
        failures++; $display("activated ways %b", l2_act_ways);
      end
      if (l2_act_single) n_pred++; else n_norm++;
    end
  end

  // no copy of a fetched line may exist anywhere in its set
  logic [15:0] probe_tag [8];
  for (genvar g = 0; g < 8; g++) begin : g_probe
    assign probe_tag[g] = dut.u_l2.g_way[g].u_way.tags[dut.u_l2.set_r];
  end
  always @(negedge clk) if (rst_n && mem_valid && !mem_we) begin
    checks++;
    for (int g = 0; g < 8; g++)
      if (dut.u_l2.valid_q[dut.u_l2.set_r][g] && probe_tag[g] == mem_addr[31:16]) begin
        failures++; $display("line %h fetched while present in way %0d", mem_addr, g);
      end
  end

  // ---------------- CPU streams
  task automatic fetch(int va);
    automatic int cyc = 0;
    @(negedge clk);
    i_req_valid = 1; i_req_va = va;
    #1;
    while (!i_req_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 i_req_valid = 0;
    while (!i_rsp_valid && cyc < 2000) begin @(posedge clk); #1; cyc++; end
    if (cyc == 0) n_l1hit++;
    checks++;
    if (!i_rsp_valid || i_rsp_rdata != img_word((i_ppn(va >>> 12) << 12) | (va & 4092))) begin
      failures++; $display("fetch %h: %h", va, i_rsp_rdata);
    end
  endtask

  task automatic data(int va, bit st);
    automatic int cyc = 0;
    automatic int pa = (d_ppn(va >>> 12) << 12) | (va & 4092);
    automatic logic [31:0] wd = $urandom;
    automatic logic [3:0] be = 4'($urandom_range(1, 15));
    @(negedge clk);
    d_req_valid = 1; d_req_va = va; d_req_we = st; d_req_wdata = wd; d_req_be = be;
    #1;
    while (!d_req_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 d_req_valid = 0;
    while (!d_rsp_valid && cyc < 2000) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (!d_rsp_valid) begin failures++; $display("data %h: no answer", va); end
    if (st) begin
      automatic logic [31:0] o = img_word(pa);
      for (int b = 0; b < 4; b++) if (be[b]) o[b*8 +: 8] = wd[b*8 +: 8];
      img[pa] = o;
      n_store++;
    end else begin
      if (cyc == 0) n_l1hit++;
      if (d_rsp_rdata != img_word(pa)) begin
        failures++; $display("load %h: %h want %h", va, d_rsp_rdata, img_word(pa));
      end
    end
  endtask

  bit i_done = 0, d_done = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin : istream
        automatic int base = 32'h0001_0000;
        automatic int n = 0;
        while (n < N_I) begin
          // a loop body of 64..512 instructions run 3..8 times
          automatic int len = $urandom_range(16, 128) * 4;
          automatic int reps = $urandom_range(3, 8);
          for (int r = 0; r < reps && n < N_I; r++)
            for (int a = 0; a < len && n < N_I; a += 4) begin
              fetch(base + a);
              n++;
            end
          base = 32'h0001_0000 + $urandom_range(0, 7) * 4096 + $urandom_range(0, 31) * 128;
          if ($urandom_range(0, 9) == 0) base = 32'h0008_0000 + $urandom_range(0, 199) * 4096;
        end
        i_done = 1;
      end
      begin : dstream
        for (int n = 0; n < N_D; n++) begin
          automatic int va;
          if ($urandom_range(0, 9) < 7)
            va = 32'h0100_0000 + $urandom_range(0, 5) * 4096 + $urandom_range(0, 1023) * 4;   // hot pages
          else
            va = 32'h0110_0000 + $urandom_range(0, 199) * 4096 + $urandom_range(0, 1023) * 4; // sweep
          data(va, $urandom_range(0, 3) == 0);
        end
        d_done = 1;
      end
    join
    repeat (5) @(posedge clk);
    begin
      real e_ori, e_new, e_ovh;
      e_ori = 0.711 * n_l2acc;
      e_new = 0.126 * n_pred + 0.711 * n_norm;
      e_ovh = 0.004 * n_wtrd + 0.001 * n_wtwr + 0.0008 * (n_wtrd + n_wtbuf);
      $display("lookups %0d, L1 hits %0d, L2 accesses %0d (predicted %0d: %0d hit, %0d wrong; normal %0d: %0d hit)",
               n_lookup, n_l1hit, n_l2acc, n_pred, n_predhit, n_mispred, n_norm, n_normhit);
      $display("TLB misses %0d, TLB buffer hits %0d, way buffer hits %0d, way table reads %0d, writes %0d",
               n_tlbmiss, n_tlbbuf, n_wtbuf, n_wtrd, n_wtwr);
      $display("memory reads %0d, write-backs %0d, stores %0d, arbitration conflicts %0d",
               n_memrd, n_memwr, n_store, n_conflict);
      $display("L2 dynamic read energy saving: %0.1f%%", 100.0 * (1.0 - (e_new + e_ovh) / e_ori));
      checks++;
      if (!n_l1hit || !n_tlbmiss || !n_tlbbuf || !n_wtbuf || !n_wtrd || !n_wtwr || !n_pred || !n_predhit ||
          !n_mispred || !n_normhit || !n_memrd || !n_memwr || !n_store || !n_conflict) begin
        failures++; $display("a mechanism never happened");
      end
      // the way table is written for every L2 access except a correct prediction
      checks++;
      if (n_wtwr != n_l2acc - n_predhit) begin
        failures++; $display("way table writes %0d, expected %0d", n_wtwr, n_l2acc - n_predhit);
      end
      checks++;
      if (e_new + e_ovh >= e_ori) begin failures++; $display("no energy saved"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
