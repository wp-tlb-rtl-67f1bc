// wp_sys_run: reusable traffic harness for the whole cache system at one
// configuration, instantiated by tb_wp_cache_sizes once per evaluated size.
//
// It drives the same kind of traffic as the default-size system test: an
// instruction stream looping over a few code pages with occasional far jumps,
// and a data stream of loads and stores to hot pages mixed with a sweep over
// many pages whose lines collide in the same L2 sets. Page walks and main
// memory are behavioural (fixed page maps, a sparse line store with a 20-cycle
// latency); instruction and data pages map to disjoint physical pages.
// Checked: every returned word against a reference image; at each L2 line
// fetch, that no way of the set holds the line (a wrong prediction is a true
// miss); the 4/6-cycle L2 hit latency plus the answer cycle; that a predicted
// access activates exactly one way and a normal one all L2_WAYS; that the
// way table is written once per L2 access except a correct prediction; and
// that predictions, correct and wrong, and memory fetches all happen.
// Interface: `done` rises at the end, with this configuration's `checks` and
// `failures`. When E_SET is non-zero the L2 read energy saving is printed
// with the given per-access energies (nJ).
module wp_sys_run #(
  parameter int unsigned TLB_ENTRIES = 128,
  parameter int unsigned L2_WAYS     = 8,
  parameter int unsigned L2_SETS     = 512,
  parameter int unsigned N_I         = 4000,
  parameter int unsigned N_D         = 4000,
  parameter real         E_SET       = 0.0,
  parameter real         E_WAY       = 0.0,
  parameter string       NAME        = "config"
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int MEM_LAT = 20;
  localparam int TAG_LSB = 7 + $clog2(L2_SETS);
  localparam int WAY_W = $clog2(L2_WAYS);
  initial begin done = 0; checks = 0; failures = 0; end
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
  logic [L2_WAYS-1:0] l2_act_ways;
  logic l2_act_single;

  wp_cache_system #(.TLB_ENTRIES(TLB_ENTRIES), .L2_WAYS(L2_WAYS), .L2_SETS(L2_SETS)) dut (.*);
  always #5 clk = ~clk;


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
        if (acc_cyc != (cur_pred ? 4 : 6) + 1) begin failures++; $display("%s: L2 hit after %0d cycles", NAME, acc_cyc); end
        if (cur_pred) n_predhit++; else n_normhit++;
      end else if (cur_pred) n_mispred++;
    end
    if (l2_act_single || l2_act_ways != 0) begin
      n_l2acc++;
      cur_pred = l2_act_single;
      acc_cyc = 0;
      checks++;
      if ($countones(l2_act_ways) != (l2_act_single ? 1 : L2_WAYS)) begin
        failures++; $display("%s: activated ways %b", NAME, l2_act_ways);
      end
      if (l2_act_single) n_pred++; else n_norm++;
    end
  end

  // no copy of a fetched line may exist anywhere in its set
  logic [31-TAG_LSB:0] probe_tag [L2_WAYS];
  for (genvar g = 0; g < L2_WAYS; g++) begin : g_probe
    assign probe_tag[g] = dut.u_l2.g_way[g].u_way.tags[dut.u_l2.set_r];
  end
  always @(negedge clk) if (rst_n && mem_valid && !mem_we) begin
    checks++;
    for (int g = 0; g < L2_WAYS; g++)
      if (dut.u_l2.valid_q[dut.u_l2.set_r][g] && probe_tag[g] == mem_addr[31:TAG_LSB]) begin
        failures++; $display("%s: line %h fetched while present in way %0d", NAME, mem_addr, g);
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
      failures++; $display("%s: fetch %h: %h", NAME, va, i_rsp_rdata);
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
    if (!d_rsp_valid) begin failures++; $display("%s: data %h: no answer", NAME, va); end
    if (st) begin
      automatic logic [31:0] o = img_word(pa);
      for (int b = 0; b < 4; b++) if (be[b]) o[b*8 +: 8] = wd[b*8 +: 8];
      img[pa] = o;
      n_store++;
    end else begin
      if (cyc == 0) n_l1hit++;
      if (d_rsp_rdata != img_word(pa)) begin
        failures++; $display("%s: load %h: %h want %h", NAME, va, d_rsp_rdata, img_word(pa));
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
    $display("%s: lookups %0d, L1 hits %0d, L2 accesses %0d (predicted %0d: %0d hit, %0d wrong; normal %0d: %0d hit)",
             NAME, n_lookup, n_l1hit, n_l2acc, n_pred, n_predhit, n_mispred, n_norm, n_normhit);
    $display("%s: TLB misses %0d, way buffer hits %0d, way table reads %0d, writes %0d, memory reads %0d, write-backs %0d",
             NAME, n_tlbmiss, n_wtbuf, n_wtrd, n_wtwr, n_memrd, n_memwr);
    $display("%s: single-way share of L2 accesses %0.1f%%", NAME, 100.0 * n_pred / n_l2acc);
    checks++;
    if (!n_pred || !n_predhit || !n_mispred || !n_memrd || !n_wtwr) begin
      failures++; $display("%s: a mechanism never happened", NAME);
    end
    checks++;
    if (n_wtwr != n_l2acc - n_predhit) begin
      failures++; $display("%s: way table writes %0d, expected %0d", NAME, n_wtwr, n_l2acc - n_predhit);
    end
    if (E_SET != 0.0) begin
      real e_ori, e_new, e_ovh;
      e_ori = E_SET * n_l2acc;
      e_new = E_WAY * n_pred + E_SET * n_norm;
      e_ovh = 0.004 * n_wtrd + 0.001 * n_wtwr + 0.0008 * (n_wtrd + n_wtbuf);
      $display("%s: L2 dynamic read energy saving %0.1f%%", NAME, 100.0 * (1.0 - (e_new + e_ovh) / e_ori));
      checks++;
      if (e_new + e_ovh >= e_ori) begin failures++; $display("%s: no energy saved", NAME); end
    end
    done = 1;
  end
endmodule
