// tb_l2_cache: drives reads and stores into the L2 with way predictions
// produced the way the WP-TLB would (a per-line record written whenever the
// response shows the prediction was missing or wrong, and randomly forgotten
// to mimic TLB refills). A behavioural memory sits behind it. Checks:
// returned data against a reference memory image (so write-backs of dirty
// victims are checked too), hit/miss and returned way against a reference
// model of the tags with the same replacement rule, one activated way for a
// predicted access and all ways otherwise, and the hit latency (4 cycles
// predicted, 6 cycles normal). Counts predicted hits, wrong predictions,
// normal hits, misses and write-backs, and fails if any never happened.
module tb_l2_cache;
  localparam int WAYS = wp_pkg::L2_WAYS, SETS = wp_pkg::L2_SETS;
  int checks = 0, failures = 0;
  int n_phit = 0, n_mispred = 0, n_nhit = 0, n_miss = 0, n_wb = 0, n_st = 0;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_wt_hit = 0;
  logic [31:0] req_addr = 0, req_wdata = 0;
  wp_pkg::l2_op_e req_op = wp_pkg::L2_READ;
  logic [3:0] req_be = 0;
  logic [2:0] req_way = 0, rsp_way;
  logic rsp_valid, rsp_hit, act_single;
  logic [255:0] rsp_rdata;
  logic [WAYS-1:0] act_ways;
  logic mem_valid, mem_ready = 0, mem_we, mem_rsp_valid = 0;
  logic [31:0] mem_addr;
  logic [1023:0] mem_wdata, mem_rsp_rdata = '0;

  l2_cache dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---- memory: backing store and its latency
  logic [1023:0] mem [int];
  function automatic logic [1023:0] mem_line(int la);
    logic [1023:0] l;
    if (mem.exists(la)) return mem[la];
    for (int w = 0; w < 32; w++) l[w*32 +: 32] = (la + w * 4) ^ 32'h5a5a_0000;
    return l;
  endfunction
  initial begin
    forever begin
      @(negedge clk);
      mem_ready = $urandom_range(0, 1);
      if (mem_valid && mem_ready) begin
        automatic int la = int'(mem_addr);
        automatic logic we = mem_we;
        automatic logic [1023:0] wd = mem_wdata;
        @(posedge clk); #1 mem_ready = 0;
        if (we) begin mem[la] = wd; n_wb++; end
        else begin
          repeat ($urandom_range(3, 8)) @(negedge clk);
          mem_rsp_valid = 1; mem_rsp_rdata = mem_line(la);
          @(posedge clk); #1 mem_rsp_valid = 0;
        end
      end
    end
  end

  // ---- reference: data image, tag model, way records
  logic [31:0] img [int];          // word address -> data as the CPU sees it
  function automatic logic [31:0] img_word(int a);
    if (img.exists(a)) return img[a];
    return a ^ 32'h5a5a_0000;
  endfunction
  bit tv [SETS][WAYS];
  int tt [SETS][WAYS];
  int tf [SETS];
  int rec [int];                   // line address -> recorded way

  task automatic access(int addr, bit st);
    int set = (addr >> 7) & (SETS - 1), tag = addr >>> 16, la = addr & ~127;
    int where = -1, cyc = 0, exp_way;
    bit pred = rec.exists(la) && $urandom_range(0, 9) != 0;
    logic [31:0] sd = $urandom;
    logic [3:0] be = st ? 4'($urandom_range(1, 15)) : 4'h0;
    for (int w = 0; w < WAYS; w++) if (tv[set][w] && tt[set][w] == tag) where = w;
    @(negedge clk);
    req_valid = 1; req_addr = addr; req_op = st ? wp_pkg::L2_WRITE : wp_pkg::L2_READ;
    req_wdata = sd; req_be = be; req_wt_hit = pred; req_way = pred ? 3'(rec[la]) : 3'($urandom);
    #1;
    checks++;
    if (!req_ready || act_single != pred || $countones(act_ways) != (pred ? 1 : WAYS) ||
        (pred && !act_ways[req_way])) begin
      failures++; $display("activation: ready=%0b single=%0b ways=%b", req_ready, act_single, act_ways);
    end
    @(posedge clk); #1 req_valid = 0;
    do begin @(posedge clk); #1; cyc++; end while (!rsp_valid && cyc < 1000);
    // expected location
    if (pred && where >= 0 && where != rec[la]) begin
      failures++; $display("record says way %0d but line is in way %0d", rec[la], where);
    end
    if (where >= 0 && (!pred || rec[la] == where)) exp_way = where;
    else begin
      exp_way = tf[set];
      for (int w = WAYS - 1; w >= 0; w--) if (!tv[set][w]) exp_way = w;
    end
    checks++;
    if (!rsp_valid || int'(rsp_way) != exp_way || rsp_hit != (where >= 0)) begin
      failures++; $display("addr %h: way %0d hit %0b, want %0d %0b", addr, rsp_way, rsp_hit, exp_way, where >= 0);
    end
    if (where >= 0) begin
      checks++;
      if (cyc != (pred ? wp_pkg::L2_LAT_WAY : wp_pkg::L2_LAT_SET)) begin
        failures++; $display("hit latency %0d (pred %0b)", cyc, pred);
      end
      if (pred) n_phit++; else n_nhit++;
    end else begin
      n_miss++;
      if (pred) n_mispred++;
      if (tv[set][exp_way]) tf[set] = (exp_way + 1) % WAYS;
      tv[set][exp_way] = 1; tt[set][exp_way] = tag;
    end
    if (!(pred && where >= 0)) rec[la] = exp_way;
    if (st) begin
      logic [31:0] o = img_word(addr & ~3);
      for (int b = 0; b < 4; b++) if (be[b]) o[b*8 +: 8] = sd[b*8 +: 8];
      img[addr & ~3] = o;
      n_st++;
    end else begin
      int base = addr & ~31;
      for (int w = 0; w < 8; w++) begin
        checks++;
        if (rsp_rdata[w*32 +: 32] != img_word(base + w * 4)) begin
          failures++; $display("data %h word %0d: %h want %h", addr, w, rsp_rdata[w*32 +: 32], img_word(base + w * 4));
        end
      end
    end
  endtask

  initial begin
    foreach (tv[s, w]) tv[s][w] = 0;
    foreach (tf[s]) tf[s] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 12 tags over 2 sets: more lines than ways, so lines are evicted and
    // predictions go stale
    for (int t = 0; t < 3000; t++) begin
      automatic int addr = (($urandom_range(0, 11) + 1) << 16) | ($urandom_range(0, 1) << 7) | ($urandom_range(0, 31) << 2);
      access(addr, $urandom_range(0, 3) == 0);
    end
    checks++;
    if (n_phit == 0 || n_mispred == 0 || n_nhit == 0 || n_miss == 0 || n_wb == 0 || n_st == 0) begin
      failures++;
    end
    $display("predicted hits %0d, wrong predictions %0d, normal hits %0d, misses %0d, write-backs %0d",
             n_phit, n_mispred, n_nhit, n_miss, n_wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
