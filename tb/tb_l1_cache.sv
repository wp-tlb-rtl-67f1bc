// tb_l1_cache: refills lines into the 2-way L1 arrays and checks lookups
// (hit, way, word), the choice of victim (invalid way first, then LRU after
// hits), and byte-masked word writes, against a reference model.
module tb_l1_cache;
  localparam int S = wp_pkg::L1_SETS, TW = wp_pkg::PPN_W;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [$clog2(S)-1:0] lk_set, rf_set, wr_set;
  logic [TW-1:0] lk_tag, rf_tag;
  logic [2:0] lk_word, wr_word;
  logic lk_hit, lk_way, touch = 0, rf_en = 0, wr_en = 0, wr_way;
  logic [31:0] lk_rdata, wr_data;
  logic [3:0] wr_be;
  logic [255:0] rf_data;
  // model: per set two lines
  bit mv [S][2];
  int mt [S][2];
  logic [255:0] md [S][2];
  bit lru [S];

  l1_cache dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int mfind(int s, int t);
    for (int w = 0; w < 2; w++) if (mv[s][w] && mt[s][w] == t) return w;
    return -1;
  endfunction

  task automatic lookup(int s, int t, int wd, bit tch);
    int w;
    @(negedge clk);
    lk_set = s[$clog2(S)-1:0]; lk_tag = TW'(t); lk_word = wd[2:0]; touch = tch;
    #1;
    w = mfind(s, t);
    checks++;
    if (lk_hit != (w >= 0) || (w >= 0 && (int'(lk_way) != w || lk_rdata != md[s][w][wd*32 +: 32]))) begin
      failures++;
      $display("set %0d tag %h: hit %0b way %0d data %h, want way %0d", s, t, lk_hit, lk_way, lk_rdata, w);
    end
    @(posedge clk); #1 touch = 0;
    if (tch && w >= 0) lru[s] = !w[0];
  endtask

  task automatic refill(int s, int t);
    int w;
    logic [255:0] d;
    for (int i = 0; i < 8; i++) d[i*32 +: 32] = $urandom;
    @(negedge clk);
    rf_en = 1; rf_set = s[$clog2(S)-1:0]; rf_tag = TW'(t); rf_data = d;
    @(posedge clk); #1 rf_en = 0;
    w = !mv[s][0] ? 0 : (!mv[s][1] ? 1 : int'(lru[s]));
    mv[s][w] = 1; mt[s][w] = t; md[s][w] = d; lru[s] = !w[0];
  endtask

  initial begin
    foreach (mv[s, w]) mv[s][w] = 0;
    foreach (lru[s]) lru[s] = 0;
    lk_set = '0; lk_tag = '0; lk_word = '0; rf_set = '0; rf_tag = '0; rf_data = '0;
    wr_set = '0; wr_word = '0; wr_data = '0; wr_be = '0; wr_way = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      automatic int s = $urandom_range(0, 7) * 16 + 1;
      automatic int tg = $urandom_range(0, 3) + 'h100;
      automatic int op = $urandom_range(0, 3);
      if (op == 0 && mfind(s, tg) < 0) refill(s, tg);
      else if (op == 1 && mfind(s, tg) >= 0) begin
        automatic int w = mfind(s, tg), wd = $urandom_range(0, 7);
        automatic logic [31:0] dv = $urandom;
        automatic logic [3:0] be = 4'($urandom);
        @(negedge clk);
        wr_en = 1; wr_set = s[$clog2(S)-1:0]; wr_way = w[0]; wr_word = wd[2:0]; wr_data = dv; wr_be = be;
        @(posedge clk); #1 wr_en = 0;
        for (int b = 0; b < 4; b++) if (be[b]) md[s][w][wd*32 + b*8 +: 8] = dv[b*8 +: 8];
      end
      lookup(s, tg, $urandom_range(0, 7), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
