// tb_way_table: random records, entry clears and reads of the way table,
// compared with a reference model kept as plain arrays.
module tb_way_table;
  localparam int E = wp_pkg::TLB_ENTRIES, F = wp_pkg::WT_FIELDS, W = wp_pkg::WAY_W;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [$clog2(E)-1:0] rd_idx, wr_idx, clr_idx;
  logic [F-1:0] rd_valid;
  logic [F*W-1:0] rd_ways;
  logic wr_en = 0, clr_en = 0;
  logic [$clog2(F)-1:0] wr_field;
  logic [W-1:0] wr_way;
  bit mv [E][F];
  int mw [E][F];

  way_table dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check_entry(int e);
    rd_idx = e[$clog2(E)-1:0];
    #1;
    for (int f = 0; f < F; f++) begin
      checks++;
      if (rd_valid[f] != mv[e][f] || (mv[e][f] && int'(rd_ways[f*W +: W]) != mw[e][f])) begin
        failures++;
        $display("entry %0d field %0d: got %0b/%0d want %0b/%0d", e, f, rd_valid[f],
                 rd_ways[f*W +: W], mv[e][f], mw[e][f]);
      end
    end
  endtask

  initial begin
    foreach (mv[e, f]) mv[e][f] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < E; e++) check_entry(e);   // all invalid after reset
    for (int t = 0; t < 3000; t++) begin
      int e, f, w, c;
      @(negedge clk);
      e = $urandom_range(0, E - 1); f = $urandom_range(0, F - 1); w = $urandom_range(0, (1 << W) - 1);
      c = ($urandom_range(0, 19) == 0) ? $urandom_range(0, E - 1) : -1;
      if (t % 7 == 3) c = e;                      // clear and write together: write wins
      wr_en = 1; wr_idx = e[$clog2(E)-1:0]; wr_field = f[$clog2(F)-1:0]; wr_way = w[W-1:0];
      clr_en = (c >= 0); clr_idx = (c >= 0) ? c[$clog2(E)-1:0] : '0;
      @(posedge clk); #1;
      wr_en = 0; clr_en = 0;
      if (c >= 0) foreach (mv[c][ff]) mv[c][ff] = 0;
      mv[e][f] = 1; mw[e][f] = w;
      check_entry(e);
      if (c >= 0) check_entry(c);
    end
    for (int e = 0; e < E; e++) check_entry(e);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
