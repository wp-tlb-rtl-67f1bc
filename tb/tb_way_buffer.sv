// tb_way_buffer: drives random lookups, way table records and entry clears
// into the way buffer, with the way table modelled in the testbench. Checks
// that the entry handed out always equals the model's entry, that the buffer
// hits exactly when the previous entry used is looked up again, and that a
// hit spares the way table read.
module tb_way_buffer;
  localparam int E = wp_pkg::TLB_ENTRIES, F = wp_pkg::WT_FIELDS, W = wp_pkg::WAY_W;
  int checks = 0, failures = 0, hits = 0;
  logic clk = 0, rst_n = 0;
  logic req_en = 0;
  logic [$clog2(E)-1:0] req_idx, wr_idx, clr_idx;
  logic buf_hit, wt_rd_en;
  logic [F-1:0] wt_valid, entry_valid;
  logic [F*W-1:0] wt_ways, entry_ways;
  logic wr_en = 0, clr_en = 0;
  logic [$clog2(F)-1:0] wr_field;
  logic [W-1:0] wr_way;
  logic [F-1:0] mv [E];
  logic [F*W-1:0] mw [E];
  int last = -1;

  way_buffer dut (.*);
  always #5 clk = ~clk;
  // way table model (combinational read)
  assign wt_valid = mv[req_idx];
  assign wt_ways  = mw[req_idx];

  initial begin
    #2000000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int e = 0; e < E; e++) begin mv[e] = '0; mw[e] = '0; end
    req_idx = '0; wr_idx = '0; clr_idx = '0; wr_field = '0; wr_way = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int e, op;
      @(negedge clk);
      // a few entries so that the buffer hits often
      e = $urandom_range(0, 3) * 5;
      op = $urandom_range(0, 9);
      req_en = 1; req_idx = e[$clog2(E)-1:0];
      wr_en = (op < 4); clr_en = (op == 9);
      wr_idx = 5 * $urandom_range(0, 3); wr_field = $urandom_range(0, F - 1); wr_way = $urandom_range(0, 7);
      clr_idx = 5 * $urandom_range(0, 3);
      #1;
      checks++;
      if (entry_valid !== mv[e] || entry_ways !== mw[e] || buf_hit != (last == e) || wt_rd_en == buf_hit) begin
        failures++;
        $display("t=%0d e=%0d hit=%0b exp=%0b", t, e, buf_hit, last == e);
      end
      if (buf_hit) hits++;
      @(posedge clk);
      if (clr_en) mv[clr_idx] = '0;
      if (wr_en) begin mv[wr_idx][wr_field] = 1'b1; mw[wr_idx][wr_field*W +: W] = wr_way; end
      last = e;
    end
    checks++;
    if (hits < 500) begin failures++; $display("too few buffer hits: %0d", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
