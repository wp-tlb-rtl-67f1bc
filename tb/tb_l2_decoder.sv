// tb_l2_decoder: exhaustive check of the access-kind decision: one way and
// the 4-cycle latency on a way table hit, all ways and 6 cycles otherwise,
// nothing without an L1 miss.
module tb_l2_decoder;
  localparam int WAYS = wp_pkg::L2_WAYS;
  int checks = 0, failures = 0;
  logic l1_miss, wt_hit;
  logic [$clog2(WAYS)-1:0] pw;
  logic [WAYS-1:0] en;
  logic single;
  logic [7:0] lat;

  l2_decoder dut (.l1_miss, .wt_hit, .pred_way(pw), .way_en(en), .single, .lat);

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++)
      for (int h = 0; h < 2; h++)
        for (int w = 0; w < WAYS; w++) begin
          int exp_lat, exp_cnt;
          l1_miss = 1'(m); wt_hit = 1'(h); pw = w[$clog2(WAYS)-1:0];
          #1;
          exp_cnt = !m ? 0 : (h ? 1 : WAYS);
          exp_lat = !m ? 0 : (h ? 4 : 6);
          checks++;
          if ($countones(en) != exp_cnt || int'(lat) != exp_lat || single != (m && h) ||
              (m && h && !en[w])) begin
            failures++;
            $display("m=%0d h=%0d w=%0d: en=%b lat=%0d single=%0b", m, h, w, en, lat, single);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
