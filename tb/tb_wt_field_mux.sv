// tb_wt_field_mux: checks the field multiplexer of the way table against an
// unpacked reference copy of random entries, for every field index.
module tb_wt_field_mux;
  localparam int F = wp_pkg::WT_FIELDS;
  localparam int W = wp_pkg::WAY_W;
  int checks = 0, failures = 0;
  logic [F-1:0] ev;
  logic [F*W-1:0] ew;
  logic [$clog2(F)-1:0] fi;
  logic fv;
  logic [W-1:0] fw;
  bit ref_v [F];
  int ref_w [F];

  wt_field_mux dut (.entry_valid(ev), .entry_ways(ew), .field_idx(fi), .field_valid(fv), .field_way(fw));

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      for (int f = 0; f < F; f++) begin
        ref_v[f] = 1'($urandom);
        ref_w[f] = $urandom_range(0, (1 << W) - 1);
        ev[f] = ref_v[f];
        for (int b = 0; b < W; b++) ew[f*W + b] = ref_w[f][b];
      end
      for (int f = 0; f < F; f++) begin
        fi = f[$clog2(F)-1:0];
        #1;
        checks++;
        if (fv !== ref_v[f] || int'(fw) != ref_w[f]) begin
          failures++;
          $display("mismatch field %0d: got %0b/%0d want %0b/%0d", f, fv, fw, ref_v[f], ref_w[f]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
