// tb_l2_arbiter: random request traffic from two sides against a modelled L2
// that accepts when idle and answers a few cycles later. Checks the forwarded
// payload, that only the winner sees ready, alternation when both sides
// request, and that each response goes back to the side that asked.
module tb_l2_arbiter;
  localparam int PW = 16;
  int checks = 0, failures = 0, both = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0] in_valid = '0, in_ready, in_rsp_valid;
  logic [PW-1:0] in_payload [2];
  logic out_valid, out_ready, out_rsp_valid = 0;
  logic [PW-1:0] out_payload;
  int busy = 0, owner = -1, last = 1;

  l2_arbiter #(.PAYLOAD_W(PW)) dut (.*);
  always #5 clk = ~clk;
  assign out_ready = (busy == 0) && (owner < 0);

  initial begin
    #5000000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_payload[0] = 16'h1000; in_payload[1] = 16'h2000;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int exp_sel;
      @(negedge clk);
      // each side keeps its request until served
      for (int s = 0; s < 2; s++)
        if (!in_valid[s] && $urandom_range(0, 2) == 0) begin
          in_valid[s] = 1; in_payload[s] = 16'((s + 1) * 16'h1000 + t);
        end
      out_rsp_valid = (owner >= 0 && busy == 1);
      #1;
      // response steering
      if (out_rsp_valid) begin
        checks++;
        if (in_rsp_valid != (2'b01 << owner)) begin failures++; $display("rsp to %b, owner %0d", in_rsp_valid, owner); end
      end else begin
        checks++;
        if (in_rsp_valid != 0) begin failures++; $display("spurious rsp"); end
      end
      if (in_valid != 0) begin
        exp_sel = (in_valid == 2'b11) ? 1 - last : (in_valid[1] ? 1 : 0);
        if (in_valid == 2'b11) both++;
        checks++;
        if (!out_valid || out_payload != in_payload[exp_sel] ||
            in_ready != (out_ready ? (2'b01 << exp_sel) : 2'b00)) begin
          failures++;
          $display("t=%0d valid=%b ready=%b payload=%h exp side %0d", t, in_valid, in_ready, out_payload, exp_sel);
        end
      end
      @(posedge clk); #1;
      if (out_rsp_valid) begin owner = -1; busy = 0; end
      else if (busy > 1) busy--;
      if (in_valid != 0 && out_ready) begin
        owner = exp_sel; last = exp_sel; busy = $urandom_range(1, 4);
        in_valid[exp_sel] = 0;
      end
    end
    checks++;
    if (both < 50) begin failures++; $display("few conflicts %0d", both); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
