// tb_adm_tracker: random clear/enable/increment sequences against a counting
// reference, with a narrow counter so that saturation is reached.
module tb_adm_tracker;
  localparam int W = 5;
  logic         clk = 0, rst_n = 0, clear = 0, en = 0, inc = 0;
  logic [W-1:0] count;
  int           ref_cnt = 0, checks = 0, failures = 0, sat_seen = 0;

  adm_tracker #(.CNT_W(W)) dut (.clk, .rst_n, .clear, .en, .inc, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      clear = ($urandom % 97) == 0;
      en    = ($urandom % 8) != 0;
      inc   = ($urandom % 3) != 0;
      @(negedge clk);
      if (clear) ref_cnt = 0;
      else if (en && inc && ref_cnt < (1 << W) - 1) ref_cnt++;
      if (ref_cnt == (1 << W) - 1) sat_seen++;
      checks++;
      if (count !== W'(ref_cnt)) begin
        failures++;
        $display("FAIL cycle %0d: count %0d expected %0d", i, count, ref_cnt);
      end
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL: saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
