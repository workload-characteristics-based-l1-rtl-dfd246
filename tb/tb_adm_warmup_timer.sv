// tb_adm_warmup_timer: checks the warm-up window length and the done pulse
// of adm_warmup_timer for several periods, a zero period and a restart in
// the middle of a window.
module tb_adm_warmup_timer;
  logic        clk = 0, rst_n = 0, start = 0;
  logic [31:0] wup = 0;
  logic        window, done;
  int          checks = 0, failures = 0;

  adm_warmup_timer dut (.clk, .rst_n, .start, .wup_cycles(wup), .window, .done);

  always #5 clk = ~clk;

  task automatic chk(input bit exp_w, input bit exp_d, input string what);
    checks++;
    if (window !== exp_w || done !== exp_d) begin
      failures++;
      $display("FAIL %s: window %0d done %0d, expected %0d %0d", what, window, done, exp_w, exp_d);
    end
  endtask

  task automatic run(input int w);
    @(negedge clk); start = 1; wup = w;
    @(negedge clk); start = 0;
    for (int k = 1; k <= w; k++) begin chk(1, 0, $sformatf("window %0d/%0d", k, w)); @(negedge clk); end
    chk(0, 1, $sformatf("done after %0d", w));
    @(negedge clk); chk(0, 0, "after done");
    repeat (3) begin @(negedge clk); chk(0, 0, "idle"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    chk(0, 0, "reset");
    rst_n = 1;
    run(1); run(5); run(37); run(0);
    // restart in the middle of a window
    @(negedge clk); start = 1; wup = 10;
    @(negedge clk); start = 0;
    repeat (4) @(negedge clk);
    start = 1; wup = 6;
    @(negedge clk); start = 0;
    for (int k = 1; k <= 6; k++) begin chk(1, 0, "restarted window"); @(negedge clk); end
    chk(0, 1, "restarted done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
