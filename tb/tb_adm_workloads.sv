// tb_adm_workloads: classification of application classes by the AdmL1D unit
// over long warm-up periods. Each workload is an event stream with a fixed
// rate of L1D accesses and of refused requests per cycle (at most one of each
// per cycle, as one SM issues one request per cycle), generated exactly with
// rate accumulators. Type-N streams have R-to-A ratios well above 3, Type-P
// streams ratios near zero; one stream sits just above and one exactly at the
// threshold. Each runs with warm-up periods of 50K and 1M cycles. Checks: the
// counts, the ratio (fixed point) and the decision.
module tb_adm_workloads;
  localparam int F = 8;
  logic        clk = 0, rst_n = 0, kernel_start = 0, req_fail = 0, l1d_acc = 0;
  logic [31:0] wup = 0;
  logic        bypass, decided, measuring;
  logic [31:0] fail_num, acc_num;
  logic [39:0] r2a;
  int          checks = 0, failures = 0;

  adml1d_unit dut (.clk, .rst_n, .kernel_start, .wup_cycles(wup), .req_fail, .l1d_acc,
                   .bypass, .decided, .measuring, .fail_num, .acc_num, .r2a_ratio(r2a));

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // rates in parts per 10000 per cycle
  task automatic workload(input string name, input int acc_rate, input int fail_rate,
                          input int w, input bit exp_bypass);
    int acc_a, acc_f, nf, na;
    longint unsigned num;
    @(negedge clk); wup = w; kernel_start = 1;
    @(negedge clk); kernel_start = 0;
    acc_a = 0; acc_f = 0; nf = 0; na = 0;
    for (int k = 1; k <= w; k++) begin
      acc_a += acc_rate; acc_f += fail_rate;
      l1d_acc  = acc_a >= 10000; if (l1d_acc)  begin acc_a -= 10000; na++; end
      req_fail = acc_f >= 10000; if (req_fail) begin acc_f -= 10000; nf++; end
      @(negedge clk);
    end
    l1d_acc = 0; req_fail = 0;
    while (!decided) @(negedge clk);
    $display("%-10s w=%0d fails=%0d accesses=%0d ratio=%0.3f bypass=%0d", name, w, fail_num,
             acc_num, real'(r2a) / 256.0, bypass);
    chk(fail_num == 32'(nf) && acc_num == 32'(na), {name, ": counts"});
    if (nf > 0 && na > 0) begin
      num = longint'(nf) << F;
      chk(r2a == 40'(num / longint'(na)), {name, ": ratio"});
    end
    chk(bypass == exp_bypass, {name, ": decision"});
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2; i++) begin
      int w;
      w = (i == 0) ? 50000 : 1000000;
      workload("TypeN-r8",  1000, 8000, w, 1);   // ratio 8
      workload("TypeN-r5",  1500, 7500, w, 1);   // ratio 5
      workload("TypeN-r7",  1200, 8400, w, 1);   // ratio 7
      workload("TypeP-r0",  6000,    0, w, 0);   // no refusals
      workload("TypeP-r03", 5000, 1500, w, 0);   // ratio 0.3
      workload("edge-r3",   2000, 6000, w, 0);   // exactly 3: not greater
      workload("edge-r3+",  2000, 6002, w, 1);   // just above 3
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
