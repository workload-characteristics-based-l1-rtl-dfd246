// tb_sm_mem_stage: one SM memory stage against a behavioural lower-level
// memory with a long latency. Three kernels run back to back:
//   1. a small reused working set with stores (Type-P: the L1D helps) ->
//      the AdmL1D unit must keep the L1D
//   2. a streaming pattern with stores (Type-N: misses exhaust MSHRs and ways,
//      so requests are refused many times) -> the unit must switch the L1D
//      off, later requests must take the bypass path, and once the L1D is
//      drained l1d_off must rise
//   3. read-back of everything stored, checked against the stored values
// All load data is checked. The R-to-A ratio is checked against the refusals
// and accesses counted here during the warm-up window, and the decision
// against ratio > 3.
module tb_sm_mem_stage;
  import adml1d_pkg::*;
  localparam int F = 8;
  logic           clk = 0, rst_n = 0, kernel_start = 0;
  logic [31:0]    wup = 0;
  logic           in_valid, in_ready, wb_valid;
  mem_req_t       in_req;
  mem_rsp_t       wb;
  logic           lo_v, lo_rdy, rsp_v, rsp_rdy;
  lo_req_t        lo_r;
  lo_rsp_t        rsp;
  logic           bypass, decided, l1d_off;
  logic [39:0]    r2a;
  logic           ev_fail, ev_acc, ev_hit, ev_miss, ev_merge, ev_store, ev_byp, measuring;
  logic [31:0]    fail_num, acc_num;
  logic           g_start = 0, g_done;
  int             g_pattern = 0, g_n = 0, g_st = 0, g_checks, g_errors;
  int             checks = 0, failures = 0;
  int             win = -1, w_fail = 0, w_acc = 0;
  int             n_fail = 0, n_hit = 0, n_miss = 0, n_merge = 0, n_byp = 0, n_off = 0;

  sm_mem_stage dut (.clk, .rst_n, .kernel_start, .wup_cycles(wup),
    .in_valid, .in_req, .in_ready, .wb_valid, .wb,
    .lo_req_valid(lo_v), .lo_req(lo_r), .lo_req_ready(lo_rdy),
    .lo_rsp_valid(rsp_v), .lo_rsp(rsp), .lo_rsp_ready(rsp_rdy),
    .bypass, .decided, .l1d_off, .r2a_ratio(r2a), .measuring, .fail_num, .acc_num,
    .ev_req_fail(ev_fail), .ev_l1d_acc(ev_acc), .ev_hit, .ev_miss, .ev_merge, .ev_store,
    .ev_bypass_req(ev_byp));

  lower_mem_model #(.LAT(200)) mem (.clk, .rst_n, .req_valid(lo_v), .req(lo_r), .req_ready(lo_rdy),
                                    .rsp_valid(rsp_v), .rsp(rsp), .rsp_ready(rsp_rdy));

  tb_traffic_gen gen (.clk, .rst_n, .start(g_start), .pattern(g_pattern), .n_req(g_n),
                      .store_every(g_st), .in_valid, .in_req, .in_ready, .wb_valid, .wb,
                      .done(g_done), .checks(g_checks), .errors(g_errors));

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (kernel_start) begin win = 0; w_fail = 0; w_acc = 0; end
    else if (win >= 0) win++;
    if (win >= 1 && win <= int'(wup)) begin
      w_fail += int'(ev_fail); w_acc += int'(ev_acc);
    end
    n_fail += int'(ev_fail); n_hit += int'(ev_hit); n_miss += int'(ev_miss);
    n_merge += int'(ev_merge); n_byp += int'(ev_byp); n_off += int'(l1d_off);
    if (bypass) chk(!ev_acc && !ev_store, "no L1D access while bypassed");
    chk(measuring == (win >= 1 && win <= int'(wup)), "warm-up window timing");
  end

  task automatic kernel(input int w, input int pattern, input int n, input int st,
                        input bit check_decision, input bit exp_bypass);
    longint unsigned num;
    @(negedge clk);
    wup = w; g_pattern = pattern; g_n = n; g_st = st;
    kernel_start = 1; g_start = 1;
    @(negedge clk); kernel_start = 0; g_start = 0;
    wait (decided);
    @(negedge clk);
    $display("kernel pattern %0d: fails %0d accesses %0d ratio %0.2f bypass %0d",
             pattern, w_fail, w_acc, real'(r2a) / 256.0, bypass);
    if (check_decision) begin
      chk(bypass == exp_bypass, $sformatf("decision %0d expected %0d", bypass, exp_bypass));
      chk(bypass == (w_fail > 3 * w_acc), "decision matches fail > 3 x access");
      chk(fail_num == 32'(w_fail) && acc_num == 32'(w_acc), "tracker counts");
      if (w_acc > 0 && w_fail > 0) begin
        num = longint'(w_fail) << F;
        chk(r2a == 40'(num / longint'(w_acc)), $sformatf("ratio %h", r2a));
      end
    end
    wait (g_done);
    repeat (400) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    kernel(2000, 0, 6000, 7, 1, 0);
    chk(n_hit > 1000 && n_byp == 0, "kernel 1 used the L1D");
    kernel(2000, 1, 4000, 5, 1, 1);
    chk(n_byp > 100, $sformatf("requests took the bypass path (%0d)", n_byp));
    chk(n_off > 0 && l1d_off, "L1D switched off once drained");
    kernel(500, 2, 1500, 0, 0, 0);
    checks += g_checks; failures += g_errors;
    chk(g_checks > 8000, $sformatf("loads checked %0d", g_checks));
    chk(n_fail > 0 && n_miss > 0 && n_merge > 0, "refusals, misses and merges seen");
    $display("events: fail %0d hit %0d miss %0d merge %0d bypass %0d off-cycles %0d",
             n_fail, n_hit, n_miss, n_merge, n_byp, n_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
