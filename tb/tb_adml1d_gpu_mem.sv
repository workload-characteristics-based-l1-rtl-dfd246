// tb_adml1d_gpu_mem: end-to-end test of all 15 SM memory stages at the
// default parameters. Each SM has its own behavioural lower-level memory and
// request generator. Kernel 1: even SMs run a reused working set (Type-P),
// odd SMs a streaming pattern (Type-N), both with stores; every SM must reach
// its own decision (keep the L1D on even SMs, switch it off on odd ones), the
// ratio must match the refusals and accesses counted here in the warm-up
// window, bypassed SMs must send requests around the L1D and reach l1d_off.
// Kernel 2: all SMs read back what they stored, with a new warm-up (the L1D is
// re-enabled at the launch). Kernel 3: every SM runs the same streaming
// pattern and every SM must switch its L1D off; kernel 4: every SM runs the
// same reused working set and every L1D must be back in use. All load data is checked, and every mechanism
// (request refusal, hit, miss, merge, store, keep and bypass decisions,
// bypassed requests, switched-off L1D) must occur at least once.
module tb_adml1d_gpu_mem;
  import adml1d_pkg::*;
  localparam int NS = 15, F = 8;
  logic           clk = 0, rst_n = 0, kernel_start = 0;
  logic [31:0]    wup = 0;
  logic           in_valid [NS], in_ready [NS], wb_valid [NS];
  mem_req_t       in_req [NS];
  mem_rsp_t       wb [NS];
  logic           lo_v [NS], lo_rdy [NS], rsp_v [NS], rsp_rdy [NS];
  lo_req_t        lo_r [NS];
  lo_rsp_t        rsp [NS];
  logic           bypass [NS], decided [NS], l1d_off [NS];
  logic [39:0]    r2a [NS];
  logic           ev_fail [NS], ev_acc [NS], ev_hit [NS], ev_miss [NS], ev_merge [NS], ev_store [NS],
                  ev_byp [NS], measuring [NS];
  logic [31:0]    fail_num [NS], acc_num [NS];
  logic           g_start = 0;
  logic           g_done [NS];
  int             g_pattern [NS], g_n = 0, g_st = 0, g_checks [NS], g_errors [NS];
  int             checks = 0, failures = 0, win = -1;
  int             w_fail [NS], w_acc [NS];
  int             n_fail = 0, n_hit = 0, n_miss = 0, n_merge = 0, n_store = 0, n_byp = 0,
                  n_off = 0, n_keep_dec = 0, n_byp_dec = 0, n_reenable = 0;

  adml1d_gpu_mem dut (.clk, .rst_n, .kernel_start, .wup_cycles(wup),
    .in_valid, .in_req, .in_ready, .wb_valid, .wb,
    .lo_req_valid(lo_v), .lo_req(lo_r), .lo_req_ready(lo_rdy),
    .lo_rsp_valid(rsp_v), .lo_rsp(rsp), .lo_rsp_ready(rsp_rdy),
    .bypass, .decided, .l1d_off, .r2a_ratio(r2a), .measuring, .fail_num, .acc_num,
    .ev_req_fail(ev_fail), .ev_l1d_acc(ev_acc), .ev_hit, .ev_miss, .ev_merge, .ev_store,
    .ev_bypass_req(ev_byp));

  for (genvar s = 0; s < NS; s++) begin : g_env
    lower_mem_model #(.LAT(200)) mem (.clk, .rst_n, .req_valid(lo_v[s]), .req(lo_r[s]),
      .req_ready(lo_rdy[s]), .rsp_valid(rsp_v[s]), .rsp(rsp[s]), .rsp_ready(rsp_rdy[s]));
    tb_traffic_gen #(.BASE(32'h0100_0000 * (s + 1))) gen (.clk, .rst_n, .start(g_start),
      .pattern(g_pattern[s]), .n_req(g_n), .store_every(g_st),
      .in_valid(in_valid[s]), .in_req(in_req[s]), .in_ready(in_ready[s]),
      .wb_valid(wb_valid[s]), .wb(wb[s]), .done(g_done[s]),
      .checks(g_checks[s]), .errors(g_errors[s]));
  end

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (kernel_start) begin
      win = 0;
      foreach (w_fail[s]) begin w_fail[s] = 0; w_acc[s] = 0; end
    end else if (win >= 0) win++;
    for (int s = 0; s < NS; s++) begin
      if (win >= 1 && win <= int'(wup)) begin
        w_fail[s] += int'(ev_fail[s]); w_acc[s] += int'(ev_acc[s]);
      end
      n_fail += int'(ev_fail[s]); n_hit += int'(ev_hit[s]); n_miss += int'(ev_miss[s]);
      n_merge += int'(ev_merge[s]); n_byp += int'(ev_byp[s]); n_off += int'(l1d_off[s]);
      n_store += int'(ev_store[s]);
    end
  end

  function automatic bit all_set(input logic v [NS]);
    foreach (v[s]) if (!v[s]) return 0;
    return 1;
  endfunction

  // mode 0: all read back; 1: even Type-P, odd Type-N; 2: all Type-N; 3: all Type-P
  task automatic kernel(input int w, input int n, input int st, input int mode);
    bit was_bypassed [NS];
    @(negedge clk);
    wup = w; g_n = n; g_st = st;
    for (int s = 0; s < NS; s++) begin
      was_bypassed[s] = bypass[s];
      g_pattern[s] = (mode == 1) ? (s % 2) : (mode == 2) ? 1 : (mode == 3) ? 0 : 2;
    end
    kernel_start = 1; g_start = 1;
    @(negedge clk); kernel_start = 0; g_start = 0;
    while (!all_set(decided)) @(negedge clk);
    @(negedge clk);
    for (int s = 0; s < NS; s++) begin
      longint unsigned num;
      if (bypass[s]) n_byp_dec++; else n_keep_dec++;
      chk(bypass[s] == (w_fail[s] > 3 * w_acc[s]), $sformatf("SM %0d decision vs counts", s));
      chk(fail_num[s] == 32'(w_fail[s]) && acc_num[s] == 32'(w_acc[s]), $sformatf("SM %0d tracker counts", s));
      if (w_acc[s] > 0 && w_fail[s] > 0) begin
        num = longint'(w_fail[s]) << F;
        chk(r2a[s] == 40'(num / longint'(w_acc[s])), $sformatf("SM %0d ratio", s));
      end
      if (mode == 1) chk(bypass[s] == (s % 2 == 1), $sformatf("SM %0d classified as Type-%s",
                                                              s, (s % 2) ? "N" : "P"));
      if (mode == 2) chk(bypass[s], $sformatf("SM %0d switched off like the others", s));
      if (mode == 3) begin
        chk(!bypass[s], $sformatf("SM %0d keeps the L1D like the others", s));
        if (was_bypassed[s]) n_reenable++;
      end
    end
    while (!all_set(g_done)) @(negedge clk);
    repeat (300) @(negedge clk);
    if (mode == 1) for (int s = 1; s < NS; s += 2) chk(l1d_off[s], $sformatf("SM %0d L1D off", s));
    if (mode == 2) for (int s = 0; s < NS; s++) chk(l1d_off[s], $sformatf("SM %0d L1D off", s));
  endtask

  initial begin
    foreach (g_pattern[s]) g_pattern[s] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    kernel(1500, 3000, 6, 1);
    kernel(400, 600, 0, 0);
    kernel(1500, 2500, 0, 2);
    kernel(1500, 2500, 9, 3);
    for (int s = 0; s < NS; s++) begin checks += g_checks[s]; failures += g_errors[s]; end
    $display("events: fail %0d hit %0d miss %0d merge %0d store %0d bypassed %0d off-cycles %0d keep %0d bypass %0d",
             n_fail, n_hit, n_miss, n_merge, n_store, n_byp, n_off, n_keep_dec, n_byp_dec);
    chk(n_fail > 0,     "request refusal happened");
    chk(n_hit > 0,      "L1D hit happened");
    chk(n_miss > 0,     "L1D miss happened");
    chk(n_merge > 0,    "MSHR merge happened");
    chk(n_store > 0,    "write-through store happened");
    chk(n_byp > 0,      "bypassed request happened");
    chk(n_off > 0,      "L1D switched off");
    chk(n_keep_dec > 0, "keep decision happened");
    chk(n_byp_dec > 0,  "bypass decision happened");
    chk(n_reenable > 0, "L1D re-enabled at a later launch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
