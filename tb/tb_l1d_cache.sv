// tb_l1d_cache: the L1D against a behavioural lower-level memory whose
// request side can be stalled. Directed checks: miss then merge into the
// pending line, hit with data one cycle after acceptance, refusal when all
// ways of a set are reserved, when the miss queue is full and when all 32
// MSHRs are taken, stores (write-through, refused while their line is being
// filled, updating a hit), invalidation. Then random traffic from the
// request generator with load data checked. Every refusal is counted.
module tb_l1d_cache;
  import adml1d_pkg::*;
  logic     clk = 0, rst_n = 0, inv = 0;
  logic     req_valid, req_accept, req_fail, rsp_valid, idle;
  mem_req_t req;
  mem_rsp_t rsp;
  logic     mq_v, mq_rdy, m_v, m_rdy, f_v, f_rdy;
  lo_req_t  mq_r;
  lo_rsp_t  f_r;
  logic     ev_hit, ev_miss, ev_merge, ev_store;
  logic     stall = 0;
  int       checks = 0, failures = 0;
  int       n_hit = 0, n_miss = 0, n_merge = 0, n_store = 0, n_fail = 0;

  // direct stimulus or the generator
  logic     use_gen = 0, d_valid = 0;
  mem_req_t d_req = '0;
  logic     g_valid, g_start = 0, g_done;
  mem_req_t g_req;
  int       g_pattern = 0, g_n = 0, g_st = 0, g_checks, g_errors;

  assign req_valid = use_gen ? g_valid : d_valid;
  assign req       = use_gen ? g_req   : d_req;

  l1d_cache dut (.clk, .rst_n, .inv, .req_valid, .req, .req_accept, .req_fail,
                 .rsp_valid, .rsp, .lo_req_valid(mq_v), .lo_req(mq_r), .lo_req_ready(mq_rdy),
                 .fill_valid(f_v), .fill(f_r), .fill_ready(f_rdy), .idle,
                 .ev_hit, .ev_miss, .ev_merge, .ev_store);

  assign m_v    = mq_v && !stall;
  assign mq_rdy = m_rdy && !stall;
  lower_mem_model #(.LAT(30)) mem (.clk, .rst_n, .req_valid(m_v), .req(mq_r), .req_ready(m_rdy),
                                   .rsp_valid(f_v), .rsp(f_r), .rsp_ready(f_rdy));

  tb_traffic_gen gen (.clk, .rst_n, .start(g_start), .pattern(g_pattern), .n_req(g_n),
                      .store_every(g_st), .in_valid(g_valid), .in_req(g_req),
                      .in_ready(req_accept && use_gen), .wb_valid(rsp_valid && use_gen), .wb(rsp),
                      .done(g_done), .checks(g_checks), .errors(g_errors));

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected load data per ID in directed mode
  logic [31:0] exp_d [int];
  int          rsp_seen [int];
  always @(posedge clk) if (rst_n) begin
    n_hit += int'(ev_hit); n_miss += int'(ev_miss); n_merge += int'(ev_merge);
    n_store += int'(ev_store); n_fail += int'(req_fail);
    if (rsp_valid && !use_gen) begin
      chk(exp_d.exists(int'(rsp.id)) && rsp.rdata == exp_d[int'(rsp.id)],
          $sformatf("load id %0d data %h", rsp.id, rsp.rdata));
      rsp_seen[int'(rsp.id)] = 1;
      exp_d.delete(int'(rsp.id));
    end
  end

  logic [31:0] wr_vals [logic [31:0]];
  function automatic logic [31:0] mem_word(input logic [31:0] a);
    return wr_vals.exists(a) ? wr_vals[a] : tb_util_pkg::init_word(a);
  endfunction

  // offer one request for one cycle; returns whether it was accepted
  task automatic offer(input logic [31:0] a, input bit we, input logic [31:0] wd, input int id,
                       output bit acc);
    @(negedge clk);
    d_valid = 1; d_req = '{addr: a, we: we, wdata: wd, id: 8'(id)};
    #1 acc = req_accept;
    @(posedge clk);
    if (acc) begin
      if (we) wr_vals[a] = wd;
      else exp_d[id] = mem_word(a);
    end
    #1 d_valid = 0;
  endtask

  task automatic must(input logic [31:0] a, input bit we, input logic [31:0] wd, input int id,
                      input bit exp_acc, input string what);
    bit acc;
    offer(a, we, wd, id, acc);
    chk(acc == exp_acc, $sformatf("%s: accept %0d expected %0d", what, acc, exp_acc));
  endtask

  task automatic drain();
    int t;
    t = 0;
    while ((exp_d.size() != 0 || !idle) && t < 5000) begin @(negedge clk); t++; end
    chk(exp_d.size() == 0 && idle, "all loads answered, cache idle");
  endtask

  initial begin
    bit acc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // 1. miss, then merge into the pending line
    must(32'h0000_1000, 0, 0, 1, 1, "load miss");
    chk(n_miss == 1, "miss counted");
    must(32'h0000_1008, 0, 0, 2, 1, "load to the pending line");
    chk(n_merge == 1, "merge counted");
    drain();
    // 2. hit: data in the next cycle
    @(negedge clk);
    d_valid = 1; d_req = '{addr: 32'h0000_1010, we: 0, wdata: 0, id: 8'd3};
    exp_d[3] = mem_word(32'h0000_1010);
    #1 chk(req_accept, "hit accepted");
    @(posedge clk); #1 d_valid = 0;
    chk(rsp_valid && rsp.id == 3, "hit data one cycle after acceptance");
    chk(n_hit == 1, "hit counted");
    @(negedge clk);
    // 3. all four ways of set 1 reserved: the fifth line is refused
    stall = 1;
    for (int k = 0; k < 4; k++) must(32'h0000_0080 + 32'(k * 4096), 0, 0, 10 + k, 1, "miss into set 1");
    must(32'h0000_0080 + 32'(4 * 4096), 0, 0, 14, 0, "fifth line of a fully reserved set");
    chk(req_fail, "refusal flagged");
    // 4. miss queue (8) full: four more misses fit, the next is refused
    for (int k = 0; k < 4; k++) must(32'h0000_0100 + 32'(k * 128), 0, 0, 20 + k, 1, "miss into queue");
    must(32'h0000_0400, 0, 0, 24, 0, "miss with the miss queue full");
    must(32'h0000_0400, 1, 32'h1234, 0, 0, "store with the miss queue full");
    // 5. MSHRs: 8 used; merges fill the other 24, then one more is refused
    for (int k = 0; k < 24; k++) must(32'h0000_0100 + 32'(4 + (k % 31) * 4), 0, 0, 30 + k, 1, "merge");
    must(32'h0000_0108, 0, 0, 60, 0, "merge with all MSHRs taken");
    // store to a line being filled is refused
    stall = 0;
    must(32'h0000_0180, 1, 32'hCAFE_0001, 0, 0, "store to a pending line");
    drain();
    // 6. store hit updates the cached word and writes through
    must(32'h0000_0180, 1, 32'hCAFE_0002, 0, 1, "store hit");
    chk(n_store == 1, "store counted");
    must(32'h0000_0180, 0, 0, 61, 1, "load after store");
    drain();
    chk(n_hit >= 2, "load after store hits");
    // store miss: no allocation
    must(32'h0004_0000, 1, 32'hBEEF_0003, 0, 1, "store miss");
    drain();
    must(32'h0004_0000, 0, 0, 62, 1, "load after store miss");
    drain();
    // 7. invalidation
    begin
      int m0;
      @(negedge clk); inv = 1; @(negedge clk); inv = 0;
      m0 = n_miss;
      must(32'h0000_1010, 0, 0, 63, 1, "load after invalidation");
      chk(n_miss == m0 + 1, "invalidated line misses");
      drain();
    end
    // 8. random traffic, reuse then streaming with stores, then readback
    use_gen = 1;
    g_pattern = 0; g_n = 3000; g_st = 7;
    @(negedge clk); g_start = 1; @(negedge clk); g_start = 0;
    wait (g_done);
    g_pattern = 1; g_n = 2000; g_st = 5;
    @(negedge clk); g_start = 1; @(negedge clk); g_start = 0;
    @(negedge clk); wait (g_done);
    g_pattern = 2; g_n = 500; g_st = 0;
    @(negedge clk); g_start = 1; @(negedge clk); g_start = 0;
    @(negedge clk); wait (g_done);
    checks += g_checks; failures += g_errors;
    chk(g_checks > 4000, $sformatf("generator loads checked: %0d", g_checks));
    chk(n_fail > 100 && n_hit > 100 && n_miss > 100 && n_merge > 10 && n_store > 100,
        $sformatf("events fail %0d hit %0d miss %0d merge %0d store %0d", n_fail, n_hit, n_miss, n_merge, n_store));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
