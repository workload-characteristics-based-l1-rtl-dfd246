// tb_lsu: random request offers and random acceptance on the memory side;
// checks that requests leave in order, none lost or repeated, that a full
// stream with constant acceptance moves one request per cycle, and that load
// responses are merged with the L1D first and the bypass path held back.
module tb_lsu;
  import adml1d_pkg::*;
  logic     clk = 0, rst_n = 0;
  logic     in_valid = 0, in_ready, req_valid, req_accept = 0;
  mem_req_t in_req = '0, req;
  logic     c_v = 0, i_v = 0, i_rdy, wb_valid;
  mem_rsp_t c_r = '0, i_r = '0, wb;
  int       checks = 0, failures = 0, sent = 0, got = 0, retries = 0;
  mem_req_t exp_q[$];

  lsu dut (.clk, .rst_n, .in_valid, .in_req, .in_ready, .req_valid, .req, .req_accept,
           .cache_rsp_valid(c_v), .cache_rsp(c_r), .icnt_rsp_valid(i_v), .icnt_rsp(i_r),
           .icnt_rsp_ready(i_rdy), .wb_valid, .wb);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // checks at the clock edge, before new stimulus
  always @(posedge clk) if (rst_n) begin
    if (req_valid && req_accept) begin
      chk(exp_q.size() > 0 && req == exp_q[0], $sformatf("request %0d in order", got));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      got++;
    end else if (req_valid) retries++;
    if (in_valid && in_ready) begin exp_q.push_back(in_req); sent++; end
  end

  task automatic phase(input int n, input int p_in, input int p_acc);
    int s0;
    s0 = sent;
    while (sent - s0 < n) begin
      @(negedge clk);
      in_valid   = ($urandom % 100) < p_in;
      in_req     = '{addr: $urandom & ~32'h3, we: $urandom, wdata: $urandom, id: 8'($urandom)};
      req_accept = ($urandom % 100) < p_acc;
      // response merge
      c_v = $urandom; i_v = $urandom;
      c_r = '{id: 8'($urandom), rdata: $urandom}; i_r = '{id: 8'($urandom), rdata: $urandom};
      #1;
      chk(wb_valid == (c_v || i_v), "wb_valid");
      if (c_v) chk(wb == c_r && !i_rdy, "L1D response has priority");
      else if (i_v) chk(wb == i_r && i_rdy, "bypass response passes");
      @(posedge clk);
    end
    @(negedge clk); in_valid = 0; req_accept = 1;
    repeat (3) @(negedge clk);
    req_accept = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    phase(300, 70, 40);
    phase(300, 90, 90);
    // full rate: one request per cycle
    begin
      int g0, cyc;
      g0 = got;
      @(negedge clk); req_accept = 1; in_valid = 1;
      for (cyc = 0; cyc < 100; cyc++) begin
        in_req = '{addr: 32'(cyc * 4), we: 0, wdata: 0, id: 8'(cyc)};
        @(negedge clk);
      end
      in_valid = 0;
      @(negedge clk);
      chk(got - g0 == 100, $sformatf("100 requests in 100 cycles (%0d)", got - g0));
    end
    chk(exp_q.size() == 0 && sent == got, $sformatf("nothing lost: sent %0d got %0d", sent, got));
    chk(retries > 0, "refused requests were retried");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
