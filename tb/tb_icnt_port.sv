// tb_icnt_port: random traffic from the L1D miss queue and the bypass path
// against a randomly stalling network. Checks that every request reaches the
// network exactly once and in order per source, that the grant alternates
// when both sources wait, and that line responses go to the L1D and word
// responses to the LSU with the right ready.
module tb_icnt_port;
  import adml1d_pkg::*;
  logic     clk = 0, rst_n = 0;
  logic     l1_v = 0, l1_rdy, b_v = 0, b_rdy, lo_v, lo_rdy = 0;
  lo_req_t  l1_r = '0, b_r = '0, lo_r;
  logic     rsp_v = 0, rsp_rdy, f_v, f_rdy = 0, w_v, w_rdy = 0;
  lo_rsp_t  rsp = '0, f;
  mem_rsp_t w;
  int       checks = 0, failures = 0, n_l1 = 0, n_b = 0, n_alt = 0, n_fill = 0, n_word = 0;
  lo_req_t  q_l1[$], q_b[$];
  int       last_grant = -1;

  icnt_port dut (.clk, .rst_n,
    .l1_req_valid(l1_v), .l1_req(l1_r), .l1_req_ready(l1_rdy),
    .byp_req_valid(b_v), .byp_req(b_r), .byp_req_ready(b_rdy),
    .lo_req_valid(lo_v), .lo_req(lo_r), .lo_req_ready(lo_rdy),
    .lo_rsp_valid(rsp_v), .lo_rsp(rsp), .lo_rsp_ready(rsp_rdy),
    .fill_valid(f_v), .fill(f), .fill_ready(f_rdy),
    .wrsp_valid(w_v), .wrsp(w), .wrsp_ready(w_rdy));

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic lo_req_t rnd_req(input lo_op_e op);
    lo_req_t r;
    r = '{op: op, addr: $urandom, wdata: $urandom, id: 8'($urandom)};
    return r;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (lo_v && lo_rdy) begin
      if (l1_v && b_v) begin
        int g;
        g = b_rdy ? 1 : 0;
        if (last_grant >= 0) begin
          chk(g != last_grant, "grant alternates under contention");
          n_alt++;
        end
        last_grant = g;
      end
      if (b_rdy) begin
        chk(q_b.size() > 0 && lo_r == q_b[0] && !l1_rdy, "bypass request forwarded");
        void'(q_b.pop_front()); n_b++;
      end else begin
        chk(l1_rdy && q_l1.size() > 0 && lo_r == q_l1[0], "L1D request forwarded");
        void'(q_l1.pop_front()); n_l1++;
      end
    end else begin
      chk(!l1_rdy && !b_rdy, "no ready without a transfer");
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // a source keeps its request until it is taken
      if (!l1_v || q_l1.size() == 0) begin
        l1_v = ($urandom % 100) < 60;
        if (l1_v) begin l1_r = rnd_req(($urandom % 2) ? LO_LINE_RD : LO_WORD_WR); q_l1.push_back(l1_r); end
      end
      if (!b_v || q_b.size() == 0) begin
        b_v = ($urandom % 100) < 60;
        if (b_v) begin b_r = rnd_req(($urandom % 2) ? LO_WORD_RD : LO_WORD_WR); q_b.push_back(b_r); end
      end
      lo_rdy = ($urandom % 100) < 70;
      // responses
      rsp_v = $urandom; f_rdy = $urandom; w_rdy = $urandom;
      rsp = '{is_line: $urandom, addr: $urandom, id: 8'($urandom),
              data: {32{$urandom}}};
      #1;
      if (rsp_v && rsp.is_line) begin
        chk(f_v && !w_v && f == rsp && rsp_rdy == f_rdy, "line response to the L1D"); n_fill++;
      end else if (rsp_v) begin
        chk(w_v && !f_v && w.id == rsp.id && w.rdata == rsp.data[31:0] && rsp_rdy == w_rdy,
            "word response to the LSU"); n_word++;
      end else chk(!f_v && !w_v, "no response");
    end
    chk(n_l1 > 100 && n_b > 100 && n_alt > 50 && n_fill > 100 && n_word > 100,
        $sformatf("coverage l1 %0d byp %0d alt %0d fill %0d word %0d", n_l1, n_b, n_alt, n_fill, n_word));
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
