// tb_adml1d_unit: drives request-fail and access events around warm-up
// windows of several lengths and checks the counts taken inside the window,
// the R-to-A ratio, the bypass decision (strictly greater than 3) and the
// cycle in which the decision appears. Events outside the window must not
// be counted; a new kernel launch must clear the decision.
module tb_adml1d_unit;
  localparam int N = 32, F = 8;
  logic           clk = 0, rst_n = 0, kernel_start = 0, req_fail = 0, l1d_acc = 0;
  logic [31:0]    wup = 0;
  logic           bypass, decided, measuring;
  logic [N-1:0]   fail_num, acc_num;
  logic [N+F-1:0] r2a;
  int             checks = 0, failures = 0, n_bypass = 0, n_keep = 0;

  adml1d_unit dut (.clk, .rst_n, .kernel_start, .wup_cycles(wup), .req_fail, .l1d_acc,
                   .bypass, .decided, .measuring, .fail_num, .acc_num, .r2a_ratio(r2a));

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // mode 0: random with probabilities pf/pa percent; 1: fail except k%4==0,
  // acc at k%4==0; 2: fail always, acc at k%4==0; 3: like 1 plus fail at k==4
  task automatic scenario(input int w, input int mode, input int pf, input int pa);
    int k, nf, na, lat;
    longint unsigned num;
    bit f, a, exp_byp;
    @(negedge clk); wup = w; kernel_start = 1; req_fail = 1; l1d_acc = 1;   // k = 0: not counted
    @(negedge clk); kernel_start = 0;
    chk(!bypass && !decided, "decision cleared by kernel start");
    nf = 0; na = 0; k = 1; lat = 1;
    forever begin
      unique case (mode)
        0: begin f = ($urandom % 100) < pf; a = ($urandom % 100) < pa; end
        1: begin f = (k % 4) != 0; a = (k % 4) == 0; end
        2: begin f = 1; a = (k % 4) == 0; end
        default: begin f = ((k % 4) != 0) || k == 4; a = (k % 4) == 0; end
      endcase
      req_fail = f; l1d_acc = a;
      if (k <= w) begin nf += int'(f); na += int'(a); end
      @(negedge clk); lat++; k++;
      if (decided || lat > w + 200) break;
    end
    req_fail = 0; l1d_acc = 0;
    exp_byp = (nf > 3 * na);
    chk(decided, $sformatf("decided within time (w=%0d)", w));
    chk(fail_num == N'(nf) && acc_num == N'(na),
        $sformatf("counts %0d/%0d expected %0d/%0d", fail_num, acc_num, nf, na));
    chk(bypass == exp_byp, $sformatf("bypass %0d expected %0d (fail %0d acc %0d)", bypass, exp_byp, nf, na));
    if (nf == 0) begin
      chk(lat == w + 2, $sformatf("no-fail decision latency %0d expected %0d", lat, w + 2));
      chk(r2a == 0, "zero ratio");
    end else begin
      chk(lat == w + N + F + 3, $sformatf("decision latency %0d expected %0d", lat, w + N + F + 3));
      if (na != 0) begin
        num = longint'(nf) << F;
        chk(r2a == (N+F)'(num / longint'(na)), $sformatf("ratio %h", r2a));
      end
    end
    if (bypass) n_bypass++; else n_keep++;
    // decision holds
    repeat (20) begin
      req_fail = $urandom; l1d_acc = $urandom;
      @(negedge clk);
    end
    chk(decided && bypass == exp_byp, "decision holds until the next kernel");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    chk(!bypass && !decided, "after reset the L1D is in use");
    rst_n = 1;
    scenario(100, 2, 0, 0);    // 100 / 25 = 4  -> bypass
    scenario(100, 1, 0, 0);    // 75 / 25 = 3   -> keep (not greater)
    scenario(100, 3, 0, 0);    // 76 / 25       -> bypass
    scenario(50, 0, 0, 100);   // no fails      -> keep
    scenario(20, 0, 100, 0);   // no accesses   -> bypass
    for (int i = 0; i < 40; i++) scenario(50 + $urandom % 300, 0, $urandom % 100, 5 + $urandom % 40);
    chk(n_bypass > 0 && n_keep > 0, "both decisions seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
