// tb_adm_comparator: forms ratios from request-fail and access counts the way
// the divider does and checks the decision against fail > 3 * acc, i.e. the
// exact R-to-A ratio compared with the threshold 3.
module tb_adm_comparator;
  localparam int F = 8, QW = 40;
  logic [QW-1:0] ratio;
  logic          rem_nz, gt;
  int            checks = 0, failures = 0;

  adm_comparator dut (.ratio, .rem_nz, .gt);

  task automatic try(input longint unsigned fail, input longint unsigned acc);
    longint unsigned num;
    bit exp;
    num    = fail << F;
    ratio  = QW'(num / acc);
    rem_nz = (num % acc) != 0;
    #1;
    exp = fail > 3 * acc;
    checks++;
    if (gt !== exp) begin
      failures++;
      $display("FAIL fail=%0d acc=%0d: gt %0d expected %0d", fail, acc, gt, exp);
    end
  endtask

  initial begin
    try(0, 1); try(3, 1); try(4, 1); try(75, 25); try(76, 25); try(74, 25);
    try(600000, 90000); try(300001, 100000); try(300000, 100000);
    try(1000, 333); try(1000, 334);
    for (int i = 0; i < 5000; i++) begin
      longint unsigned acc, fail;
      acc  = 64'($urandom % 100000) + 1;
      fail = (i % 2 == 0) ? 3 * acc + 64'($urandom % 5) - 2 : 64'($urandom % (8 * acc + 1));
      try(fail, acc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
