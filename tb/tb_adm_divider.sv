// tb_adm_divider: random and corner-case divisions at the default width,
// checked against 64-bit arithmetic, plus the latency of N+FRAC_BITS cycles.
module tb_adm_divider;
  localparam int N = 32, F = 8;
  logic           clk = 0, rst_n = 0, start = 0;
  logic [N-1:0]   a = 0, b = 0;
  logic           busy, done, rem_nz;
  logic [N+F-1:0] q;
  int             checks = 0, failures = 0;

  adm_divider dut (.clk, .rst_n, .start, .dividend(a), .divisor(b),
                                           .busy, .done, .quotient(q), .rem_nz);

  always #5 clk = ~clk;

  task automatic div(input logic [N-1:0] x, input logic [N-1:0] y);
    longint unsigned num, eq, er;
    int lat;
    @(negedge clk); a = x; b = y; start = 1;
    @(negedge clk); start = 0;
    lat = 1;
    while (!done && lat < 200) begin @(negedge clk); lat++; end
    num = longint'(x) << F;
    checks += 2;
    if (lat != N + F + 1) begin failures++; $display("FAIL latency %0d expected %0d", lat, N + F + 1); end
    if (y == 0) begin
      if (q !== '1 || rem_nz !== 0) begin failures++; $display("FAIL div by zero: %h", q); end
    end else begin
      eq = num / longint'(y); er = num % longint'(y);
      if (q !== (N+F)'(eq) || rem_nz !== (er != 0)) begin
        failures++;
        $display("FAIL %0d/%0d: q %h rem_nz %0d expected %h %0d", x, y, q, rem_nz, eq, er != 0);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    div(0, 5); div(75, 25); div(76, 25); div(100, 25); div(1, 3); div(32'hFFFF_FFFF, 1);
    div(32'hFFFF_FFFF, 32'hFFFF_FFFF); div(7, 0); div(600000, 90000);
    for (int i = 0; i < 300; i++) begin
      logic [N-1:0] x, y;
      x = $urandom; y = $urandom >> ($urandom % 32);
      if (i % 3 == 0) x = x >> ($urandom % 32);
      div(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
