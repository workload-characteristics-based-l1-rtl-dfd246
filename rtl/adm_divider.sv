// adm_divider: the "division operation" of the AdmL1D unit. It forms the
// R-to-A ratio, req-fail-num / L1D-acc-num, as an unsigned fixed-point number
// with FRAC_BITS fraction bits.
//
// A restoring divider that produces one quotient bit per cycle: start loads
// dividend << FRAC_BITS, N+FRAC_BITS steps of one cycle follow, and done pulses
// in the cycle after the last step (N+FRAC_BITS+1 cycles after the start
// cycle) with the quotient (truncated) and rem_nz, which says the true ratio is larger than the
// quotient (the remainder was non-zero); the comparator needs it to decide
// "greater than" exactly. Division by zero gives an all-ones quotient.
// The original proposal only names a division; the sequential restoring algorithm, the
// fixed-point format and the latency are design choices that trade a few
// dozen cycles, once per kernel, for a small circuit.
module adm_divider #(
  parameter int unsigned N         = 32,
  parameter int unsigned FRAC_BITS = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [N-1:0]           dividend,
  input  logic [N-1:0]           divisor,
  output logic                   busy,
  output logic                   done,
  output logic [N+FRAC_BITS-1:0] quotient,
  output logic                   rem_nz
);

  localparam int unsigned QW    = N + FRAC_BITS;
  localparam int unsigned STEPW = $clog2(QW + 1);

  logic [QW-1:0]    q;
  logic [N-1:0]     rem;
  logic [N-1:0]     dvs;
  logic [STEPW-1:0] steps;
  logic             div0;
  logic [N:0]       trial;
  logic             take;

  assign trial = {rem, q[QW-1]};
  assign take  = (trial >= {1'b0, dvs});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      rem   <= '0;
      dvs   <= '0;
      steps <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      div0  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        q     <= {dividend, {FRAC_BITS{1'b0}}};
        rem   <= '0;
        dvs   <= divisor;
        div0  <= (divisor == '0);
        steps <= STEPW'(QW);
        busy  <= 1'b1;
      end else if (busy) begin
        q   <= {q[QW-2:0], take};
        rem <= take ? N'(trial - {1'b0, dvs}) : trial[N-1:0];
        steps <= steps - 1'b1;
        if (steps == STEPW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient = div0 ? '1 : q;
  assign rem_nz   = !div0 && (rem != '0);

endmodule
