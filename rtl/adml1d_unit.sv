// adml1d_unit: the AdmL1D unit of one SM. It watches the L1D for a
// warm-up-period at the start of each kernel, classifies the running workload,
// and then either keeps the L1D in use or switches it off so that every
// memory request bypasses it until the next kernel launch.
//
// Structure (three parts): adm_warmup_timer opens a measurement window of
// wup_cycles cycles; two adm_tracker counters count, inside the window,
// rejected L1D requests (req-fail-num, one per cycle a request is refused)
// and accepted L1D accesses (L1D-acc-num); at the end of the window
// adm_divider computes the R-to-A ratio = req-fail-num / L1D-acc-num and
// adm_comparator tests ratio > B_THRESHOLD. If so, bypass is set.
//
// Interface and timing: kernel_start (one cycle) clears the counters and the
// decision and restarts the window. With kernel_start high in cycle c, the
// window is open in cycles c+1 .. c+wup_cycles and decided rises in cycle
// c + wup_cycles + CNT_W + FRAC_BITS + 3 (one cycle after the divider's done),
// or in cycle c + wup_cycles + 2 if no request failed (the ratio is then zero
// and no division is needed). bypass and decided then hold until
// the next kernel_start. After reset the L1D is in use (bypass = 0).
// Following the original proposal: what is counted, when, the ratio, and the
// threshold 3 with a strict comparison. Design choices: the counter and
// fraction widths, the division method, and treating no accesses with some
// failures as an infinite ratio (bypass).
module adml1d_unit #(
  parameter int unsigned CNT_W       = 32,
  parameter int unsigned WUP_W       = 32,
  parameter int unsigned FRAC_BITS   = 8,
  parameter int unsigned B_THRESHOLD = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     kernel_start,
  input  logic [WUP_W-1:0]         wup_cycles,
  input  logic                     req_fail,     // L1D refused a request this cycle
  input  logic                     l1d_acc,      // L1D accepted a request this cycle
  output logic                     bypass,       // Y: bypass (switch off) the L1D
  output logic                     decided,      // classification finished
  output logic                     measuring,    // warm-up window open
  output logic [CNT_W-1:0]         fail_num,
  output logic [CNT_W-1:0]         acc_num,
  output logic [CNT_W+FRAC_BITS-1:0] r2a_ratio   // valid when decided
);

  typedef enum logic [1:0] {S_IDLE, S_WARMUP, S_DIVIDE, S_DECIDED} state_e;
  state_e state;

  logic window, wup_done;
  logic div_start, div_busy, div_done, div_rem_nz, over_thr;
  logic [CNT_W+FRAC_BITS-1:0] quotient;

  adm_warmup_timer #(.WUP_W(WUP_W)) u_wup (
    .clk, .rst_n, .start(kernel_start), .wup_cycles,
    .window, .done(wup_done)
  );

  adm_tracker #(.CNT_W(CNT_W)) u_fail_trk (
    .clk, .rst_n, .clear(kernel_start), .en(window), .inc(req_fail),
    .count(fail_num)
  );

  adm_tracker #(.CNT_W(CNT_W)) u_acc_trk (
    .clk, .rst_n, .clear(kernel_start), .en(window), .inc(l1d_acc),
    .count(acc_num)
  );

  assign div_start = (state == S_WARMUP) && wup_done && (fail_num != '0);

  adm_divider #(.N(CNT_W), .FRAC_BITS(FRAC_BITS)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(fail_num), .divisor(acc_num),
    .busy(div_busy), .done(div_done), .quotient, .rem_nz(div_rem_nz)
  );

  adm_comparator #(.QW(CNT_W+FRAC_BITS), .FRAC_BITS(FRAC_BITS),
                   .B_THRESHOLD(B_THRESHOLD)) u_cmp (
    .ratio(quotient), .rem_nz(div_rem_nz), .gt(over_thr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      bypass    <= 1'b0;
      r2a_ratio <= '0;
    end else if (kernel_start) begin
      state  <= S_WARMUP;
      bypass <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE:    ;
        S_WARMUP:  if (wup_done) begin
                     if (fail_num != '0) state <= S_DIVIDE;
                     else begin
                       state     <= S_DECIDED;
                       r2a_ratio <= '0;
                       bypass    <= 1'b0;
                     end
                   end
        S_DIVIDE:  if (div_done) begin
                     state     <= S_DECIDED;
                     r2a_ratio <= quotient;
                     bypass    <= over_thr;
                   end
        S_DECIDED: ;
        default:   state <= S_IDLE;
      endcase
    end
  end

  assign decided   = (state == S_DECIDED);
  assign measuring = window;

  // A decision is never reported while the warm-up window is still open.
  a_decided_after_window: assert property (@(posedge clk) disable iff (!rst_n)
                                           decided |-> !window);

endmodule
