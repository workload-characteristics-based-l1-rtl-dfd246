// adm_warmup_timer: the "set warm-up-period" logic of the AdmL1D unit.
//
// At a kernel launch (start) it loads the warm-up-period, a cycle count
// supplied from outside (estimated with compiler support), and counts it down.
// While the count is non-zero the measurement window is open and the request
// trackers count; the cycle after the last window cycle it raises done for
// one cycle, which triggers the R-to-A ratio calculation.
//
// Timing: start sampled at edge t -> window high in cycles t+1 .. t+wup_cycles,
// done high in cycle t+wup_cycles+1. wup_cycles = 0 gives no window and done in
// cycle t+1. A new start restarts the timer at any time.
// That the period is counted in core cycles is taken from the way the
// measurement periods are reported; counter width and reset are design choices.
module adm_warmup_timer #(
  parameter int unsigned WUP_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,       // kernel launch: (re)load the period
  input  logic [WUP_W-1:0] wup_cycles,  // warm-up-period in cycles
  output logic             window,      // measurement window open
  output logic             done         // one-cycle pulse at the end
);

  logic [WUP_W-1:0] remain;
  logic             armed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remain <= '0;
      armed  <= 1'b0;
    end else if (start) begin
      remain <= wup_cycles;
      armed  <= 1'b1;
    end else if (armed) begin
      if (remain != '0) remain <= remain - 1'b1;
      else              armed  <= 1'b0;
    end
  end

  assign window = armed && (remain != '0);
  assign done   = armed && (remain == '0);

endmodule
