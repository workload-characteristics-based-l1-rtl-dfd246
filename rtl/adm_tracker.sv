// adm_tracker: event counter of the AdmL1D unit. Two copies are used: the
// req-fail-num tracker counts L1D requests that could not be accepted (each
// retry counts again) and the L1D-acc-num tracker counts accepted L1D accesses.
//
// clear zeroes the count; while en is high each cycle with inc high adds one.
// The count saturates at its maximum instead of wrapping (a design choice, so
// that a very long warm-up-period cannot make a Type-N workload look like a
// Type-P one). The count is visible the cycle after the event.
module adm_tracker #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic             inc,
  output logic [CNT_W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         count <= '0;
    else if (clear)                     count <= '0;
    else if (en && inc && (count != '1)) count <= count + 1'b1;
  end

endmodule
