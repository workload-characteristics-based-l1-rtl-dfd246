// adml1d_gpu_mem: the memory stages of all SMs of the GPU, each with its own
// L1D and AdmL1D unit (NUM_SM = 15 shader cores by default).
//
// The mechanism is the same logic in every SM, and each SM decides for itself
// from its own L1D's request fails and accesses during the warm-up-period. The
// kernel launch and the warm-up-period (estimated with compiler support) are
// common to all SMs. Each SM's pipeline side (request in, load data out) and
// its port onto the interconnection network are brought out as arrays indexed
// by SM; the network, the L2 cache, the memory controllers and DRAM lie
// outside this module. Per-SM status: the bypass decision, whether it has been
// taken, whether the L1D can be switched off, and the measured R-to-A ratio
// (fixed point, FRAC_BITS fraction bits). Events are one pulse per occurrence.
// Timing is that of sm_mem_stage; the SMs run in lock-step on one clock.
module adml1d_gpu_mem
  import adml1d_pkg::*;
#(
  parameter int unsigned NUM_SM      = 15,
  parameter int unsigned SETS        = 32,
  parameter int unsigned WAYS        = 4,
  parameter int unsigned MSHRS       = 32,
  parameter int unsigned MISSQ_DEPTH = 8,
  parameter int unsigned CNT_W       = 32,
  parameter int unsigned WUP_W       = 32,
  parameter int unsigned FRAC_BITS   = 8,
  parameter int unsigned B_THRESHOLD = 3
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       kernel_start,
  input  logic [WUP_W-1:0]           wup_cycles,
  input  logic                       in_valid     [NUM_SM],
  input  mem_req_t                   in_req       [NUM_SM],
  output logic                       in_ready     [NUM_SM],
  output logic                       wb_valid     [NUM_SM],
  output mem_rsp_t                   wb           [NUM_SM],
  output logic                       lo_req_valid [NUM_SM],
  output lo_req_t                    lo_req       [NUM_SM],
  input  logic                       lo_req_ready [NUM_SM],
  input  logic                       lo_rsp_valid [NUM_SM],
  input  lo_rsp_t                    lo_rsp       [NUM_SM],
  output logic                       lo_rsp_ready [NUM_SM],
  output logic                       bypass       [NUM_SM],
  output logic                       decided      [NUM_SM],
  output logic                       l1d_off      [NUM_SM],
  output logic [CNT_W+FRAC_BITS-1:0] r2a_ratio    [NUM_SM],
  output logic                       measuring    [NUM_SM],
  output logic [CNT_W-1:0]           fail_num     [NUM_SM],
  output logic [CNT_W-1:0]           acc_num      [NUM_SM],
  output logic                       ev_req_fail  [NUM_SM],
  output logic                       ev_l1d_acc   [NUM_SM],
  output logic                       ev_hit       [NUM_SM],
  output logic                       ev_miss      [NUM_SM],
  output logic                       ev_merge     [NUM_SM],
  output logic                       ev_store     [NUM_SM],
  output logic                       ev_bypass_req[NUM_SM]
);

  for (genvar s = 0; s < NUM_SM; s++) begin : g_sm
    sm_mem_stage #(
      .SETS(SETS), .WAYS(WAYS), .MSHRS(MSHRS), .MISSQ_DEPTH(MISSQ_DEPTH),
      .CNT_W(CNT_W), .WUP_W(WUP_W), .FRAC_BITS(FRAC_BITS),
      .B_THRESHOLD(B_THRESHOLD)
    ) u_sm (
      .clk, .rst_n, .kernel_start, .wup_cycles,
      .in_valid(in_valid[s]), .in_req(in_req[s]), .in_ready(in_ready[s]),
      .wb_valid(wb_valid[s]), .wb(wb[s]),
      .lo_req_valid(lo_req_valid[s]), .lo_req(lo_req[s]), .lo_req_ready(lo_req_ready[s]),
      .lo_rsp_valid(lo_rsp_valid[s]), .lo_rsp(lo_rsp[s]), .lo_rsp_ready(lo_rsp_ready[s]),
      .bypass(bypass[s]), .decided(decided[s]), .l1d_off(l1d_off[s]),
      .r2a_ratio(r2a_ratio[s]), .measuring(measuring[s]),
      .fail_num(fail_num[s]), .acc_num(acc_num[s]),
      .ev_req_fail(ev_req_fail[s]), .ev_l1d_acc(ev_l1d_acc[s]),
      .ev_hit(ev_hit[s]), .ev_miss(ev_miss[s]), .ev_merge(ev_merge[s]), .ev_store(ev_store[s]),
      .ev_bypass_req(ev_bypass_req[s])
    );
  end

endmodule
