// sm_mem_stage: the memory stage of one SM with the AdmL1D unit.
//
// Requests leave the LSU and pass the AdmL1D unit, which steers them: while
// the L1D is in use (N) they go to the L1D, whose misses and write-through
// stores reach the interconnect port through its miss queue; once the unit
// has classified the running kernel as one that the L1D does not help (Y),
// every request bypasses the L1D and goes straight to the interconnect port
// as a word read or write. Load data comes back either from the L1D (hits and
// filled misses) or, for bypassed loads, from the interconnect port.
// During the warm-up-period after kernel_start the AdmL1D unit counts the
// requests the L1D refuses (req-fail-num) and accepts (L1D-acc-num). Refusals
// of the bypass path by the network are not L1D request fails and are not
// counted. kernel_start also invalidates the L1D, so data left in it from an
// earlier kernel, possibly stale after bypassed stores, is never used.
// l1d_off is high when the L1D is bypassed and has nothing outstanding: the
// state in which it can be switched off (clock- or power-gated).
// Timing: one request per cycle; a hit returns its data the cycle after it is
// accepted; other latencies depend on the lower-level memory.
// The steering, the counted events and the one-decision-per-kernel rule
// follow the original proposal; the invalidation at kernel start, the handshakes and
// the l1d_off condition are design choices.
module sm_mem_stage
  import adml1d_pkg::*;
#(
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
  // from the pipeline
  input  logic                       in_valid,
  input  mem_req_t                   in_req,
  output logic                       in_ready,
  // to writeback
  output logic                       wb_valid,
  output mem_rsp_t                   wb,
  // interconnection network
  output logic                       lo_req_valid,
  output lo_req_t                    lo_req,
  input  logic                       lo_req_ready,
  input  logic                       lo_rsp_valid,
  input  lo_rsp_t                    lo_rsp,
  output logic                       lo_rsp_ready,
  // AdmL1D status
  output logic                       bypass,
  output logic                       decided,
  output logic                       l1d_off,
  output logic [CNT_W+FRAC_BITS-1:0] r2a_ratio,
  output logic                       measuring,    // warm-up window open
  output logic [CNT_W-1:0]           fail_num,     // req-fail-num so far
  output logic [CNT_W-1:0]           acc_num,      // L1D-acc-num so far
  // events, one pulse per occurrence
  output logic                       ev_req_fail,
  output logic                       ev_l1d_acc,
  output logic                       ev_hit,
  output logic                       ev_miss,
  output logic                       ev_merge,
  output logic                       ev_store,
  output logic                       ev_bypass_req
);

  logic     req_valid, req_accept;
  mem_req_t req;

  logic     c_req_valid, c_accept, c_fail, c_rsp_valid, c_idle;
  mem_rsp_t c_rsp;
  logic     mq_valid, mq_ready;
  lo_req_t  mq_req;
  logic     fill_valid, fill_ready;
  lo_rsp_t  fill;

  logic     byp_valid, byp_ready;
  lo_req_t  byp_req;
  logic     wrsp_valid, wrsp_ready;
  mem_rsp_t wrsp;


  lsu u_lsu (
    .clk, .rst_n,
    .in_valid, .in_req, .in_ready,
    .req_valid, .req, .req_accept,
    .cache_rsp_valid(c_rsp_valid), .cache_rsp(c_rsp),
    .icnt_rsp_valid(wrsp_valid), .icnt_rsp(wrsp), .icnt_rsp_ready(wrsp_ready),
    .wb_valid, .wb
  );

  adml1d_unit #(.CNT_W(CNT_W), .WUP_W(WUP_W), .FRAC_BITS(FRAC_BITS),
                .B_THRESHOLD(B_THRESHOLD)) u_adm (
    .clk, .rst_n, .kernel_start, .wup_cycles,
    .req_fail(c_fail), .l1d_acc(c_accept),
    .bypass, .decided, .measuring, .fail_num, .acc_num, .r2a_ratio
  );

  // steering: N -> L1D, Y -> bypass path
  assign c_req_valid = req_valid && !bypass;
  assign byp_valid   = req_valid && bypass;
  assign req_accept  = bypass ? byp_ready : c_accept;

  always_comb begin
    byp_req       = '0;
    byp_req.op    = req.we ? LO_WORD_WR : LO_WORD_RD;
    byp_req.addr  = req.addr;
    byp_req.wdata = req.wdata;
    byp_req.id    = req.id;
  end

  l1d_cache #(.SETS(SETS), .WAYS(WAYS), .MSHRS(MSHRS),
              .MISSQ_DEPTH(MISSQ_DEPTH)) u_l1d (
    .clk, .rst_n, .inv(kernel_start),
    .req_valid(c_req_valid), .req, .req_accept(c_accept), .req_fail(c_fail),
    .rsp_valid(c_rsp_valid), .rsp(c_rsp),
    .lo_req_valid(mq_valid), .lo_req(mq_req), .lo_req_ready(mq_ready),
    .fill_valid, .fill, .fill_ready,
    .idle(c_idle), .ev_hit, .ev_miss, .ev_merge, .ev_store
  );

  icnt_port u_icnt (
    .clk, .rst_n,
    .l1_req_valid(mq_valid), .l1_req(mq_req), .l1_req_ready(mq_ready),
    .byp_req_valid(byp_valid), .byp_req, .byp_req_ready(byp_ready),
    .lo_req_valid, .lo_req, .lo_req_ready,
    .lo_rsp_valid, .lo_rsp, .lo_rsp_ready,
    .fill_valid, .fill, .fill_ready,
    .wrsp_valid, .wrsp, .wrsp_ready
  );

  assign l1d_off       = bypass && c_idle;
  assign ev_req_fail   = c_fail;
  assign ev_l1d_acc    = c_accept;
  assign ev_bypass_req = byp_valid && byp_ready;

  // Nothing enters the L1D once it has been switched off.
  a_off_no_access: assert property (@(posedge clk) disable iff (!rst_n)
                                    bypass |-> !c_accept);

endmodule
