// icnt_port: the SM's port onto the interconnection network.
//
// Two request sources share one request channel towards the lower-level
// memory: the L1D miss queue (line reads and write-through stores) and the
// bypass path taken by requests the AdmL1D unit steers around the L1D (word
// reads and writes). When both are valid the grant alternates (round-robin);
// the priority pointer moves only on a completed transfer, so a stalled
// request stays on the channel unchanged. Responses from below are routed by
// kind: line fills go to the L1D, word responses (bypassed loads) to the LSU,
// each with its own valid/ready handshake, all combinational.
// The original proposal shows the two paths meeting at the interconnect and the fill
// data returning from it; the arbitration and handshakes are design choices.
module icnt_port
  import adml1d_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // from the L1D miss queue
  input  logic    l1_req_valid,
  input  lo_req_t l1_req,
  output logic    l1_req_ready,
  // from the bypass path
  input  logic    byp_req_valid,
  input  lo_req_t byp_req,
  output logic    byp_req_ready,
  // to the network
  output logic    lo_req_valid,
  output lo_req_t lo_req,
  input  logic    lo_req_ready,
  // from the network
  input  logic    lo_rsp_valid,
  input  lo_rsp_t lo_rsp,
  output logic    lo_rsp_ready,
  // line fills to the L1D
  output logic    fill_valid,
  output lo_rsp_t fill,
  input  logic    fill_ready,
  // word responses to the LSU
  output logic    wrsp_valid,
  output mem_rsp_t wrsp,
  input  logic    wrsp_ready
);

  logic prio_byp;   // 1: bypass path wins a tie
  logic sel_byp;

  assign sel_byp      = byp_req_valid && (!l1_req_valid || prio_byp);
  assign lo_req_valid = l1_req_valid || byp_req_valid;
  assign lo_req       = sel_byp ? byp_req : l1_req;
  assign byp_req_ready = sel_byp && lo_req_ready;
  assign l1_req_ready  = !sel_byp && l1_req_valid && lo_req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) prio_byp <= 1'b0;
    else if (lo_req_valid && lo_req_ready && l1_req_valid && byp_req_valid)
      prio_byp <= !sel_byp;
  end

  assign fill_valid   = lo_rsp_valid && lo_rsp.is_line;
  assign fill         = lo_rsp;
  assign wrsp_valid   = lo_rsp_valid && !lo_rsp.is_line;
  assign wrsp.id      = lo_rsp.id;
  assign wrsp.rdata   = lo_rsp.data[DATA_W-1:0];
  assign lo_rsp_ready = lo_rsp.is_line ? fill_ready : wrsp_ready;

  // The arbitration priority only moves on a completed transfer, so a
  // stalled request keeps its grant.
  a_prio_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                !(lo_req_valid && lo_req_ready) |=> $stable(prio_byp));

endmodule
