// lsu: the load/store unit end of the SM memory stage.
//
// Requests: the pipeline offers one word access at a time (in_valid/in_ready).
// The LSU keeps it in a holding register and presents it to the memory stage
// (req_valid/req) every cycle until req_accept says the L1D or the bypass path
// took it; a refused request is simply presented again in the next cycle,
// which is what makes the L1D's request-fail count grow when the L1D lacks
// resources. A new request can enter in the same cycle the held one leaves.
//
// Responses: load data arrives from the L1D (hits and MSHR drains, which cannot
// be stalled) and from the bypass path through the interconnect port (which can
// be). The L1D has priority; the interconnect response waits (icnt_rsp_ready
// low) while the L1D responds. Stores return nothing. wb_valid/wb is one load
// result per cycle to writeback.
// The original proposal only names the LSU; coalescing of the 32 threads of a warp
// into line requests is not modelled, and this simple retry-and-merge
// behaviour is a design choice.
module lsu
  import adml1d_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // from the pipeline
  input  logic     in_valid,
  input  mem_req_t in_req,
  output logic     in_ready,
  // to the AdmL1D steering / L1D / bypass path
  output logic     req_valid,
  output mem_req_t req,
  input  logic     req_accept,
  // load responses
  input  logic     cache_rsp_valid,
  input  mem_rsp_t cache_rsp,
  input  logic     icnt_rsp_valid,
  input  mem_rsp_t icnt_rsp,
  output logic     icnt_rsp_ready,
  // to writeback
  output logic     wb_valid,
  output mem_rsp_t wb
);

  logic     held_valid;
  mem_req_t held;

  assign in_ready  = !held_valid || req_accept;
  assign req_valid = held_valid;
  assign req       = held;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held_valid <= 1'b0;
      held       <= '0;
    end else if (in_ready) begin
      held_valid <= in_valid;
      if (in_valid) held <= in_req;
    end
  end

  assign icnt_rsp_ready = !cache_rsp_valid;
  assign wb_valid       = cache_rsp_valid || icnt_rsp_valid;
  assign wb             = cache_rsp_valid ? cache_rsp : icnt_rsp;

  // A held request must stay unchanged until it is accepted.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 (req_valid && !req_accept) |=> (req_valid && $stable(req)));

endmodule
