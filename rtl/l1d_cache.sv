// l1d_cache: the per-SM L1 data cache (tags, data and MSHRs) whose requests
// the AdmL1D unit watches.
//
// Organisation: SETS x WAYS lines of 128 bytes (16 KB with the defaults
// 32 x 4), 32 MSHRs and a miss queue towards the interconnect. Each cycle
// it looks at one word request and either accepts it or refuses it; a refused
// request is retried by the LSU and counts as a request fail.
//   load hit                   -> accepted, data returned the next cycle
//   load to a line being filled -> accepted if an MSHR is free (merged, no
//                                 new lower-level request), else refused
//   load miss                  -> accepted if an MSHR is free, a way of the set
//                                 is not reserved and the miss queue has room:
//                                 the victim way is reserved for the line and
//                                 a line read is queued; else refused
//   store                      -> write-through, no write-allocate: accepted
//                                 if the miss queue has room (a hit also updates
//                                 the cached word); refused while its line is
//                                 being filled, so a fill never overwrites it
//                                 with older data
// While a fill is offered or the MSHRs of a filled line are being answered
// (one load per cycle), all requests are refused: the response port and the
// tag array are busy.
// Fill: a line response from below is written into the way reserved for it,
// the line becomes valid, then every MSHR waiting for it is answered.
// inv (kernel launch) clears all valid bits; lines being filled stay reserved.
// idle is high when nothing is outstanding, which is when the cache could be
// power-gated after the AdmL1D unit has switched it off.
// Following the original proposal's configuration: the sizes and the refusal reasons
// "cache space all reserved" and "miss queue full" (plus MSHRs full).
// Design choices: round-robin replacement, the write policy, the miss-queue
// depth, one request per cycle, refusing requests during fills.
module l1d_cache
  import adml1d_pkg::*;
#(
  parameter int unsigned SETS        = 32,
  parameter int unsigned WAYS        = 4,
  parameter int unsigned MSHRS       = 32,
  parameter int unsigned MISSQ_DEPTH = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     inv,
  // request from the LSU (through the AdmL1D steering)
  input  logic     req_valid,
  input  mem_req_t req,
  output logic     req_accept,
  output logic     req_fail,
  // load data to the LSU
  output logic     rsp_valid,
  output mem_rsp_t rsp,
  // miss queue to the interconnect
  output logic     lo_req_valid,
  output lo_req_t  lo_req,
  input  logic     lo_req_ready,
  // fill data from the interconnect
  input  logic     fill_valid,
  input  lo_rsp_t  fill,
  output logic     fill_ready,
  // status and events
  output logic     idle,
  output logic     ev_hit,
  output logic     ev_miss,
  output logic     ev_merge,
  output logic     ev_store
);

  localparam int unsigned SET_W   = $clog2(SETS);
  localparam int unsigned WAY_W   = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned TAG_W   = ADDR_W - OFFS_W - SET_W;
  localparam int unsigned WOFF_W  = $clog2(LINE_WORDS);
  localparam int unsigned LADDR_W = ADDR_W - OFFS_W;
  localparam int unsigned LINES   = SETS * WAYS;
  localparam int unsigned IDX_W   = $clog2(LINES);
  localparam int unsigned MQ_W    = (MISSQ_DEPTH > 1) ? $clog2(MISSQ_DEPTH) : 1;
  localparam int unsigned MQC_W   = $clog2(MISSQ_DEPTH + 1);
  localparam int unsigned MSHR_W  = (MSHRS > 1) ? $clog2(MSHRS) : 1;

  typedef struct packed {
    logic [LADDR_W-1:0] laddr;
    logic [WOFF_W-1:0]  woff;
    logic [ID_W-1:0]    id;
  } mshr_t;

  // ---------------------------------------------------------------- state
  logic [TAG_W-1:0]  tags     [LINES];
  logic [LINE_W-1:0] data_mem [LINES];
  logic [LINES-1:0]  valid, rsvd;
  logic [WAY_W-1:0]  rr_ptr   [SETS];

  mshr_t             mshr     [MSHRS];
  logic [MSHRS-1:0]  mshr_v;

  lo_req_t           mq       [MISSQ_DEPTH];
  logic [MQ_W-1:0]   mq_rd, mq_wr;
  logic [MQC_W-1:0]  mq_cnt;

  logic               draining;
  logic [LADDR_W-1:0] drain_laddr;
  logic [LINE_W-1:0]  drain_line;

  // --------------------------------------------------------------- lookup
  logic [SET_W-1:0]   r_set;
  logic [TAG_W-1:0]   r_tag;
  logic [WOFF_W-1:0]  r_woff;
  logic [LADDR_W-1:0] r_laddr;
  logic               hit, pend, victim_ok;
  logic [IDX_W-1:0]   hit_idx, victim_idx;
  logic [WAY_W-1:0]   victim_way;
  logic               mshr_free_ok;
  logic [MSHR_W-1:0]  mshr_free;
  logic               mq_full, mq_push, mq_pop;
  lo_req_t            mq_in;
  logic               busy, can_take;

  assign r_set   = req.addr[OFFS_W +: SET_W];
  assign r_tag   = req.addr[ADDR_W-1 -: TAG_W];
  assign r_woff  = req.addr[2 +: WOFF_W];
  assign r_laddr = req.addr[ADDR_W-1:OFFS_W];

  always_comb begin
    logic [IDX_W-1:0] idx;
    logic [WAY_W-1:0] w;
    hit = 1'b0; pend = 1'b0; hit_idx = '0;
    victim_ok = 1'b0; victim_way = '0; victim_idx = '0;
    for (int k = 0; k < WAYS; k++) begin
      idx = IDX_W'({r_set, WAY_W'(k)});
      if (tags[idx] == r_tag) begin
        if (valid[idx] && !rsvd[idx]) begin hit = 1'b1; hit_idx = idx; end
        if (rsvd[idx]) pend = 1'b1;
      end
    end
    // round-robin victim: first way not reserved, starting at the pointer
    for (int k = WAYS - 1; k >= 0; k--) begin
      w   = WAY_W'(rr_ptr[r_set] + WAY_W'(k));
      idx = IDX_W'({r_set, w});
      if (!rsvd[idx]) begin victim_ok = 1'b1; victim_way = w; victim_idx = idx; end
    end
  end

  always_comb begin
    mshr_free_ok = 1'b0; mshr_free = '0;
    for (int m = MSHRS - 1; m >= 0; m--)
      if (!mshr_v[m]) begin mshr_free_ok = 1'b1; mshr_free = MSHR_W'(m); end
  end

  assign mq_full = (mq_cnt == MQC_W'(MISSQ_DEPTH));
  assign busy    = fill_valid || draining;

  always_comb begin
    if (req.we)        can_take = !pend && !mq_full;
    else if (hit)      can_take = 1'b1;
    else if (pend)     can_take = mshr_free_ok;
    else               can_take = mshr_free_ok && victim_ok && !mq_full;
  end

  assign req_accept = req_valid && !busy && can_take;
  assign req_fail   = req_valid && !req_accept;

  assign ev_hit   = req_accept && !req.we && hit;
  assign ev_merge = req_accept && !req.we && !hit && pend;
  assign ev_miss  = req_accept && !req.we && !hit && !pend;
  assign ev_store = req_accept && req.we;

  // ------------------------------------------------------------ miss queue
  always_comb begin
    mq_in       = '0;
    mq_in.addr  = req.addr;
    mq_in.id    = req.id;
    mq_in.wdata = req.wdata;
    if (req.we) mq_in.op = LO_WORD_WR;
    else begin
      mq_in.op   = LO_LINE_RD;
      mq_in.addr = {r_laddr, {OFFS_W{1'b0}}};
    end
  end

  assign mq_push      = ev_miss || ev_store;
  assign lo_req_valid = (mq_cnt != '0);
  assign lo_req       = mq[mq_rd];
  assign mq_pop       = lo_req_valid && lo_req_ready;

  always_ff @(posedge clk) begin
    if (mq_push) mq[mq_wr] <= mq_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mq_rd  <= '0;
      mq_wr  <= '0;
      mq_cnt <= '0;
    end else begin
      if (mq_push) mq_wr <= (mq_wr == MQ_W'(MISSQ_DEPTH - 1)) ? '0 : mq_wr + 1'b1;
      if (mq_pop)  mq_rd <= (mq_rd == MQ_W'(MISSQ_DEPTH - 1)) ? '0 : mq_rd + 1'b1;
      mq_cnt <= mq_cnt + MQC_W'(mq_push) - MQC_W'(mq_pop);
    end
  end

  // ------------------------------------------------------------------ fill
  logic               fill_take;
  logic [SET_W-1:0]   f_set;
  logic [TAG_W-1:0]   f_tag;
  logic               f_found;
  logic [IDX_W-1:0]   f_idx;

  assign fill_ready = !draining;
  assign fill_take  = fill_valid && !draining;
  assign f_set      = fill.addr[OFFS_W +: SET_W];
  assign f_tag      = fill.addr[ADDR_W-1 -: TAG_W];

  always_comb begin
    logic [IDX_W-1:0] idx;
    f_found = 1'b0; f_idx = '0;
    for (int k = 0; k < WAYS; k++) begin
      idx = IDX_W'({f_set, WAY_W'(k)});
      if (rsvd[idx] && tags[idx] == f_tag) begin f_found = 1'b1; f_idx = idx; end
    end
  end

  // MSHR waiting for the line being drained
  logic              d_found;
  logic [MSHR_W-1:0] d_idx;
  always_comb begin
    d_found = 1'b0; d_idx = '0;
    for (int m = MSHRS - 1; m >= 0; m--)
      if (mshr_v[m] && mshr[m].laddr == drain_laddr) begin d_found = 1'b1; d_idx = MSHR_W'(m); end
  end

  // ------------------------------------------------------ tag and data array
  always_ff @(posedge clk) begin
    if (ev_miss) tags[victim_idx] <= r_tag;
    if (fill_take && f_found) data_mem[f_idx] <= fill.data;
    if (ev_store && hit) data_mem[hit_idx][r_woff*DATA_W +: DATA_W] <= req.wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      rsvd  <= '0;
      for (int s = 0; s < SETS; s++) rr_ptr[s] <= '0;
    end else begin
      if (ev_miss) begin
        valid[victim_idx] <= 1'b0;
        rsvd[victim_idx]  <= 1'b1;
        rr_ptr[r_set]     <= victim_way + 1'b1;
      end
      if (fill_take && f_found) begin
        valid[f_idx] <= 1'b1;
        rsvd[f_idx]  <= 1'b0;
      end
      if (inv) valid <= '0;
    end
  end

  // ---------------------------------------------------- MSHRs and responses
  always_ff @(posedge clk) begin
    if (ev_miss || ev_merge) mshr[mshr_free] <= '{laddr: r_laddr, woff: r_woff, id: req.id};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mshr_v      <= '0;
      draining    <= 1'b0;
      drain_laddr <= '0;
      drain_line  <= '0;
      rsp_valid   <= 1'b0;
      rsp         <= '0;
    end else begin
      rsp_valid <= 1'b0;
      if (ev_miss || ev_merge) mshr_v[mshr_free] <= 1'b1;
      if (fill_take) begin
        draining    <= 1'b1;
        drain_laddr <= fill.addr[ADDR_W-1:OFFS_W];
        drain_line  <= fill.data;
      end else if (draining) begin
        if (d_found) begin
          mshr_v[d_idx] <= 1'b0;
          rsp_valid     <= 1'b1;
          rsp.id        <= mshr[d_idx].id;
          rsp.rdata     <= drain_line[mshr[d_idx].woff*DATA_W +: DATA_W];
        end else begin
          draining <= 1'b0;
        end
      end
      if (ev_hit) begin
        rsp_valid <= 1'b1;
        rsp.id    <= req.id;
        rsp.rdata <= data_mem[hit_idx][r_woff*DATA_W +: DATA_W];
      end
    end
  end

  assign idle = !draining && (mshr_v == '0) && (mq_cnt == '0) && (rsvd == '0);

  // A fill must belong to a line this cache is waiting for.
  a_fill_expected: assert property (@(posedge clk) disable iff (!rst_n)
                                    fill_take |-> f_found);
  // Hits and MSHR drains never collide on the response port.
  a_rsp_port: assert property (@(posedge clk) disable iff (!rst_n)
                               !(ev_hit && draining));

endmodule
