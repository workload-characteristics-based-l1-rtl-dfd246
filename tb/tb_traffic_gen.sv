// tb_traffic_gen: request generator and load checker for one SM memory stage.
// After start it issues n_req word requests, one per cycle when accepted:
//   pattern 0 (reuse):  loads cycle over P_LINES lines of 128 bytes (a small
//                       working set the L1D holds: mostly hits)
//   pattern 1 (stream): every load touches a new line (no reuse: misses that
//                       exhaust MSHRs and ways, many refused requests)
//   pattern 2 (readback): loads of the store region written earlier
// Every store_every-th request (0: none) is a store of a fresh value into a
// separate store region. Load data is checked against init_word or the
// last value stored. Each request ID is reused only after its load returned.
// done rises when all loads of the phase have returned.
module tb_traffic_gen
  import adml1d_pkg::*;
#(
  parameter int unsigned P_LINES = 8,
  parameter logic [31:0] BASE    = 32'h0010_0000
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  int       pattern,
  input  int       n_req,
  input  int       store_every,
  output logic     in_valid,
  output mem_req_t in_req,
  input  logic     in_ready,
  input  logic     wb_valid,
  input  mem_rsp_t wb,
  output logic     done,
  output int       checks,
  output int       errors
);
  localparam logic [31:0] ST_BASE = BASE + 32'h0080_0000;

  logic [31:0] stored [logic [31:0]];
  logic [31:0] exp_data [256];
  bit          busy_id  [256];
  int          issued, outstanding, phase_seed, n_st;
  bit          running;

  function automatic logic [31:0] expect_word(input logic [31:0] a);
    return stored.exists(a) ? stored[a] : tb_util_pkg::init_word(a);
  endfunction

  function automatic mem_req_t make_req(input int i);
    mem_req_t r;
    r = '0;
    r.id = 8'(i);
    if (store_every != 0 && (i % store_every) == store_every - 1) begin
      r.we    = 1'b1;
      r.addr  = ST_BASE + 32'(n_st * 4);
      r.wdata = $urandom;
    end else begin
      r.we = 1'b0;
      unique case (pattern)
        0: r.addr = BASE + 32'((i % P_LINES) * 128 + ((i / P_LINES) % 32) * 4);
        1: r.addr = BASE + 32'(phase_seed * 32'h0004_0000) + 32'(i * 128 + (i % 32) * 4);
        default: r.addr = ST_BASE + 32'((i % (n_st > 0 ? n_st : 1)) * 4);
      endcase
    end
    return r;
  endfunction

  initial begin
    in_valid = 0; in_req = '0; done = 0; checks = 0; errors = 0;
    issued = 0; outstanding = 0; running = 0; phase_seed = 0; n_st = 0;
    foreach (busy_id[k]) busy_id[k] = 0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      // responses
      if (wb_valid) begin
        checks++;
        if (!busy_id[wb.id] || wb.rdata !== exp_data[wb.id]) begin
          errors++;
          $display("ERROR %m: id %0d data %h expected %h (busy %0d)", wb.id, wb.rdata,
                   exp_data[wb.id], busy_id[wb.id]);
        end
        busy_id[wb.id] = 0;
        outstanding--;
      end
      // handshake of the request on offer
      if (in_valid && in_ready) begin
        if (in_req.we) begin
          stored[in_req.addr] = in_req.wdata;
          n_st++;
        end else begin
          busy_id[in_req.id]  = 1;
          exp_data[in_req.id] = expect_word(in_req.addr);
          outstanding++;
        end
        issued++;
        in_valid <= 0;
      end
      if (start) begin
        running = 1; issued = 0; done <= 0; phase_seed++;
      end
      // next request
      if (running && (!in_valid || in_ready)) begin
        if (issued < n_req) begin
          mem_req_t r;
          r = make_req(issued);
          if (!r.we && busy_id[r.id]) in_valid <= 0;
          else begin
            in_req   <= r;
            in_valid <= 1;
          end
        end else begin
          in_valid <= 0;
        end
      end
      if (running && issued >= n_req && outstanding == 0 && !(in_valid && !in_ready)) begin
        running = 0;
        done <= 1;
      end
    end
  end
endmodule
