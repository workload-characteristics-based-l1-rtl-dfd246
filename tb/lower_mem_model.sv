// lower_mem_model: behavioural model of everything below an SM's interconnect
// port (network, L2 cache, memory controllers, DRAM), for simulation only.
// Every request is answered after a fixed latency of LAT cycles, in order,
// one per cycle; the response channel honours rsp_ready. Memory content starts
// as tb_util_pkg::init_word(address); word writes update it. Line reads return
// the 32 words of the 128-byte line. Counts the requests of each kind.
module lower_mem_model
  import adml1d_pkg::*;
#(
  parameter int unsigned LAT = 20
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    req_valid,
  input  lo_req_t req,
  output logic    req_ready,
  output logic    rsp_valid,
  output lo_rsp_t rsp,
  input  logic    rsp_ready
);
  typedef struct {
    longint  due;
    lo_rsp_t r;
  } pend_t;

  logic [31:0] mem [logic [31:0]];
  pend_t       q[$];
  longint      cyc;
  int          n_line_rd, n_word_rd, n_word_wr;

  function automatic logic [31:0] rd(input logic [31:0] a);
    return mem.exists(a) ? mem[a] : tb_util_pkg::init_word(a);
  endfunction

  assign req_ready = (q.size() < 512);
  assign rsp_valid = (q.size() != 0) && (q[0].due <= cyc);
  assign rsp       = (q.size() != 0) ? q[0].r : '0;

  initial begin
    cyc = 0; n_line_rd = 0; n_word_rd = 0; n_word_wr = 0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (rsp_valid && rsp_ready) void'(q.pop_front());
      if (req_valid && req_ready) begin
        pend_t p;
        p.due = cyc + LAT;
        p.r   = '0;
        p.r.addr = req.addr;
        p.r.id   = req.id;
        unique case (req.op)
          LO_LINE_RD: begin
            p.r.is_line = 1'b1;
            for (int w = 0; w < LINE_WORDS; w++)
              p.r.data[w*DATA_W +: DATA_W] = rd({req.addr[31:OFFS_W], OFFS_W'(w*4)});
            q.push_back(p);
            n_line_rd++;
          end
          LO_WORD_RD: begin
            p.r.is_line = 1'b0;
            p.r.data[DATA_W-1:0] = rd(req.addr);
            q.push_back(p);
            n_word_rd++;
          end
          default: begin
            mem[req.addr] = req.wdata;
            n_word_wr++;
          end
        endcase
      end
    end
  end
endmodule
