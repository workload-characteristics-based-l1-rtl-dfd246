// adml1d_pkg: types and constants shared by the SM memory stage with the
// AdmL1D L1 data cache switch-off mechanism.
//
// Requests from the load/store unit are word (32-bit) accesses with a byte
// address and a tag (ID) that comes back with the load data. Below the L1D a
// single request channel carries three kinds of operation to the lower-level
// memory: a 128-byte line read (L1D miss), a word read and a word write
// (bypassed accesses and write-through stores). Responses carry either a whole
// line (a fill for the L1D) or a word (for a bypassed load).
// The 128-byte line follows the L1D configuration this design targets; the
// 32-bit word, the 8-bit request ID and the 32-bit address are design choices.
package adml1d_pkg;

  localparam int unsigned ADDR_W     = 32;
  localparam int unsigned DATA_W     = 32;
  localparam int unsigned ID_W       = 8;
  localparam int unsigned LINE_BYTES = 128;
  localparam int unsigned LINE_W     = LINE_BYTES * 8;
  localparam int unsigned LINE_WORDS = LINE_W / DATA_W;
  localparam int unsigned OFFS_W     = $clog2(LINE_BYTES);

  // Memory request from the LSU (word access).
  typedef struct packed {
    logic [ADDR_W-1:0] addr;   // byte address, word aligned
    logic              we;     // 1: store, 0: load
    logic [DATA_W-1:0] wdata;  // store data
    logic [ID_W-1:0]   id;     // returned with the load data
  } mem_req_t;

  // Load response towards writeback.
  typedef struct packed {
    logic [ID_W-1:0]   id;
    logic [DATA_W-1:0] rdata;
  } mem_rsp_t;

  typedef enum logic [1:0] {
    LO_LINE_RD = 2'd0,   // fetch a whole line for the L1D
    LO_WORD_RD = 2'd1,   // bypassed load
    LO_WORD_WR = 2'd2    // store (write-through or bypassed)
  } lo_op_e;

  // Request towards the interconnection network / lower-level memory.
  typedef struct packed {
    lo_op_e            op;
    logic [ADDR_W-1:0] addr;   // line address (LO_LINE_RD) or word address
    logic [DATA_W-1:0] wdata;
    logic [ID_W-1:0]   id;
  } lo_req_t;

  // Response from the lower-level memory.
  typedef struct packed {
    logic              is_line;  // 1: line fill for the L1D, 0: word for the LSU
    logic [ADDR_W-1:0] addr;
    logic [ID_W-1:0]   id;
    logic [LINE_W-1:0] data;     // word responses use data[DATA_W-1:0]
  } lo_rsp_t;

endpackage
