// hmp_pkg: types and constants shared by the heterogeneous multicore
// platform (processing element, address generation unit, SIMD-1D and
// MIMD-2D accelerator cores, control unit, bus bridge).
//
// The 16-bit fixed-point data word and the operation set of the processing
// element (add, subtract, multiply, accumulate, multiply-accumulate, compare,
// absolute difference) follow the document. The tag bits carried beside each
// data word (valid/first/last), the opcode encoding, the configuration word
// layouts and the host address map are choices of this design.
package hmp_pkg;

  // ---------------------------------------------------------------- data
  localparam int unsigned DW = 16;  // PE data width (16-bit fixed point)

  typedef logic signed [DW-1:0] data_t;

  // A data word travelling through the array with its stream tags.
  // valid: the word carries data; first/last: first and last element of a
  // window (used to clear and to retire accumulations).
  typedef struct packed {
    logic  valid;
    logic  first;
    logic  last;
    data_t data;
  } word_t;

  localparam word_t WORD_IDLE = '{valid: 1'b0, first: 1'b0, last: 1'b0, data: '0};

  // ------------------------------------------------------- PE operations
  typedef enum logic [2:0] {
    OP_NOP = 3'd0,  // output register holds invalid words
    OP_ADD = 3'd1,  // a + b                 (1 cycle)
    OP_SUB = 3'd2,  // a - b                 (1 cycle)
    OP_MUL = 3'd3,  // a * b                 (1 cycle)
    OP_ACC = 3'd4,  // acc += a              (2 cycles)
    OP_MAC = 3'd5,  // acc += a * b          (2 cycles, pipelined)
    OP_CMP = 3'd6,  // (a < b) ? 1 : 0       (1 cycle)
    OP_AD  = 3'd7   // |a - b|               (1 cycle)
  } pe_op_e;

  // Source of PE output B (the "switch" of the PE).
  typedef enum logic [1:0] {
    SWB_RESULT = 2'd0,  // same word as output A
    SWB_PASS_A = 2'd1,  // selected input A, registered
    SWB_PASS_B = 2'd2,  // selected input B, registered
    SWB_MUL    = 2'd3   // multiplier product, registered
  } pe_swb_e;

  localparam int unsigned SELW = 4;  // width of a PE input-mux select

  // Configuration of one PE (one context). Fits in one 32-bit host word:
  // [2:0] op, [6:3] sel_a, [10:7] sel_b, [12:11] swb.
  typedef struct packed {
    pe_swb_e         swb;
    logic [SELW-1:0] sel_b;
    logic [SELW-1:0] sel_a;
    pe_op_e          op;
  } pe_cfg_t;

  // ------------------------------------------------------------- AGU
  localparam int unsigned AW = 12;  // address width of AGU arithmetic

  // Two-dimensional address walk:
  //   addr = base + y*stride_y + x,  x = 0..len_x-1 (inner), y = 0..len_y-1
  typedef struct packed {
    logic [AW-1:0] stride_y;
    logic [7:0]    len_y;
    logic [7:0]    len_x;
    logic [AW-1:0] base;
  } agu_cfg_t;

  // ------------------------------------------------------- host bus
  // Simple word-addressed request/response bus used inside the platform.
  // A read returns its data on rsp.rdata one cycle after the request, with
  // rsp.rvalid high.
  localparam int unsigned HAW = 21;  // platform word-address width

  typedef struct packed {
    logic           req;
    logic           we;
    logic [HAW-1:0] addr;
    logic [31:0]    wdata;
  } host_req_t;

  typedef struct packed {
    logic        rvalid;
    logic [31:0] rdata;
  } host_rsp_t;

  // Core-local word address map (17 bits):
  //   [16:15] region, [14:10] index, [9:0] offset
  localparam logic [1:0] RGN_MEM   = 2'd0;  // one memory, 16-bit word
  localparam logic [1:0] RGN_PACK4 = 2'd1;  // four memories, one byte each
  localparam logic [1:0] RGN_CFG   = 2'd2;  // configuration / contexts
  localparam logic [1:0] RGN_STAT  = 2'd3;  // status

  // Platform address: [20:17] slave select, [16:0] core-local address.
  localparam int unsigned SLV_CTRL = 0;  // control unit; cores follow at 1..

  // absolute value of a 16-bit difference (wraps like the hardware)
  function automatic data_t absdiff(data_t a, data_t b);
    data_t d;
    d = a - b;
    return (d < 0) ? -d : d;
  endfunction

endpackage
