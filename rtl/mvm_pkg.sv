// mvm_pkg: types and constants shared by the analog MVM coprocessor.
//
// The coprocessor is driven over a RoCC-style command port (Rocket Custom
// Coprocessor conventions): a 32-bit custom instruction plus the two source
// register values. Five instructions exist: mvm.set, mvm.l, mvm, mvm.s and
// mvm.mv. In every one of them rs1 names the compute array and rs2 gives the
// start address of the memory access (for mvm.mv, which touches no memory,
// rs2 names the destination array). The funct7 codes below are this design's
// own numbering; only the mnemonics come from the architecture. The core routes
// the instructions here (the RoCC custom-0 opcode in the testbenches); the
// coprocessor decodes funct7 only.
//
// Data words are IEEE-754 binary64 values: the architecture gives the arrays
// a floating-point interface, and the width of that format is a choice made
// here. The coprocessor has its own memory port; every request on it gets
// exactly one response, in order (a store's response is its acknowledgement).
package mvm_pkg;

  localparam int unsigned XLEN   = 64;  // width of rs1/rs2 and of addresses
  localparam int unsigned DATA_W = 64;  // one floating-point word
  localparam int unsigned WORD_BYTES = DATA_W / 8;

  typedef enum logic [6:0] {
    FN_MVM_SET  = 7'd0,  // program the array's matrix from memory at rs2
    FN_MVM_LOAD = 7'd1,  // mvm.l: load the operand vector into the input buffer
    FN_MVM      = 7'd2,  // multiply: input buffer -> array -> output buffer
    FN_MVM_STORE= 7'd3,  // mvm.s: store the output buffer to memory at rs2
    FN_MVM_MOVE = 7'd4   // mvm.mv: output buffer of rs1 -> input buffer of rs2
  } mvm_funct_e;

  // Completion status returned when the instruction asks for a result (xd).
  typedef enum logic [1:0] {
    ST_OK        = 2'd0,
    ST_BAD_ARRAY = 2'd1,  // rs1 (or rs2 for mvm.mv) names no array
    ST_BAD_FUNCT = 2'd2   // funct7 is none of the five instructions
  } mvm_status_e;

  // RoCC instruction layout (R-type with xd/xs1/xs2 flags in funct3).
  typedef struct packed {
    logic [6:0] funct7;
    logic [4:0] rs2;
    logic [4:0] rs1;
    logic       xd;
    logic       xs1;
    logic       xs2;
    logic [4:0] rd;
    logic [6:0] opcode;
  } rocc_inst_t;

  typedef struct packed {
    rocc_inst_t      inst;
    logic [XLEN-1:0] rs1;
    logic [XLEN-1:0] rs2;
  } rocc_cmd_t;

  typedef struct packed {
    logic [4:0]      rd;
    logic [XLEN-1:0] data;
  } rocc_resp_t;

  // Coprocessor memory port.
  typedef struct packed {
    logic [XLEN-1:0]   addr;   // byte address, word aligned
    logic              we;     // 1 = store, 0 = load
    logic [DATA_W-1:0] wdata;
  } mem_req_t;

  typedef struct packed {
    logic [DATA_W-1:0] rdata;  // load data; don't care for a store
  } mem_resp_t;

endpackage
