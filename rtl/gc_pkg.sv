// gc_pkg: types and constants shared by the garbled-circuit evaluation unit.
//
// A garbled value is 128 bits: a t = 127-bit key in bits [127:1] and the
// permutation bit in bit [0] (the width follows the design; the bit order is
// this design's choice). An instruction is 32 bits: a 5-bit opcode in
// [31:27] and a 27-bit memory address in [26:0]. There are 18 opcodes; their
// numeric values are this design's own choice. Memory is addressed in
// 128-bit words; the program is packed four instructions per word, the
// instruction with the lower index in the lower 32 bits.
package gc_pkg;

  localparam int unsigned KEY_W   = 127;           // symmetric security parameter t
  localparam int unsigned GV_W    = KEY_W + 1;     // garbled value: key + permutation bit
  localparam int unsigned ADDR_W  = 27;            // address field of an instruction
  localparam int unsigned OPC_W   = 5;             // opcode field of an instruction
  localparam int unsigned INSTR_W = OPC_W + ADDR_W;

  typedef logic [GV_W-1:0]   gv_t;
  typedef logic [ADDR_W-1:0] addr_t;

  typedef enum logic [OPC_W-1:0] {
    OP_LOAD_A  = 5'd0,
    OP_LOAD_B  = 5'd1,
    OP_STORE_A = 5'd2,
    OP_STORE_B = 5'd3,
    OP_STORE_C = 5'd4,
    OP_XOR_A   = 5'd5,
    OP_XOR_B   = 5'd6,
    OP_XOR_C   = 5'd7,
    OP_XOR_AB  = 5'd8,
    OP_XOR_AC  = 5'd9,
    OP_XOR_BC  = 5'd10,
    OP_EVAL_A  = 5'd11,
    OP_EVAL_B  = 5'd12,
    OP_EVAL_C  = 5'd13,
    OP_EVAL_AB = 5'd14,
    OP_EVAL_AC = 5'd15,
    OP_EVAL_BC = 5'd16,
    OP_OUT     = 5'd17
  } opcode_e;

  typedef struct packed {
    opcode_e op;
    addr_t   addr;
  } instr_t;

  // Memory port, 128-bit words. A requester raises req with we, addr and
  // wdata and holds them unchanged until ack is high for one cycle; rdata is
  // valid in that cycle for a read.
  typedef struct packed {
    logic  req;
    logic  we;
    addr_t addr;
    gv_t   wdata;
  } mem_req_t;

  typedef struct packed {
    logic ack;
    gv_t  rdata;
  } mem_rsp_t;

  // Register-file operations issued by the controller.
  typedef enum logic [3:0] {
    RO_NONE,
    RO_LOAD_A,   // A <- mem
    RO_LOAD_B,   // B <- mem
    RO_XOR_A,    // A <- A ^ mem
    RO_XOR_B,    // B <- B ^ mem
    RO_XOR_C,    // C <- C ^ mem
    RO_XOR_AB,   // A <- A ^ B
    RO_XOR_AC,   // A <- A ^ C
    RO_XOR_BC,   // B <- B ^ C
    RO_WRITE_C   // C <- result of the Eval Gate
  } reg_op_e;

  // Register selector for the "(1 or 2) of 3" multiplexer and for stores.
  typedef enum logic [1:0] {
    SEL_A = 2'd0,
    SEL_B = 2'd1,
    SEL_C = 2'd2
  } reg_sel_e;

  // SHA-256 padding of a single-block message of len bits (len <= 447).
  function automatic logic [511:0] sha256_pad(input logic [511:0] msg_left, input int unsigned len);
    logic [511:0] blk;
    blk = msg_left;
    blk[511 - len] = 1'b1;
    blk[63:0] = 64'(len);
    return blk;
  endfunction

  // Row of a garbled table selected by the permutation bits of the gate's
  // garbled inputs: {pi_a, pi_b} for two inputs, pi_a for one input. Row 0 is
  // not stored (its entry is all zeros), rows 1..3 are stored at consecutive
  // addresses starting at the table address.
  function automatic logic [1:0] gc_row(input logic pi1, input logic pi2, input logic two_in);
    return two_in ? {pi1, pi2} : {1'b0, pi1};
  endfunction

  // Single-block message hashed for a non-XOR gate: in1 || in2 || gate id,
  // 288 bits, padded. in2 is zero for a one-input gate; the gate id is the
  // 27-bit table address, zero-extended to 32 bits.
  localparam int unsigned GATE_MSG_LEN = 2*GV_W + 32;
  function automatic logic [511:0] gate_block(input gv_t in1, input gv_t in2, input addr_t id);
    return sha256_pad({in1, in2, 32'(id), 224'b0}, GATE_MSG_LEN);
  endfunction

  // Single-block message hashed by UNMASK: garbled output || r, 255 bits.
  localparam int unsigned UNMASK_MSG_LEN = GV_W + KEY_W;
  function automatic logic [511:0] unmask_block(input gv_t z, input logic [KEY_W-1:0] r);
    return sha256_pad({z, r, 257'b0}, UNMASK_MSG_LEN);
  endfunction

endpackage
