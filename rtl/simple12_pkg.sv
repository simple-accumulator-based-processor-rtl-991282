// simple12_pkg -- types and constants shared by the Simple12 processor.
//
// Simple12 is a 12-bit accumulator machine with an 8-bit address space.
// Every instruction is one 12-bit word: a 4-bit opcode in bits 11:8 and an
// 8-bit operand address in bits 7:0. This package holds the opcode values,
// the 4-bit ALU control code (b-invert, carry-in, two function bits), the
// b-multiplexer and a-gate selects, the condition-select codes of the
// microsequencer and the 23-bit microinstruction layout. All of these
// values, field orders and widths follow the processor description; the
// grouping of the datapath controls into the dp_ctl_t bundle is this
// design's own.
package simple12_pkg;

  localparam int DATA_W  = 12;  // accumulator, MDR, memory word
  localparam int ADDR_W  = 8;   // PC, MAR, memory address
  localparam int OPC_W   = 4;   // opcode field, IR
  localparam int UADDR_W = 6;   // control-store address (Q register)

  typedef logic [DATA_W-1:0]  word_t;
  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [UADDR_W-1:0] uaddr_t;

  // Instruction opcodes (bits 11:8 of an instruction word).
  typedef enum logic [OPC_W-1:0] {
    OP_JMP   = 4'b0000,
    OP_JN    = 4'b0001,
    OP_JZ    = 4'b0010,
    OP_LOAD  = 4'b0100,
    OP_STORE = 4'b0101,
    OP_AND   = 4'b1000,
    OP_OR    = 4'b1001,
    OP_ADD   = 4'b1010,
    OP_SUB   = 4'b1011
  } opcode_e;

  // ALU function bits (op1, op0).
  typedef enum logic [1:0] {
    FN_AND = 2'b00,
    FN_OR  = 2'b01,
    FN_ADD = 2'b10
  } alu_fn_e;

  // ALU control: b-invert, carry-in, function.
  typedef struct packed {
    logic    binv;
    logic    cin;
    alu_fn_e fn;
  } alu_ctl_t;

  localparam alu_ctl_t ALU_AND  = '{binv: 1'b0, cin: 1'b0, fn: FN_AND};  // 0000
  localparam alu_ctl_t ALU_OR   = '{binv: 1'b0, cin: 1'b0, fn: FN_OR};   // 0001
  localparam alu_ctl_t ALU_ADD  = '{binv: 1'b0, cin: 1'b0, fn: FN_ADD};  // 0010
  localparam alu_ctl_t ALU_INC  = '{binv: 1'b0, cin: 1'b1, fn: FN_ADD};  // 0110
  localparam alu_ctl_t ALU_SUB  = '{binv: 1'b1, cin: 1'b1, fn: FN_ADD};  // 1110

  // b input of the ALU.
  typedef enum logic [1:0] {
    BSEL_ZERO = 2'b00,
    BSEL_MDR  = 2'b10,
    BSEL_PC   = 2'b11
  } bsel_e;

  // Condition that decides whether the Q register loads a new address
  // (condition true) or increments (condition false).
  typedef enum logic [2:0] {
    COND_FALSE    = 3'b000,
    COND_TRUE     = 3'b001,
    COND_NOT_NEG  = 3'b010,   // ~A(11)
    COND_NOT_ZERO = 3'b011,   // ~(ALU = 0)
    COND_NOT_START= 3'b100    // ~start
  } cond_e;

  // Datapath control bundle, produced by either control unit.
  typedef struct packed {
    logic     load_a;
    logic     load_pc;
    logic     load_mar;
    logic     load_mdr;
    logic     load_ir;
    alu_ctl_t alu;
    bsel_e    bsel;
    logic     agate;      // 1: a <- A, 0: a <- 0
    logic     mem_read;
    logic     mem_write;
  } dp_ctl_t;

  // Microinstruction word, 23 bits, most significant field first.
  typedef struct packed {
    cond_e    cond_sel;   // 3
    logic     addr_sel;   // 1: 0 = Next Addr, 1 = {1, MemBus(11:8), 0}
    uaddr_t   next_addr;  // 6
    logic     load_a;     // 1
    logic     load_pc;    // 1
    logic     load_mar;   // 1
    logic     load_mdr;   // 1
    alu_ctl_t alu;        // 4
    bsel_e    bsel;       // 2
    logic     agate;      // 1
    logic     rd;         // 1
    logic     wt;         // 1
  } uinstr_t;

  // Fixed control-store addresses.
  localparam uaddr_t UA_STOPPED = 6'b000000;
  localparam uaddr_t UA_IFETCH  = 6'b000001;

  // Dispatch address of the EAGen microinstruction of an opcode: {1, op, 0}.
  // The word after it, {1, op, 1}, is its OpAccess or BTaken step.
  function automatic uaddr_t ua_eagen(input logic [OPC_W-1:0] op);
    return {1'b1, op, 1'b0};
  endfunction

  // Address of the Execute microinstruction of an opcode: {01, op}.
  function automatic uaddr_t ua_execute(input logic [OPC_W-1:0] op);
    return {2'b01, op};
  endfunction

  // Build an instruction word (used by testbenches and examples).
  function automatic word_t instr(input logic [OPC_W-1:0] op, input addr_t a);
    return {op, a};
  endfunction

endpackage
