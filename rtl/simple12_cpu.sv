// simple12_cpu -- the Simple12 processor: datapath plus control unit.
//
// Simple12 executes eight instructions, each one 12-bit word {opcode(4),
// address(8)}: JMP X, JN X (jump if A < 0), JZ X (jump if A = 0), LOAD X,
// STORE X, AND X, OR X, ADD X and SUB X, where X is a memory address and A
// the 12-bit accumulator. The processor talks to a memory through MAR
// (address), A (write data), DataIn (read data), and read/write strobes.
// After reset it sits in the Stopped step; start = 1 clears PC and MAR and
// begins fetching at address 0. There is no halt instruction: a program
// ends by jumping to itself.
//
// Two control units are provided and selected by MICROPROGRAMMED. Both
// issue the same datapath controls in the same cycles (JMP 2, JN/JZ 2 or 3
// when taken, LOAD 4, STORE 3, ALU instructions 4 cycles), so the choice
// changes structure, not behaviour. 1 (default) picks the microprogrammed
// unit, 0 the hardwired state machine. Making the microprogrammed unit the
// default is this design's choice.
module simple12_cpu
  import simple12_pkg::*;
#(
  parameter bit MICROPROGRAMMED = 1'b1
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  // memory interface
  output addr_t mem_addr,
  output logic  mem_read,
  output logic  mem_write,
  output word_t mem_wdata,
  input  word_t mem_rdata,
  // observation
  output addr_t pc,
  output word_t acc,
  output logic  fetch       // high in the first cycle of each instruction
);

  // ir, mdr, alu_r and upc are observation signals of the submodules; the
  // microprogrammed unit does not read IR (it dispatches from DataIn).
  dp_ctl_t ctl;
  logic    neg, alu_zero;
  logic [OPC_W-1:0] ir;
  word_t   mdr, alu_r;

  simple12_datapath u_dp (
    .clk       (clk),
    .rst       (rst),
    .ctl       (ctl),
    .mem_rdata (mem_rdata),
    .mem_addr  (mem_addr),
    .mem_wdata (mem_wdata),
    .neg       (neg),
    .alu_zero  (alu_zero),
    .pc        (pc),
    .acc       (acc),
    .ir        (ir),
    .mdr       (mdr),
    .alu_r     (alu_r)
  );

  if (MICROPROGRAMMED) begin : g_micro
    uaddr_t upc;
    simple12_micro_control u_ctrl (
      .clk       (clk),
      .rst       (rst),
      .start     (start),
      .mem_rdata (mem_rdata),
      .neg       (neg),
      .alu_zero  (alu_zero),
      .ctl       (ctl),
      .fetch     (fetch),
      .upc       (upc)
    );
  end else begin : g_hardwired
    simple12_hardwired_control u_ctrl (
      .clk      (clk),
      .rst      (rst),
      .start    (start),
      .ir       (ir),
      .neg      (neg),
      .alu_zero (alu_zero),
      .ctl      (ctl),
      .fetch    (fetch)
    );
  end

  assign mem_read  = ctl.mem_read;
  assign mem_write = ctl.mem_write;

endmodule
