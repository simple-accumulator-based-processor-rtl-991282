// simple12_hardwired_control -- finite-state control unit of Simple12.
//
// Six states. Stopped waits for start and then clears PC and MAR. IFetch
// reads the instruction at MAR into MDR and IR and sets PC and MAR to PC+1.
// EAGen decodes IR: JMP copies the address field MDR[7:0] into PC and MAR
// and returns to IFetch; JN and JZ test the condition (JZ passes A through
// the ALU to obtain its zero flag) and go to BTaken when the branch is
// taken, otherwise back to IFetch; LOAD, STORE and the ALU instructions
// copy MDR[7:0] into MAR and go to OpAccess. BTaken loads PC and MAR with
// MDR[7:0]. OpAccess reads the operand into MDR (LOAD and ALU
// instructions, then Execute) or writes A to memory (STORE, then IFetch),
// and in both cases points MAR back at PC for the next fetch. Execute
// loads A with MDR, A and MDR, A or MDR, A + MDR or A - MDR.
//
// Cycles per instruction: JMP 2, JN/JZ 2 not taken and 3 taken, LOAD 4,
// STORE 3, AND/OR/ADD/SUB 4.
//
// Outputs are a Mealy function of state, IR, start and the status bits
// (Stopped drives its PC/MAR clear only when start is high). The states,
// their register transfers and the cycle counts follow the processor
// description. Reserved opcodes (0011, 0110, 0111, 11xx) behave as
// two-cycle no-operations: this is this design's choice. Reset is
// synchronous and active high and enters Stopped.
module simple12_hardwired_control
  import simple12_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [OPC_W-1:0] ir,
  input  logic             neg,       // A(11)
  input  logic             alu_zero,
  output dp_ctl_t          ctl,
  output logic             fetch      // high in the IFetch cycle
);

  typedef enum logic [2:0] {
    S_STOPPED  = 3'd0,
    S_IFETCH   = 3'd1,
    S_EAGEN    = 3'd2,
    S_BTAKEN   = 3'd3,
    S_OPACCESS = 3'd4,
    S_EXECUTE  = 3'd5
  } state_e;

  state_e state, state_n;

  always_ff @(posedge clk) begin
    if (rst) state <= S_STOPPED;
    else     state <= state_n;
  end

  always_comb begin
    ctl     = '0;
    ctl.alu = ALU_ADD;
    ctl.bsel = BSEL_ZERO;
    state_n = state;
    unique case (state)
      S_STOPPED: begin
        if (start) begin
          // PC <= 0, MAR <= 0
          ctl.load_pc  = 1'b1;
          ctl.load_mar = 1'b1;
          state_n = S_IFETCH;
        end
      end
      S_IFETCH: begin
        // read M[MAR]; MDR, IR <= DataIn; PC, MAR <= PC + 1
        ctl.mem_read = 1'b1;
        ctl.load_mdr = 1'b1;
        ctl.load_ir  = 1'b1;
        ctl.load_pc  = 1'b1;
        ctl.load_mar = 1'b1;
        ctl.alu      = ALU_INC;
        ctl.bsel     = BSEL_PC;
        state_n = S_EAGEN;
      end
      S_EAGEN: begin
        unique case (ir)
          OP_JMP: begin
            ctl.load_pc  = 1'b1;
            ctl.load_mar = 1'b1;
            ctl.bsel     = BSEL_MDR;
            state_n = S_IFETCH;
          end
          OP_JN: begin
            state_n = neg ? S_BTAKEN : S_IFETCH;
          end
          OP_JZ: begin
            ctl.agate = 1'b1;       // R = A + 0, zero flag = (A == 0)
            state_n = alu_zero ? S_BTAKEN : S_IFETCH;
          end
          OP_LOAD, OP_STORE, OP_AND, OP_OR, OP_ADD, OP_SUB: begin
            ctl.load_mar = 1'b1;    // MAR <= MDR(7:0)
            ctl.bsel     = BSEL_MDR;
            state_n = S_OPACCESS;
          end
          default: state_n = S_IFETCH;
        endcase
      end
      S_BTAKEN: begin
        ctl.load_pc  = 1'b1;        // MAR <= PC <= MDR(7:0)
        ctl.load_mar = 1'b1;
        ctl.bsel     = BSEL_MDR;
        state_n = S_IFETCH;
      end
      S_OPACCESS: begin
        ctl.load_mar = 1'b1;        // MAR <= PC
        ctl.bsel     = BSEL_PC;
        if (ir == OP_STORE) begin
          ctl.mem_write = 1'b1;     // M(MAR) <= A
          state_n = S_IFETCH;
        end else begin
          ctl.mem_read = 1'b1;      // MDR <= M(MAR)
          ctl.load_mdr = 1'b1;
          state_n = S_EXECUTE;
        end
      end
      S_EXECUTE: begin
        ctl.load_a = 1'b1;
        ctl.bsel   = BSEL_MDR;
        ctl.agate  = (ir != OP_LOAD);
        unique case (ir)
          OP_AND:  ctl.alu = ALU_AND;
          OP_OR:   ctl.alu = ALU_OR;
          OP_SUB:  ctl.alu = ALU_SUB;
          default: ctl.alu = ALU_ADD;   // LOAD (0 + MDR) and ADD
        endcase
        state_n = S_IFETCH;
      end
      default: state_n = S_STOPPED;
    endcase
  end

  assign fetch = (state == S_IFETCH);

endmodule
