// simple12_control_store -- microprogram ROM of the microprogrammed
// Simple12 control unit.
//
// 64 words of 23 bits (uinstr_t), read combinationally: the word at addr
// appears on data in the same cycle. Each word holds a condition select, an
// address select, a 6-bit next address and the datapath controls (load A,
// PC, MAR, MDR; 4-bit ALU code; b-mux; a-gate; memory read and write).
//
// Layout of the microprogram:
//   000000          Stopped: PC, MAR <= 0; stay here while ~start
//   000001          IFetch: MDR <= M[MAR], PC, MAR <= PC+1,
//                   dispatch to {1, DataIn(11:8), 0}
//   {1,op,0}        EAGen of opcode op
//   {1,op,1}        BTaken (JN, JZ) or OpAccess (LOAD, STORE, ALU ops)
//   {01,op}         Execute of LOAD, AND, OR, ADD, SUB
// JN's EAGen tests ~A(11) and JZ's tests ~(ALU=0) with A passed through the
// ALU: when the test holds the sequencer loads the next-address field
// (IFetch, branch not taken), otherwise it steps to the BTaken word.
//
// The word format, the addresses of Stopped, IFetch, the EAGen words, the
// JN BTaken word and the ADD Execute word, and the field values of the
// sample words follow the processor description; the remaining words are
// filled in the same pattern. The OpAccess words also load MAR with PC (as
// the state-machine version of the control does) so that the next fetch
// reads the next instruction. Words for reserved opcodes send the machine
// back to IFetch (a no-operation); unused words go to Stopped. These are
// this design's choices. The ROM contents are computed by a function, not
// read from a file.
module simple12_control_store
  import simple12_pkg::*;
(
  input  uaddr_t  addr,
  output uinstr_t data
);

  // Word that only moves the sequencer: no register loads.
  function automatic uinstr_t u_goto(input cond_e c, input uaddr_t nxt);
    uinstr_t u;
    u           = '0;
    u.cond_sel  = c;
    u.next_addr = nxt;
    u.alu       = ALU_ADD;
    u.bsel      = BSEL_ZERO;
    return u;
  endfunction

  function automatic uinstr_t rom_word(input uaddr_t a);
    uinstr_t u;
    logic [OPC_W-1:0] op;
    u = u_goto(COND_TRUE, UA_STOPPED);
    if (a == UA_STOPPED) begin
      u = u_goto(COND_NOT_START, UA_STOPPED);
      u.load_pc  = 1'b1;
      u.load_mar = 1'b1;                      // PC, MAR <= 0 + 0
    end else if (a == UA_IFETCH) begin
      u = u_goto(COND_TRUE, '0);
      u.addr_sel = 1'b1;                      // {1, MemBus(11:8), 0}
      u.load_pc  = 1'b1;
      u.load_mar = 1'b1;
      u.load_mdr = 1'b1;
      u.alu      = ALU_INC;
      u.bsel     = BSEL_PC;                   // PC, MAR <= 0 + PC + 1
      u.rd       = 1'b1;
    end else if (a[5]) begin
      op = a[4:1];
      if (!a[0]) begin
        // EAGen
        unique case (op)
          OP_JMP: begin
            u = u_goto(COND_TRUE, UA_IFETCH);
            u.load_pc  = 1'b1;
            u.load_mar = 1'b1;
            u.bsel     = BSEL_MDR;            // MAR <= PC <= MDR(7:0)
          end
          OP_JN: u = u_goto(COND_NOT_NEG, UA_IFETCH);
          OP_JZ: begin
            u = u_goto(COND_NOT_ZERO, UA_IFETCH);
            u.agate = 1'b1;                   // R = A + 0
          end
          OP_LOAD, OP_STORE, OP_AND, OP_OR, OP_ADD, OP_SUB: begin
            u = u_goto(COND_FALSE, '0);       // step to {1, op, 1}
            u.load_mar = 1'b1;
            u.bsel     = BSEL_MDR;            // MAR <= MDR(7:0)
          end
          default: u = u_goto(COND_TRUE, UA_IFETCH);
        endcase
      end else begin
        // BTaken / OpAccess
        unique case (op)
          OP_JN, OP_JZ: begin
            u = u_goto(COND_TRUE, UA_IFETCH);
            u.load_pc  = 1'b1;
            u.load_mar = 1'b1;
            u.bsel     = BSEL_MDR;            // MAR <= PC <= MDR(7:0)
          end
          OP_STORE: begin
            u = u_goto(COND_TRUE, UA_IFETCH);
            u.load_mar = 1'b1;
            u.bsel     = BSEL_PC;             // MAR <= PC
            u.wt       = 1'b1;                // M(MAR) <= A
          end
          OP_LOAD, OP_AND, OP_OR, OP_ADD, OP_SUB: begin
            u = u_goto(COND_TRUE, ua_execute(op));
            u.load_mar = 1'b1;
            u.bsel     = BSEL_PC;             // MAR <= PC
            u.load_mdr = 1'b1;
            u.rd       = 1'b1;                // MDR <= M(MAR)
          end
          default: ;
        endcase
      end
    end else if (a[5:4] == 2'b01) begin
      // Execute
      op = a[3:0];
      unique case (op)
        OP_LOAD, OP_AND, OP_OR, OP_ADD, OP_SUB: begin
          u = u_goto(COND_TRUE, UA_IFETCH);
          u.load_a = 1'b1;
          u.bsel   = BSEL_MDR;
          u.agate  = (op != OP_LOAD);
          unique case (op)
            OP_AND:  u.alu = ALU_AND;
            OP_OR:   u.alu = ALU_OR;
            OP_SUB:  u.alu = ALU_SUB;
            default: u.alu = ALU_ADD;
          endcase
        end
        default: ;
      endcase
    end
    return u;
  endfunction

  always_comb data = rom_word(addr);

endmodule
