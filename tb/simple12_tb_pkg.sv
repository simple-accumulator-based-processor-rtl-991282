// simple12_tb_pkg -- reference models used by the Simple12 testbenches.
//
// iss_step() is an instruction-level model of the Simple12 instruction set:
// it executes one instruction on a memory image and returns the number of
// clock cycles the instruction should take (JMP 2, JN/JZ 2 or 3 when taken,
// LOAD 4, STORE 3, AND/OR/ADD/SUB 4; reserved opcodes 2). exp_ctl() gives
// the datapath controls a control unit must issue in a given step of an
// instruction, written out from the register transfers of each step, not
// from the RTL. Both are written independently of the design's modules.
package simple12_tb_pkg;
  import simple12_pkg::*;

  typedef struct {
    addr_t pc;
    word_t a;
    word_t mem [256];
  } iss_t;

  // Execute one instruction; returns its expected cycle count.
  function automatic int iss_step(ref iss_t s);
    word_t w;
    logic [3:0] op;
    addr_t x;
    w  = s.mem[s.pc];
    op = w[11:8];
    x  = w[7:0];
    s.pc = s.pc + 8'd1;
    case (op)
      4'b0000: begin s.pc = x; return 2; end
      4'b0001: if (s.a[11])     begin s.pc = x; return 3; end else return 2;
      4'b0010: if (s.a == 12'd0) begin s.pc = x; return 3; end else return 2;
      4'b0100: begin s.a = s.mem[x];          return 4; end
      4'b0101: begin s.mem[x] = s.a;          return 3; end
      4'b1000: begin s.a = s.a & s.mem[x];    return 4; end
      4'b1001: begin s.a = s.a | s.mem[x];    return 4; end
      4'b1010: begin s.a = s.a + s.mem[x];    return 4; end
      4'b1011: begin s.a = s.a - s.mem[x];    return 4; end
      default: return 2;
    endcase
  endfunction

  // One control word, built field by field.
  function automatic dp_ctl_t mk(input bit la, lpc, lmar, lmdr, lir,
                                 input logic [3:0] alu, input logic [1:0] bsel,
                                 input bit ag, rd, wt);
    dp_ctl_t c;
    c.load_a    = la;
    c.load_pc   = lpc;
    c.load_mar  = lmar;
    c.load_mdr  = lmdr;
    c.load_ir   = lir;
    c.alu       = alu_ctl_t'(alu);
    c.bsel      = bsel_e'(bsel);
    c.agate     = ag;
    c.mem_read  = rd;
    c.mem_write = wt;
    return c;
  endfunction

  // Expected control in step k (0 = IFetch) of an instruction with opcode
  // op, given the accumulator's sign and zero state in that cycle.
  //                         LA LPC LMAR LMDR LIR  ALU     bMUX  aG Rd Wt
  function automatic dp_ctl_t exp_ctl(input logic [3:0] op, input int k,
                                      input bit neg, input bit zero);
    if (k == 0) return mk(0, 1, 1, 1, 1, 4'b0110, 2'b11, 0, 1, 0); // PC+1, read instr
    if (k == 1) begin                                              // EAGen
      case (op)
        4'b0000:          return mk(0, 1, 1, 0, 0, 4'b0010, 2'b10, 0, 0, 0);
        4'b0010:          return mk(0, 0, 0, 0, 0, 4'b0010, 2'b00, 1, 0, 0);
        4'b0100, 4'b0101,
        4'b1000, 4'b1001,
        4'b1010, 4'b1011: return mk(0, 0, 1, 0, 0, 4'b0010, 2'b10, 0, 0, 0);
        default:          return mk(0, 0, 0, 0, 0, 4'b0010, 2'b00, 0, 0, 0);
      endcase
    end
    if (k == 2) begin
      case (op)
        4'b0001, 4'b0010: return mk(0, 1, 1, 0, 0, 4'b0010, 2'b10, 0, 0, 0); // BTaken
        4'b0101:          return mk(0, 0, 1, 0, 0, 4'b0010, 2'b11, 0, 0, 1); // write
        default:          return mk(0, 0, 1, 1, 0, 4'b0010, 2'b11, 0, 1, 0); // read operand
      endcase
    end
    // k == 3: Execute
    case (op)
      4'b0100: return mk(1, 0, 0, 0, 0, 4'b0010, 2'b10, 0, 0, 0);
      4'b1000: return mk(1, 0, 0, 0, 0, 4'b0000, 2'b10, 1, 0, 0);
      4'b1001: return mk(1, 0, 0, 0, 0, 4'b0001, 2'b10, 1, 0, 0);
      4'b1010: return mk(1, 0, 0, 0, 0, 4'b0010, 2'b10, 1, 0, 0);
      default: return mk(1, 0, 0, 0, 0, 4'b1110, 2'b10, 1, 0, 0);
    endcase
  endfunction

  // Number of cycles of an instruction given whether its branch is taken.
  function automatic int exp_cycles(input logic [3:0] op, input bit taken);
    case (op)
      4'b0000: return 2;
      4'b0001, 4'b0010: return taken ? 3 : 2;
      4'b0100, 4'b1000, 4'b1001, 4'b1010, 4'b1011: return 4;
      4'b0101: return 3;
      default: return 2;
    endcase
  endfunction

  typedef word_t image_t [256];

  // Example program 1: Z = max(X, Y). X at 30h, Y at 31h, Z at 32h.
  // Ends in a jump-to-self at 08h.
  localparam addr_t MAX_HALT = 8'h08;
  function automatic image_t prog_max(input word_t x, input word_t y);
    image_t m;
    m = '{default: 12'h000};
    m[8'h00] = 12'h430;  //     LOAD X
    m[8'h01] = 12'hB31;  //     SUB  Y
    m[8'h02] = 12'h106;  //     JN   B1
    m[8'h03] = 12'h430;  //     LOAD X
    m[8'h04] = 12'h007;  //     JMP  SAVE
    m[8'h06] = 12'h431;  // B1: LOAD Y
    m[8'h07] = 12'h532;  // SAVE: STORE Z
    m[8'h08] = 12'h008;  //     JMP  self
    m[8'h30] = x;
    m[8'h31] = y;
    return m;
  endfunction

  // Example program 2: for each element of a zero-terminated array at
  // 10h.., replace it with 1 if (element & Mask) != 0, else 0. The loop
  // walks the array by adding One to the address fields of its own LOAD
  // (L1) and STORE (L2) instructions. Zero at 30h, One at 31h, Mask at 32h.
  localparam addr_t ARR_HALT = 8'h0F;
  localparam addr_t ARR_BASE = 8'h10;
  function automatic image_t prog_array(input word_t vals [], input word_t mask);
    image_t m;
    m = '{default: 12'h000};
    m[8'h00] = 12'h410;  // L1: LOAD A0
    m[8'h01] = 12'h20F;  //     JZ   Done
    m[8'h02] = 12'h832;  //     AND  Mask
    m[8'h03] = 12'h206;  //     JZ   B1
    m[8'h04] = 12'h431;  //     LOAD One
    m[8'h05] = 12'h007;  //     JMP  L2
    m[8'h06] = 12'h430;  // B1: LOAD Zero
    m[8'h07] = 12'h510;  // L2: STORE A0
    m[8'h08] = 12'h400;  //     LOAD L1
    m[8'h09] = 12'hA31;  //     ADD  One
    m[8'h0A] = 12'h500;  //     STORE L1
    m[8'h0B] = 12'h407;  //     LOAD L2
    m[8'h0C] = 12'hA31;  //     ADD  One
    m[8'h0D] = 12'h507;  //     STORE L2
    m[8'h0E] = 12'h000;  //     JMP  L1
    m[8'h0F] = 12'h00F;  // Done: JMP Done
    foreach (vals[i]) m[ARR_BASE + 8'(i)] = vals[i];
    m[8'h30] = 12'd0;
    m[8'h31] = 12'd1;
    m[8'h32] = mask;
    return m;
  endfunction

  // Example program 3: ((P or Q) + R) - S stored to T, then JZ.
  // P..T at 20h..24h. Ends at 07h when the result is zero, else at 06h.
  function automatic image_t prog_logic(input word_t p, q, r, t);
    image_t m;
    m = '{default: 12'h000};
    m[8'h00] = 12'h420;  // LOAD P
    m[8'h01] = 12'h921;  // OR   Q
    m[8'h02] = 12'hA22;  // ADD  R
    m[8'h03] = 12'hB23;  // SUB  S
    m[8'h04] = 12'h524;  // STORE T
    m[8'h05] = 12'h207;  // JZ   07h
    m[8'h06] = 12'h006;  // JMP  self
    m[8'h07] = 12'h007;  // JMP  self
    m[8'h20] = p;
    m[8'h21] = q;
    m[8'h22] = r;
    m[8'h23] = t;
    return m;
  endfunction

endpackage
