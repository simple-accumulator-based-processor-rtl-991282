// tb_simple12_control_store -- self-checking test of the microprogram ROM.
//
// Part 1 compares whole 23-bit words with the sample microinstructions of
// the Simple12 microprogram, written here as bit strings in field order
// (Cond, AddrSel, NextAddr, LA, LPC, LMAR, LMDR, ALU, bMUX, aGate, Rd, Wt).
// Part 2 walks the microprogram for every opcode and every branch outcome,
// following the condition/next-address rules, and checks that the
// datapath controls of each step and the number of steps match the
// expected register transfers (simple12_tb_pkg::exp_ctl, exp_cycles).
module tb_simple12_control_store;
  import simple12_pkg::*;
  import simple12_tb_pkg::*;

  uaddr_t  addr;
  uinstr_t data;
  int checks = 0, failures = 0;

  simple12_control_store dut (.addr(addr), .data(data));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare the word at a with an expected word; mask selects checked bits
  task automatic word(input logic [5:0] a, input logic [22:0] exp, input logic [22:0] mask,
                      input string name);
    addr = a; #1;
    checks++;
    if (((data ^ exp) & mask) != 0) begin
      failures++;
      $display("FAIL %s at %b: got %b exp %b", name, a, data, exp);
    end
  endtask

  localparam logic [22:0] ALL = '1;
  localparam logic [22:0] NO_NEXT = 23'b111_1_000000_1111_1111_11_1_1_1;

  function automatic dp_ctl_t to_ctl(input uinstr_t u);
    dp_ctl_t c;
    c.load_a = u.load_a; c.load_pc = u.load_pc; c.load_mar = u.load_mar;
    c.load_mdr = u.load_mdr; c.load_ir = u.addr_sel; c.alu = u.alu; c.bsel = u.bsel;
    c.agate = u.agate; c.mem_read = u.rd; c.mem_write = u.wt;
    return c;
  endfunction

  initial begin
    //                       Cond Sel Next   A PC MAR MDR ALU  bM aG Rd Wt
    word(6'b000000, 23'b100_0_000000_0_1_1_0_0010_00_0_0_0, ALL,     "Stopped");
    word(6'b000001, 23'b001_1_000000_0_1_1_1_0110_11_0_1_0, NO_NEXT, "IFetch");
    word(6'b100010, 23'b010_0_000001_0_0_0_0_0010_00_0_0_0, 23'b111_1_111111_1_1_1_1_0000_00_0_1_1, "EAGen JN");
    word(6'b100011, 23'b001_0_000001_0_1_1_0_0010_10_0_0_0, ALL,     "BTaken JN");
    word(6'b110100, 23'b000_0_000000_0_0_1_0_0010_10_0_0_0, NO_NEXT, "EAGen ADD");
    word(6'b110101, 23'b001_0_011010_0_0_1_1_0010_11_0_1_0, ALL,     "OpAccess ADD");
    word(6'b011010, 23'b001_0_000001_1_0_0_0_0010_10_1_0_0, ALL,     "Execute ADD");
    word(6'b101000, 23'b000_0_000000_0_0_1_0_0010_10_0_0_0, NO_NEXT, "EAGen LOAD");
    word(6'b010100, 23'b001_0_000001_1_0_0_0_0010_10_0_0_0, ALL,     "Execute LOAD");
    word(6'b100000, 23'b001_0_000001_0_1_1_0_0010_10_0_0_0, ALL,     "EAGen JMP");

    // walk the microprogram
    for (int op = 0; op < 16; op++) begin
      for (int br = 0; br < 2; br++) begin
        uaddr_t q;
        int steps;
        bit neg, zero, cond, done;
        neg = (op == 1) && br;   // condition for JN taken
        zero = (op == 2) && br;  // condition for JZ taken
        q = UA_IFETCH;
        steps = 0;
        done = 0;
        while (!done && steps < 8) begin
          addr = q; #1;
          checks++;
          if (to_ctl(data) != exp_ctl(4'(op), steps, neg, zero)) begin
            failures++;
            $display("FAIL op %b step %0d: ctl %h exp %h", op[3:0], steps,
                     to_ctl(data), exp_ctl(4'(op), steps, neg, zero));
          end
          case (data.cond_sel)
            COND_TRUE:      cond = 1;
            COND_NOT_NEG:   cond = !neg;
            COND_NOT_ZERO:  cond = !zero;
            COND_NOT_START: cond = 0;
            default:        cond = 0;
          endcase
          steps++;
          if (cond) q = data.addr_sel ? {1'b1, 4'(op), 1'b0} : data.next_addr;
          else      q = q + 1;
          if (q == UA_IFETCH) done = 1;
        end
        checks++;
        if (steps != exp_cycles(4'(op), br != 0)) begin
          failures++;
          $display("FAIL op %b taken=%0d: %0d cycles", op[3:0], br, steps);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
