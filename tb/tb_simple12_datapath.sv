// tb_simple12_datapath -- self-checking test of the Simple12 datapath.
//
// Part 1 replays the register transfers of a LOAD and an ADD instruction
// by hand (PC <= 0; IFetch; MAR <= MDR(7:0); MDR <= operand; A <= ...)
// and checks PC, MAR, IR, MDR and A after each step. Part 2 applies random
// control bundles and random memory words for many cycles and compares
// every register with a model kept here: a = agate ? A : 0, b = 0 / MDR /
// PC, R = the ALU function, and each register loads when its bit is set.
module tb_simple12_datapath;
  import simple12_pkg::*;

  logic    clk = 0, rst;
  dp_ctl_t ctl;
  word_t   mem_rdata, mem_wdata, acc, mdr, alu_r;
  addr_t   mem_addr, pc;
  logic    neg, alu_zero;
  logic [3:0] ir;
  int checks = 0, failures = 0;

  // model state
  addr_t m_pc, m_mar;
  word_t m_a, m_mdr;
  logic [3:0] m_ir;

  simple12_datapath dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic dp_ctl_t c(input bit la, lpc, lmar, lmdr, lir,
                                input logic [3:0] alu, input logic [1:0] bs, input bit ag);
    dp_ctl_t t;
    t = '0;
    t.load_a = la; t.load_pc = lpc; t.load_mar = lmar; t.load_mdr = lmdr; t.load_ir = lir;
    t.alu = alu_ctl_t'(alu); t.bsel = bsel_e'(bs); t.agate = ag;
    return t;
  endfunction

  // apply one control word for one clock and update the model
  task automatic step(input dp_ctl_t t, input word_t din);
    word_t av, bv, bb, r;
    @(negedge clk);
    ctl = t; mem_rdata = din;
    av = t.agate ? m_a : 12'd0;
    case (t.bsel)
      BSEL_MDR: bv = m_mdr;
      BSEL_PC:  bv = {4'd0, m_pc};
      default:  bv = 12'd0;
    endcase
    bb = t.alu.binv ? ~bv : bv;
    case (t.alu.fn)
      FN_AND:  r = av & bb;
      FN_OR:   r = av | bb;
      default: r = av + bb + {11'd0, t.alu.cin};
    endcase
    #1;
    checks++;
    if (alu_r !== r || alu_zero !== (r == 0) || neg !== m_a[11]) begin
      failures++;
      $display("FAIL alu: r=%h exp %h zero=%b neg=%b", alu_r, r, alu_zero, neg);
    end
    @(posedge clk);
    if (t.load_pc)  m_pc  = r[7:0];
    if (t.load_mar) m_mar = r[7:0];
    if (t.load_a)   m_a   = r;
    if (t.load_mdr) m_mdr = din;
    if (t.load_ir)  m_ir  = din[11:8];
    #1;
    checks++;
    if (pc !== m_pc || mem_addr !== m_mar || acc !== m_a || mem_wdata !== m_a ||
        mdr !== m_mdr || ir !== m_ir) begin
      failures++;
      $display("FAIL regs: pc=%h/%h mar=%h/%h a=%h/%h mdr=%h/%h ir=%h/%h",
               pc, m_pc, mem_addr, m_mar, acc, m_a, mdr, m_mdr, ir, m_ir);
    end
  endtask

  initial begin
    logic [3:0] codes [5] = '{4'b0000, 4'b0001, 4'b0010, 4'b0110, 4'b1110};
    logic [1:0] bsels [3] = '{2'b00, 2'b10, 2'b11};
    ctl = '0; mem_rdata = 0;
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    m_pc = 0; m_mar = 0; m_a = 0; m_mdr = 0; m_ir = 0;
    checks++;
    if (pc !== 0 || mem_addr !== 0 || acc !== 0 || mdr !== 0 || ir !== 0) begin
      failures++; $display("FAIL reset");
    end
    // Part 1: LOAD 30h (M[30h] = 007h), then ADD 31h (M[31h] = 00Ah)
    step(c(0,1,1,0,0,4'b0010,2'b00,0), 12'h000);   // PC, MAR <= 0
    step(c(0,1,1,1,1,4'b0110,2'b11,0), 12'h430);   // IFetch LOAD 30h
    step(c(0,0,1,0,0,4'b0010,2'b10,0), 12'h000);   // MAR <= MDR(7:0)
    checks++; if (mem_addr !== 8'h30 || pc !== 8'h01 || ir !== 4'h4) begin failures++; $display("FAIL LOAD EA"); end
    step(c(0,0,1,1,0,4'b0010,2'b11,0), 12'h007);   // MDR <= M[30h], MAR <= PC
    step(c(1,0,0,0,0,4'b0010,2'b10,0), 12'h000);   // A <= MDR
    checks++; if (acc !== 12'h007 || mem_addr !== 8'h01) begin failures++; $display("FAIL LOAD exec"); end
    step(c(0,1,1,1,1,4'b0110,2'b11,0), 12'hA31);   // IFetch ADD 31h
    step(c(0,0,1,0,0,4'b0010,2'b10,0), 12'h000);
    step(c(0,0,1,1,0,4'b0010,2'b11,0), 12'h00A);
    step(c(1,0,0,0,0,4'b1110,2'b10,1), 12'h000);   // A <= A - MDR
    checks++; if (acc !== 12'hFFD || !neg) begin failures++; $display("FAIL SUB result %h", acc); end
    // Part 2: random control
    repeat (3000) begin
      dp_ctl_t t;
      t = '0;
      t.load_a = 1'($urandom); t.load_pc = 1'($urandom); t.load_mar = 1'($urandom);
      t.load_mdr = 1'($urandom); t.load_ir = 1'($urandom);
      t.alu = alu_ctl_t'(codes[$urandom % 5]); t.bsel = bsel_e'(bsels[$urandom % 3]);
      t.agate = 1'($urandom);
      step(t, 12'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
