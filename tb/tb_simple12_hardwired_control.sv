// tb_simple12_hardwired_control -- self-checking test of the hardwired
// Simple12 control unit.
//
// The testbench stands in for the datapath: it holds IR (loaded when the
// unit asserts load_ir, from the instruction word it presents on the
// memory bus) and drives the A(11) and ALU-zero status bits. It first
// checks that the unit stays in Stopped without start and clears PC and
// MAR when start rises, then runs random instruction sequences with random
// status bits and checks, cycle by cycle, the control word against the
// expected register transfers of each step (simple12_tb_pkg::exp_ctl), the
// fetch marker, and the cycle count of every instruction (JMP 2, JN/JZ 2
// or 3, LOAD 4, STORE 3, ALU 4).
module tb_simple12_hardwired_control;
  import simple12_pkg::*;
  import simple12_tb_pkg::*;

  logic    clk = 0, rst, start;
  logic [3:0] ir;
  logic    neg, alu_zero, fetch;
  dp_ctl_t ctl;
  word_t   bus;
  int checks = 0, failures = 0;
  int n_taken = 0, n_not_taken = 0;

  simple12_hardwired_control dut (
    .clk(clk), .rst(rst), .start(start), .ir(ir), .neg(neg), .alu_zero(alu_zero),
    .ctl(ctl), .fetch(fetch));

  always #5 clk = ~clk;

  // IR held by the testbench, as the datapath would
  always_ff @(posedge clk) if (ctl.load_ir) ir <= bus[11:8];

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_ctl(input dp_ctl_t exp, input bit exp_fetch, input string what);
    checks++;
    if (ctl !== exp || fetch !== exp_fetch) begin
      failures++;
      $display("FAIL %s: ctl %h exp %h fetch %b", what, ctl, exp, fetch);
    end
  endtask

  initial begin
    dp_ctl_t clr;
    clr = mk(0, 1, 1, 0, 0, 4'b0010, 2'b00, 0, 0, 0);
    ir = 0; bus = 0; neg = 0; alu_zero = 0; start = 0;
    rst = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    // Stopped, start low: nothing happens
    repeat (5) begin
      #1;
      checks++;
      if (fetch || ctl.load_pc || ctl.load_mar || ctl.mem_read || ctl.mem_write) begin
        failures++; $display("FAIL: activity while stopped");
      end
      @(negedge clk);
    end
    start = 1; #1;
    expect_ctl(clr, 0, "Stopped with start");
    @(negedge clk);
    start = 0;   // start need not be held
    // random instruction stream
    repeat (3000) begin
      logic [3:0] op;
      bit n, z, taken;
      int cyc;
      op = 4'($urandom);
      n = 1'($urandom); z = 1'($urandom);
      taken = (op == 4'b0001 && n) || (op == 4'b0010 && z);
      if (op == 4'b0001 || op == 4'b0010) begin
        if (taken) n_taken++; else n_not_taken++;
      end
      bus = {op, 8'($urandom)};
      neg = n; alu_zero = z;
      cyc = 0;
      do begin
        #1;
        expect_ctl(exp_ctl(op, cyc, n, z), cyc == 0, $sformatf("op %b step %0d", op, cyc));
        @(negedge clk);
        cyc++;
      end while (!fetch && cyc < 8);
      checks++;
      if (cyc != exp_cycles(op, taken)) begin
        failures++;
        $display("FAIL op %b took %0d cycles", op, cyc);
      end
    end
    checks++;
    if (n_taken == 0 || n_not_taken == 0) begin
      failures++; $display("FAIL: branch outcomes not both seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
