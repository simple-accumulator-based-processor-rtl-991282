// tb_simple12_cpu -- self-checking test of the Simple12 processor with
// both control units.
//
// Two processors, one microprogrammed and one hardwired, each with its own
// 256-word memory modelled here, run the same programs side by side. An
// instruction-level model (simple12_tb_pkg::iss_step) runs alongside: at
// every instruction fetch the testbench checks PC, A and the fetch address
// against the model, and checks that the previous instruction took the
// number of cycles the model gives. At the end the whole memory is
// compared.
//
// Programs: the max-of-two example (X = 7 at 30h, Y = 10 at 31h, result to
// Z at 32h), then random memory images whose words are random instructions,
// so that all opcodes, taken and untaken branches, and code that stores
// into itself all occur.
module tb_simple12_cpu;
  import simple12_pkg::*;
  import simple12_tb_pkg::*;

  logic clk = 0, rst, start;
  int checks = 0, failures = 0;

  addr_t mem_addr [2];
  logic  mem_read [2], mem_write [2], fetch [2];
  word_t mem_wdata [2], mem_rdata [2], acc [2];
  addr_t pc [2];
  word_t mem [2][256];

  iss_t iss [2];
  int   cyc [2];
  int   exp_cyc [2];
  bit   running;
  int   n_instr [2];
  int   target;
  bit   done [2];

  simple12_cpu #(.MICROPROGRAMMED(1'b1)) dut_micro (
    .clk(clk), .rst(rst), .start(start),
    .mem_addr(mem_addr[0]), .mem_read(mem_read[0]), .mem_write(mem_write[0]),
    .mem_wdata(mem_wdata[0]), .mem_rdata(mem_rdata[0]),
    .pc(pc[0]), .acc(acc[0]), .fetch(fetch[0]));

  simple12_cpu #(.MICROPROGRAMMED(1'b0)) dut_hw (
    .clk(clk), .rst(rst), .start(start),
    .mem_addr(mem_addr[1]), .mem_read(mem_read[1]), .mem_write(mem_write[1]),
    .mem_wdata(mem_wdata[1]), .mem_rdata(mem_rdata[1]),
    .pc(pc[1]), .acc(acc[1]), .fetch(fetch[1]));

  always #5 clk = ~clk;

  for (genvar i = 0; i < 2; i++) begin : g_mem
    assign mem_rdata[i] = mem[i][mem_addr[i]];
    always @(posedge clk) if (mem_write[i]) mem[i][mem_addr[i]] <= mem_wdata[i];
  end

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-cycle checker, sampled just before each rising edge
  always @(negedge clk) if (running) begin
    for (int i = 0; i < 2; i++) if (!done[i]) begin
      cyc[i]++;
      if (fetch[i]) begin
        checks++;
        if (exp_cyc[i] >= 0 && cyc[i] != exp_cyc[i]) begin
          failures++;
          $display("FAIL cpu%0d: instruction took %0d cycles, expected %0d", i, cyc[i], exp_cyc[i]);
        end
        checks++;
        if (pc[i] !== iss[i].pc || acc[i] !== iss[i].a || mem_addr[i] !== iss[i].pc) begin
          failures++;
          $display("FAIL cpu%0d: pc %h a %h mar %h, model pc %h a %h",
                   i, pc[i], acc[i], mem_addr[i], iss[i].pc, iss[i].a);
        end
        if (n_instr[i] == target) begin
          // all earlier instructions have finished: compare memory
          checks++;
          if (mem[i] != iss[i].mem) begin
            failures++;
            $display("FAIL cpu%0d: memory differs from model", i);
            for (int k = 0; k < 256; k++)
              if (mem[i][k] != iss[i].mem[k])
                $display("  [%h] %h model %h", k, mem[i][k], iss[i].mem[k]);
          end
          done[i] = 1;
        end else begin
          exp_cyc[i] = iss_step(iss[i]);
          cyc[i] = 0;
          n_instr[i]++;
        end
      end
    end
  end

  // Run a memory image until n instructions have completed.
  task automatic run(input word_t image [256], input int n);
    for (int i = 0; i < 2; i++) begin
      mem[i] = image;
      iss[i].mem = image;
      iss[i].pc = 0;
      iss[i].a = 0;
      cyc[i] = 0;
      exp_cyc[i] = -1;      // first fetch: no previous instruction
    end
    n_instr = '{0, 0};
    done = '{0, 0};
    target = n;
    rst = 1; start = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (3) @(negedge clk);
    start = 1;
    running = 1;
    @(negedge clk);
    start = 0;
    while (!(done[0] && done[1])) @(negedge clk);
    running = 0;
  endtask

  initial begin
    word_t img [256];
    running = 0;
    // max of two numbers
    img = '{default: 12'h000};
    img[8'h00] = 12'h430;  // LOAD X
    img[8'h01] = 12'hB31;  // SUB Y
    img[8'h02] = 12'h106;  // JN B1
    img[8'h03] = 12'h430;  // LOAD X
    img[8'h04] = 12'h007;  // JMP SAVE
    img[8'h06] = 12'h431;  // B1: LOAD Y
    img[8'h07] = 12'h532;  // SAVE: STORE Z
    img[8'h08] = 12'h008;  // JMP 08h (stay)
    img[8'h30] = 12'd7;
    img[8'h31] = 12'd10;
    run(img, 8);
    checks++;
    if (mem[0][8'h32] !== 12'd10 || mem[1][8'h32] !== 12'd10) begin
      failures++; $display("FAIL max: Z = %0d / %0d", mem[0][8'h32], mem[1][8'h32]);
    end
    // random programs
    for (int p = 0; p < 20; p++) begin
      logic [3:0] ops [9] = '{4'h0, 4'h1, 4'h2, 4'h4, 4'h5, 4'h8, 4'h9, 4'hA, 4'hB};
      for (int k = 0; k < 256; k++) begin
        if ($urandom % 10 == 0) img[k] = 12'($urandom);        // any word, reserved ops too
        else img[k] = {ops[$urandom % 9], 8'($urandom)};
      end
      run(img, 400);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
