// tb_simple12_system -- end-to-end test of the Simple12 system.
//
// Two complete systems run side by side on the same host commands: one
// with the microprogrammed control unit (the default) and one with the
// hardwired state machine. For each program the testbench loads memory
// through the host port while reset is held, releases reset, waits a few
// cycles in Stopped, pulses start, and lets the processor run until it
// fetches the program's final jump-to-self twice. It then reads memory back
// through the host port and compares the results with values computed
// here, and compares the cycle count from the first fetch to the final
// jump with the per-instruction cycle table (JMP 2, JN/JZ 2 or 3, LOAD 4,
// STORE 3, ALU 4).
//
// Programs: max(7, 10) and max(10, 5); an array program that masks each
// element of a zero-terminated list and walks the list by rewriting its own
// instructions; ((P or Q) + R) - S with zero and nonzero results; and
// random arrays for the masking program.
//
// Finally the register-transfer examples beside the processor are given
// the swap question (A = 11, B = 00, one clock with LOAD -> 00, 11), and
// the sequencing machines one go with X = 1, Y = 2: C = 3, and the goto
// machine goes round again because A is odd.
//
// Each mechanism of the design is counted per system, and one that never
// occurs is a failure: start from Stopped, each opcode's Execute/OpAccess
// path, JN and JZ taken (BTaken step) and not taken, JMP, a store into the
// program itself, a negative accumulator.
module tb_simple12_system;
  import simple12_pkg::*;
  import simple12_tb_pkg::*;
  import rt_examples_pkg::*;

  logic  clk = 0, rst, start;
  addr_t host_addr;
  logic  host_we;
  word_t host_wdata;
  word_t host_rdata [2];
  addr_t pc [2], mem_addr [2];
  word_t acc [2], mem_wdata [2], mem_rdata [2];
  logic  fetch [2], mem_read [2], mem_write [2];
  int checks = 0, failures = 0;
  rt_in_t  rt_in;
  rt_out_t rt_out [2];
  seq_in_t  seq_in;
  seq_out_t seq_out [2];

  simple12_system u_micro (
    .clk(clk), .rst(rst), .start(start),
    .host_addr(host_addr), .host_we(host_we), .host_wdata(host_wdata),
    .host_rdata(host_rdata[0]), .pc(pc[0]), .acc(acc[0]), .fetch(fetch[0]),
    .mem_addr(mem_addr[0]), .mem_read(mem_read[0]), .mem_write(mem_write[0]),
    .mem_wdata(mem_wdata[0]), .mem_rdata(mem_rdata[0]),
    .rt_in(rt_in), .rt_out(rt_out[0]),
    .seq_in(seq_in), .seq_out(seq_out[0]));

  simple12_system #(.MICROPROGRAMMED(1'b0)) u_hw (
    .clk(clk), .rst(rst), .start(start),
    .host_addr(host_addr), .host_we(host_we), .host_wdata(host_wdata),
    .host_rdata(host_rdata[1]), .pc(pc[1]), .acc(acc[1]), .fetch(fetch[1]),
    .mem_addr(mem_addr[1]), .mem_read(mem_read[1]), .mem_write(mem_write[1]),
    .mem_wdata(mem_wdata[1]), .mem_rdata(mem_rdata[1]),
    .rt_in(rt_in), .rt_out(rt_out[1]),
    .seq_in(seq_in), .seq_out(seq_out[1]));

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- monitor
  typedef enum int {
    M_START, M_JMP, M_JN_TAKEN, M_JN_NOT, M_JZ_TAKEN, M_JZ_NOT,
    M_LOAD, M_STORE, M_AND, M_OR, M_ADD, M_SUB, M_SELF_MODIFY, M_NEGATIVE, M_NUM
  } mech_e;
  string mech_name [M_NUM] = '{"start", "JMP", "JN taken", "JN not taken",
    "JZ taken", "JZ not taken", "LOAD", "STORE", "AND", "OR", "ADD", "SUB",
    "store into program", "negative A"};
  int mech [2][M_NUM];

  bit    monitoring;
  int    cyc [2];          // cycles since the current instruction's fetch
  int    total [2];        // cycles from first fetch to the current fetch
  logic [3:0] cur_op [2];
  bit    have_op [2];
  addr_t last_pc [2];
  int    halt_hits [2];
  addr_t halt_pc;
  addr_t code_end;

  always @(negedge clk) if (monitoring) begin
    for (int i = 0; i < 2; i++) if (halt_hits[i] < 2) begin
      cyc[i]++;
      if (acc[i][11]) mech[i][M_NEGATIVE]++;
      if (mem_write[i] && mem_addr[i] <= code_end) mech[i][M_SELF_MODIFY]++;
      if (fetch[i]) begin
        if (have_op[i]) begin
          total[i] += cyc[i];
          case (cur_op[i])
            4'h0: mech[i][M_JMP]++;
            4'h1: if (cyc[i] == 3) mech[i][M_JN_TAKEN]++; else mech[i][M_JN_NOT]++;
            4'h2: if (cyc[i] == 3) mech[i][M_JZ_TAKEN]++; else mech[i][M_JZ_NOT]++;
            4'h4: mech[i][M_LOAD]++;
            4'h5: mech[i][M_STORE]++;
            4'h8: mech[i][M_AND]++;
            4'h9: mech[i][M_OR]++;
            4'hA: mech[i][M_ADD]++;
            4'hB: mech[i][M_SUB]++;
            default: ;
          endcase
        end else begin
          mech[i][M_START]++;
        end
        if (pc[i] == halt_pc) halt_hits[i]++;
        cur_op[i]  = mem_rdata[i][11:8];
        have_op[i] = 1;
        last_pc[i] = pc[i];
        cyc[i] = 0;
      end
    end
  end

  // ---------------------------------------------------------------- driver
  word_t result [2][256];
  int    cycles [2];

  // Expected cycle count from first fetch to the fetch of the halt address,
  // from the instruction-level model.
  function automatic int model_cycles(input image_t img, input addr_t halt);
    iss_t s;
    int n;
    s.mem = img; s.pc = 0; s.a = 0; n = 0;
    for (int k = 0; k < 100000 && s.pc != halt; k++) n += iss_step(s);
    return n;
  endfunction

  task automatic run(input image_t img, input addr_t halt, input addr_t last_code,
                     input string name);
    int exp_cycles_;
    rst = 1; start = 0; monitoring = 0;
    for (int k = 0; k < 256; k++) begin
      @(negedge clk);
      host_addr = 8'(k); host_wdata = img[k]; host_we = 1;
    end
    @(negedge clk) host_we = 0;
    halt_pc = halt; code_end = last_code;
    for (int i = 0; i < 2; i++) begin
      cyc[i] = 0; total[i] = 0; have_op[i] = 0; halt_hits[i] = 0;
    end
    rst = 0;
    monitoring = 1;
    repeat (5) @(negedge clk);     // sit in Stopped
    checks++;
    if (fetch[0] || fetch[1]) begin failures++; $display("FAIL %s: fetch before start", name); end
    start = 1;
    @(negedge clk) start = 0;
    while (halt_hits[0] < 2 || halt_hits[1] < 2) @(negedge clk);
    monitoring = 0;
    // read memory back
    for (int k = 0; k < 256; k++) begin
      host_addr = 8'(k); #1;
      result[0][k] = host_rdata[0];
      result[1][k] = host_rdata[1];
    end
    // cycles: up to the first fetch of halt, minus the halt jump itself
    exp_cycles_ = model_cycles(img, halt);
    for (int i = 0; i < 2; i++) begin
      cycles[i] = total[i] - exp_cycles(4'h0, 0);   // remove one halt JMP
      checks++;
      if (cycles[i] != exp_cycles_) begin
        failures++;
        $display("FAIL %s sys%0d: %0d cycles, model %0d", name, i, cycles[i], exp_cycles_);
      end
    end
    $display("%s: %0d cycles", name, cycles[0]);
  endtask

  task automatic expect_word(input addr_t a, input word_t v, input string what);
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (result[i][a] !== v) begin
        failures++;
        $display("FAIL %s sys%0d: M[%h] = %h, expected %h", what, i, a, result[i][a], v);
      end
    end
  endtask

  initial begin
    word_t vals [];
    host_addr = 0; host_we = 0; host_wdata = 0;
    rt_in = '0;
    seq_in = '0;
    seq_in.rst = 1;
    foreach (mech[i, m]) mech[i][m] = 0;

    run(prog_max(12'd7, 12'd10), MAX_HALT, 8'h08, "max(7,10)");
    expect_word(8'h32, 12'd10, "max(7,10)");
    foreach (cycles[i]) begin
      checks++;   // LOAD 4 + SUB 4 + JN taken 3 + LOAD 4 + STORE 3
      if (cycles[i] != 18) begin failures++; $display("FAIL max(7,10) cycles %0d", cycles[i]); end
    end

    run(prog_max(12'd10, 12'd5), MAX_HALT, 8'h08, "max(10,5)");
    expect_word(8'h32, 12'd10, "max(10,5)");
    foreach (cycles[i]) begin
      checks++;   // LOAD 4 + SUB 4 + JN 2 + LOAD 4 + JMP 2 + STORE 3
      if (cycles[i] != 19) begin failures++; $display("FAIL max(10,5) cycles %0d", cycles[i]); end
    end

    vals = '{12'd3, 12'd3, 12'd3, 12'd8, 12'd19, 12'd0};
    run(prog_array(vals, 12'd1), ARR_HALT, 8'h0F, "array mask");
    foreach (vals[k])
      expect_word(ARR_BASE + 8'(k), (vals[k] == 0) ? 12'd0 : 12'((vals[k] & 12'd1) != 0),
                  "array mask");
    expect_word(8'h00, 12'h415, "array mask L1 rewritten");
    expect_word(8'h07, 12'h515, "array mask L2 rewritten");

    run(prog_logic(12'h0F0, 12'h00F, 12'h001, 12'h100), 8'h07, 8'h07, "logic zero");
    expect_word(8'h24, 12'h000, "logic zero");
    run(prog_logic(12'h0F0, 12'h00F, 12'h001, 12'h200), 8'h06, 8'h07, "logic negative");
    expect_word(8'h24, 12'hF00, "logic negative");

    repeat (4) begin
      int n;
      word_t mask;
      n = 1 + $urandom % 20;
      mask = 12'($urandom);
      vals = new[n + 1];
      for (int k = 0; k < n; k++) vals[k] = 12'(1 + $urandom % 4095);
      vals[n] = 0;
      run(prog_array(vals, mask), ARR_HALT, 8'h0F, "random array");
      for (int k = 0; k < n; k++)
        expect_word(ARR_BASE + 8'(k), 12'((vals[k] & mask) != 0), "random array");
    end

    // register-transfer examples beside the processor: the swap question
    @(negedge clk);
    rt_in.swap_set = 1; rt_in.swap_a_in = 2'b11; rt_in.swap_b_in = 2'b00;
    @(negedge clk);
    rt_in.swap_set = 0; rt_in.swap_load = 1;
    @(negedge clk);
    rt_in.swap_load = 0;
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (rt_out[i].swap_a !== 2'b00 || rt_out[i].swap_b !== 2'b11) begin
        failures++;
        $display("FAIL sys%0d: swap gave A=%b B=%b", i, rt_out[i].swap_a, rt_out[i].swap_b);
      end
    end

    // sequencing machines beside the processor: X = 1, Y = 2, one go.
    // The goto machine sees A = 1 (odd) and goes round again, so it is
    // still busy when the parallel machine has finished.
    seq_in.rst = 0;
    seq_in.x = 2'd1; seq_in.y = 2'd2; seq_in.go = 1;
    @(negedge clk);
    seq_in.go = 0;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (seq_out[i].p2_c !== 2'd3 || seq_out[i].p2_busy || !seq_out[i].g_busy) begin
        failures++;
        $display("FAIL sys%0d: parallel C=%0d busy=%b, goto busy=%b", i,
                 seq_out[i].p2_c, seq_out[i].p2_busy, seq_out[i].g_busy);
      end
    end
    seq_in.x = 2'd2;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (seq_out[i].s3_c !== 2'd3 || seq_out[i].s3_busy || seq_out[i].g_busy ||
          seq_out[i].g_c !== 2'd0) begin
        failures++;
        $display("FAIL sys%0d: one-per-step C=%0d, goto C=%0d busy=%b", i,
                 seq_out[i].s3_c, seq_out[i].g_c, seq_out[i].g_busy);
      end
    end

    for (int i = 0; i < 2; i++)
      for (int m = 0; m < M_NUM; m++) begin
        checks++;
        if (mech[i][m] == 0) begin
          failures++;
          $display("FAIL sys%0d: mechanism '%s' never happened", i, mech_name[m]);
        end
      end
    for (int m = 0; m < M_NUM; m++)
      $display("mechanism %-20s micro %0d  hardwired %0d", mech_name[m], mech[0][m], mech[1][m]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
