// tb_simple12_full -- the Simple12 system at its default configuration
// (microprogrammed control, 256 x 12 memory) running the two example
// programs to completion.
//
// Program 1 computes Z = max(X, Y) for X = 7, Y = 10 and must store 10 in
// 18 cycles from the first fetch (LOAD 4, SUB 4, JN taken 3, LOAD 4,
// STORE 3). Program 2 masks each element of the list 3, 3, 3, 8, 19, 0
// with 1, rewriting its own LOAD and STORE instructions to walk the list,
// and must leave 1, 1, 1, 0, 1, 0. Expected values are worked out here.
module tb_simple12_full;
  import simple12_pkg::*;
  import simple12_tb_pkg::*;
  import rt_examples_pkg::*;

  logic  clk = 0, rst, start;
  addr_t host_addr, pc, mem_addr;
  logic  host_we, fetch, mem_read, mem_write;
  word_t host_wdata, host_rdata, acc, mem_wdata, mem_rdata;
  int checks = 0, failures = 0;
  rt_in_t  rt_in = '0;
  rt_out_t rt_out;
  seq_in_t  seq_in = '{rst: 1'b1, default: '0};
  seq_out_t seq_out;

  simple12_system dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // load, start, run until the halt address is fetched; return the cycles
  // from the first fetch to that fetch
  task automatic run(input image_t img, input addr_t halt, output int cycles);
    int n;
    bit first;
    rst = 1; start = 0;
    for (int k = 0; k < 256; k++) begin
      @(negedge clk);
      host_addr = 8'(k); host_wdata = img[k]; host_we = 1;
    end
    @(negedge clk) host_we = 0;
    rst = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    n = 0; first = 0;
    forever begin
      if (fetch) begin
        if (!first) begin first = 1; n = 0; end
        else if (pc == halt) break;
      end
      @(negedge clk);
      n++;
    end
    cycles = n;
  endtask

  task automatic expect_word(input addr_t a, input word_t v);
    host_addr = a; #1;
    checks++;
    if (host_rdata !== v) begin
      failures++;
      $display("FAIL M[%h] = %h, expected %h", a, host_rdata, v);
    end
  endtask

  initial begin
    int cycles;
    word_t vals [] = '{12'd3, 12'd3, 12'd3, 12'd8, 12'd19, 12'd0};
    word_t exp  [] = '{12'd1, 12'd1, 12'd1, 12'd0, 12'd1, 12'd0};
    host_addr = 0; host_we = 0; host_wdata = 0;

    run(prog_max(12'd7, 12'd10), MAX_HALT, cycles);
    expect_word(8'h32, 12'd10);
    checks++;
    if (cycles != 18) begin failures++; $display("FAIL max took %0d cycles", cycles); end

    run(prog_array(vals, 12'd1), ARR_HALT, cycles);
    foreach (exp[k]) expect_word(ARR_BASE + 8'(k), exp[k]);
    $display("array program: %0d cycles", cycles);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
