// tb_rt_sequencing -- self-checking test of the three sequencing machines.
//
// First a directed run: X = 3, Y = 1, one go pulse. C = X + Y must appear
// exactly 4 clocks after go for the one-operation-per-step machine and 3
// clocks after go for the parallel one; the goto machine, whose A is odd,
// must go round again, and must go idle once X is made even. Then 3000
// cycles of random go, X and Y, comparing every register and busy flag of
// the default (W = 2) and a W = 4 instance with a step-by-step model kept
// here. The goto being taken and not taken is counted; each must happen.
module tb_rt_sequencing;
  logic clk = 0, rst, go;
  logic [3:0] x, y;
  int checks = 0, failures = 0;

  logic [1:0] s3_a2, s3_b2, s3_c2, p2_a2, p2_b2, p2_c2, g_a2, g_b2, g_c2;
  logic [3:0] s3_a4, s3_b4, s3_c4, p2_a4, p2_b4, p2_c4, g_a4, g_b4, g_c4;
  logic       s3_busy2, p2_busy2, g_busy2, s3_busy4, p2_busy4, g_busy4;

  rt_sequencing dut2 (
    .clk(clk), .rst(rst), .go(go), .x(x[1:0]), .y(y[1:0]),
    .s3_a(s3_a2), .s3_b(s3_b2), .s3_c(s3_c2), .s3_busy(s3_busy2),
    .p2_a(p2_a2), .p2_b(p2_b2), .p2_c(p2_c2), .p2_busy(p2_busy2),
    .g_a(g_a2), .g_b(g_b2), .g_c(g_c2), .g_busy(g_busy2));

  rt_sequencing #(.W(4)) dut4 (
    .clk(clk), .rst(rst), .go(go), .x(x), .y(y),
    .s3_a(s3_a4), .s3_b(s3_b4), .s3_c(s3_c4), .s3_busy(s3_busy4),
    .p2_a(p2_a4), .p2_b(p2_b4), .p2_c(p2_c4), .p2_busy(p2_busy4),
    .g_a(g_a4), .g_b(g_b4), .g_c(g_c4), .g_busy(g_busy4));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ model
  // step: 0 idle, 1..3 the steps; one model per width
  typedef struct {
    int         s3, p2, g;
    logic [3:0] s3_a, s3_b, s3_c, p2_a, p2_b, p2_c, g_a, g_b, g_c;
  } model_t;
  model_t m [2];          // [0]: W = 2, [1]: W = 4
  int goto_taken = 0, goto_not = 0;

  function automatic logic [3:0] msk(input int i, input logic [3:0] v);
    return (i == 0) ? (v & 4'b0011) : v;
  endfunction

  task automatic model_clock();
    for (int i = 0; i < 2; i++) begin
      model_t n;
      n = m[i];
      if (rst) begin
        n = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
      end else begin
        case (m[i].s3)
          0: if (go) n.s3 = 1;
          1: begin n.s3_a = msk(i, x); n.s3 = 2; end
          2: begin n.s3_b = msk(i, y); n.s3 = 3; end
          3: begin n.s3_c = msk(i, m[i].s3_a + m[i].s3_b); n.s3 = 0; end
        endcase
        case (m[i].p2)
          0: if (go) n.p2 = 1;
          1: begin n.p2_a = msk(i, x); n.p2_b = msk(i, y); n.p2 = 2; end
          2: begin n.p2_c = msk(i, m[i].p2_a + m[i].p2_b); n.p2 = 0; end
        endcase
        case (m[i].g)
          0: if (go) n.g = 1;
          1: begin n.g_a = msk(i, x); n.g_b = msk(i, y); n.g = 2; end
          2: begin
            n.g_c = msk(i, m[i].g_a + m[i].g_b);
            n.g = m[i].g_a[0] ? 1 : 0;
            if (i == 0) begin
              if (m[i].g_a[0]) goto_taken++; else goto_not++;
            end
          end
        endcase
      end
      m[i] = n;
    end
  endtask

  task automatic chk(input logic [3:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  task automatic compare();
    chk(4'(s3_a2), m[0].s3_a, "s3 A W2"); chk(s3_a4, m[1].s3_a, "s3 A W4");
    chk(4'(s3_b2), m[0].s3_b, "s3 B W2"); chk(s3_b4, m[1].s3_b, "s3 B W4");
    chk(4'(s3_c2), m[0].s3_c, "s3 C W2"); chk(s3_c4, m[1].s3_c, "s3 C W4");
    chk(4'(p2_a2), m[0].p2_a, "p2 A W2"); chk(p2_a4, m[1].p2_a, "p2 A W4");
    chk(4'(p2_b2), m[0].p2_b, "p2 B W2"); chk(p2_b4, m[1].p2_b, "p2 B W4");
    chk(4'(p2_c2), m[0].p2_c, "p2 C W2"); chk(p2_c4, m[1].p2_c, "p2 C W4");
    chk(4'(g_a2), m[0].g_a, "g A W2");    chk(g_a4, m[1].g_a, "g A W4");
    chk(4'(g_b2), m[0].g_b, "g B W2");    chk(g_b4, m[1].g_b, "g B W4");
    chk(4'(g_c2), m[0].g_c, "g C W2");    chk(g_c4, m[1].g_c, "g C W4");
    chk(4'(s3_busy2), 4'(m[0].s3 != 0), "s3 busy W2");
    chk(4'(p2_busy2), 4'(m[0].p2 != 0), "p2 busy W2");
    chk(4'(g_busy2),  4'(m[0].g != 0),  "g busy W2");
    chk(4'(s3_busy4), 4'(m[1].s3 != 0), "s3 busy W4");
    chk(4'(p2_busy4), 4'(m[1].p2 != 0), "p2 busy W4");
    chk(4'(g_busy4),  4'(m[1].g != 0),  "g busy W4");
  endtask

  // one clock: model and design advance together, compared after the edge
  task automatic tick();
    @(posedge clk);
    model_clock();
    @(negedge clk);
    compare();
  endtask

  initial begin
    rst = 1; go = 0; x = 0; y = 0;
    tick();
    rst = 0;

    // directed: C = 3 + 1 after 4 (one per step) and 3 (parallel) clocks
    x = 4'd3; y = 4'd1; go = 1;
    tick();                          // go sampled: step1 begins
    go = 0;
    tick();                          // 2 clocks after go: nothing yet
    chk(4'(p2_c2), 4'd0, "parallel C not before 3 clocks");
    tick();                          // 3 clocks after go
    chk(4'(p2_c2), 4'(2'(3 + 1)), "parallel C after 3 clocks");
    chk(p2_c4, 4'd4, "parallel C after 3 clocks, W4");
    chk(4'(s3_c2), 4'd0, "one-per-step C not before 4 clocks");
    chk(4'(g_busy2), 4'd1, "goto taken: A odd, still busy");
    x = 4'd2;                        // make A even on the next pass
    tick();                          // 4 clocks after go
    chk(s3_c4, 4'd4, "one-per-step C after 4 clocks, W4");
    repeat (3) tick();
    chk(4'(g_busy2), 4'd0, "goto not taken: idle");
    chk(g_c4, 4'd3, "goto C = 2 + 1 after second pass");

    // random
    repeat (3000) begin
      go = ($urandom % 4) == 0;
      rst = ($urandom % 200) == 0;
      x = 4'($urandom); y = 4'($urandom);
      tick();
    end

    checks++;
    if (goto_taken == 0 || goto_not == 0) begin
      failures++;
      $display("FAIL goto taken %0d, not taken %0d", goto_taken, goto_not);
    end
    $display("goto taken %0d, not taken %0d", goto_taken, goto_not);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
