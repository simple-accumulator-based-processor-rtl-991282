// rt_sequencing -- the three sequencing constructs used to introduce
// control steps, each built as its own small state machine with its own
// A, B and C registers. All three compute C = X + Y from the inputs X, Y:
//
//   one operation per step (s3_*):   step1: A <= X;  step2: B <= Y;
//                                    step3: C <= A + B
//   parallel operations (p2_*):      step1: A <= X, B <= Y;
//                                    step2: C <= A + B
//   with a goto (g_*):               step1: A <= X, B <= Y;
//                                    step2: C <= A + B, if A[0] = 1 goto step1
//
// Timing: each machine waits in an idle state until go is sampled high,
// then spends one clock per step, and the transfers of a step happen on
// the rising edge that ends it. busy is high during the steps. So C holds
// X + Y (of the X, Y present in the steps that read them) 4 clocks after
// go for the three-step machine and 3 clocks after go for the other two.
// The goto machine returns to step1 as long as the A it loaded is odd,
// reloading A and B from the inputs each time, and goes idle after a step2
// with A even.
//
// The steps and their transfers follow the sequencing examples. The idle
// state, go, busy, the synchronous reset (rst clears the registers and
// enters idle), the return to idle after the last step, and the width W
// (default 2, the width of the other notation examples) are this design's
// choices: the examples give neither a start, an end, nor a width. C is
// W bits wide and the sum wraps.
module rt_sequencing #(
  parameter int W = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         go,
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  // one operation per step
  output logic [W-1:0] s3_a,
  output logic [W-1:0] s3_b,
  output logic [W-1:0] s3_c,
  output logic         s3_busy,
  // parallel operations
  output logic [W-1:0] p2_a,
  output logic [W-1:0] p2_b,
  output logic [W-1:0] p2_c,
  output logic         p2_busy,
  // parallel operations with a goto
  output logic [W-1:0] g_a,
  output logic [W-1:0] g_b,
  output logic [W-1:0] g_c,
  output logic         g_busy
);

  typedef enum logic [1:0] {IDLE, STEP1, STEP2, STEP3} step_e;

  step_e s3_step, p2_step, g_step;

  // one operation per step
  always_ff @(posedge clk) begin
    if (rst) begin
      s3_step <= IDLE;
      s3_a <= '0; s3_b <= '0; s3_c <= '0;
    end else begin
      unique case (s3_step)
        IDLE:  if (go) s3_step <= STEP1;
        STEP1: begin s3_a <= x;           s3_step <= STEP2; end
        STEP2: begin s3_b <= y;           s3_step <= STEP3; end
        STEP3: begin s3_c <= s3_a + s3_b; s3_step <= IDLE;  end
      endcase
    end
  end

  // parallel operations
  always_ff @(posedge clk) begin
    if (rst) begin
      p2_step <= IDLE;
      p2_a <= '0; p2_b <= '0; p2_c <= '0;
    end else begin
      unique case (p2_step)
        IDLE:  if (go) p2_step <= STEP1;
        STEP1: begin p2_a <= x; p2_b <= y; p2_step <= STEP2; end
        STEP2: begin p2_c <= p2_a + p2_b;  p2_step <= IDLE;  end
        default: p2_step <= IDLE;
      endcase
    end
  end

  // parallel operations with a conditional goto
  always_ff @(posedge clk) begin
    if (rst) begin
      g_step <= IDLE;
      g_a <= '0; g_b <= '0; g_c <= '0;
    end else begin
      unique case (g_step)
        IDLE:  if (go) g_step <= STEP1;
        STEP1: begin g_a <= x; g_b <= y; g_step <= STEP2; end
        STEP2: begin
          g_c    <= g_a + g_b;
          g_step <= g_a[0] ? STEP1 : IDLE;
        end
        default: g_step <= IDLE;
      endcase
    end
  end

  assign s3_busy = (s3_step != IDLE);
  assign p2_busy = (p2_step != IDLE);
  assign g_busy  = (g_step  != IDLE);

endmodule
