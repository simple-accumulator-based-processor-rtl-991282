// tb_rt_examples -- self-checking test of the register-transfer examples.
//
// Checks the swap question (A = 11, B = 00 before one clock with LOAD
// gives A = 00, B = 11), that nothing changes without LOAD, and then runs
// random inputs through all nine circuits for many cycles, comparing each
// register (and the combinational selector) with a model updated here at
// every rising edge. A second instance with W = 4 runs alongside the
// default 2-bit one.
module tb_rt_examples;
  logic clk = 0;
  int checks = 0, failures = 0;
  bit have_and;

  // default width (2) and a wider copy
  logic         inc_clr, swap_set, swap_load, ld_c, z_s0, z_x;
  logic [3:0]   xor_a, xor_b, swap_a_in, swap_b_in, ld_s, z_c, z_d;
  logic [1:0]   xor_c2, inc_a2, swap_a2, swap_b2, ld_d2, z2;
  logic [3:0]   xor_c4, inc_a4, swap_a4, swap_b4, ld_d4, z4;
  logic [3:0]   m_xor, m_inc, m_sa, m_sb, m_ld, m_z;
  logic         mux_s, and_set, f2, f4, m_f2, m_f4;
  logic [3:0]   mux_a, mux_b, and_a_in, and_b, shl_b, f_c;
  logic [1:0]   mux_y2, and_a2, shl_a2;
  logic [3:0]   mux_y4, and_a4, shl_a4;
  logic [3:0]   m_and, m_shl2, m_shl4;

  rt_examples dut2 (
    .clk(clk), .xor_a(xor_a[1:0]), .xor_b(xor_b[1:0]), .xor_c(xor_c2),
    .inc_clr(inc_clr), .inc_a(inc_a2),
    .swap_set(swap_set), .swap_a_in(swap_a_in[1:0]), .swap_b_in(swap_b_in[1:0]),
    .swap_load(swap_load), .swap_a(swap_a2), .swap_b(swap_b2),
    .ld_c(ld_c), .ld_s(ld_s[1:0]), .ld_d(ld_d2),
    .z_s0(z_s0), .z_x(z_x), .z_c(z_c[1:0]), .z_d(z_d[1:0]), .z(z2),
    .mux_s(mux_s), .mux_a(mux_a[1:0]), .mux_b(mux_b[1:0]), .mux_y(mux_y2),
    .and_set(and_set), .and_a_in(and_a_in[1:0]), .and_b(and_b[1:0]), .and_a(and_a2),
    .shl_b(shl_b[1:0]), .shl_a(shl_a2), .f_c(f_c[1:0]), .f(f2));

  rt_examples #(.W(4)) dut4 (
    .clk(clk), .xor_a(xor_a), .xor_b(xor_b), .xor_c(xor_c4),
    .inc_clr(inc_clr), .inc_a(inc_a4),
    .swap_set(swap_set), .swap_a_in(swap_a_in), .swap_b_in(swap_b_in),
    .swap_load(swap_load), .swap_a(swap_a4), .swap_b(swap_b4),
    .ld_c(ld_c), .ld_s(ld_s), .ld_d(ld_d4),
    .z_s0(z_s0), .z_x(z_x), .z_c(z_c), .z_d(z_d), .z(z4),
    .mux_s(mux_s), .mux_a(mux_a), .mux_b(mux_b), .mux_y(mux_y4),
    .and_set(and_set), .and_a_in(and_a_in), .and_b(and_b), .and_a(and_a4),
    .shl_b(shl_b), .shl_a(shl_a4), .f_c(f_c), .f(f4));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input logic [3:0] got, exp, input int w, input string what);
    logic [3:0] mask;
    mask = (w == 2) ? 4'b0011 : 4'b1111;
    checks++;
    if (((got ^ exp) & mask) != 0) begin
      failures++;
      $display("FAIL %s (W=%0d): %h expected %h", what, w, got, exp & mask);
    end
  endtask

  initial begin
    {inc_clr, swap_set, swap_load, ld_c, z_s0, z_x} = '0;
    {xor_a, xor_b, swap_a_in, swap_b_in, ld_s, z_c, z_d} = '0;
    {mux_s, and_set, mux_a, mux_b, and_a_in, and_b, shl_b, f_c} = '0;
    // initialise every register
    @(negedge clk);
    inc_clr = 1; swap_set = 1; swap_a_in = 4'b0011; swap_b_in = 4'b0000;
    ld_c = 1; z_s0 = 1; z_x = 1;
    @(negedge clk);
    inc_clr = 0; swap_set = 0; ld_c = 0; z_s0 = 0; z_x = 0;
    m_inc = 4'd0; m_sa = 4'b0011; m_sb = 4'b0000; m_ld = 4'd0; m_z = 4'd0; m_xor = 4'd0;
    cmp(swap_a2, 4'b0011, 2, "swap preset A"); cmp(swap_b2, 4'b0000, 2, "swap preset B");
    // the question: A = 11, B = 00, one clock with LOAD
    swap_load = 1;
    @(negedge clk);
    swap_load = 0;
    m_inc++;
    cmp(swap_a2, 4'b0000, 2, "swap A after one clock");
    cmp(swap_b2, 4'b0011, 2, "swap B after one clock");
    m_sa = 4'b0000; m_sb = 4'b0011;
    // no LOAD: nothing moves
    @(negedge clk);
    m_inc++;
    cmp(swap_a2, 4'b0000, 2, "swap A held"); cmp(swap_b2, 4'b0011, 2, "swap B held");
    // random; the AND register is compared once it has been preset
    have_and = 0;
    repeat (2000) begin
      xor_a = 4'($urandom); xor_b = 4'($urandom);
      inc_clr = ($urandom % 50) == 0;
      swap_load = 1'($urandom);
      ld_c = 1'($urandom); ld_s = 4'($urandom);
      z_s0 = 1'($urandom); z_x = 1'($urandom); z_c = 4'($urandom); z_d = 4'($urandom);
      mux_s = 1'($urandom); mux_a = 4'($urandom); mux_b = 4'($urandom);
      and_set = ($urandom % 8) == 0; and_a_in = 4'($urandom);
      and_b = 4'($urandom) | 4'($urandom);     // mostly ones, so A decays slowly
      shl_b = 4'($urandom);
      f_c = ($urandom % 3 == 0) ? 4'd0 : 4'($urandom);
      #1;
      cmp(mux_y2, mux_s ? mux_b : mux_a, 2, "mux"); cmp(mux_y4, mux_s ? mux_b : mux_a, 4, "mux");
      @(posedge clk);
      m_and  = and_set ? and_a_in : m_and & and_b;
      m_shl2 = {2'b00, shl_b[0], 1'b0};
      m_shl4 = shl_b << 1;
      m_f2   = (f_c[1:0] == 2'd0);
      m_f4   = (f_c == 4'd0);
      m_xor = xor_a ^ xor_b;
      m_inc = inc_clr ? 4'd0 : m_inc + 4'd1;
      if (swap_load) {m_sa, m_sb} = {m_sb, m_sa};
      if (ld_c) m_ld = ld_s;
      if (z_s0 && z_x) m_z = z_c + z_d;
      @(negedge clk);
      cmp(xor_c2, m_xor, 2, "xor");   cmp(xor_c4, m_xor, 4, "xor");
      cmp(inc_a2, m_inc, 2, "inc");   cmp(inc_a4, m_inc, 4, "inc");
      cmp(swap_a2, m_sa, 2, "swap A"); cmp(swap_a4, m_sa, 4, "swap A");
      cmp(swap_b2, m_sb, 2, "swap B"); cmp(swap_b4, m_sb, 4, "swap B");
      cmp(ld_d2, m_ld, 2, "cond load"); cmp(ld_d4, m_ld, 4, "cond load");
      cmp(z2, m_z, 2, "cond add");    cmp(z4, m_z, 4, "cond add");
      if (have_and) begin
        cmp(and_a2, m_and, 2, "and");   cmp(and_a4, m_and, 4, "and");
      end
      have_and |= and_set;
      cmp(shl_a2, m_shl2, 2, "shift"); cmp(shl_a4, m_shl4, 4, "shift");
      cmp(4'(f2), 4'(m_f2), 4, "if c=0 F=1 (W=2)"); cmp(4'(f4), 4'(m_f4), 4, "if c=0 F=1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
