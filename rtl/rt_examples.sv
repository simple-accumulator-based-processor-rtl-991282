// rt_examples -- the small register-transfer circuits that introduce the
// notation used to describe Simple12, collected in one module. They are
// independent of the processor and of each other.
//
//   xor_c  <= xor_a xor xor_b        (every clock)
//   inc_a  <= inc_a + 1               (every clock; inc_clr clears it)
//   if (swap_load) swap_a <= swap_b, swap_b <= swap_a
//                                     (both read the old values: a swap)
//   if (ld_c) ld_d <= ld_s
//   if (z_s0 and z_x) z <= z_c + z_d
//   mux_y = mux_a when mux_s = 0 else mux_b   (combinational selector)
//   and_a <= and_a & and_b             (every clock; and_set presets it)
//   shl_a <= shl_b << 1                (every clock)
//   if (f_c = 0) f <= 1 else f <= 0    (every clock, one bit)
//
// All registers are W-bit (f: one bit) edge-triggered flip-flops that
// change only on the rising clock edge; mux_y is combinational. Bit 0 of
// shl_a is always 0, since a left shift fills it with zero; synthesis
// therefore sees it as a constant output. W defaults to 2, the width of the swap example
// (registers holding 11 and 00). The transfers and the swap behaviour
// follow the notation examples; the width for the other circuits, the
// clear input of the counter, the preset inputs of the swap pair
// (swap_set loads swap_a_in / swap_b_in, and takes priority over
// swap_load) and the preset of the AND register (and_set loads and_a_in)
// are this design's choices, added so that the registers can be given
// known values. The selector is drawn with more inputs ("..."); only the
// two that are named, A and B, are built.
module rt_examples #(
  parameter int W = 2
) (
  input  logic         clk,
  // C <= A xor B
  input  logic [W-1:0] xor_a,
  input  logic [W-1:0] xor_b,
  output logic [W-1:0] xor_c,
  // A <= A + 1
  input  logic         inc_clr,
  output logic [W-1:0] inc_a,
  // A <= B, B <= A under LOAD
  input  logic         swap_set,
  input  logic [W-1:0] swap_a_in,
  input  logic [W-1:0] swap_b_in,
  input  logic         swap_load,
  output logic [W-1:0] swap_a,
  output logic [W-1:0] swap_b,
  // if (c) then D <= S
  input  logic         ld_c,
  input  logic [W-1:0] ld_s,
  output logic [W-1:0] ld_d,
  // if (s0 and x) then Z <= c + d
  input  logic         z_s0,
  input  logic         z_x,
  input  logic [W-1:0] z_c,
  input  logic [W-1:0] z_d,
  output logic [W-1:0] z,
  // Y <= A when s=0 else B when s=1
  input  logic         mux_s,
  input  logic [W-1:0] mux_a,
  input  logic [W-1:0] mux_b,
  output logic [W-1:0] mux_y,
  // A <= A & B
  input  logic         and_set,
  input  logic [W-1:0] and_a_in,
  input  logic [W-1:0] and_b,
  output logic [W-1:0] and_a,
  // A <= B << 1
  input  logic [W-1:0] shl_b,
  output logic [W-1:0] shl_a,
  // if (c=0) then F <= 1 else F <= 0
  input  logic [W-1:0] f_c,
  output logic         f
);

  always_ff @(posedge clk) begin
    xor_c <= xor_a ^ xor_b;

    if (inc_clr) inc_a <= '0;
    else         inc_a <= inc_a + 1'b1;

    if (swap_set) begin
      swap_a <= swap_a_in;
      swap_b <= swap_b_in;
    end else if (swap_load) begin
      swap_a <= swap_b;
      swap_b <= swap_a;
    end

    if (ld_c) ld_d <= ld_s;

    if (z_s0 && z_x) z <= z_c + z_d;

    if (and_set) and_a <= and_a_in;
    else         and_a <= and_a & and_b;

    shl_a <= shl_b << 1;

    if (f_c == '0) f <= 1'b1;
    else           f <= 1'b0;
  end

  assign mux_y = mux_s ? mux_b : mux_a;

endmodule
