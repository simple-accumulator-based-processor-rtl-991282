// simple12_system -- a Simple12 processor connected to its 256 x 12 memory.
//
// The processor (simple12_cpu) drives the memory address from MAR, the
// write data from the accumulator, and the read and write strobes; the
// memory returns the addressed word combinationally on DataIn. A host port
// on the memory loads programs and reads results while the processor is
// held in reset or is stopped; the host port and its timing are this
// design's choice, the processor-memory wiring follows the processor
// description.
//
// Use: hold rst high, write the program and data through host_addr /
// host_we / host_wdata (one word per clock), release rst, pulse or hold
// start. The processor then runs until the program jumps to itself; pc,
// acc, fetch (high in the first cycle of every instruction) and the
// processor's memory bus can be watched, and memory read back through
// host_addr / host_rdata. In a fetch cycle mem_rdata is the instruction.
//
// The small register-transfer examples used to introduce the notation
// (rt_examples) and the three sequencing machines (rt_sequencing) are
// instantiated beside the processor, with their inputs and outputs brought
// out as the rt_in / rt_out and seq_in / seq_out bundles; they share only
// the clock with the processor. The sequencing machines have their own
// reset, seq_in.rst.
module simple12_system
  import simple12_pkg::*;
  import rt_examples_pkg::*;
#(
  parameter bit MICROPROGRAMMED = 1'b1
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  // host port to memory
  input  addr_t host_addr,
  input  logic  host_we,
  input  word_t host_wdata,
  output word_t host_rdata,
  // observation
  output addr_t pc,
  output word_t acc,
  output logic  fetch,
  output addr_t mem_addr,
  output logic  mem_read,
  output logic  mem_write,
  output word_t mem_wdata,
  output word_t mem_rdata,
  // register-transfer examples, independent of the processor
  input  rt_in_t  rt_in,
  output rt_out_t rt_out,
  // sequencing examples, independent of the processor
  input  seq_in_t  seq_in,
  output seq_out_t seq_out
);

  simple12_cpu #(.MICROPROGRAMMED(MICROPROGRAMMED)) u_cpu (
    .clk       (clk),
    .rst       (rst),
    .start     (start),
    .mem_addr  (mem_addr),
    .mem_read  (mem_read),
    .mem_write (mem_write),
    .mem_wdata (mem_wdata),
    .mem_rdata (mem_rdata),
    .pc        (pc),
    .acc       (acc),
    .fetch     (fetch)
  );

  simple12_ram u_ram (
    .clk        (clk),
    .addr       (mem_addr),
    .read       (mem_read),
    .write      (mem_write),
    .wdata      (mem_wdata),
    .rdata      (mem_rdata),
    .host_addr  (host_addr),
    .host_we    (host_we),
    .host_wdata (host_wdata),
    .host_rdata (host_rdata)
  );

  // The notation examples that accompany the processor description stand
  // beside it, sharing only the clock.
  rt_examples #(.W(RT_W)) u_rt_examples (
    .clk       (clk),
    .xor_a     (rt_in.xor_a),
    .xor_b     (rt_in.xor_b),
    .xor_c     (rt_out.xor_c),
    .inc_clr   (rt_in.inc_clr),
    .inc_a     (rt_out.inc_a),
    .swap_set  (rt_in.swap_set),
    .swap_a_in (rt_in.swap_a_in),
    .swap_b_in (rt_in.swap_b_in),
    .swap_load (rt_in.swap_load),
    .swap_a    (rt_out.swap_a),
    .swap_b    (rt_out.swap_b),
    .ld_c      (rt_in.ld_c),
    .ld_s      (rt_in.ld_s),
    .ld_d      (rt_out.ld_d),
    .z_s0      (rt_in.z_s0),
    .z_x       (rt_in.z_x),
    .z_c       (rt_in.z_c),
    .z_d       (rt_in.z_d),
    .z         (rt_out.z),
    .mux_s     (rt_in.mux_s),
    .mux_a     (rt_in.mux_a),
    .mux_b     (rt_in.mux_b),
    .mux_y     (rt_out.mux_y),
    .and_set   (rt_in.and_set),
    .and_a_in  (rt_in.and_a_in),
    .and_b     (rt_in.and_b),
    .and_a     (rt_out.and_a),
    .shl_b     (rt_in.shl_b),
    .shl_a     (rt_out.shl_a),
    .f_c       (rt_in.f_c),
    .f         (rt_out.f)
  );

  rt_sequencing #(.W(RT_W)) u_rt_sequencing (
    .clk     (clk),
    .rst     (seq_in.rst),
    .go      (seq_in.go),
    .x       (seq_in.x),
    .y       (seq_in.y),
    .s3_a    (seq_out.s3_a),
    .s3_b    (seq_out.s3_b),
    .s3_c    (seq_out.s3_c),
    .s3_busy (seq_out.s3_busy),
    .p2_a    (seq_out.p2_a),
    .p2_b    (seq_out.p2_b),
    .p2_c    (seq_out.p2_c),
    .p2_busy (seq_out.p2_busy),
    .g_a     (seq_out.g_a),
    .g_b     (seq_out.g_b),
    .g_c     (seq_out.g_c),
    .g_busy  (seq_out.g_busy)
  );

endmodule
