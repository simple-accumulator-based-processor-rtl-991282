// simple12_ram -- main memory of the Simple12 system: 2**ADDR_W words of
// DATA_W bits (256 x 12 by default), holding program and data together.
//
// Processor port: the word at addr is on rdata combinationally, so the
// processor captures it at the end of the cycle in which it raises read;
// when write is high, wdata is written to addr at the rising clock edge.
// The read strobe changes nothing inside the memory (the data are always
// presented); an assertion checks that read and write never coincide. Host port: a second port with
// the same timing, used to load a program and inspect results while the
// processor is stopped. A host write wins when both ports write the same
// address in one cycle.
//
// The address and data widths and the Read/Write strobes follow the
// processor description; the read timing and the host port are this
// design's choices. The array has no reset.
module simple12_ram
  import simple12_pkg::*;
#(
  parameter int AW = ADDR_W,
  parameter int DW = DATA_W
) (
  input  logic          clk,
  // processor port
  input  logic [AW-1:0] addr,
  input  logic          read,
  input  logic          write,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata,
  // host port
  input  logic [AW-1:0] host_addr,
  input  logic          host_we,
  input  logic [DW-1:0] host_wdata,
  output logic [DW-1:0] host_rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (write)   mem[addr]      <= wdata;
    if (host_we) mem[host_addr] <= host_wdata;
  end

  assign rdata      = mem[addr];
  assign host_rdata = mem[host_addr];

  // The processor never reads and writes memory in the same cycle.
  a_rd_wr_exclusive: assert property (@(posedge clk) !(read && write))
    else $error("simple12_ram: read and write asserted together");

endmodule
