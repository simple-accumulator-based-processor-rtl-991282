// simple12_micro_control -- microprogrammed control unit of Simple12.
//
// A 6-bit Q register addresses the control store (simple12_control_store).
// The word read out drives the datapath directly. Its condition-select
// field picks one of False, True, ~A(11), ~(ALU=0) or ~start; when the
// picked condition is 1 the Q register loads a new address, otherwise it
// increments. The new address is the word's Next Addr field (Addr Sel = 0)
// or {1, MemBus(11:8), 0} (Addr Sel = 1), which dispatches on the opcode of
// the instruction being read from memory in the same cycle.
//
// Timing: one microinstruction per clock. Q is reset (synchronous, active
// high) to 000000, the Stopped word. IR has no field of its own in the
// microinstruction; here it is loaded in the dispatch cycle (Addr Sel = 1),
// which is this design's choice. The rest of the structure (Q register,
// load/increment, condition and address multiplexers) follows the
// processor description.
module simple12_micro_control
  import simple12_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    start,
  input  word_t   mem_rdata,  // MemBus, for the opcode dispatch
  input  logic    neg,        // A(11)
  input  logic    alu_zero,
  output dp_ctl_t ctl,
  output logic    fetch,      // high in the IFetch microinstruction
  output uaddr_t  upc         // current Q, for observation
);

  uaddr_t  q, q_load;
  uinstr_t u;
  logic    cond;

  simple12_control_store u_rom (
    .addr (q),
    .data (u)
  );

  always_comb begin
    unique case (u.cond_sel)
      COND_TRUE:      cond = 1'b1;
      COND_NOT_NEG:   cond = ~neg;
      COND_NOT_ZERO:  cond = ~alu_zero;
      COND_NOT_START: cond = ~start;
      default:        cond = 1'b0;
    endcase
    q_load = u.addr_sel ? {1'b1, mem_rdata[DATA_W-1 -: OPC_W], 1'b0}
                        : u.next_addr;
  end

  always_ff @(posedge clk) begin
    if (rst)       q <= UA_STOPPED;
    else if (cond) q <= q_load;
    else           q <= q + 1'b1;
  end

  always_comb begin
    ctl.load_a    = u.load_a;
    ctl.load_pc   = u.load_pc;
    ctl.load_mar  = u.load_mar;
    ctl.load_mdr  = u.load_mdr;
    ctl.load_ir   = u.addr_sel;
    ctl.alu       = u.alu;
    ctl.bsel      = u.bsel;
    ctl.agate     = u.agate;
    ctl.mem_read  = u.rd;
    ctl.mem_write = u.wt;
  end

  assign fetch = (q == UA_IFETCH);
  assign upc   = q;

endmodule
