// simple12_datapath -- registers and ALU of the Simple12 processor.
//
// Five registers: PC (8 bits, program counter), MAR (8 bits, drives the
// memory address), IR (4 bits, opcode of the current instruction), MDR
// (12 bits, word read from memory) and A (12 bits, accumulator, drives the
// memory write data). All datapath arithmetic goes through one ALU whose
// a input is either 0 or A (the a-gate) and whose b input is 0, MDR or PC
// (the b-mux). The ALU result R is the only source for A, PC and MAR (PC
// and MAR take R[7:0]); MDR and IR load straight from the memory read bus.
//
// Interface: the control unit supplies one dp_ctl_t bundle per cycle.
// Every register loads on the rising clock edge when its load bit is set,
// so a memory read addressed by MAR in one cycle is captured in MDR at
// the end of that same cycle (the memory is read combinationally). The
// status outputs neg (A[11]) and alu_zero go back to the control unit.
//
// The register set, widths, mux sources and the A-to-DataOut wiring follow
// the processor's datapath drawings. The synchronous active-high reset
// clearing all registers is this design's choice.
module simple12_datapath
  import simple12_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  dp_ctl_t ctl,
  // memory side
  input  word_t   mem_rdata,   // DataIn
  output addr_t   mem_addr,    // Address (= MAR)
  output word_t   mem_wdata,   // DataOut (= A)
  // status to control
  output logic    neg,         // A(11)
  output logic    alu_zero,
  // architectural state, for observation
  output addr_t   pc,
  output word_t   acc,
  output logic [OPC_W-1:0] ir,
  output word_t   mdr,
  output word_t   alu_r
);

  addr_t pc_q, mar_q;
  word_t a_q, mdr_q;
  logic [OPC_W-1:0] ir_q;

  word_t a_in, b_in, r;

  always_comb begin
    a_in = ctl.agate ? a_q : '0;
    unique case (ctl.bsel)
      BSEL_MDR: b_in = mdr_q;
      BSEL_PC:  b_in = word_t'(pc_q);
      default:  b_in = '0;
    endcase
  end

  simple12_alu #(.W(DATA_W)) u_alu (
    .a    (a_in),
    .b    (b_in),
    .ctl  (ctl.alu),
    .r    (r),
    .zero (alu_zero)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      pc_q  <= '0;
      mar_q <= '0;
      a_q   <= '0;
      mdr_q <= '0;
      ir_q  <= '0;
    end else begin
      if (ctl.load_pc)  pc_q  <= r[ADDR_W-1:0];
      if (ctl.load_mar) mar_q <= r[ADDR_W-1:0];
      if (ctl.load_a)   a_q   <= r;
      if (ctl.load_mdr) mdr_q <= mem_rdata;
      if (ctl.load_ir)  ir_q  <= mem_rdata[DATA_W-1 -: OPC_W];
    end
  end

  assign mem_addr  = mar_q;
  assign mem_wdata = a_q;
  assign neg       = a_q[DATA_W-1];
  assign pc        = pc_q;
  assign acc       = a_q;
  assign ir        = ir_q;
  assign mdr       = mdr_q;
  assign alu_r     = r;

endmodule
