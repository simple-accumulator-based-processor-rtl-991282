// tb_simple12_ram -- self-checking test of the Simple12 memory.
//
// Fills all 256 words through the host port, reads them back on both
// ports (combinational read), then overwrites random words through the
// processor port and checks both ports again against a copy kept here.
module tb_simple12_ram;
  logic        clk = 0;
  logic [7:0]  addr, host_addr;
  logic        read, write, host_we;
  logic [11:0] wdata, rdata, host_wdata, host_rdata;
  logic [11:0] model [256];
  int checks = 0, failures = 0;

  simple12_ram dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [7:0] ad);
    addr = ad; host_addr = ad; #1;
    checks++;
    if (rdata !== model[ad] || host_rdata !== model[ad]) begin
      failures++;
      $display("FAIL addr %h: cpu %h host %h exp %h", ad, rdata, host_rdata, model[ad]);
    end
  endtask

  initial begin
    read = 0; write = 0; host_we = 0; addr = 0; host_addr = 0; wdata = 0; host_wdata = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      host_addr = 8'(i); host_wdata = 12'($urandom); host_we = 1;
      model[i] = host_wdata;
    end
    @(negedge clk); host_we = 0;
    for (int i = 0; i < 256; i++) chk(8'(i));
    repeat (300) begin
      @(negedge clk);
      addr = 8'($urandom); wdata = 12'($urandom); write = 1;
      model[addr] = wdata;
      @(negedge clk); write = 0; read = 1;
      chk(addr);
      read = 0;
    end
    for (int i = 0; i < 256; i++) chk(8'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
