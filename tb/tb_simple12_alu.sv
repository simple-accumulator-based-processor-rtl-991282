// tb_simple12_alu -- self-checking test of the Simple12 ALU.
//
// Applies every control code used by the processor (AND, OR, ADD, PC+1,
// SUB) and the remaining b-invert/carry-in combinations to corner and
// random operands, and compares result and zero flag with values computed
// here from the ALU's definition: b' = binv ? ~b : b, then a & b',
// a | b' or a + b' + cin, modulo 2**12.
module tb_simple12_alu;
  import simple12_pkg::*;

  logic [11:0] a, b, r;
  alu_ctl_t    ctl;
  logic        zero;
  int checks = 0, failures = 0;

  simple12_alu dut (.a(a), .b(b), .ctl(ctl), .r(r), .zero(zero));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [11:0] ta, tb_, input logic [3:0] code);
    logic [11:0] bb, exp;
    a = ta; b = tb_; ctl = alu_ctl_t'(code);
    #1;
    bb = code[3] ? ~tb_ : tb_;
    case (code[1:0])
      2'b00:   exp = ta & bb;
      2'b01:   exp = ta | bb;
      default: exp = 12'((int'(ta) + int'(bb) + int'(code[2])) % 4096);
    endcase
    checks++;
    if (r !== exp || zero !== (exp == 12'd0)) begin
      failures++;
      $display("FAIL a=%h b=%h code=%b r=%h zero=%b exp=%h", ta, tb_, code, r, zero, exp);
    end
  endtask

  initial begin
    logic [3:0] codes [8] = '{4'b0000, 4'b1000, 4'b0001, 4'b1001,
                              4'b0010, 4'b0110, 4'b1110, 4'b1010};
    logic [11:0] corner [6] = '{12'h000, 12'h001, 12'h7FF, 12'h800, 12'hFFF, 12'h555};
    foreach (codes[c])
      foreach (corner[i])
        foreach (corner[j])
          check(corner[i], corner[j], codes[c]);
    repeat (2000) check(12'($urandom), 12'($urandom), codes[$urandom % 8]);
    // named cases from the instruction set
    check(12'h007, 12'h00A, 4'b1110);   // 7 - 10 = -3
    if (r !== 12'hFFD) begin failures++; $display("FAIL 7-10 = %h", r); end
    checks++;
    check(12'h000, 12'h0FF, 4'b0110);   // PC + 1 wraps in 12 bits
    if (r !== 12'h100) begin failures++; $display("FAIL inc = %h", r); end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
