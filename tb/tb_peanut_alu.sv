// tb_peanut_alu: self-checking test of the ALU.
// Drives directed corner cases and random operand pairs through ALU_ADD and
// ALU_PASS_B and compares result and status bits with values computed here
// from integer arithmetic.
module tb_peanut_alu;
  import peanut_pkg::*;

  alu_op_e op;
  word_t   a, b, c;
  cc_t     status;
  int      checks = 0, failures = 0;

  peanut_alu dut (.op(op), .a(a), .b(b), .c(c), .status(status));

  task automatic check(input alu_op_e o, input word_t x, input word_t y);
    int unsigned full;
    int          sa, sb, ss;
    word_t       exp_c;
    cc_t         exp_s;
    op = o; a = x; b = y;
    #1;
    exp_s = '0;
    if (o == ALU_ADD) begin
      full  = int'(x) + int'(y);
      exp_c = full[15:0];
      exp_s.c = full > 32'hFFFF;
      sa = int'(signed'(x)); sb = int'(signed'(y)); ss = sa + sb;
      exp_s.v = (ss > 32767) || (ss < -32768);
    end else begin
      exp_c = y;
    end
    exp_s.n = exp_c[15];
    exp_s.z = (exp_c == 0);
    checks++;
    if (c !== exp_c || status !== exp_s) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h c=%h/%h status=%b/%b", o, x, y, c, exp_c, status, exp_s);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(ALU_ADD, 16'd31, 16'd34);
    check(ALU_ADD, 16'hFFFF, 16'h0001);   // zero with carry
    check(ALU_ADD, 16'h7FFF, 16'h0001);   // positive overflow
    check(ALU_ADD, 16'h8000, 16'h8000);   // negative overflow, carry, zero
    check(ALU_ADD, 16'hFFFE, 16'h0001);   // negative result
    check(ALU_PASS_B, 16'h1234, 16'h0000);
    check(ALU_PASS_B, 16'h0000, 16'h8001);
    repeat (2000) begin
      check(ALU_ADD, word_t'($urandom), word_t'($urandom));
      check(ALU_PASS_B, word_t'($urandom), word_t'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
