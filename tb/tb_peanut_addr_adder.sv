// tb_peanut_addr_adder: self-checking test of the MAR address adder.
// Checks PC - 1 (offset all ones) including the wrap from 0 to 1023, a zero
// offset, and random sums against modulo-1024 integer arithmetic.
module tb_peanut_addr_adder;
  import peanut_pkg::*;

  addr_t base, offset, sum;
  int    checks = 0, failures = 0;

  peanut_addr_adder dut (.base(base), .offset(offset), .sum(sum));

  task automatic check(input int unsigned x, input int unsigned y);
    int unsigned exp_sum;
    base = addr_t'(x); offset = addr_t'(y);
    #1;
    exp_sum = (x + y) % 1024;
    checks++;
    if (int'(sum) != exp_sum) begin
      failures++;
      $display("FAIL %0d + %0d = %0d, expected %0d", x, y, sum, exp_sum);
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
    check(0, 1023);      // PC - 1 wraps
    check(21, 1023);     // PC - 1
    check(20, 0);        // opspec, zero offset
    check(1023, 1);
    repeat (1000) check($urandom % 1024, $urandom % 1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
