// tb_peanut_memory: self-checking test of the 1024 x 16 memory.
// Writes every cell through the Write/Enable protocol, reads them back with
// Read/Enable, checks that a write with Enable low changes nothing, that a
// cell can be overwritten, and that rdata is zero while Enable is low.
module tb_peanut_memory;
  import peanut_pkg::*;

  logic  clk = 0;
  addr_t addr;
  word_t wdata, rdata;
  logic  write, en;
  int    checks = 0, failures = 0;
  word_t model [1024];

  peanut_memory dut (.clk(clk), .addr(addr), .wdata(wdata), .write(write),
                     .en(en), .rdata(rdata));

  always #5 clk = ~clk;

  task automatic do_write(input int a, input word_t d, input logic enable);
    @(negedge clk);
    addr = addr_t'(a); wdata = d; write = 1'b1; en = enable;
    @(negedge clk);
    en = 1'b0; write = 1'b0;
    if (enable) model[a] = d;
  endtask

  task automatic do_read(input int a);
    @(negedge clk);
    addr = addr_t'(a); write = 1'b0; en = 1'b1;
    #1;
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      $display("FAIL read mem[%0d] = %h, expected %h", a, rdata, model[a]);
    end
    en = 1'b0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; write = 0; addr = '0; wdata = '0;
    for (int i = 0; i < 1024; i++) do_write(i, word_t'($urandom), 1'b1);
    for (int i = 0; i < 1024; i++) do_read(i);
    // write with Enable low must not change the cell
    do_write(20, 16'hDEAD, 1'b0);
    do_read(20);
    // overwrite
    do_write(30, 16'd57, 1'b1);
    do_read(30);
    do_write(1023, 16'hBEEF, 1'b1);
    do_read(1023);
    do_read(0);
    // disabled output reads zero
    @(negedge clk);
    addr = 10'd30; en = 1'b0; write = 1'b0;
    #1;
    checks++;
    if (rdata !== '0) begin
      failures++;
      $display("FAIL rdata not zero while disabled: %h", rdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
