// tb_peanut_cpu: self-checking test of the CPU against an instruction-level
// reference model.
//
// The testbench plays the memory itself (combinational read while Enable is
// high). It runs the three addressing-mode examples (LOAD #31 -> 31,
// LOAD 20 with mem[20] = 34 -> 34, LOAD @20 with mem[20] = 30, mem[30] = 57
// -> 57), then random programs of LOAD and ADD in all three modes, each
// ending in an undefined instruction word. After every instruction it
// compares AC, CC and PC with the model and checks the instruction took 6
// (immediate), 7 (direct) or 9 (indirect) cycles; at the end it checks that
// the CPU halted with illegal set at the right PC and cycle.
module tb_peanut_cpu;
  import peanut_pkg::*;

  logic  clk = 0, rst_n = 0;
  addr_t mem_addr;
  word_t mem_wdata, mem_rdata, ac, ci;
  logic  mem_write, mem_en, instr_done, halted, illegal;
  psw_t  psw;
  word_t mem [1024];
  int    checks = 0, failures = 0;
  int    cyc = 0;

  peanut_cpu dut (.clk(clk), .rst_n(rst_n), .mem_addr(mem_addr),
                  .mem_wdata(mem_wdata), .mem_write(mem_write), .mem_en(mem_en),
                  .mem_rdata(mem_rdata), .ac(ac), .psw(psw), .ci(ci),
                  .instr_done(instr_done), .halted(halted), .illegal(illegal));

  assign mem_rdata = (mem_en && !mem_write) ? mem[mem_addr] : '0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%h), expected %0d (0x%h)", what, got, got, exp, exp);
    end
  endtask

  function automatic word_t f1(input logic [2:0] mode, input logic [2:0] opc, input int spec);
    return {mode, opc, addr_t'(spec)};
  endfunction

  // Run the program in mem from address 0 and check every instruction.
  task automatic run_and_check(input int max_instr);
    int    pc, m_ac, done_at, n;
    cc_t   m_cc;
    word_t w, opnd;
    logic [2:0] mode, opc;
    int    spec, len, sum;
    int    sa, sb;
    bit    stop;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cyc = 0;
    pc = 0; m_ac = 0; m_cc = '0; done_at = -1; n = 0; stop = 0;
    while (!stop && n < max_instr) begin
      w = mem[pc];
      pc = (pc + 1) % 1024;
      mode = w[15:13]; opc = w[12:10]; spec = int'(w[9:0]);
      if (!(mode inside {3'b000, 3'b001, 3'b010}) || !(opc inside {3'b001, 3'b011})) begin
        // undefined word: expect a halt after fetch and decode (HALT is entered 6 cycles after the previous EXEC)
        while (!halted) @(negedge clk);
        expect_eq("halt cycle", cyc, done_at + 6);
        expect_eq("illegal", int'(illegal), 1);
        expect_eq("halt pc", int'(psw.pc), pc);
        expect_eq("halt ac", int'(ac), m_ac);
        stop = 1;
      end else begin
        case (mode)
          3'b000: begin opnd = word_t'(signed'(addr_t'(spec))); len = 6; end
          3'b001: begin opnd = mem[spec]; len = 7; end
          default: begin opnd = mem[mem[spec][9:0]]; len = 9; end
        endcase
        m_cc = '0;
        if (opc == 3'b011) begin
          sum = m_ac + int'(opnd);
          m_cc.c = sum > 16'hFFFF;
          sa = int'(signed'(word_t'(m_ac))); sb = int'(signed'(opnd));
          m_cc.v = (sa + sb > 32767) || (sa + sb < -32768);
          m_ac = sum % 65536;
        end else begin
          m_ac = int'(opnd);
        end
        m_cc.n = m_ac[15];
        m_cc.z = (m_ac == 0);
        while (!instr_done) @(negedge clk);
        expect_eq("instruction cycles", cyc - done_at, len);
        done_at = cyc;
        @(negedge clk);
        expect_eq("ac", int'(ac), m_ac);
        expect_eq("cc", int'(psw.cc), int'(m_cc));
        expect_eq("pc", int'(psw.pc), pc);
        expect_eq("ci", int'(ci), int'(w));
        n++;
      end
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Immediate, direct and indirect LOAD examples
    foreach (mem[i]) mem[i] = '0;
    mem[0] = f1(3'b000, 3'b001, 31);
    mem[1] = 16'hFFFF;
    run_and_check(10);
    expect_eq("LOAD #31", int'(ac), 31);
    mem[0] = f1(3'b001, 3'b001, 20);
    mem[20] = 16'd34;
    run_and_check(10);
    expect_eq("LOAD 20", int'(ac), 34);
    mem[0] = f1(3'b010, 3'b001, 20);
    mem[20] = 16'd30;
    mem[30] = 16'd57;
    run_and_check(10);
    expect_eq("LOAD @20", int'(ac), 57);
    // Random programs
    repeat (20) begin
      int len = 5 + $urandom % 30;
      foreach (mem[i]) mem[i] = word_t'($urandom);
      for (int i = 0; i < len; i++)
        mem[i] = f1(3'($urandom % 3), ($urandom % 2) ? 3'b011 : 3'b001, $urandom % 1024);
      mem[len] = {3'b111, 13'($urandom)};
      run_and_check(100);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
