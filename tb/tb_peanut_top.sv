// tb_peanut_top: end-to-end test of the PeANUt computer at its default size.
//
// Loads a short program into the 1024-cell memory, releases reset and runs
// it to the halt. The program starts with the three addressing-mode
// examples (LOAD #31, LOAD 20 with mem[20] = 34, LOAD @21 with mem[21] = 30
// and mem[30] = 57), then adds in all three modes so that the zero, carry,
// negative and overflow condition codes each get set, and ends with an
// undefined instruction word that stops the CPU. Expected AC, CC, PC and
// instruction lengths (6, 7, 9 cycles) are worked out by hand below. Each
// mechanism (every mode, LOAD, ADD, each condition code, memory reads, the
// halt) is counted, and one that never happened counts as a failure.
module tb_peanut_top;
  import peanut_pkg::*;

  logic  clk = 0, rst_n = 0;
  addr_t mar;
  word_t mdr, ac, ci;
  psw_t  psw;
  logic  mem_write, mem_en, instr_done, halted, illegal;
  int    checks = 0, failures = 0, cyc = 0;

  peanut_top dut (.clk(clk), .rst_n(rst_n), .mar(mar), .mdr(mdr),
                  .mem_write(mem_write), .mem_en(mem_en), .ac(ac), .psw(psw),
                  .ci(ci), .instr_done(instr_done), .halted(halted),
                  .illegal(illegal));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_imm = 0, n_dir = 0, n_ind = 0, n_load = 0, n_add = 0;
  int n_z = 0, n_n = 0, n_c = 0, n_v = 0, n_rd = 0, n_halt = 0;

  always @(posedge clk) if (rst_n) begin
    if (mem_en && !mem_write) n_rd++;
    if (instr_done) begin
      case (ci[15:13])
        3'b000: n_imm++;
        3'b001: n_dir++;
        3'b010: n_ind++;
        default: ;
      endcase
      if (ci[12:10] == 3'b001) n_load++;
      if (ci[12:10] == 3'b011) n_add++;
    end
  end

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

  typedef struct {
    int ac;
    int cc;    // {V, C, N, Z}
    int len;
  } step_t;

  step_t steps [7];

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last;
    for (int i = 0; i < 1024; i++) dut.u_mem.mem[i] = '0;
    dut.u_mem.mem[0] = f1(3'b000, 3'b001, 31);         // LOAD #31
    dut.u_mem.mem[1] = f1(3'b001, 3'b001, 20);         // LOAD 20
    dut.u_mem.mem[2] = f1(3'b010, 3'b001, 21);         // LOAD @21
    dut.u_mem.mem[3] = f1(3'b000, 3'b011, 1024 - 57);  // ADD #-57
    dut.u_mem.mem[4] = f1(3'b001, 3'b011, 22);         // ADD 22
    dut.u_mem.mem[5] = f1(3'b010, 3'b011, 23);         // ADD @23
    dut.u_mem.mem[6] = f1(3'b000, 3'b011, 1023);       // ADD #-1
    dut.u_mem.mem[7] = 16'hE000;                       // undefined: halt
    dut.u_mem.mem[20] = 16'd34;
    dut.u_mem.mem[21] = 16'd30;
    dut.u_mem.mem[30] = 16'd57;
    dut.u_mem.mem[22] = 16'h7FFF;
    dut.u_mem.mem[23] = 16'd31;
    dut.u_mem.mem[31] = 16'd1;
    //            AC       {V,C,N,Z}  cycles
    steps[0] = '{31,      4'b0000,   6};
    steps[1] = '{34,      4'b0000,   7};
    steps[2] = '{57,      4'b0000,   9};
    steps[3] = '{0,       4'b0101,   6};   // 57 + 0xFFC7 = 0x10000
    steps[4] = '{'h7FFF,  4'b0000,   7};
    steps[5] = '{'h8000,  4'b1010,   9};   // 0x7FFF + 1
    steps[6] = '{'h7FFF,  4'b1100,   6};   // 0x8000 + 0xFFFF

    repeat (2) @(negedge clk);
    rst_n = 1;
    cyc = 0;
    last = -1;
    for (int s = 0; s < 7; s++) begin
      while (!instr_done) @(negedge clk);
      expect_eq($sformatf("step %0d cycles", s), cyc - last, steps[s].len);
      last = cyc;
      @(negedge clk);
      expect_eq($sformatf("step %0d ac", s), int'(ac), steps[s].ac);
      expect_eq($sformatf("step %0d cc", s), int'(psw.cc), steps[s].cc);
      expect_eq($sformatf("step %0d pc", s), int'(psw.pc), s + 1);
      if (psw.cc.z) n_z++;
      if (psw.cc.n) n_n++;
      if (psw.cc.c) n_c++;
      if (psw.cc.v) n_v++;
    end
    while (!halted) @(negedge clk);
    n_halt++;
    expect_eq("halt cycle", cyc, last + 6);
    expect_eq("illegal", int'(illegal), 1);
    expect_eq("halt pc", int'(psw.pc), 8);
    expect_eq("halt ac", int'(ac), 'h7FFF);
    repeat (5) @(negedge clk);
    expect_eq("stays halted", int'(halted), 1);
    expect_eq("pc frozen", int'(psw.pc), 8);
    expect_eq("memory reads", n_rd, 8 + 2 + 2 * 2);

    $display("mechanisms: immediate=%0d direct=%0d indirect=%0d load=%0d add=%0d zero=%0d negative=%0d carry=%0d overflow=%0d reads=%0d halt=%0d",
             n_imm, n_dir, n_ind, n_load, n_add, n_z, n_n, n_c, n_v, n_rd, n_halt);
    checks++; if (n_imm  == 0) begin failures++; $display("FAIL no immediate mode"); end
    checks++; if (n_dir  == 0) begin failures++; $display("FAIL no direct mode"); end
    checks++; if (n_ind  == 0) begin failures++; $display("FAIL no indirect mode"); end
    checks++; if (n_load == 0) begin failures++; $display("FAIL no LOAD"); end
    checks++; if (n_add  == 0) begin failures++; $display("FAIL no ADD"); end
    checks++; if (n_z    == 0) begin failures++; $display("FAIL no zero result"); end
    checks++; if (n_n    == 0) begin failures++; $display("FAIL no negative result"); end
    checks++; if (n_c    == 0) begin failures++; $display("FAIL no carry"); end
    checks++; if (n_v    == 0) begin failures++; $display("FAIL no overflow"); end
    checks++; if (n_halt == 0) begin failures++; $display("FAIL no halt"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
