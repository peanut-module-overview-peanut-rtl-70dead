// peanut_top: the PeANUt computer, a CPU and its 1024 x 16 memory.
//
// The CPU's Memory Address Register drives the memory's address lines, its
// Memory Data Register the write data, and the control unit the Read/Write
// and Enable lines; the memory's read data returns to MDR. Programs and data
// share the memory (von Neumann). After reset the CPU starts fetching at
// address 0.
//
// The machine's I/O unit and exception unit are not built, as their
// workings are not described. Where they would attach, the memory bus
// (MAR, MDR, Read/Write, Enable) and the CPU's state (AC, PSW, CI, halted,
// illegal) are brought out as outputs. Memory contents are loaded before
// reset is released, for example by a testbench writing u_mem.mem directly.
module peanut_top
  import peanut_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  output addr_t mar,
  output word_t mdr,
  output logic  mem_write,
  output logic  mem_en,
  output word_t ac,
  output psw_t  psw,
  output word_t ci,
  output logic  instr_done,
  output logic  halted,
  output logic  illegal
);

  word_t mem_rdata;

  peanut_cpu u_cpu (
    .clk       (clk),
    .rst_n     (rst_n),
    .mem_addr  (mar),
    .mem_wdata (mdr),
    .mem_write (mem_write),
    .mem_en    (mem_en),
    .mem_rdata (mem_rdata),
    .ac        (ac),
    .psw       (psw),
    .ci        (ci),
    .instr_done(instr_done),
    .halted    (halted),
    .illegal   (illegal)
  );

  peanut_memory u_mem (
    .clk  (clk),
    .addr (mar),
    .wdata(mdr),
    .write(mem_write),
    .en   (mem_en),
    .rdata(mem_rdata)
  );

endmodule
