// peanut_memory: the PeANUt main memory, 1024 cells of 16 bits.
//
// It holds programs and data alike. The address comes from MAR (10 bits) and
// the data goes to and from MDR (16 bits); two control lines, Read/Write and
// Enable, come from the control unit. The data lines of the description are
// bidirectional; here they are split into wdata (MDR to memory) and rdata
// (memory to MDR).
//
// Timing: reading is combinational. While en is high and write is low,
// rdata shows mem[addr] and the CPU loads it into MDR on the next rising
// clock edge. A write takes place on the rising edge at which en and write
// are both high. With en low, rdata reads zero and nothing is written.
// Own choices: the split data lines, the encoding write = 1 for Write, the
// clocked write and zero on rdata while disabled. The contents are not reset.
module peanut_memory
  import peanut_pkg::*;
#(
  parameter int unsigned CELLS = 1 << ADDR_W  // 1024
)(
  input  logic  clk,
  input  addr_t addr,
  input  word_t wdata,
  input  logic  write,  // Read/Write line: 1 = Write, 0 = Read
  input  logic  en,     // Enable line
  output word_t rdata
);

  word_t mem [CELLS];

  always_ff @(posedge clk) begin
    if (en && write) mem[addr] <= wdata;
  end

  assign rdata = (en && !write) ? mem[addr] : '0;

endmodule
