// peanut_addr_adder: the adder in front of the Memory Address Register.
//
// It adds a base address from the CI/PC side and an offset from the register
// side, modulo 1024, and hands the sum to MAR. The control unit uses it to
// form MAR <- PC - 1 during instruction fetch (offset all ones) and
// MAR <- opspec during operand evaluation (offset zero). Combinational.
//
// The adder and where its inputs come from are taken from the block diagram
// of the machine; its use for PC - 1 follows the fetch sequence. Which
// registers feed the offset in indexed and stack mode is not described and
// is not built.
module peanut_addr_adder
  import peanut_pkg::*;
(
  input  addr_t base,
  input  addr_t offset,
  output addr_t sum
);

  assign sum = base + offset;

endmodule
