// peanut_pkg: shared widths, field layouts and codes of the PeANUt machine.
//
// A PeANUt word is 16 bits and an address 10 bits (1024 memory cells).
// Format-one instructions carry a 3-bit addressing mode in bits 15-13, a
// 3-bit opcode in bits 12-10 and a 10-bit operand specifier (opspec) in bits
// 9-0. The Program Status Word holds the condition codes in bits 15-10 and
// the program counter in bits 9-0.
//
// From the description: the field positions, the mode codes 000 immediate,
// 001 direct, 010 indirect, 011 indexed and 100 stack, the ADD opcode 011 and
// the LOAD opcode 001 (read from the worked addressing-mode examples). Own
// choice: the assignment of the six condition-code bits, of which only four
// are used (Z, N, C, V) and the top two read as zero.
package peanut_pkg;

  localparam int unsigned WORD_W = 16;
  localparam int unsigned ADDR_W = 10;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;

  typedef enum logic [2:0] {
    MODE_IMMEDIATE = 3'b000,
    MODE_DIRECT    = 3'b001,
    MODE_INDIRECT  = 3'b010,
    MODE_INDEXED   = 3'b011,
    MODE_STACK     = 3'b100
  } mode_e;

  typedef enum logic [2:0] {
    OP_LOAD = 3'b001,
    OP_ADD  = 3'b011
  } opcode_e;

  // Format-one instruction layout.
  typedef struct packed {
    logic [2:0] mode;    // bits 15-13
    logic [2:0] opcode;  // bits 12-10
    addr_t      opspec;  // bits 9-0
  } instr_f1_t;

  // Condition codes: PSW bits 15-10.
  typedef struct packed {
    logic [1:0] rsvd;  // PSW 15-14, always zero
    logic v;           // PSW 13: 2's complement overflow
    logic c;           // PSW 12: carry out of bit 15
    logic n;           // PSW 11: result negative
    logic z;           // PSW 10: result zero
  } cc_t;

  typedef struct packed {
    cc_t   cc;  // bits 15-10
    addr_t pc;  // bits 9-0
  } psw_t;

  // ALU operations used by the implemented instructions.
  typedef enum logic [0:0] {
    ALU_PASS_B = 1'b0,  // C = B (LOAD)
    ALU_ADD    = 1'b1   // C = A + B (ADD)
  } alu_op_e;

endpackage
