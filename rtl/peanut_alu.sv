// peanut_alu: the PeANUt arithmetic and logic unit, C = A op B.
//
// A is the accumulator and B the operand held in MDR. The unit works on
// 16-bit 2's complement words and returns, next to the result, the status
// bits that the control unit copies into the condition codes: Z (zero),
// N (bit 15 set), C (carry out of bit 15) and V (signed overflow).
// Purely combinational; the result is valid in the cycle its inputs are.
//
// Operations: ALU_ADD, the 2's complement addition the ADD instruction needs,
// and ALU_PASS_B, which hands the operand through for LOAD (C and V then
// read zero). The description says the unit also does logic operations but
// does not list them, so none are built here.
module peanut_alu
  import peanut_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   c,
  output cc_t     status
);

  logic [WORD_W:0] sum;

  always_comb begin
    sum    = {1'b0, a} + {1'b0, b};
    status = '0;
    unique case (op)
      ALU_ADD: begin
        c        = sum[WORD_W-1:0];
        status.c = sum[WORD_W];
        status.v = (a[WORD_W-1] == b[WORD_W-1]) && (c[WORD_W-1] != a[WORD_W-1]);
      end
      default: c = b;
    endcase
    status.n = c[WORD_W-1];
    status.z = (c == '0);
  end

endmodule
