// peanut_cpu: the PeANUt central processing unit, control unit and registers.
//
// The CPU repeats the execution cycle of the machine: PC <- PC + 1, fetch
// CI <- mem[PC - 1], evaluate the operand, execute. Every step is one state
// of the control unit and takes one clock cycle:
//
//   FETCH_PC   PC <- PC + 1
//   FETCH_MAR  MAR <- PC - 1 (through the address adder)
//   FETCH_RD   Read, Enable; MDR <- mem[MAR]
//   FETCH_CI   CI <- MDR
//   EVAL       decode CI; immediate: MDR <- opspec, direct and indirect:
//              MAR <- opspec
//   IND_RD     (indirect) Read, Enable; MDR <- mem[MAR]
//   IND_MAR    (indirect) MAR <- MDR
//   OP_RD      (direct, indirect) Read, Enable; MDR <- mem[MAR]
//   EXEC       AC <- ALU(AC, MDR); CC <- ALU status
//
// An instruction therefore takes 6 cycles in immediate mode, 7 in direct
// mode and 9 in indirect mode. instr_done pulses for one cycle in EXEC.
//
// Implemented instructions are the format-one LOAD (opcode 001) and ADD
// (opcode 011) in the immediate (000), direct (001) and indirect (010)
// modes, as the description defines them. The other opcodes, the formats two
// and three and the indexed and stack modes are not defined there; this
// design's own choice is to stop on any such word: the CPU enters HALT,
// raises halted and illegal, and stays there until reset. The stack pointer
// and index register are therefore not built, as no implemented instruction
// reads or writes them. Further own choices: the immediate operand is the
// 10-bit opspec sign-extended to 16 bits; an indirect address uses the low
// 10 bits of the fetched word; LOAD and ADD both update the condition codes;
// reset (active low, synchronous) clears PC, CC, AC, CI, MAR and MDR.
//
// Memory interface: mem_addr is MAR, mem_wdata is MDR, mem_write and mem_en
// are the Read/Write and Enable lines, mem_rdata is the data the memory
// returns in the same cycle. No implemented instruction writes memory, so
// mem_write stays low.
module peanut_cpu
  import peanut_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // memory bus
  output addr_t mem_addr,
  output word_t mem_wdata,
  output logic  mem_write,
  output logic  mem_en,
  input  word_t mem_rdata,
  // visible state
  output word_t ac,
  output psw_t  psw,
  output word_t ci,
  output logic  instr_done,
  output logic  halted,
  output logic  illegal
);

  typedef enum logic [3:0] {
    S_FETCH_PC,
    S_FETCH_MAR,
    S_FETCH_RD,
    S_FETCH_CI,
    S_EVAL,
    S_IND_RD,
    S_IND_MAR,
    S_OP_RD,
    S_EXEC,
    S_HALT
  } state_e;

  state_e    state_q, state_d;
  word_t     ac_q, ci_q, mdr_q;
  addr_t     mar_q, pc_q;
  cc_t       cc_q;
  logic      illegal_q;
  instr_f1_t ir;

  // address adder in front of MAR
  addr_t adder_base, adder_offset, adder_sum;
  peanut_addr_adder u_adder (
    .base  (adder_base),
    .offset(adder_offset),
    .sum   (adder_sum)
  );

  // ALU
  alu_op_e alu_op;
  word_t   alu_c;
  cc_t     alu_status;
  peanut_alu u_alu (
    .op    (alu_op),
    .a     (ac_q),
    .b     (mdr_q),
    .c     (alu_c),
    .status(alu_status)
  );

  assign ir = instr_f1_t'(ci_q);

  logic legal;
  always_comb begin
    legal = (ir.mode == MODE_IMMEDIATE || ir.mode == MODE_DIRECT ||
             ir.mode == MODE_INDIRECT) &&
            (ir.opcode == OP_LOAD || ir.opcode == OP_ADD);
  end

  always_comb begin
    alu_op = (ir.opcode == OP_ADD) ? ALU_ADD : ALU_PASS_B;
    // The adder forms PC - 1 during fetch, otherwise passes an address with
    // a zero offset.
    adder_base   = ir.opspec;
    adder_offset = '0;
    unique case (state_q)
      S_FETCH_MAR: begin
        adder_base   = pc_q;
        adder_offset = '1;
      end
      S_IND_MAR: adder_base = mdr_q[ADDR_W-1:0];
      default: ;
    endcase
  end

  // next state
  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_FETCH_PC:  state_d = S_FETCH_MAR;
      S_FETCH_MAR: state_d = S_FETCH_RD;
      S_FETCH_RD:  state_d = S_FETCH_CI;
      S_FETCH_CI:  state_d = S_EVAL;
      S_EVAL: begin
        if (!legal)                         state_d = S_HALT;
        else if (ir.mode == MODE_IMMEDIATE) state_d = S_EXEC;
        else if (ir.mode == MODE_DIRECT)    state_d = S_OP_RD;
        else                                state_d = S_IND_RD;
      end
      S_IND_RD:    state_d = S_IND_MAR;
      S_IND_MAR:   state_d = S_OP_RD;
      S_OP_RD:     state_d = S_EXEC;
      S_EXEC:      state_d = S_FETCH_PC;
      S_HALT:      state_d = S_HALT;
      default:     state_d = S_HALT;
    endcase
  end

  assign mem_en = (state_q == S_FETCH_RD) || (state_q == S_IND_RD) ||
                  (state_q == S_OP_RD);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q   <= S_FETCH_PC;
      pc_q      <= '0;
      cc_q      <= '0;
      ac_q      <= '0;
      ci_q      <= '0;
      mar_q     <= '0;
      mdr_q     <= '0;
      illegal_q <= 1'b0;
    end else begin
      state_q <= state_d;
      unique case (state_q)
        S_FETCH_PC:  pc_q  <= pc_q + 1'b1;
        S_FETCH_MAR: mar_q <= adder_sum;
        S_FETCH_RD:  mdr_q <= mem_rdata;
        S_FETCH_CI:  ci_q  <= mdr_q;
        S_EVAL: begin
          if (!legal)                         illegal_q <= 1'b1;
          else if (ir.mode == MODE_IMMEDIATE) mdr_q <= word_t'(signed'(ir.opspec));
          else                                mar_q <= adder_sum;
        end
        S_IND_RD:    mdr_q <= mem_rdata;
        S_IND_MAR:   mar_q <= adder_sum;
        S_OP_RD:     mdr_q <= mem_rdata;
        S_EXEC: begin
          ac_q <= alu_c;
          cc_q <= alu_status;
        end
        default: ;
      endcase
    end
  end

  assign mem_addr   = mar_q;
  assign mem_wdata  = mdr_q;
  assign mem_write  = 1'b0;
  assign ac         = ac_q;
  assign psw        = '{cc: cc_q, pc: pc_q};
  assign ci         = ci_q;
  assign instr_done = (state_q == S_EXEC);
  assign halted     = (state_q == S_HALT);
  assign illegal    = illegal_q;

  // The condition-code bits without a meaning stay zero.
  a_cc_rsvd: assert property (@(posedge clk) disable iff (!rst_n) cc_q.rsvd == 2'b00);
  // Memory is only enabled in a read state, never written.
  a_no_write: assert property (@(posedge clk) disable iff (!rst_n) !(mem_en && mem_write));

endmodule
