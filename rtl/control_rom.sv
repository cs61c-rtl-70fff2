// control_rom: ROM realization of the RV32I controller.
//
// Same interface and same function as control_logic: the 11-bit address
// {inst[30], inst[14:12], inst[6:2], BrEq, BrLT} selects a 15-bit control word.
// Built the way a control ROM is organized: an address decoder raises one word
// line per instruction (and, for a conditional branch, one per outcome), and
// the word lines select rows of a table of control words. Address bits an
// instruction does not depend on are "for all values" in its decoder pattern.
// An address no word line matches (fence, ecall, ebreak, CSR, illegal codes)
// reads the all-zero word, which writes neither a register nor memory and
// advances the PC by 4. Purely combinational.
// The decoder-plus-word-table structure follows the reference ROM controller
// figure; the row order and the codes inside the words are this design's own.
module control_rom
  import rv_pkg::*;
(
  input  logic [8:0] inst_bits,  // {inst[30], inst[14:12], inst[6:2]}
  input  logic       br_eq,
  input  logic       br_lt,
  output ctrl_t      ctrl
);

  typedef enum logic [5:0] {
    W_ADD, W_SUB, W_SLL, W_SLT, W_SLTU, W_XOR, W_SRL, W_SRA, W_OR, W_AND,
    W_ADDI, W_SLTI, W_SLTIU, W_XORI, W_ORI, W_ANDI, W_SLLI, W_SRLI, W_SRAI,
    W_LB, W_LH, W_LW, W_LBU, W_LHU, W_SB, W_SH, W_SW,
    W_BEQ_N, W_BEQ_T, W_BNE_N, W_BNE_T, W_BLT_N, W_BLT_T, W_BGE_N, W_BGE_T,
    W_BLTU_N, W_BLTU_T, W_BGEU_N, W_BGEU_T,
    W_JALR, W_JAL, W_LUI, W_AUIPC,
    W_NONE
  } word_e;

  localparam int unsigned NWORDS = 43;

  function automatic ctrl_t cw(logic pc_sel, imm_sel_e imm, logic br_un, logic a_sel,
                               logic b_sel, alu_sel_e alu, logic mem_rw, logic reg_wen,
                               wb_sel_e wb);
    return '{pc_sel: pc_sel, imm_sel: imm, br_un: br_un, a_sel: a_sel, b_sel: b_sel,
             alu_sel: alu, mem_rw: mem_rw, reg_wen: reg_wen, wb_sel: wb};
  endfunction

  //                          PCSel ImmSel BrUn ASel BSel ALUSel   MemRW RegWEn WBSel
  localparam ctrl_t ROM [NWORDS] = '{
    cw(1'b0, IMM_I, 1'b0, 1'b0, 1'b0, ALU_ADD,  1'b0, 1'b1, WB_ALU),   // add
    cw(1'b0, IMM_I, 1'b0, 1'b0, 1'b0, ALU_SUB,  1'b0, 1'b1, WB_ALU),   // sub
    cw(1'b0, IMM_I, 1'b0, 1'b0, 1'b0, ALU_SLL,  1'b0, 1'b1, WB_ALU),   // sll
    cw(1'b0, IMM_I, 1'b0, 1'b0, 1'b0, ALU_SLT,  1'b0, 1'b1, WB_ALU),   // slt
    cw(1'b0, IMM_I, 1'b0, 1'b0, 1'b0, ALU_SLTU, 1'b0, 1'b1, WB_ALU),   // sltu
    cw(1'b0, IMM_I, 1'b0, 1'b0, 1'b0, ALU_XOR,  1'b0, 1'b1, WB_ALU),   // xor
    cw(1'b0, IMM_I, 1'b0, 1'b0, 1'b0, ALU_SRL,  1'b0, 1'b1, WB_ALU),   // srl
    cw(1'b0, IMM_I, 1'b0, 1'b0, 1'b0, ALU_SRA,  1'b0, 1'b1, WB_ALU),   // sra
    cw(1'b0, IMM_I, 1'b0, 1'b0, 1'b0, ALU_OR,   1'b0, 1'b1, WB_ALU),   // or
    cw(1'b0, IMM_I, 1'b0, 1'b0, 1'b0, ALU_AND,  1'b0, 1'b1, WB_ALU),   // and
    cw(1'b0, IMM_I, 1'b0, 1'b0, 1'b1, ALU_ADD,  1'b0, 1'b1, WB_ALU),   // addi
    cw(1'b0, IMM_I, 1'b0, 1'b0, 1'b1, ALU_SLT,  1'b0, 1'b1, WB_ALU),   // slti
    cw(1'b0, IMM_I, 1'b0, 1'b0, 1'b1, ALU_SLTU, 1'b0, 1'b1, WB_ALU),   // sltiu
    cw(1'b0, IMM_I, 1'b0, 1'b0, 1'b1, ALU_XOR,  1'b0, 1'b1, WB_ALU),   // xori
    cw(1'b0, IMM_I, 1'b0, 1'b0, 1'b1, ALU_OR,   1'b0, 1'b1, WB_ALU),   // ori
    cw(1'b0, IMM_I, 1'b0, 1'b0, 1'b1, ALU_AND,  1'b0, 1'b1, WB_ALU),   // andi
    cw(1'b0, IMM_I, 1'b0, 1'b0, 1'b1, ALU_SLL,  1'b0, 1'b1, WB_ALU),   // slli
    cw(1'b0, IMM_I, 1'b0, 1'b0, 1'b1, ALU_SRL,  1'b0, 1'b1, WB_ALU),   // srli
    cw(1'b0, IMM_I, 1'b0, 1'b0, 1'b1, ALU_SRA,  1'b0, 1'b1, WB_ALU),   // srai
    cw(1'b0, IMM_I, 1'b0, 1'b0, 1'b1, ALU_ADD,  1'b0, 1'b1, WB_MEM),   // lb
    cw(1'b0, IMM_I, 1'b0, 1'b0, 1'b1, ALU_ADD,  1'b0, 1'b1, WB_MEM),   // lh
    cw(1'b0, IMM_I, 1'b0, 1'b0, 1'b1, ALU_ADD,  1'b0, 1'b1, WB_MEM),   // lw
    cw(1'b0, IMM_I, 1'b0, 1'b0, 1'b1, ALU_ADD,  1'b0, 1'b1, WB_MEM),   // lbu
    cw(1'b0, IMM_I, 1'b0, 1'b0, 1'b1, ALU_ADD,  1'b0, 1'b1, WB_MEM),   // lhu
    cw(1'b0, IMM_S, 1'b0, 1'b0, 1'b1, ALU_ADD,  1'b1, 1'b0, WB_ALU),   // sb
    cw(1'b0, IMM_S, 1'b0, 1'b0, 1'b1, ALU_ADD,  1'b1, 1'b0, WB_ALU),   // sh
    cw(1'b0, IMM_S, 1'b0, 1'b0, 1'b1, ALU_ADD,  1'b1, 1'b0, WB_ALU),   // sw
    cw(1'b0, IMM_B, 1'b0, 1'b1, 1'b1, ALU_ADD,  1'b0, 1'b0, WB_ALU),   // beq  not taken
    cw(1'b1, IMM_B, 1'b0, 1'b1, 1'b1, ALU_ADD,  1'b0, 1'b0, WB_ALU),   // beq  taken
    cw(1'b0, IMM_B, 1'b0, 1'b1, 1'b1, ALU_ADD,  1'b0, 1'b0, WB_ALU),   // bne  not taken
    cw(1'b1, IMM_B, 1'b0, 1'b1, 1'b1, ALU_ADD,  1'b0, 1'b0, WB_ALU),   // bne  taken
    cw(1'b0, IMM_B, 1'b0, 1'b1, 1'b1, ALU_ADD,  1'b0, 1'b0, WB_ALU),   // blt  not taken
    cw(1'b1, IMM_B, 1'b0, 1'b1, 1'b1, ALU_ADD,  1'b0, 1'b0, WB_ALU),   // blt  taken
    cw(1'b0, IMM_B, 1'b0, 1'b1, 1'b1, ALU_ADD,  1'b0, 1'b0, WB_ALU),   // bge  not taken
    cw(1'b1, IMM_B, 1'b0, 1'b1, 1'b1, ALU_ADD,  1'b0, 1'b0, WB_ALU),   // bge  taken
    cw(1'b0, IMM_B, 1'b1, 1'b1, 1'b1, ALU_ADD,  1'b0, 1'b0, WB_ALU),   // bltu not taken
    cw(1'b1, IMM_B, 1'b1, 1'b1, 1'b1, ALU_ADD,  1'b0, 1'b0, WB_ALU),   // bltu taken
    cw(1'b0, IMM_B, 1'b1, 1'b1, 1'b1, ALU_ADD,  1'b0, 1'b0, WB_ALU),   // bgeu not taken
    cw(1'b1, IMM_B, 1'b1, 1'b1, 1'b1, ALU_ADD,  1'b0, 1'b0, WB_ALU),   // bgeu taken
    cw(1'b1, IMM_I, 1'b0, 1'b0, 1'b1, ALU_ADD,  1'b0, 1'b1, WB_PC4),   // jalr
    cw(1'b1, IMM_J, 1'b0, 1'b1, 1'b1, ALU_ADD,  1'b0, 1'b1, WB_PC4),   // jal
    cw(1'b0, IMM_U, 1'b0, 1'b0, 1'b1, ALU_B,    1'b0, 1'b1, WB_ALU),   // lui
    cw(1'b0, IMM_U, 1'b0, 1'b1, 1'b1, ALU_ADD,  1'b0, 1'b1, WB_ALU)    // auipc
  };

  // Address decoder: {inst[30], funct3, opcode[6:2], BrEq, BrLT} -> word line
  function automatic word_e decode(input logic [10:0] addr);
    word_e line;
    casez (addr)
      11'b0_000_01100_??: line = W_ADD;
      11'b1_000_01100_??: line = W_SUB;
      11'b0_001_01100_??: line = W_SLL;
      11'b0_010_01100_??: line = W_SLT;
      11'b0_011_01100_??: line = W_SLTU;
      11'b0_100_01100_??: line = W_XOR;
      11'b0_101_01100_??: line = W_SRL;
      11'b1_101_01100_??: line = W_SRA;
      11'b0_110_01100_??: line = W_OR;
      11'b0_111_01100_??: line = W_AND;
      11'b?_000_00100_??: line = W_ADDI;
      11'b?_010_00100_??: line = W_SLTI;
      11'b?_011_00100_??: line = W_SLTIU;
      11'b?_100_00100_??: line = W_XORI;
      11'b?_110_00100_??: line = W_ORI;
      11'b?_111_00100_??: line = W_ANDI;
      11'b0_001_00100_??: line = W_SLLI;
      11'b0_101_00100_??: line = W_SRLI;
      11'b1_101_00100_??: line = W_SRAI;
      11'b?_000_00000_??: line = W_LB;
      11'b?_001_00000_??: line = W_LH;
      11'b?_010_00000_??: line = W_LW;
      11'b?_100_00000_??: line = W_LBU;
      11'b?_101_00000_??: line = W_LHU;
      11'b?_000_01000_??: line = W_SB;
      11'b?_001_01000_??: line = W_SH;
      11'b?_010_01000_??: line = W_SW;
      11'b?_000_11000_0?: line = W_BEQ_N;
      11'b?_000_11000_1?: line = W_BEQ_T;
      11'b?_001_11000_1?: line = W_BNE_N;
      11'b?_001_11000_0?: line = W_BNE_T;
      11'b?_100_11000_?0: line = W_BLT_N;
      11'b?_100_11000_?1: line = W_BLT_T;
      11'b?_101_11000_?1: line = W_BGE_N;
      11'b?_101_11000_?0: line = W_BGE_T;
      11'b?_110_11000_?0: line = W_BLTU_N;
      11'b?_110_11000_?1: line = W_BLTU_T;
      11'b?_111_11000_?1: line = W_BGEU_N;
      11'b?_111_11000_?0: line = W_BGEU_T;
      11'b?_000_11001_??: line = W_JALR;
      11'b?_???_11011_??: line = W_JAL;
      11'b?_???_01101_??: line = W_LUI;
      11'b?_???_00101_??: line = W_AUIPC;
      default:            line = W_NONE;
    endcase
    return line;
  endfunction

  function automatic ctrl_t read_word(input word_e line);
    return (line == W_NONE) ? ctrl_t'('0) : ROM[line];
  endfunction

  // BrUn chooses how the comparator that produces BrEq/BrLT compares, so its
  // column is read at the word line decoded with the two flag bits at zero:
  // the BrUn bit of a branch is the same in its taken and not-taken words, and
  // this keeps the flags from feeding back into their own comparison.
  ctrl_t word, word_nf;
  assign word    = read_word(decode({inst_bits, br_eq, br_lt}));
  assign word_nf = read_word(decode({inst_bits, 2'b00}));

  always_comb begin
    ctrl       = word;
    ctrl.br_un = word_nf.br_un;
  end

endmodule
