// control_logic: combinational controller of the RV32I datapath.
//
// 11-bit input: the nine instruction bits {inst[30], inst[14:12], inst[6:2]}
// plus the branch comparator flags BrEq and BrLT. 15-bit output: the control
// word ctrl_t (PCSel, ImmSel, BrUn, ASel, BSel, ALUSel, MemRW, RegWEn, WBSel).
// This is the "logic equations" realization: one small equation per control
// signal, sharing the opcode decode terms. The values follow the reference
// truth table (add/sub/R-R ops, addi, lw, sw, beq, bne, blt, bltu, jalr, jal,
// auipc) and extend it in the same way to the rest of RV32I that the
// instruction list shows (I-type ALU ops and shifts, the other loads and
// stores, bge/bgeu, lui). fence, ecall, ebreak and the CSR instructions are
// decoded as no-ops (no register or memory write), which is this design's
// choice. Don't-care outputs are driven to the values that need the least logic.
// Purely combinational, no clock.
module control_logic
  import rv_pkg::*;
(
  input  logic [8:0] inst_bits,  // {inst[30], inst[14:12], inst[6:2]}
  input  logic       br_eq,
  input  logic       br_lt,
  output ctrl_t      ctrl
);

  logic       i30;
  logic [2:0] f3;
  logic [4:0] op5;
  assign {i30, f3, op5} = inst_bits;

  logic is_load, is_store, is_opimm, is_op, is_lui, is_auipc, is_branch, is_jal, is_jalr;
  assign is_load   = (op5 == OP5_LOAD);
  assign is_store  = (op5 == OP5_STORE);
  assign is_opimm  = (op5 == OP5_OPIMM);
  assign is_op     = (op5 == OP5_OP);
  assign is_lui    = (op5 == OP5_LUI);
  assign is_auipc  = (op5 == OP5_AUIPC);
  assign is_branch = (op5 == OP5_BRANCH);
  assign is_jal    = (op5 == OP5_JAL);
  assign is_jalr   = (op5 == OP5_JALR);

  // beq/bne test BrEq, blt/bge/bltu/bgeu test BrLT; funct3[0] inverts the test
  logic taken;
  assign taken = (f3[2] ? br_lt : br_eq) ^ f3[0];

  // inst[30] selects sub/sra for R-type; for I-type it is an immediate bit and
  // only counts for the right shifts (srai)
  logic alt;
  assign alt = is_op ? i30 : (is_opimm && f3 == 3'b101) ? i30 : 1'b0;

  always_comb begin
    ctrl.pc_sel  = is_jal | is_jalr | (is_branch & taken);
    ctrl.imm_sel = is_store              ? IMM_S :
                   is_branch             ? IMM_B :
                   (is_lui | is_auipc)   ? IMM_U :
                   is_jal                ? IMM_J : IMM_I;
    ctrl.br_un   = is_branch & f3[1];
    ctrl.a_sel   = is_branch | is_jal | is_auipc;
    ctrl.b_sel   = ~is_op;
    ctrl.alu_sel = is_lui                ? ALU_B :
                   (is_op | is_opimm)    ? alu_sel_e'({alt, f3}) : ALU_ADD;
    ctrl.mem_rw  = is_store;
    ctrl.reg_wen = is_op | is_opimm | is_load | is_lui | is_auipc | is_jal | is_jalr;
    ctrl.wb_sel  = is_load               ? WB_MEM :
                   (is_jal | is_jalr)    ? WB_PC4 : WB_ALU;
  end

endmodule
