// tb_ctrl_ref_pkg: reference for the controller tests, written as the control
// truth table: one row per RV32I instruction with the value of every control
// signal, and a care mask for the "don't care" entries (ImmSel of register-
// register ops, BrUn outside branches, WBSel when no register is written).
// ref_ctrl returns the expected word for an 11-bit controller input and
// whether the nine instruction bits name an RV32I instruction at all.
package tb_ctrl_ref_pkg;
  import rv_pkg::*;

  typedef struct {
    bit    valid;
    ctrl_t exp;
    bit    care_imm, care_brun, care_wb;
  } ref_t;

  function automatic ref_t row(logic pcsel, imm_sel_e imm, bit ci, logic brun, bit cb,
                               logic asel, logic bsel, alu_sel_e alu, logic mem, logic wen,
                               wb_sel_e wb, bit cw);
    ref_t r;
    r.valid = 1;
    r.exp = '{pc_sel: pcsel, imm_sel: imm, br_un: brun, a_sel: asel, b_sel: bsel,
              alu_sel: alu, mem_rw: mem, reg_wen: wen, wb_sel: wb};
    r.care_imm = ci; r.care_brun = cb; r.care_wb = cw;
    return r;
  endfunction

  function automatic ref_t ref_ctrl(logic [8:0] bits, logic eq, logic lt);
    logic       i30 = bits[8];
    logic [2:0] f3  = bits[7:5];
    logic [6:0] opc = {bits[4:0], 2'b11};
    ref_t r;
    r.valid = 0;
    r.exp = '0; r.care_imm = 0; r.care_brun = 0; r.care_wb = 0;
    case (opc)
      7'b0110011: begin   // R-R op: +4, -, -, Reg, Reg, op, Read, 1, ALU
        alu_sel_e a;
        bit ok = 1;
        case ({i30, f3})
          4'b0000: a = ALU_ADD;  4'b1000: a = ALU_SUB;  4'b0001: a = ALU_SLL;
          4'b0010: a = ALU_SLT;  4'b0011: a = ALU_SLTU; 4'b0100: a = ALU_XOR;
          4'b0101: a = ALU_SRL;  4'b1101: a = ALU_SRA;  4'b0110: a = ALU_OR;
          4'b0111: a = ALU_AND;  default: begin a = ALU_ADD; ok = 0; end
        endcase
        if (ok) r = row(0, IMM_I, 0, 0, 0, 0, 0, a, 0, 1, WB_ALU, 1);
      end
      7'b0010011: begin   // addi and friends: +4, I, -, Reg, Imm, op, Read, 1, ALU
        alu_sel_e a;
        bit ok = 1;
        case (f3)
          3'd0: a = ALU_ADD; 3'd2: a = ALU_SLT; 3'd3: a = ALU_SLTU; 3'd4: a = ALU_XOR;
          3'd6: a = ALU_OR;  3'd7: a = ALU_AND;
          3'd1: begin a = ALU_SLL; ok = !i30; end
          default: a = i30 ? ALU_SRA : ALU_SRL;
        endcase
        if (ok) r = row(0, IMM_I, 1, 0, 0, 0, 1, a, 0, 1, WB_ALU, 1);
      end
      7'b0000011:         // lw: +4, I, -, Reg, Imm, Add, Read, 1, Mem
        if (f3 inside {3'd0, 3'd1, 3'd2, 3'd4, 3'd5})
          r = row(0, IMM_I, 1, 0, 0, 0, 1, ALU_ADD, 0, 1, WB_MEM, 1);
      7'b0100011:         // sw: +4, S, -, Reg, Imm, Add, Write, 0, -
        if (f3 inside {3'd0, 3'd1, 3'd2})
          r = row(0, IMM_S, 1, 0, 0, 0, 1, ALU_ADD, 1, 0, WB_ALU, 0);
      7'b1100011: begin   // branches: +4/ALU, B, BrUn, PC, Imm, Add, Read, 0, -
        logic t;
        bit ok = 1;
        case (f3)
          3'd0: t = eq;  3'd1: t = !eq; 3'd4: t = lt; 3'd5: t = !lt;
          3'd6: t = lt;  3'd7: t = !lt; default: begin t = 0; ok = 0; end
        endcase
        if (ok) r = row(t, IMM_B, 1, f3[1], 1, 1, 1, ALU_ADD, 0, 0, WB_ALU, 0);
      end
      7'b1100111:         // jalr: ALU, I, -, Reg, Imm, Add, Read, 1, PC+4
        if (f3 == 0) r = row(1, IMM_I, 1, 0, 0, 0, 1, ALU_ADD, 0, 1, WB_PC4, 1);
      7'b1101111:         // jal: ALU, J, -, PC, Imm, Add, Read, 1, PC+4
        r = row(1, IMM_J, 1, 0, 0, 1, 1, ALU_ADD, 0, 1, WB_PC4, 1);
      7'b0010111:         // auipc: +4, U, -, PC, Imm, Add, Read, 1, ALU
        r = row(0, IMM_U, 1, 0, 0, 1, 1, ALU_ADD, 0, 1, WB_ALU, 1);
      7'b0110111:         // lui: +4, U, -, -, Imm, pass B, Read, 1, ALU
        r = row(0, IMM_U, 1, 0, 0, 0, 1, ALU_B, 0, 1, WB_ALU, 1);
      default: ;
    endcase
    return r;
  endfunction

  // compares a controller output with the reference; returns 1 when it matches
  function automatic bit ctrl_ok(ctrl_t got, ref_t r);
    bit ok = 1;
    if (!r.valid) return 1;
    ok &= got.pc_sel  == r.exp.pc_sel;
    ok &= got.alu_sel == r.exp.alu_sel;
    ok &= got.b_sel   == r.exp.b_sel;
    ok &= got.mem_rw  == r.exp.mem_rw;
    ok &= got.reg_wen == r.exp.reg_wen;
    // lui ignores operand A
    if (!(r.exp.alu_sel == ALU_B)) ok &= got.a_sel == r.exp.a_sel;
    if (r.care_imm)  ok &= got.imm_sel == r.exp.imm_sel;
    if (r.care_brun) ok &= got.br_un   == r.exp.br_un;
    if (r.care_wb)   ok &= got.wb_sel  == r.exp.wb_sel;
    return ok;
  endfunction
endpackage
