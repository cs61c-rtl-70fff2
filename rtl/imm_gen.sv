// imm_gen: immediate generator of the RV32I datapath.
//
// Combinational. Takes inst[31:7] and ImmSel and returns the 32-bit immediate
// of the selected format, sign-extended from inst[31]:
//   I: inst[31:20]                       S: {inst[31:25], inst[11:7]}
//   B: {inst[31], inst[7], inst[30:25], inst[11:8], 0}
//   U: {inst[31:12], 12'b0}              J: {inst[31], inst[19:12], inst[20], inst[30:21], 0}
// The formats are the RV32I ones; the ImmSel codes are in rv_pkg.
module imm_gen
  import rv_pkg::*;
(
  input  logic [31:7] inst,
  input  imm_sel_e    imm_sel,
  output logic [31:0] imm
);

  always_comb begin
    unique case (imm_sel)
      IMM_I:   imm = {{21{inst[31]}}, inst[30:20]};
      IMM_S:   imm = {{21{inst[31]}}, inst[30:25], inst[11:7]};
      IMM_B:   imm = {{20{inst[31]}}, inst[7], inst[30:25], inst[11:8], 1'b0};
      IMM_U:   imm = {inst[31:12], 12'd0};
      IMM_J:   imm = {{12{inst[31]}}, inst[19:12], inst[20], inst[30:21], 1'b0};
      default: imm = {{21{inst[31]}}, inst[30:20]};
    endcase
  end

endmodule
