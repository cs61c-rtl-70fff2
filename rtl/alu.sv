// alu: the 32-bit arithmetic/logic unit of the RV32I datapath.
//
// Purely combinational. ALUSel (4 bits, codes in rv_pkg) picks one of add, sub,
// the three shifts, slt, sltu, xor, or, and, or "pass B" (used for LUI, whose
// U-immediate arrives on B). Shifts use b[4:0] as the shift amount. The set of
// operations is that of the RV32I instruction list; the codes and the pass-B
// operation are this design's own choice.
module alu
  import rv_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_sel_e    alu_sel,
  output logic [31:0] y
);

  logic [4:0] shamt;
  assign shamt = b[4:0];

  always_comb begin
    unique case (alu_sel)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_SLL:  y = a << shamt;
      ALU_SLT:  y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'd0, a < b};
      ALU_XOR:  y = a ^ b;
      ALU_SRL:  y = a >> shamt;
      ALU_SRA:  y = $unsigned($signed(a) >>> shamt);
      ALU_OR:   y = a | b;
      ALU_AND:  y = a & b;
      ALU_B:    y = b;
      default:  y = a + b;
    endcase
  end

endmodule
