// branch_comp: the branch comparator of the RV32I datapath.
//
// Combinational. Compares the two register operands: BrEq is high when they are
// equal, BrLT when A < B, as signed numbers when BrUn = 0 and as unsigned
// numbers when BrUn = 1. The controller turns these two flags into PCSel.
module branch_comp (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        br_un,
  output logic        br_eq,
  output logic        br_lt
);

  assign br_eq = (a == b);
  assign br_lt = br_un ? (a < b) : ($signed(a) < $signed(b));

endmodule
