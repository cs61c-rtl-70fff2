// tb_branch_comp: self-checking test of the branch comparator, signed and
// unsigned, with equal, corner and random operands. Expected flags come from
// comparing sign bits and magnitudes here.
`timescale 1ns/1ps
module tb_branch_comp;
  logic [31:0] a, b;
  logic        br_un, br_eq, br_lt;
  int checks = 0, failures = 0;

  branch_comp dut (.a, .b, .br_un, .br_eq, .br_lt);

  task automatic one(logic [31:0] x, logic [31:0] z, logic un);
    logic e, l;
    a = x; b = z; br_un = un; #1;
    e = (x ^ z) == 0;
    if (un || x[31] == z[31]) l = x < z;   // same sign: the magnitude order holds
    else                      l = x[31];   // different signs: the negative one is less
    checks++;
    if (br_eq !== e || br_lt !== l) begin
      failures++;
      $display("FAIL a %h b %h un %0b: eq %0b lt %0b exp %0b %0b", x, z, un, br_eq, br_lt, e, l);
    end
  endtask

  initial begin
    logic [31:0] v;
    for (int u = 0; u < 2; u++) begin
      one(32'h0, 32'h0, 1'(u));
      one(32'hffff_ffff, 32'h1, 1'(u));
      one(32'h1, 32'hffff_ffff, 1'(u));
      one(32'h8000_0000, 32'h7fff_ffff, 1'(u));
      one(32'h7fff_ffff, 32'h8000_0000, 1'(u));
      repeat (500) one($urandom, $urandom, 1'(u));
      repeat (100) begin v = $urandom; one(v, v, 1'(u)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
