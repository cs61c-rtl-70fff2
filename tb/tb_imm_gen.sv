// tb_imm_gen: self-checking test of the immediate generator. For each format
// it picks a random immediate in range, encodes an instruction holding it with
// the testbench's own encoders (other fields random) and checks that the
// generator returns the same value.
`timescale 1ns/1ps
module tb_imm_gen;
  import rv_pkg::*;
  import tb_rv_pkg::*;

  logic [31:0] inst, imm;
  imm_sel_e    sel;
  int checks = 0, failures = 0;

  imm_gen dut (.inst(inst[31:7]), .imm_sel(sel), .imm);

  task automatic one(imm_sel_e s, logic [31:0] w, logic [31:0] exp);
    sel = s; inst = w; #1;
    checks++;
    if (imm !== exp) begin
      failures++;
      $display("FAIL %s inst %h imm %h exp %h", s.name(), w, imm, exp);
    end
  endtask

  initial begin
    repeat (400) begin
      int v;
      logic [4:0] r1, r2;
      logic [2:0] f3;
      r1 = 5'($urandom); r2 = 5'($urandom); f3 = 3'($urandom);
      v = int'($urandom % 4096) - 2048;
      one(IMM_I, enc_i(v, r1, f3, r2, 7'($urandom)), 32'(v));
      v = int'($urandom % 4096) - 2048;
      one(IMM_S, enc_s(v, r2, r1, f3), 32'(v));
      v = (int'($urandom % 4096) - 2048) * 2;
      one(IMM_B, enc_b(v, r2, r1, f3), 32'(v));
      v = int'($urandom % 32'h100000);
      one(IMM_U, enc_u(v, r1, 7'($urandom)), 32'(v) << 12);
      v = (int'($urandom % 32'h100000) - 32'h80000) * 2;
      one(IMM_J, enc_j(v, r1), 32'(v));
    end
    one(IMM_I, enc_i(-1, 5'd3, 3'd0, 5'd1, 7'h13), 32'hffff_ffff);
    one(IMM_B, enc_b(-4096, 5'd3, 5'd1, 3'd0), 32'hffff_f000);
    one(IMM_J, enc_j(1048574, 5'd1), 32'h000f_fffe);
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
