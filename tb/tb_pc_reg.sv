// tb_pc_reg: self-checking test of the program counter: reset value, pc+4
// output, and the next PC for random PCSel and ALU values over many cycles.
`timescale 1ns/1ps
module tb_pc_reg;
  logic        clk = 0, rst_n = 0, pc_sel = 0;
  logic [31:0] alu = '0, pc, pc_plus4, exp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pc_reg #(.RESET_PC(32'h0000_0100)) dut (.clk, .rst_n, .pc_sel, .alu, .pc, .pc_plus4);

  task automatic chk(logic [31:0] got, logic [31:0] e, string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, e);
    end
  endtask

  initial begin
    @(negedge clk);
    rst_n = 1;
    exp = 32'h100;
    repeat (1000) begin
      chk(pc, exp, "pc");
      chk(pc_plus4, exp + 4, "pc+4");
      pc_sel = 1'($urandom); alu = $urandom & ~32'h3;
      @(negedge clk);
      exp = pc_sel ? alu : exp + 4;
    end
    rst_n = 0;
    @(negedge clk);
    chk(pc, 32'h100, "pc after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
