// tb_control_rom: exhaustive self-checking test of the control_rom controller. It
// applies all 2048 values of the 11-bit input and, for every one that encodes
// an RV32I instruction, compares the 15-bit control word with the truth-table
// reference in tb_ctrl_ref_pkg (don't-care entries are not compared). For the
// rest (fence, ecall, ebreak, CSR and illegal codes) it checks that nothing is
// written: RegWEn = 0, MemRW = 0, PCSel = 0.
`timescale 1ns/1ps
module tb_control_rom;
  import rv_pkg::*;
  import tb_ctrl_ref_pkg::*;

  logic [8:0] bits;
  logic       eq, lt;
  ctrl_t      ctrl;
  int checks = 0, failures = 0, valid = 0;

  control_rom dut (.inst_bits(bits), .br_eq(eq), .br_lt(lt), .ctrl);

  initial begin
    for (int a = 0; a < 2048; a++) begin
      ref_t r;
      {bits, eq, lt} = 11'(a);
      #1;
      r = ref_ctrl(bits, eq, lt);
      checks++;
      if (r.valid) begin
        valid++;
        if (!ctrl_ok(ctrl, r)) begin
          failures++;
          if (failures < 10) $display("FAIL addr %b got %p exp %p", 11'(a), ctrl, r.exp);
        end
      end else if (bits[4:0] inside {5'b00011, 5'b11100}) begin
        if (ctrl.reg_wen || ctrl.mem_rw || ctrl.pc_sel) begin
          failures++;
          $display("FAIL addr %b: fence/system must not write", 11'(a));
        end
      end
    end
    $display("%0d of 2048 inputs are RV32I instructions", valid);
    checks++;
    if (valid != 412) begin  // 103 instruction codes x 4 flag values
      failures++;
      $display("FAIL wrong number of RV32I inputs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
