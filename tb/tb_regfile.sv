// tb_regfile: self-checking test of the register file against an array model:
// random writes and reads, x0 stays zero, a write is visible from the next
// cycle (a same-cycle read returns the old value), RegWEn = 0 writes nothing,
// and reset clears every register.
`timescale 1ns/1ps
module tb_regfile;
  logic        clk = 0, rst_n = 0, we = 0;
  logic [4:0]  ad = '0, aa = '0, ab = '0;
  logic [31:0] dd = '0, da, db;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  regfile dut (.clk, .rst_n, .reg_wen(we), .addr_d(ad), .data_d(dd),
               .addr_a(aa), .addr_b(ab), .data_a(da), .data_b(db));

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      aa = 5'(i); ab = 5'(31 - i); #1;
      chk(da, 0, "after reset A"); chk(db, 0, "after reset B");
    end
    repeat (2000) begin
      @(negedge clk);
      we = 1'($urandom); ad = 5'($urandom); dd = $urandom;
      aa = 5'($urandom); ab = ($urandom % 4 == 0) ? ad : 5'($urandom);
      #1;
      chk(da, model[aa], $sformatf("read A x%0d", aa));
      chk(db, model[ab], $sformatf("read B x%0d (same-cycle write %0b x%0d)", ab, we, ad));
      @(posedge clk);
      if (we && ad != 0) model[ad] = dd;
    end
    @(negedge clk);
    we = 0; rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      aa = 5'(i); #1; chk(da, 0, "after second reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
