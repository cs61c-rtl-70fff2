// tb_dmem: self-checking test of the data memory against a byte-array model:
// random byte, halfword and word stores and loads (signed and unsigned),
// naturally aligned, with loads checked in the same cycle as their address.
`timescale 1ns/1ps
module tb_dmem;
  localparam int W = 64;
  logic        clk = 0, rw = 0;
  logic [31:0] addr = '0, dw = '0, dr;
  logic [2:0]  f3 = 3'd2;
  logic [7:0]  model [4*W];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dmem #(.WORDS(W)) dut (.clk, .addr, .data_w(dw), .mem_rw(rw), .funct3(f3), .data_r(dr));

  function automatic logic [31:0] expect_load(logic [2:0] f, int a);
    logic [31:0] v;
    case (f[1:0])
      2'd0: v = {24'd0, model[a]};
      2'd1: v = {16'd0, model[a + 1], model[a]};
      default: v = {model[a + 3], model[a + 2], model[a + 1], model[a]};
    endcase
    if (!f[2] && f[1:0] == 0 && v[7])  v[31:8]  = '1;
    if (!f[2] && f[1:0] == 1 && v[15]) v[31:16] = '1;
    return v;
  endfunction

  initial begin
    // fill with words
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      rw = 1; f3 = 3'd2; addr = 32'(4 * i); dw = $urandom;
      for (int k = 0; k < 4; k++) model[4 * i + k] = dw[8*k +: 8];
    end
    repeat (3000) begin
      int kind, sz, a;
      kind = int'($urandom % 3);
      sz = 1 << kind;
      @(negedge clk);
      a = int'($urandom % (4 * W)) / sz * sz;
      addr = 32'(a);
      if ($urandom % 2 != 0) begin
        rw = 1; f3 = 3'(kind); dw = $urandom;
        for (int k = 0; k < sz; k++) model[a + k] = dw[8*k +: 8];
      end else begin
        logic [2:0] lf;
        lf = (kind == 2) ? 3'd2 : 3'(kind) | (($urandom % 2 != 0) ? 3'd4 : 3'd0);
        rw = 0; f3 = lf; #1;
        checks++;
        if (dr !== expect_load(lf, a)) begin
          failures++;
          $display("FAIL load f3 %0d addr %h got %h exp %h", lf, a, dr, expect_load(lf, a));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
