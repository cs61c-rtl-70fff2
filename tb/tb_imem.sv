// tb_imem: self-checking test of the instruction memory: fill it through the
// load port with random words, then read every word back combinationally by
// byte address, including low address bits and addresses beyond the size
// (which wrap).
`timescale 1ns/1ps
module tb_imem;
  localparam int W = 64;
  logic        clk = 0, we = 0;
  logic [5:0]  la = '0;
  logic [31:0] ld = '0, addr = '0, inst;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  imem #(.WORDS(W)) dut (.clk, .addr, .inst, .load_we(we), .load_addr(la), .load_data(ld));

  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      we = 1; la = 6'(i); ld = $urandom; model[i] = ld;
    end
    @(negedge clk);
    we = 0;
    repeat (500) begin
      int k;
      k = int'($urandom % W);
      addr = 32'(4 * k) + ($urandom % 4) + (($urandom % 2) * 32'(4 * W));
      #1;
      checks++;
      if (inst !== model[k]) begin
        failures++;
        $display("FAIL addr %h inst %h exp %h", addr, inst, model[k]);
      end
    end
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
