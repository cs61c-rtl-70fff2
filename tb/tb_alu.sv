// tb_alu: self-checking test of the ALU. For each ALUSel code it applies
// corner and random operands and compares with results worked out here
// bit by bit (shifts by repeated single-bit steps, comparisons by sign and
// magnitude), not with the operators the ALU uses.
`timescale 1ns/1ps
module tb_alu;
  import rv_pkg::*;

  logic [31:0] a, b, y;
  alu_sel_e    sel;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .alu_sel(sel), .y);

  function automatic logic [31:0] model(alu_sel_e s, logic [31:0] x, logic [31:0] z);
    logic [31:0] r;
    case (s)
      ALU_ADD:  r = x + z;
      ALU_SUB:  r = x + ~z + 1;
      ALU_SLL:  begin r = x; repeat (int'(z[4:0])) r = {r[30:0], 1'b0}; end
      ALU_SRL:  begin r = x; repeat (int'(z[4:0])) r = {1'b0, r[31:1]}; end
      ALU_SRA:  begin r = x; repeat (int'(z[4:0])) r = {r[31], r[31:1]}; end
      ALU_SLT:  r = (x[31] != z[31]) ? {31'd0, x[31]} : {31'd0, x[30:0] < z[30:0]};
      ALU_SLTU: r = {31'd0, x < z};
      ALU_XOR:  r = (x | z) & ~(x & z);
      ALU_OR:   r = ~(~x & ~z);
      ALU_AND:  r = ~(~x | ~z);
      ALU_B:    r = z;
      default:  r = 'x;
    endcase
    return r;
  endfunction

  localparam alu_sel_e OPS [11] = '{ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR,
                                    ALU_SRL, ALU_SRA, ALU_OR, ALU_AND, ALU_B};
  localparam logic [31:0] CORNER [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000,
                                         32'h7fff_ffff, 32'h0000_001f};

  initial begin
    foreach (OPS[o]) begin
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 6; j++) begin
          sel = OPS[o]; a = CORNER[i]; b = CORNER[j]; #1;
          checks++;
          if (y !== model(sel, a, b)) begin
            failures++;
            $display("FAIL op %s a %h b %h y %h exp %h", sel.name(), a, b, y, model(sel, a, b));
          end
        end
      repeat (300) begin
        sel = OPS[o]; a = $urandom; b = $urandom; #1;
        checks++;
        if (y !== model(sel, a, b)) begin
          failures++;
          $display("FAIL op %s a %h b %h y %h exp %h", sel.name(), a, b, y, model(sel, a, b));
        end
      end
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
