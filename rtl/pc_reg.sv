// pc_reg: program counter with its +4 adder and next-PC multiplexer.
//
// On each rising clock edge the PC loads either pc+4 (PCSel = 0) or the ALU
// result (PCSel = 1), the two inputs of the PCSel multiplexer of the reference
// datapath. pc_plus4 is also given to the write-back multiplexer for JAL/JALR.
// Reset (active low, synchronous) sets the PC to RESET_PC; the reset address
// and the stall-free, every-cycle update are this design's choices.
module pc_reg #(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pc_sel,
  input  logic [31:0] alu,
  output logic [31:0] pc,
  output logic [31:0] pc_plus4
);

  assign pc_plus4 = pc + 32'd4;

  always_ff @(posedge clk) begin
    if (!rst_n)      pc <= RESET_PC;
    else if (pc_sel) pc <= alu;
    else             pc <= pc_plus4;
  end

endmodule
