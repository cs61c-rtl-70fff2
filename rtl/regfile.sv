// regfile: the 32 x 32-bit integer register file Reg[].
//
// Two combinational read ports (AddrA -> DataA, AddrB -> DataB) and one write
// port (AddrD, DataD) written on the rising clock edge when RegWEn is high.
// Register x0 always reads zero and ignores writes. A read in the same cycle as
// a write to the same register returns the old value; the new value is visible
// from the next cycle. Reset (active low, synchronous) clears all registers,
// which is this design's choice: the reference gives no reset behaviour.
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned XLEN  = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     reg_wen,
  input  logic [$clog2(NREGS)-1:0] addr_d,
  input  logic [XLEN-1:0]          data_d,
  input  logic [$clog2(NREGS)-1:0] addr_a,
  input  logic [$clog2(NREGS)-1:0] addr_b,
  output logic [XLEN-1:0]          data_a,
  output logic [XLEN-1:0]          data_b
);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (reg_wen && addr_d != '0) begin
      regs[addr_d] <= data_d;
    end
  end

  assign data_a = (addr_a == '0) ? '0 : regs[addr_a];
  assign data_b = (addr_b == '0) ? '0 : regs[addr_b];

endmodule
