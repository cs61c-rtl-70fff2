// dmem: data memory.
//
// WORDS x 32-bit, byte-addressed. Reads are combinational: DataR is the byte,
// halfword or word at Addr, sign- or zero-extended as funct3 asks (LB, LH, LW,
// LBU, LHU). Writes happen on the rising clock edge when MemRW = 1 and store
// the low byte, halfword or word of DataW (SB, SH, SW). The access size comes
// from the instruction's funct3, which is this design's choice: the 15-bit
// controller word carries only MemRW. A halfword uses Addr[1], a word ignores
// Addr[1:0] (no misaligned accesses); address bits above the size are ignored.
module dmem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic [31:0] data_w,
  input  logic        mem_rw,
  input  logic [2:0]  funct3,
  output logic [31:0] data_r
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] widx;
  logic [31:0]   word;
  logic [7:0]    rbyte;
  logic [15:0]   rhalf;

  assign widx  = addr[AW+1:2];
  assign word  = mem[widx];
  assign rbyte = word[8*addr[1:0] +: 8];
  assign rhalf = word[16*addr[1] +: 16];

  always_comb begin
    unique case (funct3)
      3'b000:  data_r = {{24{rbyte[7]}}, rbyte};   // LB
      3'b001:  data_r = {{16{rhalf[15]}}, rhalf};  // LH
      3'b100:  data_r = {24'd0, rbyte};            // LBU
      3'b101:  data_r = {16'd0, rhalf};            // LHU
      default: data_r = word;                      // LW
    endcase
  end

  always_ff @(posedge clk) begin
    if (mem_rw) begin
      unique case (funct3[1:0])
        2'b00:   mem[widx][8*addr[1:0] +: 8] <= data_w[7:0];
        2'b01:   mem[widx][16*addr[1] +: 16] <= data_w[15:0];
        default: mem[widx] <= data_w;
      endcase
    end
  end

endmodule
