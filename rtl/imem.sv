// imem: instruction memory.
//
// WORDS x 32-bit, read combinationally: inst = mem[addr[AW+1:2]], so an
// instruction is available in the same cycle as its PC, as the single-cycle
// datapath needs. Address bits above the memory size are ignored (the memory
// repeats through the address space) and the two low bits are ignored.
// A clocked load port (load_we, load_addr word index, load_data) fills the
// memory with a program before the processor runs; the processor itself never
// writes it. Size, address wrapping and the load port are this design's choices.
module imem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic                     clk,
  input  logic [31:0]              addr,
  output logic [31:0]              inst,
  input  logic                     load_we,
  input  logic [$clog2(WORDS)-1:0] load_addr,
  input  logic [31:0]              load_data
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
  end

  assign inst = mem[addr[AW+1:2]];

endmodule
