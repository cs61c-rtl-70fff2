// rv_pkg: types and constants shared by the RV32I single-cycle and pipelined
// processors.
//
// The control word is the 15-bit controller output: PCSel (1), ImmSel (3),
// BrUn (1), ASel (1), BSel (1), ALUSel (4), MemRW (1), RegWEn (1), WBSel (2).
// The field widths and the multiplexer input numbers (PCSel 1 = alu, ASel 1 = pc,
// BSel 1 = imm, WBSel 2 = pc+4 / 1 = alu / 0 = mem) follow the reference datapath.
// The binary codes of ImmSel and ALUSel are this design's own choice: ALUSel for
// register-register operations is {inst[30], funct3}, and one spare code (1111)
// passes operand B through for LUI.
package rv_pkg;

  typedef enum logic [2:0] {
    IMM_I = 3'd0,
    IMM_S = 3'd1,
    IMM_B = 3'd2,
    IMM_U = 3'd3,
    IMM_J = 3'd4
  } imm_sel_e;

  typedef enum logic [3:0] {
    ALU_ADD  = 4'b0000,
    ALU_SLL  = 4'b0001,
    ALU_SLT  = 4'b0010,
    ALU_SLTU = 4'b0011,
    ALU_XOR  = 4'b0100,
    ALU_SRL  = 4'b0101,
    ALU_OR   = 4'b0110,
    ALU_AND  = 4'b0111,
    ALU_SUB  = 4'b1000,
    ALU_SRA  = 4'b1101,
    ALU_B    = 4'b1111
  } alu_sel_e;

  typedef enum logic [1:0] {
    WB_MEM = 2'd0,
    WB_ALU = 2'd1,
    WB_PC4 = 2'd2
  } wb_sel_e;

  // PCSel: 0 = pc+4, 1 = alu.  ASel: 0 = Reg[rs1], 1 = pc.  BSel: 0 = Reg[rs2], 1 = imm.
  // MemRW: 0 = read, 1 = write.
  typedef struct packed {
    logic     pc_sel;
    imm_sel_e imm_sel;
    logic     br_un;
    logic     a_sel;
    logic     b_sel;
    alu_sel_e alu_sel;
    logic     mem_rw;
    logic     reg_wen;
    wb_sel_e  wb_sel;
  } ctrl_t;

  // inst[6:2] of the RV32I base opcodes
  localparam logic [4:0] OP5_LOAD   = 5'b00000;
  localparam logic [4:0] OP5_FENCE  = 5'b00011;
  localparam logic [4:0] OP5_OPIMM  = 5'b00100;
  localparam logic [4:0] OP5_AUIPC  = 5'b00101;
  localparam logic [4:0] OP5_STORE  = 5'b01000;
  localparam logic [4:0] OP5_OP     = 5'b01100;
  localparam logic [4:0] OP5_LUI    = 5'b01101;
  localparam logic [4:0] OP5_BRANCH = 5'b11000;
  localparam logic [4:0] OP5_JALR   = 5'b11001;
  localparam logic [4:0] OP5_JAL    = 5'b11011;
  localparam logic [4:0] OP5_SYSTEM = 5'b11100;

  // branch funct3
  localparam logic [2:0] F3_BEQ  = 3'b000;
  localparam logic [2:0] F3_BNE  = 3'b001;
  localparam logic [2:0] F3_BLT  = 3'b100;
  localparam logic [2:0] F3_BGE  = 3'b101;
  localparam logic [2:0] F3_BLTU = 3'b110;
  localparam logic [2:0] F3_BGEU = 3'b111;

  // Per-cycle trace of one processor, as brought out at the top level
  typedef struct packed {
    logic [31:0] inst;       // instruction writing back (W stage when pipelined)
    logic        reg_we;     // it writes a register other than x0
    logic [4:0]  rd;
    logic [31:0] wdata;
    logic        mem_we;     // a store is writing DMEM this cycle
    logic [31:0] mem_addr;
    logic [31:0] mem_wdata;
    logic        pc_sel;     // the PC is loaded from the ALU this cycle
  } trace_t;

  // addi x0, x0, 0
  localparam logic [31:0] NOP = 32'h0000_0013;

  // The nine instruction bits the controller looks at: {inst[30], inst[14:12], inst[6:2]}
  function automatic logic [8:0] ctrl_bits(input logic [31:0] inst);
    return {inst[30], inst[14:12], inst[6:2]};
  endfunction

endpackage
