// riscv_sc_cpu: single-cycle RV32I processor.
//
// Every instruction completes in one clock cycle (CPI = 1). In one cycle the
// PC addresses IMEM; the instruction's register fields read Reg[] (AddrA =
// inst[19:15], AddrB = inst[24:20]); Imm. Gen builds the immediate from
// inst[31:7]; the branch comparator compares Reg[rs1] and Reg[rs2]; the ASel
// multiplexer (0 = Reg[rs1], 1 = pc) and the BSel multiplexer (0 = Reg[rs2],
// 1 = imm) feed the ALU; the ALU result addresses DMEM and, with the PC+4 and
// the memory data, goes to the WBSel multiplexer (0 = mem, 1 = alu, 2 = pc+4)
// whose output is written to Reg[inst[11:7]]. On the rising clock edge the
// register file, DMEM and the PC (pc+4 or the ALU result, by PCSel) update
// together. The controller sees {inst[30], inst[14:12], inst[6:2]}, BrEq and
// BrLT and returns the 15-bit control word.
//
// CTRL_ROM selects the controller realization: 0 = logic equations
// (control_logic), 1 = decoder and word table (control_rom). Both produce the
// same control words for every RV32I instruction.
//
// The datapath follows the reference single-cycle diagram. This design's own
// additions: the instruction memory load port (load_*), a synchronous
// active-low reset that sets the PC to RESET_PC and clears Reg[], DMEM access
// size taken from funct3, and the trace outputs (commit_*), which show each
// cycle's PC, instruction and register write for observation.
module riscv_sc_cpu
  import rv_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter bit          CTRL_ROM   = 1'b0,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // program load port of the instruction memory
  input  logic                          load_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] load_addr,
  input  logic [31:0]                   load_data,
  // trace of the instruction executed this cycle
  output logic [31:0]                   commit_pc,
  output logic [31:0]                   commit_inst,
  output logic                          commit_reg_we,
  output logic [4:0]                    commit_rd,
  output logic [31:0]                   commit_wdata,
  output logic                          commit_mem_we,
  output logic [31:0]                   commit_mem_addr,
  output logic [31:0]                   commit_mem_wdata,
  output logic                          commit_pc_sel
);

  logic [31:0] pc, pc_plus4, inst, imm;
  logic [31:0] rs1_data, rs2_data, alu_a, alu_b, alu_y, mem_data, wb;
  logic        br_eq, br_lt;
  ctrl_t       ctrl;

  pc_reg #(.RESET_PC(RESET_PC)) u_pc (
    .clk, .rst_n, .pc_sel(ctrl.pc_sel), .alu(alu_y), .pc, .pc_plus4
  );

  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .addr(pc), .inst, .load_we, .load_addr, .load_data
  );

  regfile u_rf (
    .clk, .rst_n,
    .reg_wen(ctrl.reg_wen), .addr_d(inst[11:7]), .data_d(wb),
    .addr_a(inst[19:15]), .addr_b(inst[24:20]),
    .data_a(rs1_data), .data_b(rs2_data)
  );

  imm_gen u_imm (.inst(inst[31:7]), .imm_sel(ctrl.imm_sel), .imm);

  branch_comp u_bc (
    .a(rs1_data), .b(rs2_data), .br_un(ctrl.br_un), .br_eq, .br_lt
  );

  generate
    if (CTRL_ROM) begin : g_ctrl_rom
      control_rom u_ctrl (.inst_bits(ctrl_bits(inst)), .br_eq, .br_lt, .ctrl);
    end else begin : g_ctrl_logic
      control_logic u_ctrl (.inst_bits(ctrl_bits(inst)), .br_eq, .br_lt, .ctrl);
    end
  endgenerate

  assign alu_a = ctrl.a_sel ? pc  : rs1_data;
  assign alu_b = ctrl.b_sel ? imm : rs2_data;

  alu u_alu (.a(alu_a), .b(alu_b), .alu_sel(ctrl.alu_sel), .y(alu_y));

  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .addr(alu_y), .data_w(rs2_data), .mem_rw(ctrl.mem_rw && rst_n),
    .funct3(inst[14:12]), .data_r(mem_data)
  );

  always_comb begin
    unique case (ctrl.wb_sel)
      WB_MEM:  wb = mem_data;
      WB_ALU:  wb = alu_y;
      WB_PC4:  wb = pc_plus4;
      default: wb = alu_y;
    endcase
  end

  assign commit_pc        = pc;
  assign commit_inst      = inst;
  assign commit_reg_we    = ctrl.reg_wen && inst[11:7] != 5'd0;
  assign commit_rd        = inst[11:7];
  assign commit_wdata     = wb;
  assign commit_mem_we    = ctrl.mem_rw;
  assign commit_mem_addr  = alu_y;
  assign commit_mem_wdata = rs2_data;
  assign commit_pc_sel    = ctrl.pc_sel;

endmodule
