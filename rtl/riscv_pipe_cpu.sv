// riscv_pipe_cpu: five-stage pipelined RV32I processor.
//
// The single-cycle datapath cut by pipeline registers into the stages
// Instruction Fetch (F), Instruction Decode/Register Read (D), ALU Execute (X),
// Memory Access (M) and Write Back (W). One instruction enters per clock and
// each takes five cycles to finish.
//   F: pc_F addresses IMEM.                     -> pc_D, inst_D
//   D: Reg[] read at inst_D[19:15], [24:20].     -> pc_X, rs1_X, rs2_X, inst_X
//   X: Imm. Gen, branch comparator, ASel/BSel, ALU; a taken branch or jump
//      loads alu_X into pc_F.                    -> pc_M, alu_M, rs2_M, inst_M
//   M: DMEM access; pc_M+4 is recomputed here rather than carried; WBSel
//      multiplexer.                              -> wb_W, inst_W
//   W: wb_W is written to Reg[inst_W[11:7]] on the clock edge ending W.
// The instruction word travels with its data, and each stage decodes the
// control it needs from its own copy (X: PCSel, ImmSel, BrUn, ASel, BSel,
// ALUSel; M: MemRW, WBSel; W: RegWEn) with the same controller as the
// single-cycle processor.
//
// The stage split, the pipeline registers and the PC+4 recomputation follow
// the reference pipelined datapath. It describes no hazard handling, and this
// design has none: there is no forwarding, stall or flush. Software must
// schedule around it: a result is readable by an instruction fetched at least
// four instructions after its producer (three instructions in between), and
// the two instructions fetched after a taken branch or jump are executed
// (two delay slots). Reset (synchronous, active low) fills all stages with
// nops (addi x0, x0, 0), sets pc_F to RESET_PC and clears Reg[]; the
// load port and the trace outputs are this design's additions.
module riscv_pipe_cpu
  import rv_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // program load port of the instruction memory
  input  logic                          load_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] load_addr,
  input  logic [31:0]                   load_data,
  // trace: register write of the instruction in W
  output logic [31:0]                   commit_inst,
  output logic                          commit_reg_we,
  output logic [4:0]                    commit_rd,
  output logic [31:0]                   commit_wdata,
  // trace: store of the instruction in M
  output logic                          commit_mem_we,
  output logic [31:0]                   commit_mem_addr,
  output logic [31:0]                   commit_mem_wdata,
  // trace: PCSel of the instruction in X
  output logic                          commit_pc_sel
);

  // ---------------- F ----------------
  logic [31:0] pc_F, pc_F_plus4, inst_F;
  ctrl_t       ctrl_X, ctrl_M, ctrl_W;
  logic [31:0] alu_X;

  pc_reg #(.RESET_PC(RESET_PC)) u_pc (
    .clk, .rst_n, .pc_sel(ctrl_X.pc_sel), .alu(alu_X), .pc(pc_F), .pc_plus4(pc_F_plus4)
  );

  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .addr(pc_F), .inst(inst_F), .load_we, .load_addr, .load_data
  );

  // ---------------- F/D ----------------
  logic [31:0] pc_D, inst_D;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc_D   <= '0;
      inst_D <= NOP;
    end else begin
      pc_D   <= pc_F;
      inst_D <= inst_F;
    end
  end

  // ---------------- D ----------------
  logic [31:0] rs1_D, rs2_D;
  logic [31:0] wb_W, inst_W;

  regfile u_rf (
    .clk, .rst_n,
    .reg_wen(ctrl_W.reg_wen), .addr_d(inst_W[11:7]), .data_d(wb_W),
    .addr_a(inst_D[19:15]), .addr_b(inst_D[24:20]),
    .data_a(rs1_D), .data_b(rs2_D)
  );

  // ---------------- D/X ----------------
  logic [31:0] pc_X, rs1_X, rs2_X, inst_X;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc_X   <= '0;
      rs1_X  <= '0;
      rs2_X  <= '0;
      inst_X <= NOP;
    end else begin
      pc_X   <= pc_D;
      rs1_X  <= rs1_D;
      rs2_X  <= rs2_D;
      inst_X <= inst_D;
    end
  end

  // ---------------- X ----------------
  logic [31:0] imm_X, alu_a_X, alu_b_X;
  logic        br_eq_X, br_lt_X;

  control_logic u_ctrl_x (
    .inst_bits(ctrl_bits(inst_X)), .br_eq(br_eq_X), .br_lt(br_lt_X), .ctrl(ctrl_X)
  );

  imm_gen u_imm (.inst(inst_X[31:7]), .imm_sel(ctrl_X.imm_sel), .imm(imm_X));

  branch_comp u_bc (
    .a(rs1_X), .b(rs2_X), .br_un(ctrl_X.br_un), .br_eq(br_eq_X), .br_lt(br_lt_X)
  );

  assign alu_a_X = ctrl_X.a_sel ? pc_X  : rs1_X;
  assign alu_b_X = ctrl_X.b_sel ? imm_X : rs2_X;

  alu u_alu (.a(alu_a_X), .b(alu_b_X), .alu_sel(ctrl_X.alu_sel), .y(alu_X));

  // ---------------- X/M ----------------
  logic [31:0] pc_M, alu_M, rs2_M, inst_M;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc_M   <= '0;
      alu_M  <= '0;
      rs2_M  <= '0;
      inst_M <= NOP;
    end else begin
      pc_M   <= pc_X;
      alu_M  <= alu_X;
      rs2_M  <= rs2_X;
      inst_M <= inst_X;
    end
  end

  // ---------------- M ----------------
  logic [31:0] mem_M, pc4_M, wb_M;

  // branch flags do not matter for the M-stage outputs (MemRW, WBSel)
  control_logic u_ctrl_m (
    .inst_bits(ctrl_bits(inst_M)), .br_eq(1'b0), .br_lt(1'b0), .ctrl(ctrl_M)
  );

  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .addr(alu_M), .data_w(rs2_M), .mem_rw(ctrl_M.mem_rw && rst_n),
    .funct3(inst_M[14:12]), .data_r(mem_M)
  );

  assign pc4_M = pc_M + 32'd4;

  always_comb begin
    unique case (ctrl_M.wb_sel)
      WB_MEM:  wb_M = mem_M;
      WB_ALU:  wb_M = alu_M;
      WB_PC4:  wb_M = pc4_M;
      default: wb_M = alu_M;
    endcase
  end

  // ---------------- M/W ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wb_W   <= '0;
      inst_W <= NOP;
    end else begin
      wb_W   <= wb_M;
      inst_W <= inst_M;
    end
  end

  // ---------------- W ----------------
  // branch flags do not matter for the W-stage output (RegWEn)
  control_logic u_ctrl_w (
    .inst_bits(ctrl_bits(inst_W)), .br_eq(1'b0), .br_lt(1'b0), .ctrl(ctrl_W)
  );

  assign commit_inst      = inst_W;
  assign commit_reg_we    = ctrl_W.reg_wen && inst_W[11:7] != 5'd0;
  assign commit_rd        = inst_W[11:7];
  assign commit_wdata     = wb_W;
  assign commit_mem_we    = ctrl_M.mem_rw;
  assign commit_mem_addr  = alu_M;
  assign commit_mem_wdata = rs2_M;
  assign commit_pc_sel    = ctrl_X.pc_sel;

endmodule
