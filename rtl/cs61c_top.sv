// cs61c_top: the RV32I processors side by side.
//
// Three independent processors share only the clock and reset:
//   sc     single-cycle processor with the logic-equation controller
//   scrom  single-cycle processor with the ROM (decoder + word table) controller
//   pipe   five-stage pipelined processor
// Each has its own instruction-memory load port (hold rst_n low while loading,
// one word per clock) and its own trace output (trace_t in rv_pkg). The
// single-cycle processors complete one instruction per clock; the pipelined
// one completes one per clock once its five stages are full, four cycles after
// reset.
module cs61c_top
  import rv_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          sc_load_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] sc_load_addr,
  input  logic [31:0]                   sc_load_data,
  output logic [31:0]                   sc_pc,
  output trace_t                        sc_trace,
  input  logic                          scrom_load_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] scrom_load_addr,
  input  logic [31:0]                   scrom_load_data,
  output logic [31:0]                   scrom_pc,
  output trace_t                        scrom_trace,
  input  logic                          pipe_load_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] pipe_load_addr,
  input  logic [31:0]                   pipe_load_data,
  output trace_t                        pipe_trace
);

  riscv_sc_cpu #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS), .CTRL_ROM(1'b0)) u_sc (
    .clk, .rst_n,
    .load_we(sc_load_we), .load_addr(sc_load_addr), .load_data(sc_load_data),
    .commit_pc(sc_pc), .commit_inst(sc_trace.inst),
    .commit_reg_we(sc_trace.reg_we), .commit_rd(sc_trace.rd), .commit_wdata(sc_trace.wdata),
    .commit_mem_we(sc_trace.mem_we), .commit_mem_addr(sc_trace.mem_addr),
    .commit_mem_wdata(sc_trace.mem_wdata), .commit_pc_sel(sc_trace.pc_sel)
  );

  riscv_sc_cpu #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS), .CTRL_ROM(1'b1)) u_scrom (
    .clk, .rst_n,
    .load_we(scrom_load_we), .load_addr(scrom_load_addr), .load_data(scrom_load_data),
    .commit_pc(scrom_pc), .commit_inst(scrom_trace.inst),
    .commit_reg_we(scrom_trace.reg_we), .commit_rd(scrom_trace.rd),
    .commit_wdata(scrom_trace.wdata),
    .commit_mem_we(scrom_trace.mem_we), .commit_mem_addr(scrom_trace.mem_addr),
    .commit_mem_wdata(scrom_trace.mem_wdata), .commit_pc_sel(scrom_trace.pc_sel)
  );

  riscv_pipe_cpu #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_pipe (
    .clk, .rst_n,
    .load_we(pipe_load_we), .load_addr(pipe_load_addr), .load_data(pipe_load_data),
    .commit_inst(pipe_trace.inst),
    .commit_reg_we(pipe_trace.reg_we), .commit_rd(pipe_trace.rd),
    .commit_wdata(pipe_trace.wdata),
    .commit_mem_we(pipe_trace.mem_we), .commit_mem_addr(pipe_trace.mem_addr),
    .commit_mem_wdata(pipe_trace.mem_wdata), .commit_pc_sel(pipe_trace.pc_sel)
  );

endmodule
