// tb_riscv_sc_cpu: self-checking test of the single-cycle processor.
//
// Runs random RV32I programs (tb_rv_pkg::prog_gen) on two copies of the
// processor, one per controller realization, and compares every cycle with
// the instruction-set reference model: the PC, the register write, the store
// and PCSel. Because the PC must match the model's every cycle, the test also
// checks CPI = 1: instruction k executes in cycle k after reset.
`timescale 1ns/1ps
module tb_riscv_sc_cpu;
  import rv_pkg::*;
  import tb_rv_pkg::*;

  localparam int IW = 256;

  logic        clk = 0, rst_n = 0;
  logic        load_we = 0;
  logic [7:0]  load_addr = '0;
  logic [31:0] load_data = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [31:0] pc   [2], inst [2], wdata [2], maddr [2], mwdata [2];
  logic        rwe  [2], mwe  [2], psel  [2];
  logic [4:0]  rd   [2];

  for (genvar g = 0; g < 2; g++) begin : g_dut
    riscv_sc_cpu #(.IMEM_WORDS(IW), .DMEM_WORDS(1024), .CTRL_ROM(g == 1)) dut (
      .clk, .rst_n, .load_we, .load_addr, .load_data,
      .commit_pc(pc[g]), .commit_inst(inst[g]), .commit_reg_we(rwe[g]), .commit_rd(rd[g]),
      .commit_wdata(wdata[g]), .commit_mem_we(mwe[g]), .commit_mem_addr(maddr[g]),
      .commit_mem_wdata(mwdata[g]), .commit_pc_sel(psel[g])
    );
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic run_program(int seed_body, int loops);
    prog_gen gen = new(1'b0);
    rv_iss   iss = new(0);
    int      end_idx, ends, ncyc;
    gen.gen(seed_body, loops);
    if (gen.prog.size() > IW) $fatal(1, "program too long");
    iss.load(gen.prog);
    end_idx = gen.prog.size() - 5;
    rst_n = 0;
    foreach (gen.prog[i]) begin
      @(negedge clk);
      load_we = 1; load_addr = 8'(i); load_data = gen.prog[i];
    end
    @(negedge clk);
    load_we = 0;
    @(negedge clk);
    rst_n = 1;
    ends = 0; ncyc = 0;
    while (ends < 3) begin
      step_t s = iss.step();
      if (s.undef_read) $fatal(1, "generator read unwritten memory");
      for (int g = 0; g < 2; g++) begin
        check(pc[g] == s.pc, $sformatf("dut%0d cycle %0d pc %h exp %h", g, ncyc, pc[g], s.pc));
        check(rwe[g] == s.reg_we && (!s.reg_we || (rd[g] == s.rd && wdata[g] == s.wdata)),
              $sformatf("dut%0d pc %h inst %h reg write %0b x%0d=%h exp %0b x%0d=%h", g, s.pc,
                        s.inst, rwe[g], rd[g], wdata[g], s.reg_we, s.rd, s.wdata));
        check(mwe[g] == s.mem_we && (!s.mem_we || (maddr[g] == s.mem_addr && mwdata[g] == s.mem_wdata)),
              $sformatf("dut%0d pc %h store", g, s.pc));
        check(psel[g] == s.taken, $sformatf("dut%0d pc %h pcsel", g, s.pc));
      end
      if (s.pc == 32'(4 * end_idx)) ends++;
      ncyc++;
      @(negedge clk);
    end
    $display("program of %0d words: %0d instructions in %0d cycles", gen.prog.size(), ncyc, ncyc);
  endtask

  initial begin
    run_program(40, 3);
    run_program(50, 2);
    run_program(50, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
