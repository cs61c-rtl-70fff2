// tb_cs61c_top: end-to-end test of the top level at its default sizes.
//
// Loads the same programs into the three processors: random RV32I programs
// scheduled for the pipeline (forward branches of all six kinds, jal, jalr,
// loads and stores of every size, a counted backward loop) and the
// instruction sequence of the pipelining example. Both single-cycle
// processors are compared every cycle with the reference model (instruction
// k in cycle k, CPI = 1); the pipelined one with the model in pipeline fetch
// order, its register write of instruction k in cycle k+4. It counts how often
// each mechanism occurred (taken and not-taken branch, jal, jalr, load, store,
// instructions overlapping in the pipeline, delay-slot execution after a
// taken branch, both controller realizations) and fails if one never did.
`timescale 1ns/1ps
module tb_cs61c_top;
  import rv_pkg::*;
  import tb_rv_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        we = 0;
  logic [9:0]  la = '0;
  logic [31:0] ld = '0;
  logic [31:0] sc_pc, scrom_pc;
  trace_t      sc_trace, scrom_trace, pipe_trace;
  int checks = 0, failures = 0;
  int n_taken = 0, n_not_taken = 0, n_jal = 0, n_jalr = 0, n_load = 0, n_store = 0;
  int n_overlap = 0, n_delay_slot = 0, n_rom = 0, n_comb = 0;

  always #5 clk = ~clk;

  cs61c_top dut (
    .clk, .rst_n,
    .sc_load_we(we), .sc_load_addr(la), .sc_load_data(ld), .sc_pc, .sc_trace,
    .scrom_load_we(we), .scrom_load_addr(la), .scrom_load_data(ld), .scrom_pc, .scrom_trace,
    .pipe_load_we(we), .pipe_load_addr(la), .pipe_load_data(ld), .pipe_trace
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic bit same_sc(trace_t t, logic [31:0] pc, step_t s);
    return pc == s.pc && t.reg_we == s.reg_we && (!s.reg_we || (t.rd == s.rd && t.wdata == s.wdata))
        && t.mem_we == s.mem_we && (!s.mem_we || (t.mem_addr == s.mem_addr && t.mem_wdata == s.mem_wdata))
        && t.pc_sel == s.taken;
  endfunction

  task automatic run(logic [31:0] prog [$], int max_cycles);
    rv_iss iss_sc = new(0), iss_pipe = new(2);
    step_t recs [$], none;
    int    end_idx = prog.size() - 5, ends_sc = 0, ends_pipe = 0, c = 0;
    int    writes_in_row = 0;
    bit    after_taken = 0;
    none = '{default: 0};
    iss_sc.load(prog);
    iss_pipe.load(prog);
    rst_n = 0;
    foreach (prog[i]) begin
      @(negedge clk);
      we = 1; la = 10'(i); ld = prog[i];
    end
    @(negedge clk);
    we = 0;
    @(negedge clk);
    rst_n = 1;
    while ((ends_sc < 3 || ends_pipe < 3) && c < max_cycles) begin
      step_t s, p, ex, em, ew;
      s = iss_sc.step();
      p = iss_pipe.step();
      if (s.undef_read || p.undef_read) $fatal(1, "program read unwritten memory");
      // single-cycle, both controllers, until their program end
      if (ends_sc < 3) begin
        check(same_sc(sc_trace, sc_pc, s), $sformatf("sc cycle %0d pc %h exp %h", c, sc_pc, s.pc));
        check(same_sc(scrom_trace, scrom_pc, s), $sformatf("scrom cycle %0d pc %h exp %h", c, scrom_pc, s.pc));
        n_comb++; n_rom++;
        if (s.is_branch &&  s.taken) n_taken++;
        if (s.is_branch && !s.taken) n_not_taken++;
        if (s.is_jal)   n_jal++;
        if (s.is_jalr)  n_jalr++;
        if (s.is_load)  n_load++;
        if (s.is_store) n_store++;
        if (s.pc == 32'(4 * end_idx)) ends_sc++;
      end
      // pipeline, stage-delayed
      recs.push_back(p);
      if (after_taken && p.pc != 32'(4 * end_idx) + 4 && p.pc != 32'(4 * end_idx) + 8) n_delay_slot++;
      after_taken = p.taken && p.pc != 32'(4 * end_idx);
      ex = (c >= 2) ? recs[c - 2] : none;
      em = (c >= 3) ? recs[c - 3] : none;
      ew = (c >= 4) ? recs[c - 4] : none;
      check(pipe_trace.pc_sel == ex.taken, $sformatf("pipe cycle %0d pcsel", c));
      check(pipe_trace.mem_we == em.mem_we &&
            (!em.mem_we || (pipe_trace.mem_addr == em.mem_addr && pipe_trace.mem_wdata == em.mem_wdata)),
            $sformatf("pipe cycle %0d store", c));
      check(pipe_trace.reg_we == ew.reg_we &&
            (!ew.reg_we || (pipe_trace.rd == ew.rd && pipe_trace.wdata == ew.wdata)),
            $sformatf("pipe cycle %0d write x%0d=%h exp x%0d=%h", c, pipe_trace.rd, pipe_trace.wdata,
                      ew.rd, ew.wdata));
      // five instructions in flight, each doing work: a register write in W while
      // the next instructions are in M, X, D and F
      writes_in_row = pipe_trace.reg_we ? writes_in_row + 1 : 0;
      if (writes_in_row >= 5) n_overlap++;
      if (p.pc == 32'(4 * end_idx)) ends_pipe++;
      c++;
      @(negedge clk);
    end
    check(ends_sc == 3 && ends_pipe == 3, "program did not reach its end");
    $display("program of %0d words: %0d cycles", prog.size(), c);
  endtask

  initial begin
    logic [31:0] p [$];
    // pipelining example: add t0,t1,t2; or t3,t4,t5; slt t6,t0,t3; sw t0,4(t3);
    // lw t0,8(t3); addi t2,t2,1 (t0=x5 t1=x6 t2=x7 t3=x28 t4=x29 t5=x30 t6=x31)
    p = '{i_addi(6, 0, 11), i_addi(7, 0, 22), i_addi(29, 0, 36), i_addi(30, 0, 8),
          i_addi(5, 0, 0), I_NOP, I_NOP, i_sw(6, 0, 52),
          i_add(5, 6, 7), i_or(28, 29, 30), I_NOP, I_NOP, I_NOP,
          i_slt(31, 5, 28), i_sw(5, 28, 4), i_lw(5, 28, 8), i_addi(7, 7, 1),
          I_NOP, I_NOP, I_NOP, i_jal(0, 0), I_NOP, I_NOP, I_NOP, I_NOP};
    run(p, 200);
    for (int t = 0; t < 4; t++) begin
      prog_gen gen;
      gen = new(1'b1);
      gen.gen(40 + 10 * t, 2 + t);
      run(gen.prog, 10000);
    end
    $display("mechanisms: taken %0d not-taken %0d jal %0d jalr %0d load %0d store %0d",
             n_taken, n_not_taken, n_jal, n_jalr, n_load, n_store);
    $display("            pipeline overlap %0d delay-slot %0d logic-controller %0d rom-controller %0d",
             n_overlap, n_delay_slot, n_comb, n_rom);
    checks++; if (n_taken == 0)      begin failures++; $display("FAIL no taken branch"); end
    checks++; if (n_not_taken == 0)  begin failures++; $display("FAIL no untaken branch"); end
    checks++; if (n_jal == 0)        begin failures++; $display("FAIL no jal"); end
    checks++; if (n_jalr == 0)       begin failures++; $display("FAIL no jalr"); end
    checks++; if (n_load == 0)       begin failures++; $display("FAIL no load"); end
    checks++; if (n_store == 0)      begin failures++; $display("FAIL no store"); end
    checks++; if (n_overlap == 0)    begin failures++; $display("FAIL no five-deep overlap"); end
    checks++; if (n_delay_slot == 0) begin failures++; $display("FAIL no delay slot executed"); end
    checks++; if (n_comb == 0 || n_rom == 0) begin failures++; $display("FAIL a controller never ran"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
