// tb_riscv_pipe_cpu: self-checking test of the five-stage pipelined processor.
//
// Runs random RV32I programs scheduled for a pipeline without forwarding
// (tb_rv_pkg::prog_gen with sched = 1) and compares, cycle by cycle, with the
// reference model run in pipeline fetch order (two delay slots). Instruction k
// (0-based, in execution order) enters F in cycle k after reset, so the test
// expects its PCSel in cycle k+2 (X), its store in cycle k+3 (M) and its
// register write in cycle k+4 (W): a five-cycle latency at one instruction per
// cycle. The last program runs the instruction sequence of the pipelining
// example (add, or, slt, sw, lw, addi) with nops between dependent pairs.
// A directed program then checks the behaviour the pipeline leaves to software:
// reads of a register fewer than four slots after its write see the old value,
// and the two instructions after a taken jump execute.
`timescale 1ns/1ps
module tb_riscv_pipe_cpu;
  import rv_pkg::*;
  import tb_rv_pkg::*;

  localparam int IW = 512;

  logic        clk = 0, rst_n = 0;
  logic        load_we = 0;
  logic [8:0]  load_addr = '0;
  logic [31:0] load_data = '0;
  logic [31:0] inst, wdata, maddr, mwdata;
  logic        rwe, mwe, psel;
  logic [4:0]  rd;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  riscv_pipe_cpu #(.IMEM_WORDS(IW), .DMEM_WORDS(1024)) dut (
    .clk, .rst_n, .load_we, .load_addr, .load_data,
    .commit_inst(inst), .commit_reg_we(rwe), .commit_rd(rd), .commit_wdata(wdata),
    .commit_mem_we(mwe), .commit_mem_addr(maddr), .commit_mem_wdata(mwdata),
    .commit_pc_sel(psel)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic run(logic [31:0] prog [$], int max_cycles);
    rv_iss iss = new(2);
    step_t recs [$];
    step_t none;
    int    end_idx = prog.size() - 5, ends = 0, c = 0, first_write = -1, first_idx = -1;
    none = '{default: 0};
    if (prog.size() > IW) $fatal(1, "program too long");
    iss.load(prog);
    rst_n = 0;
    foreach (prog[i]) begin
      @(negedge clk);
      load_we = 1; load_addr = 9'(i); load_data = prog[i];
    end
    @(negedge clk);
    load_we = 0;
    @(negedge clk);
    rst_n = 1;
    while (ends < 3 && c < max_cycles) begin
      step_t s = iss.step();
      step_t ex, em, ew;
      if (s.undef_read) $fatal(1, "program read unwritten memory");
      recs.push_back(s);
      if (first_idx < 0 && s.reg_we) first_idx = c;
      ex = (c >= 2) ? recs[c - 2] : none;
      em = (c >= 3) ? recs[c - 3] : none;
      ew = (c >= 4) ? recs[c - 4] : none;
      check(psel == ex.taken, $sformatf("cycle %0d pcsel %0b exp %0b (pc %h)", c, psel, ex.taken, ex.pc));
      check(mwe == em.mem_we && (!mwe || (maddr == em.mem_addr && mwdata == em.mem_wdata)),
            $sformatf("cycle %0d store %0b %h=%h exp %0b %h=%h", c, mwe, maddr, mwdata,
                      em.mem_we, em.mem_addr, em.mem_wdata));
      check(rwe == ew.reg_we && (!rwe || (rd == ew.rd && wdata == ew.wdata)),
            $sformatf("cycle %0d W inst %h write %0b x%0d=%h exp %0b x%0d=%h (pc %h)", c, inst,
                      rwe, rd, wdata, ew.reg_we, ew.rd, ew.wdata, ew.pc));
      if (first_write < 0 && rwe) first_write = c;
      if (s.pc == 32'(4 * end_idx)) ends++;
      c++;
      @(negedge clk);
    end
    // latency: the first register write appears four cycles after its instruction entered F
    check(first_write == first_idx + 4, $sformatf("first write in cycle %0d, instruction entered F in %0d",
                                                first_write, first_idx));
    check(ends == 3, "program did not reach its end");
    $display("program of %0d words: %0d cycles", prog.size(), c);
  endtask

  initial begin
    for (int t = 0; t < 3; t++) begin
      prog_gen gen;
      gen = new(1'b1);
      gen.gen(30 + 10 * t, 2 + t);
      run(gen.prog, 5000);
    end
    begin
      // pipelining example sequence; x5=t0 x6=t1 x7=t2 x28=t3 x29=t4 x30=t5 x31=t6
      logic [31:0] p [$];
      p = '{i_addi(6, 0, 11), i_addi(7, 0, 22), i_addi(29, 0, 36), i_addi(30, 0, 8),
            i_addi(5, 0, 0), I_NOP, I_NOP,
            i_sw(6, 0, 52),                            // memory word 52 = 8(t3) once t3 = 44
            i_add(5, 6, 7), i_or(28, 29, 30), I_NOP, I_NOP, I_NOP,
            i_slt(31, 5, 28), i_sw(5, 28, 4), i_lw(5, 28, 8), i_addi(7, 7, 1),
            I_NOP, I_NOP, I_NOP, i_jal(0, 0), I_NOP, I_NOP, I_NOP, I_NOP};
      run(p, 200);
    end
    begin
      // No hazard handling: a consumer less than four slots after its producer
      // reads the old value, and the two instructions after a taken jump execute.
      // Expected register writes, in order, worked out by hand.
      logic [31:0] p [$];
      logic [4:0]  exp_rd [7];
      logic [31:0] exp_v  [7];
      int n;
      exp_rd = '{5'd1, 5'd2, 5'd7, 5'd3, 5'd4, 5'd5, 5'd6};
      exp_v  = '{32'd5, 32'd1, 32'd0, 32'd6, 32'd7, 32'd9, 32'd1};
      n = 0;
      p = '{i_addi(1, 0, 5),     // slot 0: x1 = 5
            i_addi(2, 1, 1),     // slot 1: reads x1 too early -> x2 = 0 + 1
            I_NOP,
            i_addi(7, 1, 0),     // slot 3: still too early -> x7 = 0
            i_addi(3, 1, 1),     // slot 4: sees x1 -> x3 = 6
            i_jal(0, 12),        // slot 5: jump to slot 8
            i_addi(4, 0, 7),     // slot 6: delay slot, executes
            i_addi(5, 0, 9),     // slot 7: delay slot, executes
            i_addi(6, 0, 1),     // slot 8: jump target
            I_NOP, I_NOP, I_NOP, i_jal(0, 0), I_NOP, I_NOP, I_NOP, I_NOP};
      rst_n = 0;
      foreach (p[i]) begin
        @(negedge clk);
        load_we = 1; load_addr = 9'(i); load_data = p[i];
      end
      @(negedge clk);
      load_we = 0;
      @(negedge clk);
      rst_n = 1;
      repeat (30) begin
        if (rwe) begin
          if (n < 7)
            check(rd == exp_rd[n] && wdata == exp_v[n],
                  $sformatf("hazard test write %0d: x%0d=%h exp x%0d=%h", n, rd, wdata, exp_rd[n], exp_v[n]));
          n++;
        end
        @(negedge clk);
      end
      check(n == 7, $sformatf("hazard test: %0d register writes, expected 7", n));
    end
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
