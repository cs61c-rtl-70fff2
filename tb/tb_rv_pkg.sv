// tb_rv_pkg: testbench support for the RV32I processors.
//
// - Instruction encoders (enc_r, enc_i, ... and one helper per mnemonic).
// - rv_iss: an instruction-set reference model written from the RV32I
//   definition, independent of the RTL. It executes one instruction per step
//   and reports what that instruction writes. With DELAY_SLOTS = 2 it models
//   the fetch order of the five-stage pipeline, in which the two instructions
//   after a taken branch or jump still execute.
// - prog_gen: a random program generator. It emits register and memory set-up,
//   then a loop body of random ALU, load, store, branch and jump instructions
//   with forward targets, closed by a counted backward branch, and ends in a
//   self-loop. With sched = 1 it schedules for the pipeline, which has no
//   forwarding: three instructions between a producer and a consumer, three
//   nops before and two after every branch or jump.
package tb_rv_pkg;

  // ---------------- encoders ----------------
  function automatic logic [31:0] enc_r(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                        logic [2:0] f3, logic [4:0] rd, logic [6:0] op);
    return {f7, rs2, rs1, f3, rd, op};
  endfunction
  function automatic logic [31:0] enc_i(int imm, logic [4:0] rs1, logic [2:0] f3,
                                        logic [4:0] rd, logic [6:0] op);
    logic [31:0] v = imm;
    return {v[11:0], rs1, f3, rd, op};
  endfunction
  function automatic logic [31:0] enc_s(int imm, logic [4:0] rs2, logic [4:0] rs1, logic [2:0] f3);
    logic [31:0] v = imm;
    return {v[11:5], rs2, rs1, f3, v[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] enc_b(int imm, logic [4:0] rs2, logic [4:0] rs1, logic [2:0] f3);
    logic [31:0] v = imm;
    return {v[12], v[10:5], rs2, rs1, f3, v[4:1], v[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] enc_u(int imm20, logic [4:0] rd, logic [6:0] op);
    logic [31:0] v = imm20;
    return {v[19:0], rd, op};
  endfunction
  function automatic logic [31:0] enc_j(int imm, logic [4:0] rd);
    logic [31:0] v = imm;
    return {v[20], v[10:1], v[11], v[19:12], rd, 7'b1101111};
  endfunction

  localparam logic [6:0] OPC_OP = 7'b0110011, OPC_OPIMM = 7'b0010011, OPC_LOAD = 7'b0000011,
                         OPC_LUI = 7'b0110111, OPC_AUIPC = 7'b0010111, OPC_JALR = 7'b1100111;

  function automatic logic [31:0] i_add (int rd, int a, int b); return enc_r(7'h00, 5'(b), 5'(a), 3'd0, 5'(rd), OPC_OP); endfunction
  function automatic logic [31:0] i_or  (int rd, int a, int b); return enc_r(7'h00, 5'(b), 5'(a), 3'd6, 5'(rd), OPC_OP); endfunction
  function automatic logic [31:0] i_slt (int rd, int a, int b); return enc_r(7'h00, 5'(b), 5'(a), 3'd2, 5'(rd), OPC_OP); endfunction
  function automatic logic [31:0] i_addi(int rd, int a, int imm); return enc_i(imm, 5'(a), 3'd0, 5'(rd), OPC_OPIMM); endfunction
  function automatic logic [31:0] i_lw  (int rd, int a, int imm); return enc_i(imm, 5'(a), 3'd2, 5'(rd), OPC_LOAD); endfunction
  function automatic logic [31:0] i_sw  (int rs2, int a, int imm); return enc_s(imm, 5'(rs2), 5'(a), 3'd2); endfunction
  function automatic logic [31:0] i_lui (int rd, int imm20); return enc_u(imm20, 5'(rd), OPC_LUI); endfunction
  function automatic logic [31:0] i_jal (int rd, int imm); return enc_j(imm, 5'(rd)); endfunction
  function automatic logic [31:0] i_bne (int a, int b, int imm); return enc_b(imm, 5'(b), 5'(a), 3'd1); endfunction
  localparam logic [31:0] I_NOP = 32'h0000_0013;

  function automatic logic [31:0] sext(logic [31:0] v, int bits);
    return 32'($signed(v << (32 - bits)) >>> (32 - bits));
  endfunction

  // ---------------- reference model ----------------
  typedef struct {
    logic [31:0] pc, inst;
    bit          reg_we;        // writes a register other than x0
    logic [4:0]  rd;
    logic [31:0] wdata;
    bit          mem_we;
    logic [31:0] mem_addr, mem_wdata;
    bit          taken;         // PC loaded with a computed target
    bit          is_branch, is_load, is_store, is_jal, is_jalr;
    bit          undef_read;    // a load read memory that was never written
  } step_t;

  class rv_iss;
    logic [31:0] x [32];
    logic [7:0]  dmem [int unsigned];
    logic [31:0] imem [int unsigned];
    logic [31:0] pcq [$];
    int          delay_slots;
    int unsigned mem_mask;

    function new(int ds = 0, int unsigned mem_bytes = 4096);
      delay_slots = ds;
      mem_mask    = mem_bytes - 1;
      foreach (x[i]) x[i] = '0;
      for (int i = 0; i <= ds; i++) pcq.push_back(32'(4 * i));
    endfunction

    function void load(logic [31:0] prog [$]);
      foreach (prog[i]) imem[i] = prog[i];
    endfunction

    function logic [31:0] fetch(logic [31:0] pc);
      if (imem.exists(pc >> 2)) return imem[pc >> 2];
      return I_NOP;
    endfunction

    function logic [7:0] rdb(logic [31:0] a, ref bit undef);
      int unsigned k = a & mem_mask;
      if (!dmem.exists(k)) begin undef = 1; return 8'h00; end
      return dmem[k];
    endfunction

    function step_t step();
      step_t s;
      logic [31:0] in, a, b, immi, imms, immb, immu, immj, r, addr, nxt;
      logic [2:0]  f3;
      logic [6:0]  op, f7;
      bit          wr;
      s = '{default: 0};
      s.pc  = pcq[0];
      in    = fetch(s.pc);
      s.inst = in;
      op = in[6:0]; f3 = in[14:12]; f7 = in[31:25];
      a = x[in[19:15]]; b = x[in[24:20]];
      immi = sext({20'd0, in[31:20]}, 12);
      imms = sext({20'd0, in[31:25], in[11:7]}, 12);
      immb = sext({19'd0, in[31], in[7], in[30:25], in[11:8], 1'b0}, 13);
      immu = {in[31:12], 12'd0};
      immj = sext({11'd0, in[31], in[19:12], in[20], in[30:21], 1'b0}, 21);
      nxt = s.pc + 4; wr = 0; r = '0;
      case (op)
        7'b0110011, 7'b0010011: begin
          logic [31:0] bb;
          bit alt;
          bb  = (op == 7'b0110011) ? b : immi;
          alt = (op == 7'b0110011) ? f7[5] : (f3 == 3'd5 && f7[5]);
          case (f3)
            3'd0: r = (op == 7'b0110011 && alt) ? a - bb : a + bb;
            3'd1: r = a << bb[4:0];
            3'd2: r = ($signed(a) < $signed(bb)) ? 1 : 0;
            3'd3: r = (a < bb) ? 1 : 0;
            3'd4: r = a ^ bb;
            3'd5: r = alt ? 32'($signed(a) >>> bb[4:0]) : a >> bb[4:0];
            3'd6: r = a | bb;
            3'd7: r = a & bb;
          endcase
          wr = 1;
        end
        7'b0110111: begin r = immu; wr = 1; end
        7'b0010111: begin r = s.pc + immu; wr = 1; end
        7'b1101111: begin r = s.pc + 4; wr = 1; nxt = s.pc + immj; s.taken = 1; s.is_jal = 1; end
        7'b1100111: begin r = s.pc + 4; wr = 1; nxt = a + immi; s.taken = 1; s.is_jalr = 1; end
        7'b1100011: begin
          bit t;
          case (f3)
            3'd0: t = (a == b);
            3'd1: t = (a != b);
            3'd4: t = ($signed(a) < $signed(b));
            3'd5: t = ($signed(a) >= $signed(b));
            3'd6: t = (a < b);
            3'd7: t = (a >= b);
            default: t = 0;
          endcase
          s.is_branch = 1; s.taken = t;
          if (t) nxt = s.pc + immb;
        end
        7'b0000011: begin
          bit u = 0;
          addr = a + immi;
          case (f3)
            3'd0: r = sext({24'd0, rdb(addr, u)}, 8);
            3'd1: r = sext({16'd0, rdb(addr + 1, u), rdb(addr, u)}, 16);
            3'd2: r = {rdb(addr + 3, u), rdb(addr + 2, u), rdb(addr + 1, u), rdb(addr, u)};
            3'd4: r = {24'd0, rdb(addr, u)};
            3'd5: r = {16'd0, rdb(addr + 1, u), rdb(addr, u)};
            default: r = '0;
          endcase
          s.undef_read = u; s.is_load = 1; wr = 1;
        end
        7'b0100011: begin
          int n;
          addr = a + imms;
          n = (f3 == 3'd0) ? 1 : (f3 == 3'd1) ? 2 : 4;
          for (int i = 0; i < n; i++) dmem[(addr + i) & mem_mask] = b[8*i +: 8];
          s.mem_we = 1; s.mem_addr = addr; s.mem_wdata = b; s.is_store = 1;
        end
        default: ;  // fence, system: no effect
      endcase
      if (wr && in[11:7] != 0) begin
        x[in[11:7]] = r;
        s.reg_we = 1; s.rd = in[11:7]; s.wdata = r;
      end
      void'(pcq.pop_front());
      pcq.push_back(s.taken ? nxt : ((delay_slots == 0) ? nxt : pcq[$] + 4));
      return s;
    endfunction
  endclass

  // ---------------- program generator ----------------
  class prog_gen;
    logic [31:0] prog [$];
    bit          sched;
    int          last_rd [$];   // destinations of the last three emitted instructions

    function new(bit sched_for_pipe);
      sched = sched_for_pipe;
    endfunction

    function int rnd(int lo, int hi);
      return lo + int'($urandom % 32'(hi - lo + 1));
    endfunction

    function void put(logic [31:0] w, int rd);
      prog.push_back(w);
      last_rd.push_back(rd);
      if (last_rd.size() > 3) void'(last_rd.pop_front());
    endfunction

    function void nop(); put(I_NOP, 0); endfunction

    // emit w (writes rd, reads rs1/rs2), first waiting out producers if scheduling
    function void emit(logic [31:0] w, int rd, int rs1, int rs2);
      if (sched) begin
        bit hit;
        do begin
          hit = 0;
          foreach (last_rd[i])
            if (last_rd[i] != 0 && (last_rd[i] == rs1 || last_rd[i] == rs2)) hit = 1;
          if (hit) nop();
        end while (hit);
      end
      put(w, rd);
    endfunction

    function void barrier_before(); if (sched) repeat (3) nop(); endfunction
    function void barrier_after();  if (sched) repeat (2) nop(); endfunction

    function void rand_simple();
      int k = rnd(0, 9);
      int rd = rnd(1, 15), r1 = rnd(0, 15), r2 = rnd(0, 15);
      logic [2:0] f3 = 3'(rnd(0, 7));
      case (k)
        0, 1, 2: begin  // register-register
          logic [6:0] f7 = ((f3 == 0 || f3 == 5) && rnd(0, 1) == 1) ? 7'h20 : 7'h00;
          emit(enc_r(f7, 5'(r2), 5'(r1), f3, 5'(rd), OPC_OP), rd, r1, r2);
        end
        3, 4, 5: begin  // register-immediate
          int imm = rnd(-2048, 2047);
          if (f3 == 1) imm = rnd(0, 31);
          if (f3 == 5) imm = rnd(0, 31) + (rnd(0, 1) == 1 ? 32'h400 : 0);
          emit(enc_i(imm, 5'(r1), f3, 5'(rd), OPC_OPIMM), rd, r1, 0);
        end
        6: emit(enc_u(rnd(0, 32'hfffff), 5'(rd), (rnd(0, 1) != 0) ? OPC_LUI : OPC_AUIPC), rd, 0, 0);
        7, 8: begin  // load, base x24 = 64
          int kind = rnd(0, 4);
          logic [2:0] lf3 = (kind == 0) ? 3'd0 : (kind == 1) ? 3'd1 : (kind == 2) ? 3'd2 :
                            (kind == 3) ? 3'd4 : 3'd5;
          int sz = (lf3[1:0] == 0) ? 1 : (lf3[1:0] == 1) ? 2 : 4;
          int off = rnd(-64 / sz, 63 / sz) * sz;
          emit(enc_i(off, 5'd24, lf3, 5'(rd), OPC_LOAD), rd, 24, 0);
        end
        default: begin  // store
          int kind = rnd(0, 2);
          int sz = 1 << kind;
          int off = rnd(-64 / sz, 63 / sz) * sz;
          emit(enc_s(off, 5'(r2), 5'd24, 3'(kind)), 0, 24, r2);
        end
      endcase
    endfunction

    function void gen(int body, int loops);
      int loop_top;
      prog.delete(); last_rd.delete();
      for (int r = 1; r <= 15; r++) begin
        emit(i_lui(r, rnd(0, 32'hfffff)), r, 0, 0);
        emit(i_addi(r, r, rnd(-2048, 2047)), r, r, 0);
      end
      emit(i_addi(24, 0, 64), 24, 0, 0);
      emit(i_addi(20, 0, loops), 20, 0, 0);
      for (int w = 0; w < 32; w++) emit(i_sw(1 + w % 15, 24, 4 * w - 64), 0, 24, 1 + w % 15);
      barrier_before();
      loop_top = prog.size();
      for (int n = 0; n < body; n++) begin
        int k = rnd(0, 9);
        if (k < 7) rand_simple();
        else begin
          int at, skip = rnd(1, 3);
          barrier_before();
          at = prog.size();
          if (k == 7 || k == 8) begin
            int r1 = rnd(1, 15), r2 = (rnd(0, 3) == 0) ? r1 : rnd(0, 15);
            logic [2:0] bf3 = 3'(rnd(0, 5));
            if (bf3 >= 2) bf3 += 2;
            put(enc_b(0, 5'(r2), 5'(r1), bf3), 0);
            barrier_after();
            repeat (skip) rand_simple();
            barrier_before();
            prog[at] = enc_b(4 * (prog.size() - at), 5'(r2), 5'(r1), bf3);
          end else if (rnd(0, 1) == 0) begin
            put(i_jal(22, 0), 22);
            barrier_after();
            repeat (skip) rand_simple();
            barrier_before();
            prog[at] = i_jal(22, 4 * (prog.size() - at));
          end else begin
            put(enc_u(0, 5'd21, OPC_AUIPC), 21);
            barrier_before();
            put(I_NOP, 0);   // patched to jalr x23, off(x21)
            barrier_after();
            repeat (skip) rand_simple();
            barrier_before();
            begin
              int jpos = at + 1 + (sched ? 3 : 0);
              prog[jpos] = enc_i(4 * (prog.size() - at), 5'd21, 3'd0, 5'd23, OPC_JALR);
            end
          end
          last_rd.delete();
        end
      end
      emit(i_addi(20, 20, -1), 20, 20, 0);
      barrier_before();
      prog.push_back(i_bne(20, 0, 4 * (loop_top - int'(prog.size()))));
      barrier_after();
      prog.push_back(i_jal(0, 0));
      repeat (4) prog.push_back(I_NOP);
    endfunction
  endclass

endpackage
