// rv_tb_pkg: test programs and a reference model for the processor
// testbenches.
//
// enc_*      encode the five supported instructions (RISC-V RV32I formats).
// rv_prog    a program: a list of instruction words and the address of its
//            last instruction. make_random() builds a program that first
//            clears data words 0..15, then runs a loop (counter x31) over a
//            random body of add/addi/lw/sw/bne on registers x0..x7, with
//            loads and stores to words 0..15 and forward branches inside
//            the body; it ends with a nop. Directed programs are built with
//            add_word().
// rv_ref     executes a program instruction by instruction (the reference
//            model) and records the expected commit and store sequences,
//            the number of taken branches and of load-use pairs.
// rv_checker compares a processor's commit and store ports against rv_ref
//            and checks the cycle of the last commit against
//            (stages-1) + (N-1) + branch_penalty*taken + lu_penalty*loaduse.
package rv_tb_pkg;
  import rv_pkg::*;

  function automatic word_t enc_add(int rd, int rs1, int rs2);
    return {7'b0, 5'(rs2), 5'(rs1), 3'b000, 5'(rd), OP_R};
  endfunction

  function automatic word_t enc_addi(int rd, int rs1, int imm);
    return {12'(imm), 5'(rs1), 3'b000, 5'(rd), OP_IMM};
  endfunction

  function automatic word_t enc_lw(int rd, int rs1, int imm);
    return {12'(imm), 5'(rs1), 3'b010, 5'(rd), OP_LOAD};
  endfunction

  function automatic word_t enc_sw(int rs2, int rs1, int imm);
    logic [11:0] i;
    i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), 3'b010, i[4:0], OP_STORE};
  endfunction

  function automatic word_t enc_bne(int rs1, int rs2, int imm);
    logic [12:0] i;
    i = 13'(imm);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), 3'b001, i[4:1], i[11], OP_BRANCH};
  endfunction

  class rv_prog;
    word_t words[$];
    word_t end_pc;

    function void add_word(word_t w);
      words.push_back(w);
    endfunction

    // close the program with a nop whose commit marks the end
    function void finish();
      end_pc = word_t'(words.size() * 4);
      words.push_back(NOP);
    endfunction

    function void make_random(int body_len, int loops);
      int body_start, body_end, r, rd, rs1, rs2, k;
      words.delete();
      for (int i = 0; i < 16; i++) add_word(enc_sw(0, 0, 4 * i));
      add_word(enc_addi(31, 0, loops));
      body_start = words.size();
      body_end   = body_start + body_len;      // index of the counter decrement
      for (int i = body_start; i < body_end; i++) begin
        r   = int'($urandom_range(0, 99));
        rd  = int'($urandom_range(0, 7));
        rs1 = int'($urandom_range(0, 7));
        rs2 = ($urandom_range(0, 3) == 0) ? rs1 : int'($urandom_range(0, 7));
        if (r < 28)       add_word(enc_add(rd, rs1, rs2));
        else if (r < 52)  add_word(enc_addi(rd, rs1, ($urandom_range(0, 4) == 0) ?
                                   int'($urandom_range(0, 4095)) - 2048 :
                                   int'($urandom_range(0, 127)) - 64));
        else if (r < 68)  add_word(enc_lw(rd, 0, 4 * int'($urandom_range(0, 15))));
        else if (r < 80)  add_word(enc_sw(rs2, 0, 4 * int'($urandom_range(0, 15))));
        else begin
          k = int'($urandom_range(1, 3));
          if (i + k > body_end) k = body_end - i;
          add_word(enc_bne(rs1, rs2, 4 * k));
        end
      end
      add_word(enc_addi(31, 31, -1));
      add_word(enc_bne(31, 0, 4 * (body_start - words.size())));
      finish();
    endfunction
  endclass

  class rv_ref;
    commit_t exp_commits[$];
    store_t  exp_stores[$];
    int      taken;
    int      loaduse;

    function void run(rv_prog p, int max_steps);
      word_t       regs[32];
      word_t       mem[int];
      word_t       pc, ir, imm, a, bv, res;
      logic [6:0]  op;
      int          steps;
      logic        prev_ld;
      logic [4:0]  prev_rd;
      exp_commits.delete();
      exp_stores.delete();
      taken   = 0;
      loaduse = 0;
      prev_ld = 1'b0;
      prev_rd = '0;
      foreach (regs[k]) regs[k] = '0;
      pc    = '0;
      steps = 0;
      while (steps < max_steps) begin
        ir  = p.words[pc / 4];
        op  = ir[6:0];
        a   = regs[ir[19:15]];
        bv  = regs[ir[24:20]];
        res = '0;
        // load-use pair: the previous instruction loaded a register this one reads
        if (prev_ld && prev_rd != 0 &&
            (ir[19:15] == prev_rd ||
             ((op == OP_R || op == OP_STORE || op == OP_BRANCH) && ir[24:20] == prev_rd)))
          loaduse++;
        prev_ld = (op == OP_LOAD);
        prev_rd = ir[11:7];
        case (op)
          OP_R:   res = a + bv;
          OP_IMM: res = a + {{20{ir[31]}}, ir[31:20]};
          OP_LOAD: begin
            imm = a + {{20{ir[31]}}, ir[31:20]};
            res = mem.exists(int'(imm[11:2])) ? mem[int'(imm[11:2])] : '0;
          end
          OP_STORE: begin
            imm = a + {{20{ir[31]}}, ir[31:25], ir[11:7]};
            mem[int'(imm[11:2])] = bv;
            exp_stores.push_back('{valid: 1'b1, addr: imm, data: bv});
          end
          default: ;
        endcase
        exp_commits.push_back('{valid: 1'b1, pc: pc, we: (op != OP_STORE && op != OP_BRANCH),
                                rd: ir[11:7], data: res});
        if (op != OP_STORE && op != OP_BRANCH && ir[11:7] != 0) regs[ir[11:7]] = res;
        if (pc == p.end_pc) break;
        if (op == OP_BRANCH && a != bv) begin
          taken++;
          pc = pc + {{19{ir[31]}}, ir[31], ir[7], ir[30:25], ir[11:8], 1'b0};
        end else begin
          pc = pc + 4;
        end
        steps++;
      end
    endfunction
  endclass

  class rv_checker;
    string   name;
    int      stages, br_penalty, lu_penalty;
    int      checks, failures;
    rv_ref   r;
    int      ci, si, cycle, end_cycle;
    bit      done;

    function new(string name, int stages, int br_penalty, int lu_penalty);
      this.name       = name;
      this.stages     = stages;
      this.br_penalty = br_penalty;
      this.lu_penalty = lu_penalty;
      checks   = 0;
      failures = 0;
    endfunction

    function void start(rv_ref r);
      this.r    = r;
      ci        = 0;
      si        = 0;
      cycle     = 0;
      end_cycle = -1;
      done      = 1'b0;
    endfunction

    function void check(bit ok, string what);
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("%s FAIL: %s", name, what);
      end
    endfunction

    // call once per clock cycle after reset, with the ports' values
    function void sample(commit_t c, store_t s);
      commit_t e;
      if (!done) begin
        if (c.valid) begin
          e = r.exp_commits[ci];
          check(c.pc == e.pc, $sformatf("commit %0d pc %h expected %h", ci, c.pc, e.pc));
          check(c.we == e.we, $sformatf("commit %0d pc %h we %b expected %b", ci, c.pc, c.we, e.we));
          if (e.we && e.rd != 0)
            check(c.rd == e.rd && c.data == e.data,
                  $sformatf("commit %0d pc %h x%0d=%h expected x%0d=%h",
                            ci, c.pc, c.rd, c.data, e.rd, e.data));
          ci++;
          if (ci == r.exp_commits.size()) begin
            done      = 1'b1;
            end_cycle = cycle;
          end
        end
        if (s.valid) begin
          if (si < r.exp_stores.size())
            check(s.addr == r.exp_stores[si].addr && s.data == r.exp_stores[si].data,
                  $sformatf("store %0d [%h]=%h expected [%h]=%h", si, s.addr, s.data,
                            r.exp_stores[si].addr, r.exp_stores[si].data));
          else
            check(1'b0, "unexpected store");
          si++;
        end
      end
      cycle++;
    endfunction

    // after the last commit: counts and cycle count
    function void finish_run();
      int expected;
      expected = (stages - 1) + (r.exp_commits.size() - 1) +
                 br_penalty * r.taken + lu_penalty * r.loaduse;
      check(done, $sformatf("only %0d of %0d instructions committed", ci, r.exp_commits.size()));
      check(si == r.exp_stores.size(), $sformatf("%0d stores, expected %0d", si, r.exp_stores.size()));
      check(end_cycle == expected, $sformatf("last commit in cycle %0d, expected %0d", end_cycle, expected));
    endfunction
  endclass

endpackage
