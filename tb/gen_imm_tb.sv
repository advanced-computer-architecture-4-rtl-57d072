// gen_imm_tb: self-checking testbench of gen_imm.
//
// For each of 4000 trials it picks an instruction format and a random
// immediate of that format's range, scatters the immediate into the format's
// instruction fields (the RISC-V layout), fills the other fields at random,
// and checks that gen_imm returns the sign-extended immediate and exactly
// the class flags of the opcode. Random words with other opcodes must give
// no class flag and immediate 0. Purely combinational: values are checked
// 1 ns after they are applied.
module gen_imm_tb;
  import rv_pkg::*;

  word_t   ir, imm;
  iclass_t cls;
  int      checks = 0, failures = 0;

  gen_imm dut (.ir, .imm, .cls);

  initial begin
    #1000000;
    failures++;
    $display("gen_imm_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(word_t exp_imm, iclass_t exp_cls, string what);
    #1;
    checks++;
    if (imm !== exp_imm || cls !== exp_cls) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: ir=%h imm=%h cls=%b expected imm=%h cls=%b",
                 what, ir, imm, cls, exp_imm, exp_cls);
    end
  endtask

  initial begin
    logic [6:0]  ops[9];
    logic [6:0]  op;
    logic [31:0] v, rnd;
    iclass_t     ec;
    ops = '{OP_R, OP_IMM, OP_LOAD, OP_JALR, OP_STORE, OP_BRANCH, OP_LUI, OP_AUIPC, OP_JAL};
    for (int t = 0; t < 4000; t++) begin
      op  = ops[$urandom_range(0, 8)];
      rnd = $urandom();
      v   = $urandom();
      ec  = '0;
      case (op)
        OP_R: begin
          ec.r = 1'b1;
          ir = {rnd[31:7], op};
          check('0, ec, "R");
        end
        OP_IMM, OP_LOAD, OP_JALR: begin
          ec.i  = 1'b1;
          ec.ld = (op == OP_LOAD);
          ir = {v[11:0], rnd[19:7], op};
          check({{20{v[11]}}, v[11:0]}, ec, "I");
        end
        OP_STORE: begin
          ec.s = 1'b1;
          ir = {v[11:5], rnd[24:12], v[4:0], op};
          check({{20{v[11]}}, v[11:0]}, ec, "S");
        end
        OP_BRANCH: begin
          ec.b = 1'b1;
          ir = {v[12], v[10:5], rnd[24:12], v[4:1], v[11], op};
          check({{19{v[12]}}, v[12:1], 1'b0}, ec, "B");
        end
        OP_LUI, OP_AUIPC: begin
          ec.u = 1'b1;
          ir = {v[31:12], rnd[11:7], op};
          check({v[31:12], 12'b0}, ec, "U");
        end
        default: begin
          ec.j = 1'b1;
          ir = {v[20], v[10:1], v[11], v[19:12], rnd[11:7], op};
          check({{11{v[20]}}, v[20:1], 1'b0}, ec, "J");
        end
      endcase
    end
    // opcodes outside the supported set
    for (int t = 0; t < 500; t++) begin
      rnd = $urandom();
      if (rnd[6:0] inside {OP_R, OP_IMM, OP_LOAD, OP_JALR, OP_STORE, OP_BRANCH,
                           OP_LUI, OP_AUIPC, OP_JAL}) continue;
      ir = rnd;
      check('0, '0, "other");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
