// proc6_tb: self-checking testbench of proc6.
//
// proc6 completes one instruction per cycle and loses one cycle per taken branch.
// Programs: the four-instruction dependency chain of the exercise
// (addi x1,x0,3 / addi x2,x1,4 / addi x10,x1,5 / addi x11,x10,0), the
// chain addi x1,x0,3 / addi x2,x1,4 / addi x10,x2,5 / addi x30,x10,0, a
// taken bne at 0x08 to 0x30 with two instructions behind it, and 30 random
// looping programs (see rv_tb_pkg). For each, the instruction memory is
// filled through the load port during reset, a reference model executes the
// program, and every commit (pc, write enable, rd, value) and every store
// (address, data) of the processor is compared with it in order. The cycle
// of the last commit is checked against 2-1 fill cycles + one cycle per
// instruction + 1 per taken branch + 0 per load-use pair.
module proc6_tb;
  import rv_pkg::*;
  import rv_tb_pkg::*;

  localparam int MAX_CYCLES = 400000;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  imem_load_t load;
  commit_t    commit;
  store_t     store;
  bit         running = 1'b0;
  int         checks = 0, failures = 0, cyc = 0;

  rv_checker chk = new("proc6", 2, 1, 0);
  rv_ref     rref = new();
  rv_prog    prog = new();

  proc6 dut (.clk, .rst, .load, .commit, .store);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (running) chk.sample(commit, store);
  end

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("proc6_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk.checks, failures + chk.failures);
    $finish;
  end

  task automatic run_prog(rv_prog p);
    int n;
    rref.run(p, 100000);
    @(negedge clk);
    rst = 1'b1;
    foreach (p.words[i]) begin
      load = '{we: 1'b1, addr: word_t'(i * 4), data: p.words[i]};
      @(negedge clk);
    end
    for (int i = 0; i < 8; i++) begin
      load = '{we: 1'b1, addr: word_t'((p.words.size() + i) * 4), data: NOP};
      @(negedge clk);
    end
    load = '0;
    @(negedge clk);
    chk.start(rref);
    rst     = 1'b0;
    running = 1'b1;
    n = 0;
    while (!chk.done && n < 20000) begin
      @(negedge clk);
      n++;
    end
    running = 1'b0;
    rst     = 1'b1;
    chk.finish_run();
  endtask

  initial begin
    load = '0;
    repeat (3) @(negedge clk);

    prog.words.delete();
    prog.add_word(enc_addi(1, 0, 3));
    prog.add_word(enc_addi(2, 1, 4));
    prog.add_word(enc_addi(10, 1, 5));
    prog.add_word(enc_addi(11, 10, 0));
    prog.finish();
    run_prog(prog);
    checks++;
    if (rref.exp_commits[3].data != 32'd8) failures++;    // x11 = 3 + 5

    prog.words.delete();
    prog.add_word(enc_addi(1, 0, 3));
    prog.add_word(enc_addi(2, 1, 4));
    prog.add_word(enc_addi(10, 2, 5));
    prog.add_word(enc_addi(30, 10, 0));
    prog.finish();
    run_prog(prog);
    checks++;
    if (rref.exp_commits[3].data != 32'd12) failures++;   // x30 = 3 + 4 + 5

    prog.words.delete();
    prog.add_word(enc_addi(1, 0, 5));                      // 00
    prog.add_word(enc_add(2, 1, 1));                       // 04
    prog.add_word(enc_bne(1, 2, 32'h30 - 32'h08));         // 08 taken
    prog.add_word(enc_add(3, 1, 1));                       // 0c wrong path
    prog.add_word(enc_add(4, 1, 1));                       // 10 wrong path
    for (int i = 5; i < 12; i++) prog.add_word(NOP);       // 14 .. 2c
    prog.add_word(enc_addi(5, 0, 1));                      // 30
    prog.add_word(enc_addi(6, 5, 2));                      // 34
    prog.finish();
    run_prog(prog);
    checks++;
    if (rref.exp_commits.size() != 6 || rref.taken != 1) failures++;

    for (int t = 0; t < 30; t++) begin
      prog.make_random(40, 4);
      run_prog(prog);
    end

    $display("proc6_tb: %0d cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk.checks, failures + chk.failures);
    $finish;
  end

endmodule
