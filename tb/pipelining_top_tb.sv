// pipelining_top_tb: end-to-end testbench of pipelining_top at its default
// parameters.
//
// The same program is loaded into all four processors and run side by side;
// each processor's commits, stores and cycle count are checked against the
// reference model (see rv_tb_pkg) with its own pipeline depth and
// penalties: proc5 1 stage, proc6 2 stages and 1 cycle per taken branch,
// proc8 4 stages and 2 per taken branch, proc9 5 stages, 2 per taken
// branch and 1 per load-use pair. Programs: the exercise's dependency chain
// and 40 random looping programs. Meanwhile the multiply-add circuit gets a
// new random (b, c) every cycle and y is checked three cycles later, and
// the split gate path gets random inputs, its output checked against
// ((a & p) | q) & r formed over two cycles.
//
// It counts how often each mechanism of the designs acts and fails if one
// never does: taken branch in proc5; wrong-path flush in proc6, proc8 and
// proc9; forwarding into ALU input 1, ALU input 2 and store data in proc8;
// register file bypass in proc8 and proc9; forwarding from MA and from WB
// and the load-use stall in proc9; writes to x0 being ignored.
module pipelining_top_tb;
  import rv_pkg::*;
  import rv_tb_pkg::*;

  localparam int MAX_CYCLES = 400000;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  imem_load_t  load;
  commit_t     c5, c6, c8, c9;
  store_t      s5, s6, s8, s9;
  logic [15:0] ma_b;
  logic [31:0] ma_c, ma_y;
  logic [31:0] hist[$];
  logic        gl_a, gl_p, gl_q, gl_r, gl_b, m_a, m_c, m_b;
  int          gl_n = 0;
  bit          running = 1'b0;
  int          checks = 0, failures = 0, cyc = 0;

  typedef enum int {
    EV_P5_TAKEN, EV_P6_FLUSH, EV_P8_FLUSH, EV_P8_FWD1, EV_P8_FWD2, EV_P8_FWD3,
    EV_P8_BYPASS, EV_P9_FLUSH, EV_P9_STALL, EV_P9_FWD_MA, EV_P9_FWD_WB,
    EV_P9_BYPASS, EV_X0_WRITE, EV_N
  } ev_e;
  int    ev[EV_N];
  string ev_name[EV_N] = '{"proc5 taken branch", "proc6 flush", "proc8 flush",
                           "proc8 forward ALU in1", "proc8 forward ALU in2",
                           "proc8 forward store data", "proc8 RF bypass",
                           "proc9 flush", "proc9 load-use stall",
                           "proc9 forward from MA", "proc9 forward from WB",
                           "proc9 RF bypass", "write to x0 ignored"};

  rv_checker k5 = new("proc5", 1, 0, 0);
  rv_checker k6 = new("proc6", 2, 1, 0);
  rv_checker k8 = new("proc8", 4, 2, 0);
  rv_checker k9 = new("proc9", 5, 2, 1);
  rv_ref     rref = new();
  rv_prog    prog = new();

  pipelining_top dut (
    .clk, .rst,
    .p5_load(load), .p5_commit(c5), .p5_store(s5),
    .p6_load(load), .p6_commit(c6), .p6_store(s6),
    .p8_load(load), .p8_commit(c8), .p8_store(s8),
    .p9_load(load), .p9_commit(c9), .p9_store(s9),
    .ma_b, .ma_c, .ma_y,
    .gl_a, .gl_p, .gl_q, .gl_r, .gl_b
  );

  // split gate path: model registers A, C, B
  always @(posedge clk) begin
    m_b = m_c & gl_r;
    m_c = (m_a & gl_p) | gl_q;
    m_a = gl_a;
  end

  always @(negedge clk) begin
    if (gl_n >= 3) begin
      checks++;
      if (gl_b !== m_b) begin
        failures++;
        if (failures < 10) $display("gate_levels FAIL b=%b expected %b", gl_b, m_b);
      end
    end
    gl_n++;
    {gl_a, gl_p, gl_q, gl_r} = 4'($urandom());
  end

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (running) begin
      k5.sample(c5, s5);
      k6.sample(c6, s6);
      k8.sample(c8, s8);
      k9.sample(c9, s9);
      if (dut.u_proc5.c.b && dut.u_proc5.w_tkn)                  ev[EV_P5_TAKEN]++;
      if (dut.u_proc6.w_miss)                                    ev[EV_P6_FLUSH]++;
      if (dut.u_proc8.w_miss)                                    ev[EV_P8_FLUSH]++;
      if (dut.u_proc8.P2_v && dut.u_proc8.fwd1)                  ev[EV_P8_FWD1]++;
      if (dut.u_proc8.P2_v && dut.u_proc8.fwd2)                  ev[EV_P8_FWD2]++;
      if (dut.u_proc8.P2_v && dut.u_proc8.P2_s && dut.u_proc8.fwd3) ev[EV_P8_FWD3]++;
      if (dut.u_proc8.P1_v && (dut.u_proc8.m5.bp1 || dut.u_proc8.m5.bp2) &&
          dut.u_proc8.P3_rd != 0)                                ev[EV_P8_BYPASS]++;
      if (dut.u_proc9.w_miss)                                    ev[EV_P9_FLUSH]++;
      if (dut.u_proc9.stall)                                     ev[EV_P9_STALL]++;
      if (dut.u_proc9.P2_v && (dut.u_proc9.ma_hit1 || dut.u_proc9.ma_hit2)) ev[EV_P9_FWD_MA]++;
      if (dut.u_proc9.P2_v && (dut.u_proc9.wb_hit1 || dut.u_proc9.wb_hit2)) ev[EV_P9_FWD_WB]++;
      if (dut.u_proc9.P1_v && (dut.u_proc9.m5.bp1 || dut.u_proc9.m5.bp2) &&
          dut.u_proc9.P4_rd != 0)                                ev[EV_P9_BYPASS]++;
      if (c8.valid && c8.we && c8.rd == 0 && c8.data != 0)       ev[EV_X0_WRITE]++;
    end
  end

  // multiply-add: a new pair every cycle, result three edges later
  always @(negedge clk) begin
    if (hist.size() >= 3) begin
      checks++;
      if (ma_y !== hist[hist.size() - 3]) begin
        failures++;
        if (failures < 10) $display("madd FAIL y=%h expected %h", ma_y, hist[hist.size() - 3]);
      end
    end
    ma_b = 16'($urandom());
    ma_c = $urandom();
    hist.push_back(32'(ma_b) * 32'd3 + ma_c);
    if (hist.size() > 8) void'(hist.pop_front());
  end

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("pipelining_top_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures());
    $finish;
  end

  function automatic int total_checks();
    return checks + k5.checks + k6.checks + k8.checks + k9.checks;
  endfunction

  function automatic int total_failures();
    return failures + k5.failures + k6.failures + k8.failures + k9.failures;
  endfunction

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
    k5.start(rref);
    k6.start(rref);
    k8.start(rref);
    k9.start(rref);
    rst     = 1'b0;
    running = 1'b1;
    n = 0;
    while (!(k5.done && k6.done && k8.done && k9.done) && n < 20000) begin
      @(negedge clk);
      n++;
    end
    running = 1'b0;
    rst     = 1'b1;
    k5.finish_run();
    k6.finish_run();
    k8.finish_run();
    k9.finish_run();
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

    for (int t = 0; t < 40; t++) begin
      prog.make_random(48, 5);
      run_prog(prog);
    end

    foreach (ev[e]) begin
      $display("  %-26s %0d", ev_name[e], ev[e]);
      checks++;
      if (ev[e] == 0) begin
        failures++;
        $display("FAIL: %s never happened", ev_name[e]);
      end
    end
    $display("pipelining_top_tb: %0d cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures());
    $finish;
  end

endmodule
