// gate_levels_tb: self-checking testbench of gate_levels.
//
// Drives random a, p, q, r every cycle into the split path (default,
// SPLIT=1) and the unsplit one (SPLIT=0), and checks b against a cycle
// model of each: unsplit b = ((a one edge earlier & p) | q) & r, all side
// inputs taken one edge earlier; split b = c & r with c = (a & p) | q
// formed one edge earlier, so a result appears one cycle later than in the
// unsplit path (latency 2 edges against 3).
module gate_levels_tb;

  logic clk = 1'b0;
  logic a, p, q, r, b1, b0;
  logic m_a, m_c, m_b1, m_b0;
  int   checks = 0, failures = 0;

  gate_levels dut1 (.clk, .a, .p, .q, .r, .b(b1));
  gate_levels #(.SPLIT(1'b0)) dut0 (.clk, .a, .p, .q, .r, .b(b0));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("gate_levels_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {a, p, q, r} = '0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      {a, p, q, r} = 4'($urandom());
      @(posedge clk);
      // model registers, updated with the values seen at this edge
      m_b1 = m_c & r;
      m_c  = (m_a & p) | q;
      m_b0 = ((m_a & p) | q) & r;
      m_a  = a;
      #1;
      if (t >= 3) begin
        checks += 2;
        if (b1 !== m_b1) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d split b=%b expected %b", t, b1, m_b1);
        end
        if (b0 !== m_b0) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d unsplit b=%b expected %b", t, b0, m_b0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
