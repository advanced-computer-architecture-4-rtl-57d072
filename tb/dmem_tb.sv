// dmem_tb: self-checking testbench of dmem.
//
// Writes every word once, then runs 5000 cycles of random writes (we high
// half the time) while reading the same or another address, comparing the
// asynchronous read data with a model array: a read in the cycle of a write
// to the same word returns the old value, the new one from the next cycle.
module dmem_tb;
  import rv_pkg::*;

  localparam int unsigned WORDS = 1024;

  logic  clk = 1'b0, we;
  word_t adr, wd, rd;
  word_t model[WORDS];
  int    checks = 0, failures = 0;

  dmem #(.WORDS(WORDS)) dut (.clk, .adr, .we, .wd, .rd);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("dmem_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned w;
    we = 1'b0; adr = '0; wd = '0;
    @(negedge clk);
    for (int unsigned i = 0; i < WORDS; i++) begin
      we = 1'b1; adr = word_t'(i * 4); wd = $urandom();
      model[i] = wd;
      @(negedge clk);
    end
    for (int t = 0; t < 5000; t++) begin
      w   = $urandom_range(0, WORDS - 1);
      we  = $urandom_range(0, 1) == 1;
      adr = word_t'(w * 4 + $urandom_range(0, 3));
      wd  = $urandom();
      #1;
      checks++;
      if (rd !== model[w]) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d adr=%h rd=%h expected %h", t, adr, rd, model[w]);
      end
      @(negedge clk);
      if (we) model[w] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
