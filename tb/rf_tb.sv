// rf_tb: self-checking testbench of rf.
//
// After a reset that must clear all registers, 5000 cycles of random reads
// and writes are applied and both read ports are compared every cycle with
// a model array. x0 must read as zero even after being written.
// A read of the register being written in the same cycle returns the old value (no bypass).
// Inputs change at the falling edge; reads are checked just before the
// rising edge.
module rf_tb;
  import rv_pkg::*;

  localparam bit BYPASS = 0;

  logic     clk = 1'b0, rst = 1'b1, we;
  regaddr_t ra1, ra2, wa;
  word_t    rd1, rd2, wd;
  word_t    model[32];
  int       checks = 0, failures = 0;

  rf dut (.clk, .rst, .ra1, .ra2, .rd1, .rd2, .wa, .we, .wd);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("rf_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t expect_rd(regaddr_t ra);
    if (ra == 0) return '0;
    if (BYPASS && we && wa == ra) return wd;
    return model[ra];
  endfunction

  initial begin
    foreach (model[k]) model[k] = '0;
    we = 1'b0; ra1 = '0; ra2 = '0; wa = '0; wd = '0;
    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 5000; t++) begin
      we  = ($urandom_range(0, 2) != 0);
      wa  = regaddr_t'($urandom_range(0, 31));
      wd  = $urandom();
      ra1 = ($urandom_range(0, 3) == 0) ? wa : regaddr_t'($urandom_range(0, 31));
      ra2 = ($urandom_range(0, 3) == 0) ? wa : regaddr_t'($urandom_range(0, 31));
      #4;
      checks += 2;
      if (rd1 !== expect_rd(ra1)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d rd1 x%0d=%h expected %h", t, ra1, rd1, expect_rd(ra1));
      end
      if (rd2 !== expect_rd(ra2)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d rd2 x%0d=%h expected %h", t, ra2, rd2, expect_rd(ra2));
      end
      @(negedge clk);
      if (we) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
