// imem_tb: self-checking testbench of imem.
//
// Fills every word of the memory through the load port with a value derived
// from its index (a multiplicative hash, index * 0x9E3779B1 + 0x13), then
// reads 3000 random byte addresses (low two bits random) and checks the
// asynchronous read data in the same cycle. Also checks that an address
// beyond the memory wraps around.
module imem_tb;
  import rv_pkg::*;

  localparam int unsigned WORDS = 1024;

  logic       clk = 1'b0;
  imem_load_t load;
  word_t      adr, ir;
  int         checks = 0, failures = 0;

  imem #(.WORDS(WORDS)) dut (.clk, .load, .adr, .ir);

  always #5 clk = ~clk;

  function automatic word_t pattern(int unsigned i);
    return word_t'(i * 32'h9E37_79B1 + 32'h13);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("imem_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned w;
    load = '0;
    adr  = '0;
    @(negedge clk);
    for (int unsigned i = 0; i < WORDS; i++) begin
      load = '{we: 1'b1, addr: word_t'(i * 4), data: pattern(i)};
      @(negedge clk);
    end
    load = '0;
    for (int t = 0; t < 3000; t++) begin
      w   = $urandom_range(0, WORDS - 1);
      adr = word_t'(w * 4 + $urandom_range(0, 3));
      if (t % 10 == 0) adr = adr + word_t'(WORDS * 4);   // wraps around
      #1;
      checks++;
      if (ir !== pattern(w)) begin
        failures++;
        if (failures < 10) $display("FAIL adr=%h ir=%h expected %h", adr, ir, pattern(w));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
