// rf: register file of the single-cycle and two-stage processors (unit m5).
//
// 32 registers of 32 bits, two asynchronous read ports (ra1/rd1, ra2/rd2)
// and one write port (wa, we, wd) that writes on the rising clock edge.
// Register x0 reads as zero whatever was written to it. There is no
// bypass: a read in the cycle of a write returns the old value (rf2 adds the
// bypass). The port set is the lecture's; x0 reading as zero follows the
// lecture's bypassing register file; the synchronous reset that clears all
// registers is this design's choice (the lecture initialises them to zero).
module rf
  import rv_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  regaddr_t ra1,
  input  regaddr_t ra2,
  output word_t    rd1,
  output word_t    rd2,
  input  regaddr_t wa,
  input  logic     we,
  input  word_t    wd
);

  word_t mem [32];

  assign rd1 = (ra1 == '0) ? '0 : mem[ra1];
  assign rd2 = (ra2 == '0) ? '0 : mem[ra2];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 32; k++) mem[k] <= '0;
    end else if (we) begin
      mem[wa] <= wd;
    end
  end

endmodule
