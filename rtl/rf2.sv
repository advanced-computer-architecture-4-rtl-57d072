// rf2: register file with bypassing, used by the four- and five-stage
// processors (unit m5 there).
//
// Same ports and storage as rf: 32 x 32 bits, two asynchronous read ports,
// one write port clocked on the rising edge, x0 reads as zero. In addition a
// read of the register being written in the same cycle returns the write
// data wd instead of the stored value, so an instruction decoding in ID sees
// the result that the instruction in WB is writing at that moment. This
// bypass is what the lecture describes; the synchronous reset that clears
// all registers is this design's choice.
module rf2
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
  logic  bp1, bp2;

  assign bp1 = we && (ra1 == wa);
  assign bp2 = we && (ra2 == wa);

  assign rd1 = (ra1 == '0) ? '0 : bp1 ? wd : mem[ra1];
  assign rd2 = (ra2 == '0) ? '0 : bp2 ? wd : mem[ra2];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 32; k++) mem[k] <= '0;
    end else if (we) begin
      mem[wa] <= wd;
    end
  end

endmodule
