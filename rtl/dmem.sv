// dmem: data memory (unit m9, "am_dmem").
//
// WORDS words of 32 bits at byte addresses 0 .. 4*WORDS-1, word accesses
// only (address bits [1:0] ignored, address taken modulo the memory size).
// Reading is asynchronous: rd is the word at adr in the same cycle. Writing
// happens on the rising clock edge when we is high. The ports adr, we, wd,
// rd are the lecture's; the size is this design's choice. The memory is not
// cleared by reset, so a program must store a word before it loads it.
module dmem
  import rv_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic  clk,
  input  word_t adr,
  input  logic  we,
  input  word_t wd,
  output word_t rd
);

  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  assign rd = mem[adr[AW+1:2]];

  always_ff @(posedge clk) begin
    if (we) mem[adr[AW+1:2]] <= wd;
  end

endmodule
