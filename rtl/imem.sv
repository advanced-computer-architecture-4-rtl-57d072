// imem: instruction memory (unit m3, "am_imem").
//
// WORDS words of 32 bits, read asynchronously: ir is the word at byte
// address adr (bits [1:0] ignored, address taken modulo the memory size),
// available in the same cycle, as the single-cycle datapath needs. The
// lecture names the unit only; its size and the fill port are this
// design's choices. The fill port (load.we/addr/data) writes one word per
// rising clock edge and is meant to be used while the processor is in reset.
module imem
  import rv_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic       clk,
  input  imem_load_t load,
  input  word_t      adr,
  output word_t      ir
);

  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  assign ir = mem[adr[AW+1:2]];

  always_ff @(posedge clk) begin
    if (load.we) mem[load.addr[AW+1:2]] <= load.data;
  end

endmodule
