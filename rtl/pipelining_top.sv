// pipelining_top: the designs of this collection side by side.
//
// Four implementations of the same small RISC-V processor (add, addi, lw,
// sw, bne) that show the steps from a single-cycle datapath to a five-stage
// pipeline, and the multiply-add circuit that introduces pipeline
// registers:
//   p5  proc5  single cycle
//   p6  proc6  two stages (IF, EX), one wrong-path instruction flushed per
//              taken branch
//   p8  proc8  four stages (IF, ID, EX, WB), forwarding and a bypassing
//              register file, two instructions flushed per taken branch
//   p9  proc9  five stages (IF, ID, EX, MA, WB), forwarding from MA and WB,
//              load-use interlock, two instructions flushed per taken branch
//   ma  madd   y = 3*b + c in two pipeline stages
//   gl  gate_levels  three gate levels between registers, split by a
//              register
// The designs share only the clock and the reset. Each processor has its
// own instruction memory fill port (pX_load, used during reset) and its own
// commit and store observation ports; see proc5 for their meaning.
module pipelining_top
  import rv_pkg::*;
#(
  parameter int unsigned IMEM_WORDS  = 1024,
  parameter int unsigned DMEM_WORDS  = 1024,
  parameter int unsigned MADD_STAGES = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  imem_load_t  p5_load,
  output commit_t     p5_commit,
  output store_t      p5_store,
  input  imem_load_t  p6_load,
  output commit_t     p6_commit,
  output store_t      p6_store,
  input  imem_load_t  p8_load,
  output commit_t     p8_commit,
  output store_t      p8_store,
  input  imem_load_t  p9_load,
  output commit_t     p9_commit,
  output store_t      p9_store,
  input  logic [15:0] ma_b,
  input  logic [31:0] ma_c,
  output logic [31:0] ma_y,
  input  logic        gl_a,
  input  logic        gl_p,
  input  logic        gl_q,
  input  logic        gl_r,
  output logic        gl_b
);

  proc5 #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_proc5 (
    .clk, .rst, .load(p5_load), .commit(p5_commit), .store(p5_store)
  );

  proc6 #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_proc6 (
    .clk, .rst, .load(p6_load), .commit(p6_commit), .store(p6_store)
  );

  proc8 #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_proc8 (
    .clk, .rst, .load(p8_load), .commit(p8_commit), .store(p8_store)
  );

  proc9 #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_proc9 (
    .clk, .rst, .load(p9_load), .commit(p9_commit), .store(p9_store)
  );

  madd #(.STAGES(MADD_STAGES)) u_madd (
    .clk, .b(ma_b), .c(ma_c), .y(ma_y)
  );

  gate_levels u_gate_levels (
    .clk, .a(gl_a), .p(gl_p), .q(gl_q), .r(gl_r), .b(gl_b)
  );

endmodule
