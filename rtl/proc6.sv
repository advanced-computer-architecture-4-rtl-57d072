// proc6: two-stage pipelined processor (IF, EX) for add, addi, lw, sw, bne.
//
// The single-cycle datapath of proc5 is cut after the instruction memory by
// pipeline register P1 = {P1_ir, P1_pc, P1_v}. IF reads the instruction at
// the PC and computes PC+4; EX decodes, reads the register file, executes,
// accesses data memory and writes back, all for the instruction in P1. The
// instruction after a branch is always fetched. When the branch in EX is
// taken (w_miss) the PC is loaded with the target P1_pc+imm and the
// instruction fetched in the same cycle is flushed by clearing P1_v; a
// flushed instruction writes neither registers nor memory. This follows the
// lecture's proc6.
//
// Interface: as proc5. Timing: one instruction per cycle once the pipeline
// is full, the first instruction completes in the second cycle after reset,
// a taken branch costs one extra cycle. Reset (PC <- 0, P1 empty holding a
// nop) stands in for the lecture's initial register values.
module proc6
  import rv_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic       clk,
  input  logic       rst,
  input  imem_load_t load,
  output commit_t    commit,
  output store_t     store
);

  // IF stage
  word_t r_pc, w_npc, w_pcin, w_ir;
  // P1
  word_t P1_ir, P1_pc;
  logic  P1_v;
  // EX stage
  word_t   w_imm, w_tpc, w_r1, w_r2, w_s2, w_alu, w_ldd, w_rt;
  iclass_t c;
  logic    w_tkn, w_miss, w_we;

  assign w_npc  = r_pc + 32'd4;
  assign w_pcin = w_miss ? w_tpc : w_npc;

  imem #(.WORDS(IMEM_WORDS)) m3 (.clk, .load, .adr(r_pc), .ir(w_ir));

  always_ff @(posedge clk) begin
    if (rst) begin
      r_pc  <= '0;
      P1_ir <= NOP;
      P1_pc <= '0;
      P1_v  <= 1'b0;
    end else begin
      r_pc  <= w_pcin;
      P1_ir <= w_ir;
      P1_pc <= r_pc;
      P1_v  <= !w_miss;
    end
  end

  gen_imm m4 (.ir(P1_ir), .imm(w_imm), .cls(c));

  assign w_we = !c.s && !c.b && P1_v;

  rf m5 (
    .clk, .rst,
    .ra1(P1_ir[19:15]), .ra2(P1_ir[24:20]), .rd1(w_r1), .rd2(w_r2),
    .wa(P1_ir[11:7]), .we(w_we), .wd(w_rt)
  );

  assign w_tpc  = P1_pc + w_imm;
  assign w_s2   = (!c.r && !c.b) ? w_imm : w_r2;
  assign w_alu  = w_r1 + w_s2;
  assign w_tkn  = (w_r1 != w_s2);
  assign w_miss = c.b && w_tkn && P1_v;

  dmem #(.WORDS(DMEM_WORDS)) m9 (
    .clk, .adr(w_alu), .we(c.s && P1_v), .wd(w_r2), .rd(w_ldd)
  );

  assign w_rt = c.ld ? w_ldd : w_alu;

  assign commit = '{valid: P1_v, pc: P1_pc, we: !c.s && !c.b, rd: P1_ir[11:7], data: w_rt};
  assign store  = '{valid: c.s && P1_v, addr: w_alu, data: w_r2};

endmodule
