// proc5: single-cycle processor for add, addi, lw, sw and bne.
//
// Every instruction is fetched, decoded, executed and written back in one
// clock cycle. The datapath is the lecture's: the PC register (m1) reads
// the instruction memory (m3); gen_imm (m4) supplies the immediate and the
// class flags; the register file (m5) is written unless the instruction is a
// store or a branch; the second ALU operand (mux m7) is the immediate unless
// the instruction is R-type or a branch; one adder (m8) gives both the
// address/sum and the branch condition rs1 != rs2; the data memory (m9) is
// written by stores; mux m10 picks load data or ALU result for write-back;
// the next PC (mux m11) is PC+4 (adder m2) or the branch target PC+imm
// (adder m6) when a branch is taken. Every ALU operation is an addition, so
// only the five instructions above execute correctly.
//
// Interface: clk, rst (synchronous, active high: PC <- 0, registers <- 0);
// load fills the instruction memory during reset; commit reports the
// instruction executed in each cycle and store each data memory write.
// Timing: one instruction per cycle, a taken branch costs nothing extra.
// Reset, the fill port and the observation ports are this design's own.
module proc5
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

  word_t   r_pc, w_npc, w_tpc, w_pcin, w_ir, w_imm;
  word_t   w_r1, w_r2, w_s2, w_alu, w_ldd, w_rt;
  iclass_t c;
  logic    w_tkn, w_we;

  assign w_npc  = r_pc + 32'd4;                          // m2
  assign w_tpc  = r_pc + w_imm;                          // m6
  assign w_pcin = (c.b && w_tkn) ? w_tpc : w_npc;        // m11

  always_ff @(posedge clk) begin                         // m1
    if (rst) r_pc <= '0;
    else     r_pc <= w_pcin;
  end

  imem #(.WORDS(IMEM_WORDS)) m3 (.clk, .load, .adr(r_pc), .ir(w_ir));

  gen_imm m4 (.ir(w_ir), .imm(w_imm), .cls(c));

  assign w_we = !c.s && !c.b;

  rf m5 (
    .clk, .rst,
    .ra1(w_ir[19:15]), .ra2(w_ir[24:20]), .rd1(w_r1), .rd2(w_r2),
    .wa(w_ir[11:7]), .we(w_we && !rst), .wd(w_rt)
  );

  assign w_s2  = (!c.r && !c.b) ? w_imm : w_r2;          // m7
  assign w_alu = w_r1 + w_s2;                            // m8
  assign w_tkn = (w_r1 != w_s2);                         // m8

  dmem #(.WORDS(DMEM_WORDS)) m9 (
    .clk, .adr(w_alu), .we(c.s && !rst), .wd(w_r2), .rd(w_ldd)
  );

  assign w_rt = c.ld ? w_ldd : w_alu;                    // m10

  assign commit = '{valid: !rst, pc: r_pc, we: w_we, rd: w_ir[11:7], data: w_rt};
  assign store  = '{valid: c.s && !rst, addr: w_alu, data: w_r2};

endmodule
