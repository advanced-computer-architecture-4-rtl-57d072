// proc8: four-stage pipelined processor (IF, ID, EX, WB) with data
// forwarding, for add, addi, lw, sw and bne.
//
// Stages and pipeline registers follow the lecture's proc8:
//   IF  PC (m1), instruction memory (m3), PC+4 (m2), next-PC mux (m0)
//   P1  P1_ir, P1_pc, P1_v
//   ID  gen_imm (m4), bypassing register file rf2 (m5), branch target
//       P1_pc+imm (m6), operand-2 mux (m7: immediate unless R-type/branch)
//   P2  P2_r1, P2_r2, P2_s2, P2_tpc, P2_pc, class flags r/s/b/ld,
//       register numbers rs1/rs2/rd, P2_v
//   EX  ALU add and rs1 != operand-2 compare (m8), data memory (m9): the
//       memory access is part of EX
//   P3  P3_alu, P3_ldd, P3_rd, P3_pc, P3_ld, P3_we, P3_v
//   WB  mux m10 (load data or ALU result) drives the register file write.
//
// Hazards. The instruction in WB writes the register file in the same cycle
// as the instruction in ID reads it: rf2's bypass hands the new value over.
// The instruction in EX takes a result from WB, one instruction older,
// through the forwarding muxes m11 (ALU input 1), m12 (ALU input 2, only
// for R-type and branch, whose second operand is rs2) and m13 (store data).
// A load completes its memory access in EX, so its data is forwarded the
// same way and no instruction ever waits. Branches resolve in EX: a taken
// bne loads the PC with P2_tpc and flushes the two younger instructions in
// IF and ID by clearing their valid bits.
//
// This design's own details: forwarding (and the register write) is
// qualified by P3_we, the write enable of the instruction in WB (valid, not
// a store, not a branch), and forwarding also by rd != 0; the store and
// branch flags are carried into P3 next to the load flag for this. A store
// or branch in WB, whose rd field holds immediate bits, thus never writes or
// forwards a register.
//
// Interface: as proc5; commit reports the instruction in WB, store reports
// the memory write in EX. Timing: first instruction completes in the fourth
// cycle after reset, then one per cycle; a taken branch costs two cycles.
module proc8
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

  // IF
  word_t r_pc, w_npc, w_pcin, w_ir;
  // P1
  word_t P1_ir, P1_pc;
  logic  P1_v;
  // ID
  word_t   w_imm, w_r1, w_r2, w_s2, w_tpc;
  iclass_t c;
  // P2
  word_t    P2_pc, P2_r1, P2_r2, P2_s2, P2_tpc;
  logic     P2_r, P2_s, P2_b, P2_ld, P2_v;
  regaddr_t P2_rs1, P2_rs2, P2_rd;
  // EX
  word_t w_in1, w_in2, w_in3, w_alu, w_ldd;
  logic  w_tkn, w_miss;
  logic  fwd1, fwd2, fwd3;
  // P3
  word_t    P3_pc, P3_alu, P3_ldd;
  logic     P3_ld, P3_s, P3_b, P3_v, P3_we;
  regaddr_t P3_rd;
  // WB
  word_t w_rt;

  // ---------------- IF ----------------
  assign w_npc  = r_pc + 32'd4;                          // m2
  assign w_pcin = w_miss ? P2_tpc : w_npc;               // m0

  imem #(.WORDS(IMEM_WORDS)) m3 (.clk, .load, .adr(r_pc), .ir(w_ir));

  // ---------------- ID ----------------
  gen_imm m4 (.ir(P1_ir), .imm(w_imm), .cls(c));

  rf2 m5 (
    .clk, .rst,
    .ra1(P1_ir[19:15]), .ra2(P1_ir[24:20]), .rd1(w_r1), .rd2(w_r2),
    .wa(P3_rd), .we(P3_we), .wd(w_rt)
  );

  assign w_tpc = P1_pc + w_imm;                          // m6
  assign w_s2  = (!c.r && !c.b) ? w_imm : w_r2;          // m7

  // ---------------- EX ----------------
  assign fwd1  = P3_we && (P3_rd != '0) && (P2_rs1 == P3_rd);
  assign fwd3  = P3_we && (P3_rd != '0) && (P2_rs2 == P3_rd);
  assign fwd2  = fwd3 && (P2_r || P2_b);

  assign w_in1 = fwd1 ? w_rt : P2_r1;                    // m11
  assign w_in2 = fwd2 ? w_rt : P2_s2;                    // m12
  assign w_in3 = fwd3 ? w_rt : P2_r2;                    // m13

  assign w_alu  = w_in1 + w_in2;                         // m8
  assign w_tkn  = (w_in1 != w_in2);                      // m8
  assign w_miss = P2_b && w_tkn && P2_v;

  dmem #(.WORDS(DMEM_WORDS)) m9 (
    .clk, .adr(w_alu), .we(P2_s && P2_v), .wd(w_in3), .rd(w_ldd)
  );

  // ---------------- WB ----------------
  assign P3_we = P3_v && !P3_s && !P3_b;
  assign w_rt  = P3_ld ? P3_ldd : P3_alu;                // m10

  // ---------------- pipeline registers ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      r_pc  <= '0;
      P1_ir <= NOP;
      P1_pc <= '0;
      P1_v  <= 1'b0;
      P2_v  <= 1'b0;
      P3_v  <= 1'b0;
      {P2_pc, P2_r1, P2_r2, P2_s2, P2_tpc} <= '0;
      {P2_r, P2_s, P2_b, P2_ld}            <= '0;
      {P2_rs1, P2_rs2, P2_rd}              <= '0;
      {P3_pc, P3_alu, P3_ldd, P3_rd}       <= '0;
      {P3_ld, P3_s, P3_b}                  <= '0;
    end else begin
      // valid bits: a taken branch in EX empties IF and ID
      P1_v <= !w_miss;
      P2_v <= !w_miss && P1_v;
      P3_v <= P2_v;
      // IF -> ID
      r_pc  <= w_pcin;
      P1_ir <= w_ir;
      P1_pc <= r_pc;
      // ID -> EX
      P2_pc  <= P1_pc;
      P2_r1  <= w_r1;
      P2_r2  <= w_r2;
      P2_s2  <= w_s2;
      P2_tpc <= w_tpc;
      {P2_r, P2_s, P2_b, P2_ld} <= {c.r, c.s, c.b, c.ld};
      P2_rs1 <= P1_ir[19:15];
      P2_rs2 <= P1_ir[24:20];
      P2_rd  <= P1_ir[11:7];
      // EX -> WB
      P3_pc  <= P2_pc;
      P3_alu <= w_alu;
      P3_ldd <= w_ldd;
      P3_rd  <= P2_rd;
      {P3_ld, P3_s, P3_b} <= {P2_ld, P2_s, P2_b};
    end
  end

  assign commit = '{valid: P3_v, pc: P3_pc, we: !P3_s && !P3_b, rd: P3_rd, data: w_rt};
  assign store  = '{valid: P2_s && P2_v, addr: w_alu, data: w_in3};

endmodule
