// proc9: five-stage pipelined processor (IF, ID, EX, MA, WB) for add, addi,
// lw, sw and bne.
//
// The lecture splits proc8's EX into an execute stage and a memory access
// stage, with pipeline register P3 between EX and MA and P4 between MA and
// WB, and names the path from P4 through forwarding, the ALU compare and the
// next-PC mux into the PC as the critical path. The rest is built as in
// proc8 and is this design's own extension of it:
//   IF  PC, instruction memory, PC+4, next-PC mux
//   P1  P1_ir, P1_pc, P1_v
//   ID  gen_imm, bypassing register file rf2, branch target, operand-2 mux
//   P2  operands, target, flags, register numbers, P2_v
//   EX  forwarding muxes, ALU add and rs1 != operand-2 compare
//   P3  P3_alu, P3_sd (store data), P3_rd, flags, P3_v
//   MA  data memory (address P3_alu)
//   P4  P4_alu, P4_ldd, P4_rd, flags, P4_v
//   WB  load data or ALU result into the register file
//
// Hazards. rf2 bypasses the WB write to the ID read. The instruction in EX
// takes a source from MA (P3_alu, the ALU result of the previous
// instruction) in preference to WB (the write-back value of the one before).
// A load's data exists only at the end of MA, so a load in EX followed by
// an instruction in ID that reads the loaded register holds IF and ID for
// one cycle and sends a bubble into EX; the value then comes from WB. This
// interlock is not in the lecture. Branches resolve in EX as in proc8: a
// taken bne loads the PC with P2_tpc and flushes IF and ID.
//
// Interface: as proc5; commit reports the instruction in WB, store the
// memory write in MA. Timing: first instruction completes in the fifth
// cycle after reset, then one per cycle; a taken branch costs two cycles, a
// load followed at once by a use of its result costs one.
module proc9
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
  logic    use1, use2, stall;
  // P2
  word_t    P2_pc, P2_r1, P2_r2, P2_s2, P2_tpc;
  logic     P2_r, P2_s, P2_b, P2_ld, P2_v;
  regaddr_t P2_rs1, P2_rs2, P2_rd;
  // EX
  word_t w_in1, w_in2, w_in3, w_alu, w_src1, w_src2;
  logic  w_tkn, w_miss;
  logic  ma_hit1, ma_hit2, wb_hit1, wb_hit2;
  logic  fwd1, fwd3;
  // P3
  word_t    P3_pc, P3_alu, P3_sd;
  logic     P3_ld, P3_s, P3_b, P3_v, P3_we;
  regaddr_t P3_rd;
  // MA
  word_t w_ldd;
  // P4
  word_t    P4_pc, P4_alu, P4_ldd;
  logic     P4_ld, P4_s, P4_b, P4_v, P4_we;
  regaddr_t P4_rd;
  // WB
  word_t w_rt;

  // ---------------- IF ----------------
  assign w_npc  = r_pc + 32'd4;
  assign w_pcin = w_miss ? P2_tpc : w_npc;

  imem #(.WORDS(IMEM_WORDS)) m3 (.clk, .load, .adr(r_pc), .ir(w_ir));

  // ---------------- ID ----------------
  gen_imm m4 (.ir(P1_ir), .imm(w_imm), .cls(c));

  rf2 m5 (
    .clk, .rst,
    .ra1(P1_ir[19:15]), .ra2(P1_ir[24:20]), .rd1(w_r1), .rd2(w_r2),
    .wa(P4_rd), .we(P4_we), .wd(w_rt)
  );

  assign w_tpc = P1_pc + w_imm;
  assign w_s2  = (!c.r && !c.b) ? w_imm : w_r2;

  // load-use interlock: which source registers the ID instruction reads
  assign use1  = !c.u && !c.j;
  assign use2  = c.r || c.s || c.b;
  assign stall = P1_v && P2_v && P2_ld && (P2_rd != '0) &&
                 ((use1 && (P1_ir[19:15] == P2_rd)) ||
                  (use2 && (P1_ir[24:20] == P2_rd)));

  // ---------------- EX ----------------
  assign P3_we = P3_v && !P3_s && !P3_b;
  assign P4_we = P4_v && !P4_s && !P4_b;

  // a load in MA never matches here: the interlock keeps its user in ID
  assign ma_hit1 = P3_we && !P3_ld && (P3_rd != '0) && (P2_rs1 == P3_rd);
  assign ma_hit2 = P3_we && !P3_ld && (P3_rd != '0) && (P2_rs2 == P3_rd);
  assign wb_hit1 = P4_we && (P4_rd != '0) && (P2_rs1 == P4_rd);
  assign wb_hit2 = P4_we && (P4_rd != '0) && (P2_rs2 == P4_rd);

  assign fwd1   = ma_hit1 || wb_hit1;
  assign fwd3   = ma_hit2 || wb_hit2;
  assign w_src1 = ma_hit1 ? P3_alu : w_rt;
  assign w_src2 = ma_hit2 ? P3_alu : w_rt;

  assign w_in1 = fwd1 ? w_src1 : P2_r1;
  assign w_in2 = (fwd3 && (P2_r || P2_b)) ? w_src2 : P2_s2;
  assign w_in3 = fwd3 ? w_src2 : P2_r2;

  assign w_alu  = w_in1 + w_in2;
  assign w_tkn  = (w_in1 != w_in2);
  assign w_miss = P2_b && w_tkn && P2_v;

  // ---------------- MA ----------------
  dmem #(.WORDS(DMEM_WORDS)) m9 (
    .clk, .adr(P3_alu), .we(P3_s && P3_v), .wd(P3_sd), .rd(w_ldd)
  );

  // ---------------- WB ----------------
  assign w_rt = P4_ld ? P4_ldd : P4_alu;

  // ---------------- pipeline registers ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      r_pc  <= '0;
      P1_ir <= NOP;
      P1_pc <= '0;
      {P1_v, P2_v, P3_v, P4_v} <= '0;
      {P2_pc, P2_r1, P2_r2, P2_s2, P2_tpc} <= '0;
      {P2_r, P2_s, P2_b, P2_ld}            <= '0;
      {P2_rs1, P2_rs2, P2_rd}              <= '0;
      {P3_pc, P3_alu, P3_sd, P3_rd}        <= '0;
      {P3_ld, P3_s, P3_b}                  <= '0;
      {P4_pc, P4_alu, P4_ldd, P4_rd}       <= '0;
      {P4_ld, P4_s, P4_b}                  <= '0;
    end else begin
      // IF and ID: held during a load-use stall, flushed by a taken branch
      if (w_miss || !stall) begin
        r_pc  <= w_pcin;
        P1_ir <= w_ir;
        P1_pc <= r_pc;
        P1_v  <= !w_miss;
      end
      // ID -> EX: a bubble during a stall or after a taken branch
      P2_v   <= P1_v && !w_miss && !stall;
      P2_pc  <= P1_pc;
      P2_r1  <= w_r1;
      P2_r2  <= w_r2;
      P2_s2  <= w_s2;
      P2_tpc <= w_tpc;
      {P2_r, P2_s, P2_b, P2_ld} <= {c.r, c.s, c.b, c.ld};
      P2_rs1 <= P1_ir[19:15];
      P2_rs2 <= P1_ir[24:20];
      P2_rd  <= P1_ir[11:7];
      // EX -> MA
      P3_v   <= P2_v;
      P3_pc  <= P2_pc;
      P3_alu <= w_alu;
      P3_sd  <= w_in3;
      P3_rd  <= P2_rd;
      {P3_ld, P3_s, P3_b} <= {P2_ld, P2_s, P2_b};
      // MA -> WB
      P4_v   <= P3_v;
      P4_pc  <= P3_pc;
      P4_alu <= P3_alu;
      P4_ldd <= w_ldd;
      P4_rd  <= P3_rd;
      {P4_ld, P4_s, P4_b} <= {P3_ld, P3_s, P3_b};
    end
  end

  // the interlock needs a load in EX, a taken branch a branch in EX: the two
  // never meet, so a stalled fetch is never also redirected
  a_stall_xor_miss: assert property (@(posedge clk) disable iff (rst) !(stall && w_miss));

  assign commit = '{valid: P4_v, pc: P4_pc, we: !P4_s && !P4_b, rd: P4_rd, data: w_rt};
  assign store  = '{valid: P3_s && P3_v, addr: P3_alu, data: P3_sd};

endmodule
