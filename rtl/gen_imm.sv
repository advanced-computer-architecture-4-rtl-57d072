// gen_imm: immediate generator and instruction classifier (unit m4 of the
// processors).
//
// From a 32-bit instruction it derives the sign-extended immediate of the
// instruction's format and the class flags r, i, s, b, u, j and ld, seven
// bits in all. The lecture names this unit and its outputs; the decoding
// itself follows the RISC-V base ISA: the major opcode selects the format,
// and the immediate is assembled from the instruction fields of that format
// (I: [31:20]; S: [31:25],[11:7]; B: [31],[7],[30:25],[11:8],0;
// U: [31:12],12'b0; J: [31],[19:12],[20],[30:21],0). An R-type or unknown
// opcode gives immediate 0 and, for unknown opcodes, no class flag.
//
// Purely combinational: outputs follow ir in the same cycle.
module gen_imm
  import rv_pkg::*;
(
  input  word_t   ir,
  output word_t   imm,
  output iclass_t cls
);

  logic [6:0] op;
  assign op = ir[6:0];

  always_comb begin
    cls    = '0;
    cls.r  = (op == OP_R);
    cls.i  = (op == OP_IMM) || (op == OP_LOAD) || (op == OP_JALR);
    cls.s  = (op == OP_STORE);
    cls.b  = (op == OP_BRANCH);
    cls.u  = (op == OP_LUI) || (op == OP_AUIPC);
    cls.j  = (op == OP_JAL);
    cls.ld = (op == OP_LOAD);
  end

  always_comb begin
    unique case (1'b1)
      cls.i:   imm = {{20{ir[31]}}, ir[31:20]};
      cls.s:   imm = {{20{ir[31]}}, ir[31:25], ir[11:7]};
      cls.b:   imm = {{19{ir[31]}}, ir[31], ir[7], ir[30:25], ir[11:8], 1'b0};
      cls.u:   imm = {ir[31:12], 12'b0};
      cls.j:   imm = {{11{ir[31]}}, ir[31], ir[19:12], ir[20], ir[30:21], 1'b0};
      default: imm = '0;
    endcase
  end

endmodule
