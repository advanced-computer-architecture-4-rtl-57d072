// rv_pkg: types and constants shared by the processors proc5, proc6, proc8
// and proc9 and by their building blocks.
//
// The processors execute the RV32I subset add, addi, lw, sw and bne. The
// instruction decoder (gen_imm) classifies an instruction by its major opcode
// into the RISC-V formats R, I, S, B, U and J plus a load flag; that set of
// seven class bits is the iclass_t struct below. The opcode values are the
// RISC-V base ISA encodings.
//
// Observation ports: the processors have no architectural outputs of their
// own, so each one reports, per retired instruction, a commit_t record (what
// it wrote to the register file) and, per data memory write, a store_t
// record. The instruction memory is filled through an imem_load_t port while
// the processor is held in reset. These three structs are this design's own
// additions for loading programs and for checking.
package rv_pkg;

  localparam int unsigned XLEN = 32;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      regaddr_t;

  // Major opcodes (instruction bits [6:0]).
  localparam logic [6:0] OP_R      = 7'b0110011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;

  // addi x0,x0,0: the value a pipeline register holds when it carries no
  // instruction.
  localparam word_t NOP = 32'h0000_0013;

  // Instruction class flags produced by gen_imm.
  typedef struct packed {
    logic r;   // R-type (register-register)
    logic i;   // I-type (op-imm, load, jalr)
    logic s;   // S-type (store)
    logic b;   // B-type (branch)
    logic u;   // U-type (lui, auipc)
    logic j;   // J-type (jal)
    logic ld;  // load
  } iclass_t;

  // One retired instruction, reported in the stage that writes the register
  // file. we is the register file write enable of that instruction.
  typedef struct packed {
    logic     valid;
    word_t    pc;
    logic     we;
    regaddr_t rd;
    word_t    data;
  } commit_t;

  // One data memory write.
  typedef struct packed {
    logic  valid;
    word_t addr;
    word_t data;
  } store_t;

  // Instruction memory fill port (word written at byte address addr).
  typedef struct packed {
    logic  we;
    word_t addr;
    word_t data;
  } imem_load_t;

endpackage
