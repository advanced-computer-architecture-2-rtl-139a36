// rv_pkg: types and constants shared by the single-cycle RV32I processor.
// It holds the data width (XLEN = 32, as for the 32-bit base ISA), the 7-bit
// major opcodes of the RV32I encoding table that the datapath decodes, the
// funct3 codes of the ALU and of the conditional branches, and the bundle of
// instruction-class flags that the immediate generator hands to the control
// points of the datapath (r, i, s, b, u, j, ld).
package rv_pkg;

  localparam int unsigned XLEN = 32;

  typedef logic [XLEN-1:0] word_t;

  // Major opcodes, bits [6:0] of an instruction.
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_REG    = 7'b0110011;

  // funct3 of the register-register and register-immediate ALU operations.
  typedef enum logic [2:0] {
    F3_ADD  = 3'b000,  // ADD / SUB / ADDI
    F3_SLL  = 3'b001,
    F3_SLT  = 3'b010,
    F3_SLTU = 3'b011,
    F3_XOR  = 3'b100,
    F3_SR   = 3'b101,  // SRL / SRA / SRLI / SRAI
    F3_OR   = 3'b110,
    F3_AND  = 3'b111
  } alu_f3_e;

  // funct3 of the conditional branches.
  typedef enum logic [2:0] {
    F3_BEQ  = 3'b000,
    F3_BNE  = 3'b001,
    F3_BLT  = 3'b100,
    F3_BGE  = 3'b101,
    F3_BLTU = 3'b110,
    F3_BGEU = 3'b111
  } br_f3_e;

  // Instruction-class flags produced beside the immediate.
  //   r  : register-register (R-type) operation
  //   i  : I-type format (register-immediate ALU, load, JALR)
  //   s  : store (S-type)
  //   b  : conditional branch (B-type)
  //   u  : LUI / AUIPC (U-type)
  //   j  : JAL (J-type)
  //   ld : load
  typedef struct packed {
    logic r;
    logic i;
    logic s;
    logic b;
    logic u;
    logic j;
    logic ld;
  } itype_t;

endpackage
