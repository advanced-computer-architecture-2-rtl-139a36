// alu: the ALU of the single-cycle datapath (m8). It computes w_alu from the
// first register operand a and the second operand b (register or immediate,
// chosen by m7), and beside it the branch condition w_tkn, which the datapath
// uses only for branch instructions.
//  - Register-register (is_r) and register-immediate (is_opimm) operations
//    select their function with funct3: ADD/SUB, SLL, SLT, SLTU, XOR,
//    SRL/SRA, OR, AND. Bit 30 of the instruction (f7b5) picks SUB for a
//    register-register ADD and SRA/SRAI for a right shift; ADDI ignores it.
//    Shifts use the low 5 bits of b.
//  - Every other instruction (load, store, branch) uses the adder, so a
//    load or store gets the address base + offset.
//  - w_tkn compares a with b by the branch funct3: BEQ, BNE, BLT, BGE
//    (signed), BLTU, BGEU (unsigned).
// The lecture gives the ALU only as a block with these two outputs; the
// operation set follows the RV32I encoding table. Combinational.
module alu
  import rv_pkg::*;
(
  input  word_t      a,
  input  word_t      b,
  input  logic [2:0] funct3,
  input  logic       f7b5,
  input  logic       is_r,
  input  logic       is_opimm,
  output word_t      y,
  output logic       tkn
);

  logic  arith;
  logic  eq, lt, ltu;

  assign arith = is_r || is_opimm;
  assign eq    = (a == b);
  assign lt    = ($signed(a) < $signed(b));
  assign ltu   = (a < b);

  always_comb begin
    y = a + b;
    if (arith) begin
      unique case (alu_f3_e'(funct3))
        F3_ADD:  y = (is_r && f7b5) ? a - b : a + b;
        F3_SLL:  y = a << b[4:0];
        F3_SLT:  y = {31'b0, lt};
        F3_SLTU: y = {31'b0, ltu};
        F3_XOR:  y = a ^ b;
        F3_SR:   y = f7b5 ? word_t'($signed(a) >>> b[4:0]) : a >> b[4:0];
        F3_OR:   y = a | b;
        F3_AND:  y = a & b;
        default: y = a + b;
      endcase
    end
  end

  always_comb begin
    unique case (funct3)
      F3_BEQ:  tkn = eq;
      F3_BNE:  tkn = !eq;
      F3_BLT:  tkn = lt;
      F3_BGE:  tkn = !lt;
      F3_BLTU: tkn = ltu;
      F3_BGEU: tkn = !ltu;
      default: tkn = 1'b0;
    endcase
  end

endmodule
