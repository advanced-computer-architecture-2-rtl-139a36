// gen_imm: immediate generator (m4 of the single-cycle datapath). From the
// instruction word ir it rebuilds the sign-extended 32-bit immediate of the
// instruction's format and reports, beside it, the instruction's class as the
// flags r, i, s, b, u, j, ld that drive the datapath's control points. The bit
// positions of each immediate follow the RISC-V base instruction formats:
//   I: imm[11:0]  = ir[31:20]
//   S: imm[11:5]  = ir[31:25], imm[4:0] = ir[11:7]
//   B: imm[12|10:5] = ir[31|30:25], imm[4:1|11] = ir[11:8|7], imm[0] = 0
//   U: imm[31:12] = ir[31:12], imm[11:0] = 0
//   J: imm[20|10:1|11|19:12] = ir[31|30:21|20|19:12], imm[0] = 0
// The class is taken from the major opcode ir[6:0]. An R-type instruction has
// no immediate (imm = 0). Purely combinational.
module gen_imm
  import rv_pkg::*;
(
  input  word_t  ir,
  output word_t  imm,
  output itype_t it
);

  logic [6:0] opcode;
  assign opcode = ir[6:0];

  always_comb begin
    it    = '0;
    it.r  = (opcode == OP_REG);
    it.i  = (opcode == OP_IMM) || (opcode == OP_LOAD) || (opcode == OP_JALR);
    it.s  = (opcode == OP_STORE);
    it.b  = (opcode == OP_BRANCH);
    it.u  = (opcode == OP_LUI) || (opcode == OP_AUIPC);
    it.j  = (opcode == OP_JAL);
    it.ld = (opcode == OP_LOAD);
  end

  always_comb begin
    unique case (1'b1)
      it.i:    imm = {{20{ir[31]}}, ir[31:20]};
      it.s:    imm = {{20{ir[31]}}, ir[31:25], ir[11:7]};
      it.b:    imm = {{19{ir[31]}}, ir[31], ir[7], ir[30:25], ir[11:8], 1'b0};
      it.u:    imm = {ir[31:12], 12'b0};
      it.j:    imm = {{11{ir[31]}}, ir[31], ir[19:12], ir[20], ir[30:21], 1'b0};
      default: imm = '0;
    endcase
  end

endmodule
