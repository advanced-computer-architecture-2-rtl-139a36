// rv_asm_pkg: a small RV32I assembler for the testbenches. Each function
// returns the 32-bit machine word of one instruction, packing the fields as
// the RISC-V base instruction formats place them (R, I, S, B, U, J). Branch
// offsets are byte offsets relative to the branch itself. Register names of
// the ABI (t0, s0, ...) are given as constants.
package rv_asm_pkg;

  localparam logic [4:0] ZERO = 5'd0,  RA = 5'd1,  SP = 5'd2;
  localparam logic [4:0] T0 = 5'd5,  T1 = 5'd6,  T2 = 5'd7;
  localparam logic [4:0] S0 = 5'd8,  S1 = 5'd9;
  localparam logic [4:0] A0 = 5'd10, A1 = 5'd11;
  localparam logic [4:0] S2 = 5'd18, S3 = 5'd19, S4 = 5'd20;

  function automatic logic [31:0] enc_r(input logic [6:0] f7, input logic [4:0] rs2,
      input logic [4:0] rs1, input logic [2:0] f3, input logic [4:0] rd);
    return {f7, rs2, rs1, f3, rd, 7'b0110011};
  endfunction

  function automatic logic [31:0] enc_i(input logic [6:0] op, input int imm,
      input logic [4:0] rs1, input logic [2:0] f3, input logic [4:0] rd);
    logic [31:0] v = 32'(imm);
    return {v[11:0], rs1, f3, rd, op};
  endfunction

  function automatic logic [31:0] enc_s(input int imm, input logic [4:0] rs2,
      input logic [4:0] rs1, input logic [2:0] f3);
    logic [31:0] v = 32'(imm);
    return {v[11:5], rs2, rs1, f3, v[4:0], 7'b0100011};
  endfunction

  function automatic logic [31:0] enc_b(input int off, input logic [4:0] rs2,
      input logic [4:0] rs1, input logic [2:0] f3);
    logic [31:0] v = 32'(off);
    return {v[12], v[10:5], rs2, rs1, f3, v[4:1], v[11], 7'b1100011};
  endfunction

  function automatic logic [31:0] enc_u(input logic [6:0] op, input logic [19:0] hi,
      input logic [4:0] rd);
    return {hi, rd, op};
  endfunction

  function automatic logic [31:0] enc_j(input int off, input logic [4:0] rd);
    logic [31:0] v = 32'(off);
    return {v[20], v[10:1], v[11], v[19:12], rd, 7'b1101111};
  endfunction

  // Mnemonics used by the programs.
  function automatic logic [31:0] add(input logic [4:0] rd, rs1, rs2);
    return enc_r(7'b0000000, rs2, rs1, 3'b000, rd);
  endfunction
  function automatic logic [31:0] sub(input logic [4:0] rd, rs1, rs2);
    return enc_r(7'b0100000, rs2, rs1, 3'b000, rd);
  endfunction
  function automatic logic [31:0] addi(input logic [4:0] rd, rs1, input int imm);
    return enc_i(7'b0010011, imm, rs1, 3'b000, rd);
  endfunction
  function automatic logic [31:0] slli(input logic [4:0] rd, rs1, input int sh);
    return enc_i(7'b0010011, sh & 31, rs1, 3'b001, rd);
  endfunction
  function automatic logic [31:0] srai(input logic [4:0] rd, rs1, input int sh);
    return enc_i(7'b0010011, 32'h400 | (sh & 31), rs1, 3'b101, rd);
  endfunction
  function automatic logic [31:0] lw(input logic [4:0] rd, input int off, input logic [4:0] rs1);
    return enc_i(7'b0000011, off, rs1, 3'b010, rd);
  endfunction
  function automatic logic [31:0] sw(input logic [4:0] rs2, input int off, input logic [4:0] rs1);
    return enc_s(off, rs2, rs1, 3'b010);
  endfunction
  function automatic logic [31:0] beq(input logic [4:0] rs1, rs2, input int off);
    return enc_b(off, rs2, rs1, 3'b000);
  endfunction
  function automatic logic [31:0] bne(input logic [4:0] rs1, rs2, input int off);
    return enc_b(off, rs2, rs1, 3'b001);
  endfunction
  function automatic logic [31:0] blt(input logic [4:0] rs1, rs2, input int off);
    return enc_b(off, rs2, rs1, 3'b100);
  endfunction
  function automatic logic [31:0] bge(input logic [4:0] rs1, rs2, input int off);
    return enc_b(off, rs2, rs1, 3'b101);
  endfunction

endpackage
