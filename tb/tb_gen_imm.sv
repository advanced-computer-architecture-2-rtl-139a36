// tb_gen_imm: self-checking test of the immediate generator. For each format
// (I, S, B, U, J) it draws a random immediate, packs it into an instruction
// with the assembler package (other fields random), and checks that gen_imm
// returns the same value sign-extended to 32 bits, and that exactly the right
// class flags (r, i, s, b, u, j, ld) are raised for every opcode.
module tb_gen_imm;
  import rv_pkg::*;
  import rv_asm_pkg::*;

  logic   clk = 1'b0;
  word_t  ir, imm;
  itype_t it;
  int checks = 0, failures = 0;

  gen_imm dut (.ir(ir), .imm(imm), .it(it));

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] instr, input logic [31:0] want_imm,
                       input itype_t want_it, input string what);
    ir = instr;
    #1;
    checks++;
    if (imm !== want_imm || it !== want_it) begin
      failures++;
      $display("FAIL %s ir=%h imm=%h (want %h) it=%b (want %b)", what, instr, imm,
               want_imm, it, want_it);
    end
  endtask

  function automatic itype_t flags(input bit r, i, s, b, u, j, ld);
    itype_t f;
    f.r = r; f.i = i; f.s = s; f.b = b; f.u = u; f.j = j; f.ld = ld;
    return f;
  endfunction

  initial begin
    int v;
    logic [4:0] r1, r2, rd;
    repeat (200) begin
      r1 = 5'($urandom); r2 = 5'($urandom); rd = 5'($urandom);
      // I-type: 12-bit signed immediate
      v = int'($urandom_range(0, 4095)) - 2048;
      check(enc_i(OP_IMM, v, r1, 3'($urandom), rd), 32'(v), flags(0,1,0,0,0,0,0), "OP-IMM");
      check(enc_i(OP_LOAD, v, r1, 3'b010, rd), 32'(v), flags(0,1,0,0,0,0,1), "LOAD");
      check(enc_i(OP_JALR, v, r1, 3'b000, rd), 32'(v), flags(0,1,0,0,0,0,0), "JALR");
      // S-type
      v = int'($urandom_range(0, 4095)) - 2048;
      check(enc_s(v, r2, r1, 3'b010), 32'(v), flags(0,0,1,0,0,0,0), "STORE");
      // B-type: 13-bit signed even offset
      v = (int'($urandom_range(0, 4095)) - 2048) * 2;
      check(enc_b(v, r2, r1, 3'($urandom)), 32'(v), flags(0,0,0,1,0,0,0), "BRANCH");
      // U-type
      v = int'($urandom);
      check(enc_u(OP_LUI, 20'(v), rd), {20'(v), 12'b0}, flags(0,0,0,0,1,0,0), "LUI");
      check(enc_u(OP_AUIPC, 20'(v), rd), {20'(v), 12'b0}, flags(0,0,0,0,1,0,0), "AUIPC");
      // J-type: 21-bit signed even offset
      v = (int'($urandom_range(0, 1048575)) - 524288) * 2;
      check(enc_j(v, rd), 32'(v), flags(0,0,0,0,0,1,0), "JAL");
      // R-type: no immediate
      check(enc_r({1'b0, 1'($urandom), 5'b0}, r2, r1, 3'($urandom), rd), 32'h0,
            flags(1,0,0,0,0,0,0), "OP");
    end
    // the ADDI example: addi x7, x8, -2
    check(addi(T2, S0, -2), 32'hffff_fffe, flags(0,1,0,0,0,0,0), "addi x7,x8,-2");
    // lw x5, 8(x7) and sw x5, 8(x7)
    check(lw(T0, 8, T2), 32'd8, flags(0,1,0,0,0,0,1), "lw x5,8(x7)");
    check(sw(T0, 8, T2), 32'd8, flags(0,0,1,0,0,0,0), "sw x5,8(x7)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
