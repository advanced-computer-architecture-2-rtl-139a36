// single_cycle_proc: a single-cycle RV32I processor. Every instruction is
// fetched, decoded, executed, given its memory access and written back within
// one clock cycle; the next rising edge loads the new PC and commits the
// register or memory write. The datapath is built from eleven units, named as
// in the classic IF / ID / EX / MA / WB drawing:
//   m1  pc_reg     r_pc, the program counter
//   m2  adder      w_npc = pc + 4
//   m3  am_imem    instruction memory, w_ir = imem[pc]
//   m4  gen_imm    immediate w_imm and class flags r,i,s,b,u,j,ld
//   m5  regfile    RF: ra1 = ir[19:15], ra2 = ir[24:20], wa = ir[11:7],
//                  we = !s & !b, wd = w_rt
//   m6  adder      w_tpc = pc + imm (branch target)
//   m7  mux2       w_s2 = w_r2 for R-type and branches, else w_imm
//   m8  alu        w_alu and the branch condition w_tkn
//   m9  am_dmem    adr = w_alu, we = s, wd = w_r2, rd = w_ldd
//   m10 mux2       w_rt = ld ? w_ldd : w_alu
//   m11 mux2       w_pcin = (b & w_tkn) ? w_tpc : w_npc
// The datapath carries register-register and register-immediate ALU
// operations, lw, sw and the six conditional branches. LUI, AUIPC, JAL,
// JALR, FENCE and ECALL/EBREAK have no path of their own in it: gen_imm still
// classifies them, but they execute as an ALU add of rs1-field register and
// immediate written to rd, and the PC steps by 4. Loads and stores move whole
// words. The memory sizes, the reset and the debug outputs are this design's
// choice. Assertions flag a PC that is not word-aligned (a branch to a
// half-word target, which RV32I would trap) and an instruction that falls in
// more than one class. Interface: clk, active-low asynchronous reset rst_n
// (PC = RESET_PC, registers cleared), and debug outputs of the current PC,
// instruction and data-memory write port.
module single_cycle_proc
  import rv_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter string       IMEM_FILE  = "",
  parameter word_t       RESET_PC   = '0
) (
  input  logic  clk,
  input  logic  rst_n,
  output word_t dbg_pc,
  output word_t dbg_ir,
  output logic  dbg_dmem_we,
  output word_t dbg_dmem_adr,
  output word_t dbg_dmem_wd
);

  word_t  r_pc, w_npc, w_ir, w_imm, w_tpc, w_pcin;
  word_t  w_r1, w_r2, w_s2, w_alu, w_ldd, w_rt;
  itype_t w_it;
  logic   w_tkn, w_rf_we, w_br, w_use_rs2;

  // IF
  pc_reg #(.W(XLEN), .RESET_PC(RESET_PC)) m1 (
    .clk(clk), .rst_n(rst_n), .d(w_pcin), .q(r_pc)
  );

  adder #(.W(XLEN)) m2 (.a(r_pc), .b(32'h4), .y(w_npc));

  am_imem #(.WORDS(IMEM_WORDS), .INIT_FILE(IMEM_FILE)) m3 (
    .pc(r_pc), .ir(w_ir)
  );

  // ID
  gen_imm m4 (.ir(w_ir), .imm(w_imm), .it(w_it));

  assign w_rf_we = !w_it.s && !w_it.b;

  regfile m5 (
    .clk(clk), .rst_n(rst_n),
    .ra1(w_ir[19:15]), .ra2(w_ir[24:20]), .wa(w_ir[11:7]),
    .we(w_rf_we), .wd(w_rt),
    .rd1(w_r1), .rd2(w_r2)
  );

  adder #(.W(XLEN)) m6 (.a(r_pc), .b(w_imm), .y(w_tpc));

  // The drawing marks this select "!r". Branches also compare two registers,
  // so here "r" covers every instruction whose second operand is rs2.
  assign w_use_rs2 = w_it.r || w_it.b;

  mux2 #(.W(XLEN)) m7 (.sel(!w_use_rs2), .d0(w_r2), .d1(w_imm), .y(w_s2));

  // EX
  alu m8 (
    .a(w_r1), .b(w_s2),
    .funct3(w_ir[14:12]), .f7b5(w_ir[30]),
    .is_r(w_it.r), .is_opimm(w_it.i && (w_ir[6:0] == OP_IMM)),
    .y(w_alu), .tkn(w_tkn)
  );

  // MA
  am_dmem #(.WORDS(DMEM_WORDS)) m9 (
    .clk(clk), .adr(w_alu), .we(w_it.s), .wd(w_r2), .rd(w_ldd)
  );

  // WB
  mux2 #(.W(XLEN)) m10 (.sel(w_it.ld), .d0(w_alu), .d1(w_ldd), .y(w_rt));

  // next PC
  assign w_br = w_it.b && w_tkn;

  mux2 #(.W(XLEN)) m11 (.sel(w_br), .d0(w_npc), .d1(w_tpc), .y(w_pcin));

  // A branch offset is only a multiple of 2; without compressed instructions
  // a target that is not word-aligned is an error the datapath does not trap.
  pc_aligned: assert property (@(posedge clk) disable iff (!rst_n) r_pc[1:0] == 2'b00)
    else $error("misaligned PC %h", r_pc);

  // The instruction classes are exclusive.
  one_class: assert property (@(posedge clk) disable iff (!rst_n)
                              $onehot0({w_it.r, w_it.i, w_it.s, w_it.b, w_it.u, w_it.j}))
    else $error("instruction %h falls in several classes", w_ir);

  assign dbg_pc       = r_pc;
  assign dbg_ir       = w_ir;
  assign dbg_dmem_we  = w_it.s;
  assign dbg_dmem_adr = w_alu;
  assign dbg_dmem_wd  = w_r2;

endmodule
