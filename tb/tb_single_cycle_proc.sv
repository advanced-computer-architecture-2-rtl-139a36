// tb_single_cycle_proc: self-checking test of the single-cycle processor,
// with 256-word instruction and 64-word data memories.
// Part 1 runs the four small programs of the lecture's exercises, written
// with the assembler package: f = (g + h) - (i + j); g = h + A[2];
// A[1] = h + A[2] (A at 0x12000000, built with addi and slli); and the loop
// sum of 1..10. It checks the registers and memory words they leave and that
// each takes exactly one cycle per executed instruction.
// Part 2 runs random programs (all ALU operations, lw, sw, the six branches)
// in lockstep with an instruction-set reference model written here: PC and
// store traffic are compared every cycle and all registers at the end.
module tb_single_cycle_proc;
  import rv_pkg::*;
  import rv_asm_pkg::*;

  localparam int IW = 256;
  localparam int DW = 64;

  logic  clk = 1'b0, rst_n = 1'b0;
  word_t pc, ir, dadr, dwd;
  logic  dwe;
  int checks = 0, failures = 0;

  single_cycle_proc #(.IMEM_WORDS(IW), .DMEM_WORDS(DW)) dut (
    .clk(clk), .rst_n(rst_n), .dbg_pc(pc), .dbg_ir(ir),
    .dbg_dmem_we(dwe), .dbg_dmem_adr(dadr), .dbg_dmem_wd(dwd)
  );

  always #5 clk = ~clk;

  word_t prog [$];
  word_t mx [32];
  word_t mmem [DW];

  task automatic expect_eq(input word_t got, input word_t want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h (%0d), expected %h (%0d)", what, got, got, want, want);
    end
  endtask

  function automatic word_t reg_of(input int k);
    return (k == 0) ? '0 : dut.m5.x[k];
  endfunction

  // Load prog into the instruction memory (rest filled with a self-loop),
  // reset, and return once the reset is released.
  task automatic load_and_reset();
    rst_n = 1'b0;
    for (int k = 0; k < IW; k++) dut.m3.mem[k] = (k < prog.size()) ? prog[k] : beq(ZERO, ZERO, 0);
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  // Run until the PC reaches halt_pc; return the cycle count.
  task automatic run_to(input word_t halt_pc, output int cycles);
    cycles = 0;
    while (pc != halt_pc && cycles < 10000) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  // ---------------------------------------------------------------- model
  function automatic word_t model_step(input word_t mpc);
    word_t i = mmem_fetch(mpc);
    word_t a, b, imm, res;
    logic [6:0] op = i[6:0];
    logic [2:0] f3 = i[14:12];
    logic [4:0] rd = i[11:7];
    a = mx[i[19:15]];
    b = mx[i[24:20]];
    res = '0;
    case (op)
      7'b0110011: begin
        case (f3)
          3'd0: res = i[30] ? a - b : a + b;
          3'd1: res = a << b[4:0];
          3'd2: res = (int'(a) < int'(b)) ? 1 : 0;
          3'd3: res = (a < b) ? 1 : 0;
          3'd4: res = a ^ b;
          3'd5: res = i[30] ? 32'(int'(a) >>> b[4:0]) : a >> b[4:0];
          3'd6: res = a | b;
          default: res = a & b;
        endcase
        if (rd != 0) mx[rd] = res;
        mpc += 4;
      end
      7'b0010011: begin
        imm = {{20{i[31]}}, i[31:20]};
        case (f3)
          3'd0: res = a + imm;
          3'd1: res = a << imm[4:0];
          3'd2: res = (int'(a) < int'(imm)) ? 1 : 0;
          3'd3: res = (a < imm) ? 1 : 0;
          3'd4: res = a ^ imm;
          3'd5: res = i[30] ? 32'(int'(a) >>> imm[4:0]) : a >> imm[4:0];
          3'd6: res = a | imm;
          default: res = a & imm;
        endcase
        if (rd != 0) mx[rd] = res;
        mpc += 4;
      end
      7'b0000011: begin
        imm = {{20{i[31]}}, i[31:20]};
        if (rd != 0) mx[rd] = mmem[((a + imm) >> 2) % DW];
        mpc += 4;
      end
      7'b0100011: begin
        imm = {{20{i[31]}}, i[31:25], i[11:7]};
        mmem[((a + imm) >> 2) % DW] = b;
        mpc += 4;
      end
      7'b1100011: begin
        logic t;
        imm = {{19{i[31]}}, i[31], i[7], i[30:25], i[11:8], 1'b0};
        case (f3)
          3'd0: t = (a == b);
          3'd1: t = (a != b);
          3'd4: t = int'(a) < int'(b);
          3'd5: t = int'(a) >= int'(b);
          3'd6: t = a < b;
          default: t = a >= b;
        endcase
        mpc = t ? mpc + imm : mpc + 4;
      end
      default: mpc += 4;
    endcase
    return mpc;
  endfunction

  function automatic word_t mmem_fetch(input word_t a);
    return ((a >> 2) < prog.size()) ? prog[a >> 2] : beq(ZERO, ZERO, 0);
  endfunction

  function automatic word_t rand_instr(input int idx, input int n);
    logic [4:0] rd  = 5'($urandom_range(0, 15));
    logic [4:0] rs1 = 5'($urandom_range(0, 15));
    logic [4:0] rs2 = 5'($urandom_range(0, 15));
    logic [2:0] f3  = 3'($urandom);
    int sel = $urandom_range(0, 9);
    int off;
    logic [2:0] bf3s [6] = '{3'd0, 3'd1, 3'd4, 3'd5, 3'd6, 3'd7};
    case (sel)
      0, 1, 2: return enc_r((f3 == 3'd0 || f3 == 3'd5) ? {1'b0, 1'($urandom), 5'b0} : 7'b0,
                            rs2, rs1, f3, rd);
      3, 4, 5: begin
        if (f3 == 3'd1) return slli(rd, rs1, $urandom_range(0, 31));
        if (f3 == 3'd5) return ($urandom_range(0, 1) == 1) ? srai(rd, rs1, $urandom_range(0, 31))
                                                          : enc_i(7'b0010011, $urandom_range(0, 31), rs1, 3'd5, rd);
        return enc_i(7'b0010011, $urandom_range(0, 4095) - 2048, rs1, f3, rd);
      end
      6: return lw(rd, 4 * $urandom_range(0, DW - 1), ZERO);
      7: return sw(rs2, 4 * $urandom_range(0, DW - 1), ZERO);
      default: begin
        // branch forward by 1..4 instructions or back by 1..3 (loops end
        // because the run is bounded by a cycle count)
        off = 4 * (($urandom_range(0, 3) == 0) ? -$urandom_range(1, 3) : $urandom_range(1, 4));
        if (idx * 4 + off < 0 || idx * 4 + off >= n * 4) off = 4;
        return enc_b(off, rs2, rs1, bf3s[$urandom_range(0, 5)]);
      end
    endcase
  endfunction

  initial begin
    int cyc;
    word_t mpc;
    int taken, stores, loads;

    // ------------------------------------------------ Exercise 1
    prog = {};
    prog.push_back(addi(S1, ZERO, 10));   // g
    prog.push_back(addi(S2, ZERO, 20));   // h
    prog.push_back(addi(S3, ZERO, 3));    // i
    prog.push_back(addi(S4, ZERO, 4));    // j
    prog.push_back(add(T0, S1, S2));
    prog.push_back(add(T1, S3, S4));
    prog.push_back(sub(S0, T0, T1));
    load_and_reset();
    run_to(32'd28, cyc);
    expect_eq(word_t'(cyc), 32'd7, "exercise 1 cycles");
    expect_eq(reg_of(8), 32'd23, "exercise 1 f = (g+h)-(i+j)");

    // ------------------------------------------------ Exercises 2 and 3
    prog = {};
    prog.push_back(addi(S3, ZERO, 32'h120));
    prog.push_back(slli(S3, S3, 20));     // s3 = 0x12000000, base of A
    prog.push_back(addi(T2, ZERO, 3));
    prog.push_back(sw(T2, 8, S3));        // A[2] = 3
    prog.push_back(addi(S2, ZERO, 20));   // h = 20
    prog.push_back(lw(T0, 8, S3));        // Exercise 2: t0 = A[2]
    prog.push_back(add(S1, S2, T0));      //             g = h + A[2]
    prog.push_back(lw(T0, 8, S3));        // Exercise 3: t0 = A[2]
    prog.push_back(add(T1, S2, T0));
    prog.push_back(sw(T1, 4, S3));        //             A[1] = t1
    prog.push_back(lw(A0, 4, S3));        // read A[1] back
    load_and_reset();
    run_to(32'd44, cyc);
    expect_eq(word_t'(cyc), 32'd11, "exercises 2/3 cycles");
    expect_eq(reg_of(19), 32'h1200_0000, "base address of A");
    expect_eq(reg_of(9), 32'd23, "exercise 2 g = h + A[2]");
    expect_eq(dut.m9.mem[1], 32'd23, "exercise 3 A[1] in memory");
    expect_eq(dut.m9.mem[2], 32'd3, "A[2] in memory");
    expect_eq(reg_of(10), 32'd23, "exercise 3 A[1] read back");

    // ------------------------------------------------ Exercise 4
    prog = {};
    prog.push_back(addi(S3, ZERO, 11));
    prog.push_back(addi(S4, ZERO, 0));
    prog.push_back(addi(S2, ZERO, 1));
    prog.push_back(add(S4, S4, S2));      // Loop: s4 += s2
    prog.push_back(addi(S2, S2, 1));      //       s2++
    prog.push_back(bne(S2, S3, -8));      //       if (s2 != s3) goto Loop
    load_and_reset();
    run_to(32'd24, cyc);
    expect_eq(word_t'(cyc), 32'd33, "exercise 4 cycles (3 + 10 x 3)");
    expect_eq(reg_of(20), 32'd55, "exercise 4 sum of 1..10");
    expect_eq(reg_of(18), 32'd11, "exercise 4 loop variable");

    // ------------------------------------------------ random lockstep
    taken = 0; stores = 0; loads = 0;
    for (int run = 0; run < 20; run++) begin
      int n;
      n = 60;
      prog = {};
      for (int k = 0; k < n; k++) prog.push_back(rand_instr(k, n));
      for (int k = 0; k < DW; k++) begin
        mmem[k] = $urandom;
        dut.m9.mem[k] = mmem[k];
      end
      for (int k = 0; k < 32; k++) mx[k] = '0;
      mpc = '0;
      load_and_reset();
      for (int c = 0; c < 150; c++) begin
        word_t want_pc, cur;
        want_pc = mpc;
        cur = mmem_fetch(mpc);
        #1;
        expect_eq(pc, want_pc, "lockstep PC");
        if (cur[6:0] == 7'b0100011) begin
          stores++;
          checks++;
          if (!dwe || dadr[7:2] != ((mx[cur[19:15]] + {{20{cur[31]}}, cur[31:25], cur[11:7]}) >> 2) % DW
              || dwd != mx[cur[24:20]]) begin
            failures++;
            $display("FAIL store at pc=%h", pc);
          end
        end
        if (cur[6:0] == 7'b0000011) loads++;
        mpc = model_step(mpc);
        if (cur[6:0] == 7'b1100011 && mpc != want_pc + 4) taken++;
        @(negedge clk);
      end
      for (int k = 0; k < 32; k++) expect_eq(reg_of(k), mx[k], $sformatf("run %0d x%0d", run, k));
    end
    checks++;
    if (taken == 0 || stores == 0 || loads == 0) begin
      failures++;
      $display("FAIL random runs did not cover branches/loads/stores");
    end
    $display("random runs: %0d taken branches, %0d loads, %0d stores", taken, loads, stores);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
