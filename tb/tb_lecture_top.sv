// tb_lecture_top: end-to-end test of the top at its default sizes (1024-word
// instruction and data memories, 2-bit counter). One program, loaded into
// the instruction memory, chains the four exercise programs of the lecture
// (arithmetic, a load, a load-add-store, a counting loop), then takes each of
// the six branch types once taken and once not taken and tries a write to x0.
// It ends in a self-loop. The test checks the final registers and memory,
// the store traffic seen on the top's ports, and the cycle count (one cycle per
// executed instruction). It counts each mechanism of the datapath (R-type
// and immediate ALU operations, load write-back, store, taken and untaken
// branch, dropped write to x0) and fails if one never happened. Meanwhile the
// counter runs on its own clock and must wrap from 3 to 0.
module tb_lecture_top;
  import rv_pkg::*;
  import rv_asm_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, cnt_clk = 1'b0;
  word_t      pc, ir, dmem_adr, dmem_wd;
  logic       dmem_we;
  logic [1:0] cnt;
  int checks = 0, failures = 0;

  lecture_top dut (
    .clk(clk), .rst_n(rst_n), .pc(pc), .ir(ir), .dmem_we(dmem_we),
    .dmem_adr(dmem_adr), .dmem_wd(dmem_wd), .cnt_clk(cnt_clk), .cnt(cnt)
  );

  always #5 clk = ~clk;
  always #7 cnt_clk = ~cnt_clk;

  word_t prog [$];

  // mechanism counters
  int n_rtype = 0, n_opimm = 0, n_load = 0, n_store = 0;
  int n_taken = 0, n_not_taken = 0, n_x0 = 0, n_wrap = 0;
  logic [1:0] last_cnt = 2'd0;

  always @(negedge clk) if (rst_n) begin
    if (dut.u_proc.w_it.r) n_rtype++;
    if (dut.u_proc.w_it.i && !dut.u_proc.w_it.ld) n_opimm++;
    if (dut.u_proc.w_it.ld) n_load++;
    if (dmem_we) n_store++;
    if (dut.u_proc.w_it.b && ir != beq(ZERO, ZERO, 0)) begin
      if (dut.u_proc.w_tkn) n_taken++;
      else n_not_taken++;
    end
    if (dut.u_proc.w_rf_we && ir[11:7] == 5'd0 && ir != beq(ZERO, ZERO, 0)) n_x0++;
  end

  always @(posedge cnt_clk) begin
    #1;
    if (last_cnt == 2'd3 && cnt == 2'd0) n_wrap++;
    checks++;
    if (cnt != last_cnt + 2'd1) begin
      failures++;
      $display("FAIL counter %0d -> %0d", last_cnt, cnt);
    end
    last_cnt = cnt;
  end

  task automatic expect_eq(input word_t got, input word_t want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h (%0d), expected %h (%0d)", what, got, got, want, want);
    end
  endtask

  function automatic word_t xr(input int k);
    return (k == 0) ? '0 : dut.u_proc.m5.x[k];
  endfunction

  task automatic mech(input int n, input string what);
    checks++;
    $display("  %-24s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    int cycles, halt, st_seen;
    word_t st_adr [$];
    word_t st_dat [$];
    // Exercise 1: f = (g + h) - (i + j); g..j in s1..s4, f in s0
    prog.push_back(addi(S1, ZERO, 10));
    prog.push_back(addi(S2, ZERO, 20));
    prog.push_back(addi(S3, ZERO, 3));
    prog.push_back(addi(S4, ZERO, 4));
    prog.push_back(add(T0, S1, S2));
    prog.push_back(add(T1, S3, S4));
    prog.push_back(sub(S0, T0, T1));                // s0 = 23
    // Exercise 2: g = h + A[2]; A at 0x12000000 in s3, A[2] = 3
    prog.push_back(addi(S3, ZERO, 32'h120));
    prog.push_back(slli(S3, S3, 20));
    prog.push_back(addi(T2, ZERO, 3));
    prog.push_back(sw(T2, 8, S3));
    prog.push_back(lw(T0, 8, S3));
    prog.push_back(add(S1, S2, T0));                // s1 = 23
    // Exercise 3: A[1] = h + A[2]
    prog.push_back(lw(T0, 8, S3));
    prog.push_back(add(T1, S2, T0));
    prog.push_back(sw(T1, 4, S3));                  // A[1] = 23
    // Exercise 4: for (s2 = 1; s2 < s3; s2++) s4 += s2, s3 = 11
    prog.push_back(addi(S3, ZERO, 11));
    prog.push_back(addi(S4, ZERO, 0));
    prog.push_back(addi(S2, ZERO, 1));
    prog.push_back(add(S4, S4, S2));
    prog.push_back(addi(S2, S2, 1));
    prog.push_back(bne(S2, S3, -8));                // s4 = 55
    // each branch type: a0 collects one bit per correct outcome
    prog.push_back(addi(A0, ZERO, 0));
    prog.push_back(addi(T0, ZERO, -1));             // t0 = -1
    prog.push_back(addi(T1, ZERO, 1));              // t1 = 1
    prog.push_back(beq(T0, T1, 8));                 // not taken
    prog.push_back(addi(A0, A0, 1));
    prog.push_back(blt(T0, T1, 8));                 // taken (-1 < 1)
    prog.push_back(addi(A0, A0, 100));              // skipped
    prog.push_back(enc_b(8, T1, T0, 3'b110));       // bltu -1 < 1 unsigned: not taken
    prog.push_back(addi(A0, A0, 2));
    prog.push_back(bge(T1, T0, 8));                 // taken
    prog.push_back(addi(A0, A0, 100));              // skipped
    prog.push_back(enc_b(8, T1, T0, 3'b111));       // bgeu: taken
    prog.push_back(addi(A0, A0, 100));              // skipped
    prog.push_back(beq(T1, T1, 8));                 // taken
    prog.push_back(addi(A0, A0, 100));              // skipped
    prog.push_back(addi(ZERO, ZERO, 5));            // write to x0, dropped
    prog.push_back(add(A1, ZERO, ZERO));            // a1 = x0 = 0
    halt = prog.size();
    prog.push_back(beq(ZERO, ZERO, 0));             // halt: self-loop

    for (int k = 0; k < 1024; k++) dut.u_proc.m3.mem[k] = (k < prog.size()) ? prog[k] : beq(ZERO, ZERO, 0);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    cycles = 0; st_seen = 0;
    while (pc != word_t'(halt * 4) && cycles < 1000) begin
      #1;
      if (dmem_we) begin
        st_adr.push_back(dmem_adr);
        st_dat.push_back(dmem_wd);
      end
      @(negedge clk);
      cycles++;
    end
    // 16 straight-line + 3 setup + 10 x 3 loop + 17 branch-test instructions
    // instructions, of which 4 are skipped by taken branches: 16 + 33 + 13
    expect_eq(word_t'(cycles), 32'd62, "instructions executed = cycles");
    expect_eq(xr(8), 32'd23, "exercise 1 s0");
    expect_eq(xr(9), 32'd23, "exercise 2 s1");
    expect_eq(dut.u_proc.m9.mem[1], 32'd23, "exercise 3 A[1]");
    expect_eq(dut.u_proc.m9.mem[2], 32'd3, "A[2]");
    expect_eq(xr(20), 32'd55, "exercise 4 s4 = 1+..+10");
    expect_eq(xr(18), 32'd11, "exercise 4 s2");
    expect_eq(xr(10), 32'd3, "branch outcomes");
    expect_eq(xr(11), 32'd0, "x0 stays zero");
    expect_eq(word_t'(st_adr.size()), 32'd2, "stores on the port");
    if (st_adr.size() == 2) begin
      expect_eq(st_adr[0], 32'h1200_0008, "first store address");
      expect_eq(st_dat[0], 32'd3, "first store data");
      expect_eq(st_adr[1], 32'h1200_0004, "second store address");
      expect_eq(st_dat[1], 32'd23, "second store data");
    end
    // the PC stays on the halt loop
    repeat (5) @(negedge clk);
    expect_eq(pc, word_t'(halt * 4), "halted");

    $display("mechanisms:");
    mech(n_rtype, "R-type ALU");
    mech(n_opimm, "immediate ALU");
    mech(n_load, "load write-back");
    mech(n_store, "store");
    mech(n_taken, "branch taken");
    mech(n_not_taken, "branch not taken");
    mech(n_x0, "write to x0 dropped");
    mech(n_wrap, "counter wrap 3->0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
