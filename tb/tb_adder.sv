// tb_adder: self-checking test of the 32-bit adder used for pc + 4 and
// pc + imm. It applies corner cases (carry through all bits, wrap-around,
// negative offsets) and random pairs, and compares y with the sum computed in
// 64-bit arithmetic and cut to 32 bits. A watchdog ends the run after a fixed
// number of cycles.
module tb_adder;
  logic        clk = 1'b0;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  adder #(.W(32)) dut (.a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_);
    longint unsigned full;
    a = ta; b = tb_;
    #1;
    full = longint'(ta) + longint'(tb_);
    checks++;
    if (y !== full[31:0]) begin
      failures++;
      $display("FAIL a=%h b=%h y=%h expected=%h", ta, tb_, y, full[31:0]);
    end
  endtask

  initial begin
    check(32'h0000_0000, 32'h0000_0004);
    check(32'h0000_0ffc, 32'h0000_0004);
    check(32'hffff_ffff, 32'h0000_0001);
    check(32'h0000_0010, 32'hffff_fff8);   // pc + (-8)
    check(32'h7fff_ffff, 32'h0000_0001);
    check(32'h0000_ffff, 32'h0000_0001);
    repeat (500) check($urandom, $urandom);
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
