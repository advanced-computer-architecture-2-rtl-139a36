// tb_pc_reg: self-checking test of the program-counter register. It checks
// that reset forces the reset address, that q follows d exactly one rising
// edge later (one new PC per cycle) and that q holds between edges.
module tb_pc_reg;
  logic        clk = 1'b0;
  logic        rst_n;
  logic [31:0] d, q, expect_q;
  int checks = 0, failures = 0;

  pc_reg #(.W(32), .RESET_PC(32'h0000_0100)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic expect_eq(input logic [31:0] want, input string what);
    checks++;
    if (q !== want) begin
      failures++;
      $display("FAIL %s: q=%h expected=%h", what, q, want);
    end
  endtask

  initial begin
    d = 32'h1234_5678;
    rst_n = 1'b0;
    #2;
    expect_eq(32'h0000_0100, "during reset");
    @(posedge clk); #1;
    expect_eq(32'h0000_0100, "reset holds over a clock edge");
    rst_n = 1'b1;
    repeat (200) begin
      d = $urandom & 32'hffff_fffc;
      expect_q = d;
      @(posedge clk); #1;
      expect_eq(expect_q, "after edge");
      d = ~expect_q;
      #3;
      expect_eq(expect_q, "between edges");
    end
    rst_n = 1'b0;
    #1;
    expect_eq(32'h0000_0100, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
