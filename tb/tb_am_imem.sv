// tb_am_imem: self-checking test of the instruction memory. A 16-word
// instance is loaded from a hex file holding the word value 0x1000 + 0x11*k at
// word k; reading at byte address 4*k (and at the same word with high address
// bits set) must return that word in the same cycle, without a clock.
module tb_am_imem;
  logic        clk = 1'b0;
  logic [31:0] pc, ir;
  int checks = 0, failures = 0;

  am_imem #(.WORDS(16), .INIT_FILE("tb/imem_test.hex")) dut (.pc(pc), .ir(ir));

  always #5 clk = ~clk;

  initial begin
    logic [31:0] want;
    for (int k = 0; k < 16; k++) begin
      want = 32'h1000 + 32'(k) * 32'h11;
      pc = 32'(k * 4); #1;
      checks++;
      if (ir !== want) begin failures++; $display("FAIL word %0d ir=%h want %h", k, ir, want); end
      pc = 32'h0010_0000 | 32'(k * 4); #1;
      checks++;
      if (ir !== want) begin failures++; $display("FAIL alias %0d ir=%h", k, ir); end
    end
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
