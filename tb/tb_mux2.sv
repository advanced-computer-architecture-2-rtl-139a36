// tb_mux2: self-checking test of the 2:1 multiplexer. For random data on
// both inputs it checks that select 0 passes d0 and select 1 passes d1.
module tb_mux2;
  logic        clk = 1'b0;
  logic        sel;
  logic [31:0] d0, d1, y;
  int checks = 0, failures = 0;

  mux2 #(.W(32)) dut (.sel(sel), .d0(d0), .d1(d1), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (400) begin
      d0 = $urandom; d1 = $urandom; sel = 1'($urandom);
      #1;
      checks++;
      if (y !== (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%0b d0=%h d1=%h y=%h", sel, d0, d1, y);
      end
    end
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
