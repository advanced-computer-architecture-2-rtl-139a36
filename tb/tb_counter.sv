// tb_counter: self-checking test of the 2-bit counter example. The clock
// mirrors the example's stimulus: low for 150 time units, then a period of
// 100, with the first rising edge at 200. The counter starts at 0 and must
// read (number of rising edges seen) mod 4 after every edge, wrapping from 3
// to 0; at time 810 seven edges have passed, so it reads 3. A 4-bit instance
// checks that the width parameter is honoured.
module tb_counter;
  logic       clk = 1'b0;
  logic [1:0] cnt;
  logic [3:0] cnt4;
  int checks = 0, failures = 0;
  int edges = 0, wraps = 0;

  counter #(.W(2)) dut   (.clk(clk), .cnt(cnt));
  counter #(.W(4)) dut4  (.clk(clk), .cnt(cnt4));

  initial #150 forever #50 clk = ~clk;

  initial begin
    #1;
    checks++;
    if (cnt !== 2'd0) begin failures++; $display("FAIL power-up value %0d", cnt); end
    repeat (40) begin
      @(posedge clk); #1;
      edges++;
      checks++;
      if (cnt !== 2'(edges)) begin
        failures++;
        $display("FAIL after %0d edges cnt=%0d", edges, cnt);
      end
      checks++;
      if (cnt4 !== 4'(edges)) begin
        failures++;
        $display("FAIL 4-bit after %0d edges cnt=%0d", edges, cnt4);
      end
      if (cnt == 2'd0) wraps++;
      if ($time == 801) begin
        checks++;
        if (cnt !== 2'd3) begin failures++; $display("FAIL at time 810 cnt=%0d", cnt); end
      end
    end
    checks++;
    if (wraps != 10) begin failures++; $display("FAIL wraps=%0d", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
