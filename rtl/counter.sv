// counter: the free-running 2-bit counter of the "simple sequential circuit"
// example. A register cnt feeds an adder that adds 1, and the sum is loaded
// back on every rising edge of clk, so cnt steps 0, 1, 2, 3, 0, ... one step
// per clock. As in the example there is no reset: the register is given the
// power-up value 0. The width is a parameter whose default is the example's 2
// bits. Interface: clk in, cnt out; cnt changes right after each rising edge.
// Lint notes that the register has both a declaration initialiser and a
// clocked assignment; that is intended, the initialiser being the power-up
// value (an FPGA bitstream value), since the example has no reset input.
module counter #(
  parameter int unsigned W = 2
) (
  input  logic         clk,
  output logic [W-1:0] cnt
);

  logic [W-1:0] r_cnt = '0;

  always_ff @(posedge clk) r_cnt <= r_cnt + W'(1);

  assign cnt = r_cnt;

endmodule
