// adder: W-bit two-input adder, used twice in the single-cycle datapath:
// m2 forms w_npc = pc + 4 and m6 forms the branch target w_tpc = pc + imm.
// Purely combinational; the carry out is dropped, so the sum wraps modulo
// 2**W as RISC-V address arithmetic does.
module adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  assign y = a + b;

endmodule
