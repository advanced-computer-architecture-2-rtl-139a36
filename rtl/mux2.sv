// mux2: W-bit two-to-one multiplexer, used three times in the single-cycle
// datapath: m7 picks the second ALU operand (register rd2 or immediate), m10
// the write-back value (ALU result or loaded data) and m11 the next PC
// (pc + 4 or the branch target). y = d0 when sel = 0 and y = d1 when sel = 1,
// as the 0 and 1 input labels of the drawing show. Combinational.
module mux2 #(
  parameter int unsigned W = 32
) (
  input  logic         sel,
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  output logic [W-1:0] y
);

  assign y = sel ? d1 : d0;

endmodule
