// pc_reg: the program counter register r_pc (m1 of the single-cycle datapath).
// It loads the next-PC value w_pcin on every rising clock edge, so the
// processor starts one new instruction per cycle. The datapath drawing shows
// only the register; the asynchronous active-low reset and its value (the
// start of the text segment, address 0 by default) are this design's choice.
// Interface: clk, rst_n, d (next PC), q (current PC). Timing: q changes one
// clock edge after d is presented; reset forces q = RESET_PC at once.
module pc_reg #(
  parameter int unsigned          W        = 32,
  parameter logic        [W-1:0]  RESET_PC = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= RESET_PC;
    else        q <= d;
  end

endmodule
