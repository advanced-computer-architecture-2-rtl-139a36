// regfile: the integer register file RF (m5 of the single-cycle datapath):
// 32 registers x0..x31 of XLEN bits, x0 hard-wired to zero. Two read ports
// (ra1/rd1 for rs1 = ir[19:15], ra2/rd2 for rs2 = ir[24:20]) are
// combinational; the write port (wa = rd field ir[11:7], wd, we) writes on the
// rising clock edge, and a write to x0 is dropped. A value written in one
// cycle is read by the next instruction, which is all a single-cycle machine
// needs, so there is no write-to-read bypass. The active-low asynchronous
// reset that clears all registers is this design's choice.
module regfile
  import rv_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] ra1,
  input  logic [4:0] ra2,
  input  logic [4:0] wa,
  input  logic       we,
  input  word_t      wd,
  output word_t      rd1,
  output word_t      rd2
);

  word_t x [1:31];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < 32; k++) x[k] <= '0;
    end else if (we && wa != 5'd0) begin
      x[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == 5'd0) ? '0 : x[ra1];
  assign rd2 = (ra2 == 5'd0) ? '0 : x[ra2];

endmodule
