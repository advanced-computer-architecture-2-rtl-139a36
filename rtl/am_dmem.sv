// am_dmem: data memory (m9 of the single-cycle datapath). The ALU result is
// the byte address adr, the register value rd2 is the write data wd and we is
// the store signal s. Reading is combinational (rd follows adr in the same
// cycle, so a load finishes within its one cycle); writing happens on the
// rising clock edge that ends a store. Memory is word-wide: lw and sw are the
// data transfers the datapath carries, so the low two address bits are
// ignored, and only the word address adr[AW+1:2] is used, the higher bits
// being ignored (an array at 0x12000000 lands at word 0). WORDS is this
// design's choice. The contents are not initialised.
module am_dmem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] adr,
  input  logic        we,
  input  logic [31:0] wd,
  output logic [31:0] rd
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  logic [AW-1:0] widx;

  assign widx = adr[AW+1:2];

  always_ff @(posedge clk) begin
    if (we) mem[widx] <= wd;
  end

  assign rd = mem[widx];

endmodule
