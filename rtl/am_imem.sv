// am_imem: instruction memory (m3 of the single-cycle datapath). It is read
// without a clock: the word at the current PC appears on ir in the same cycle,
// which a single-cycle processor needs. The memory holds WORDS 32-bit words
// and is indexed by the word address pc[AW+1:2]; higher PC bits are ignored,
// so the contents repeat every 4*WORDS bytes. It has no write port: its
// contents come from INIT_FILE (hex, one word per line, read with $readmemh)
// or are loaded by a testbench. The size and the loading are this design's
// choice; the lecture gives only the block and its use.
module am_imem #(
  parameter int unsigned WORDS     = 1024,
  parameter string       INIT_FILE = ""
) (
  input  logic [31:0] pc,
  output logic [31:0] ir
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign ir = mem[pc[AW+1:2]];

endmodule
