// lecture_top: the two circuits of the lecture side by side, each with its own
// ports. The single-cycle RV32I processor runs from clk / rst_n and brings out
// its PC, current instruction and data-memory write port for observation;
// its program is loaded into the instruction memory from IMEM_FILE or by a
// testbench. The 2-bit counter example runs from its own clock cnt_clk and
// brings out cnt. The two share nothing.
module lecture_top
  import rv_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter string       IMEM_FILE  = "",
  parameter int unsigned CNT_W      = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  output word_t            pc,
  output word_t            ir,
  output logic             dmem_we,
  output word_t            dmem_adr,
  output word_t            dmem_wd,
  input  logic             cnt_clk,
  output logic [CNT_W-1:0] cnt
);

  single_cycle_proc #(
    .IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS), .IMEM_FILE(IMEM_FILE)
  ) u_proc (
    .clk(clk), .rst_n(rst_n),
    .dbg_pc(pc), .dbg_ir(ir),
    .dbg_dmem_we(dmem_we), .dbg_dmem_adr(dmem_adr), .dbg_dmem_wd(dmem_wd)
  );

  counter #(.W(CNT_W)) u_cnt (.clk(cnt_clk), .cnt(cnt));

endmodule
