// tb_am_dmem: self-checking test of the data memory with a small size
// (64 words). Writes happen on the clock edge only when we is high; reads
// are combinational and ignore the two low address bits and the bits above
// the word index, so address 0x12000008 reads word 2.
module tb_am_dmem;
  logic        clk = 1'b0;
  logic [31:0] adr, wd, rd;
  logic        we;
  logic [31:0] model [64];
  int checks = 0, failures = 0;

  am_dmem #(.WORDS(64)) dut (.clk(clk), .adr(adr), .we(we), .wd(wd), .rd(rd));

  always #5 clk = ~clk;

  initial begin
    we = 1'b0; adr = '0; wd = '0;
    // fill every word
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      adr = 32'(k * 4); wd = $urandom; we = 1'b1;
      model[k] = wd;
      @(posedge clk); #1;
      we = 1'b0;
      checks++;
      if (rd !== model[k]) begin failures++; $display("FAIL fill word %0d", k); end
    end
    repeat (500) begin
      @(negedge clk);
      adr = {8'h12, 16'($urandom), 6'($urandom), 2'($urandom)};
      wd  = $urandom;
      we  = 1'($urandom);
      #1;
      checks++;
      if (rd !== model[adr[7:2]]) begin
        failures++;
        $display("FAIL read adr=%h rd=%h want %h", adr, rd, model[adr[7:2]]);
      end
      @(posedge clk);
      if (we) model[adr[7:2]] = wd;
      #1;
      checks++;
      if (rd !== model[adr[7:2]]) begin
        failures++;
        $display("FAIL after edge adr=%h we=%0b rd=%h want %h", adr, we, rd, model[adr[7:2]]);
      end
    end
    // the memory figure's example: A[2] at 0x12000008 holds 3
    @(negedge clk);
    adr = 32'h1200_0008; wd = 32'd3; we = 1'b1;
    @(posedge clk); #1 we = 1'b0;
    adr = 32'h0000_0008; #1;
    checks++;
    if (rd !== 32'd3) begin failures++; $display("FAIL A[2] alias"); end
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
