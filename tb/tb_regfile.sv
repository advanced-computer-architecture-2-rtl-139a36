// tb_regfile: self-checking test of the register file against a model array.
// After reset all registers must read 0. Then random writes and reads on
// both ports are checked: a write appears on the next cycle, a write with we
// low or to x0 changes nothing, and x0 always reads 0.
module tb_regfile;
  import rv_pkg::*;

  logic       clk = 1'b0, rst_n;
  logic [4:0] ra1, ra2, wa;
  logic       we;
  word_t      wd, rd1, rd2;
  word_t      model [32];
  int checks = 0, failures = 0;
  int x0_writes = 0;

  regfile dut (.clk(clk), .rst_n(rst_n), .ra1(ra1), .ra2(ra2), .wa(wa), .we(we),
               .wd(wd), .rd1(rd1), .rd2(rd2));

  always #5 clk = ~clk;

  task automatic compare_reads();
    for (int k = 0; k < 32; k++) begin
      ra1 = 5'(k); ra2 = 5'(31 - k);
      #0.1;
      checks += 2;
      if (rd1 !== model[k] || rd2 !== model[31-k]) begin
        failures++;
        $display("FAIL read x%0d=%h (want %h) x%0d=%h (want %h)", k, rd1, model[k],
                 31-k, rd2, model[31-k]);
      end
    end
  endtask

  initial begin
    we = 1'b0; wa = '0; wd = '0; ra1 = '0; ra2 = '0;
    rst_n = 1'b0;
    for (int k = 0; k < 32; k++) model[k] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    compare_reads();
    repeat (600) begin
      @(negedge clk);
      we = 1'($urandom);
      wa = ($urandom_range(0, 7) == 0) ? 5'd0 : 5'($urandom);
      wd = $urandom;
      ra1 = 5'($urandom); ra2 = 5'($urandom);
      #1;
      checks += 2;
      if (rd1 !== model[ra1] || rd2 !== model[ra2]) begin
        failures++;
        $display("FAIL before write: rd1=%h want %h, rd2=%h want %h", rd1, model[ra1], rd2,
                 model[ra2]);
      end
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
      if (we && wa == 0) x0_writes++;
      #1;
      ra1 = wa;
      #0.1;
      checks++;
      if (rd1 !== model[wa]) begin
        failures++;
        $display("FAIL after write x%0d=%h want %h", wa, rd1, model[wa]);
      end
    end
    compare_reads();
    checks++;
    if (x0_writes == 0) begin failures++; $display("FAIL no write to x0 was tried"); end
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
