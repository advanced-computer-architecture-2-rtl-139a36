// tb_alu: self-checking test of the ALU. For random operands it runs every
// register-register and register-immediate operation (selected by funct3 and
// instruction bit 30), the plain add used for loads, stores and branches, and
// the six branch conditions, and compares with a reference computed here from
// the RV32I definitions. Directed cases cover signed/unsigned differences and
// the ADDI-with-bit-30 case that must not subtract.
module tb_alu;
  import rv_pkg::*;

  logic       clk = 1'b0;
  word_t      a, b, y;
  logic [2:0] funct3;
  logic       f7b5, is_r, is_opimm, tkn;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .funct3(funct3), .f7b5(f7b5), .is_r(is_r),
           .is_opimm(is_opimm), .y(y), .tkn(tkn));

  always #5 clk = ~clk;

  function automatic word_t ref_y(input word_t x1, x2, input logic [2:0] f3,
                                  input logic alt, input logic r, input logic opi);
    int sh = int'(x2[4:0]);
    if (!(r || opi)) return x1 + x2;
    case (f3)
      3'd0: return (r && alt) ? x1 - x2 : x1 + x2;
      3'd1: return x1 << sh;
      3'd2: return (int'(x1) < int'(x2)) ? 32'd1 : 32'd0;
      3'd3: return (x1 < x2) ? 32'd1 : 32'd0;
      3'd4: return x1 ^ x2;
      3'd5: return alt ? 32'(int'(x1) >>> sh) : x1 >> sh;
      3'd6: return x1 | x2;
      default: return x1 & x2;
    endcase
  endfunction

  function automatic logic ref_t(input word_t x1, x2, input logic [2:0] f3);
    case (f3)
      3'd0: return x1 == x2;
      3'd1: return x1 != x2;
      3'd4: return int'(x1) < int'(x2);
      3'd5: return int'(x1) >= int'(x2);
      3'd6: return x1 < x2;
      3'd7: return x1 >= x2;
      default: return 1'b0;
    endcase
  endfunction

  task automatic run(input word_t x1, x2, input logic [2:0] f3, input logic alt,
                     input logic r, input logic opi);
    a = x1; b = x2; funct3 = f3; f7b5 = alt; is_r = r; is_opimm = opi;
    #1;
    checks++;
    if (y !== ref_y(x1, x2, f3, alt, r, opi)) begin
      failures++;
      $display("FAIL y a=%h b=%h f3=%0d alt=%0b r=%0b opi=%0b y=%h want=%h", x1, x2, f3,
               alt, r, opi, y, ref_y(x1, x2, f3, alt, r, opi));
    end
    checks++;
    if (tkn !== ref_t(x1, x2, f3)) begin
      failures++;
      $display("FAIL tkn a=%h b=%h f3=%0d tkn=%0b", x1, x2, f3, tkn);
    end
  endtask

  initial begin
    word_t v1, v2;
    // directed
    run(32'd10, 32'd3, 3'd0, 1'b1, 1'b1, 1'b0);              // sub
    run(32'd10, 32'hffff_fc00, 3'd0, 1'b1, 1'b0, 1'b1);      // addi with bit 30 set
    run(32'hffff_ffff, 32'd1, 3'd2, 1'b0, 1'b1, 1'b0);       // slt -1 < 1
    run(32'hffff_ffff, 32'd1, 3'd3, 1'b0, 1'b1, 1'b0);       // sltu
    run(32'h8000_0000, 32'd4, 3'd5, 1'b1, 1'b0, 1'b1);       // srai
    run(32'h8000_0000, 32'd4, 3'd5, 1'b0, 1'b0, 1'b1);       // srli
    run(32'h1200_0000, 32'd8, 3'd2, 1'b0, 1'b0, 1'b0);       // lw address
    run(32'd5, 32'd5, 3'd1, 1'b0, 1'b0, 1'b0);               // bne not taken
    run(32'hffff_fff0, 32'd1, 3'd4, 1'b0, 1'b0, 1'b0);       // blt signed
    run(32'hffff_fff0, 32'd1, 3'd6, 1'b0, 1'b0, 1'b0);       // bltu unsigned
    repeat (3000) begin
      v1 = $urandom; v2 = $urandom;
      if ($urandom_range(0, 3) == 0) v2 = v1;
      case ($urandom_range(0, 2))
        0: run(v1, v2, 3'($urandom), 1'($urandom), 1'b1, 1'b0);
        1: run(v1, v2, 3'($urandom), 1'($urandom), 1'b0, 1'b1);
        default: run(v1, v2, 3'($urandom), 1'($urandom), 1'b0, 1'b0);
      endcase
    end
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
