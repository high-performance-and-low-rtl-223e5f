// tb_rca_block: exhaustive check of a 4-bit ripple carry block (all 512 operand and carry
// combinations) and a random check of a 7-bit one. {co, s} must equal a + b + ci, and
// p_all must be 1 exactly when every bit pair differs (a ^ b all ones).
module tb_rca_block;
  logic [3:0] a4, b4, s4;
  logic [6:0] a7, b7, s7;
  logic       ci4, co4, p4, ci7, co7, p7;
  int checks = 0, failures = 0;

  rca_block #(.M(4)) dut4 (.a(a4), .b(b4), .ci(ci4), .s(s4), .co(co4), .p_all(p4));
  rca_block #(.M(7)) dut7 (.a(a7), .b(b7), .ci(ci7), .s(s7), .co(co7), .p_all(p7));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {a4, b4, ci4} = 9'(v);
      #1;
      checks++;
      if ({co4, s4} != 5'(int'(a4) + int'(b4) + int'(ci4)) || p4 != ((a4 ^ b4) == 4'hf)) begin
        failures++;
        $display("FAIL M=4 a=%h b=%h ci=%0b -> co=%0b s=%h p=%0b", a4, b4, ci4, co4, s4, p4);
      end
    end
    for (int n = 0; n < 2000; n++) begin
      a7  = 7'($urandom);
      b7  = (n % 4 == 0) ? ~a7 : 7'($urandom);
      ci7 = 1'($urandom);
      #1;
      checks++;
      if ({co7, s7} != 8'(int'(a7) + int'(b7) + int'(ci7)) || p7 != ((a7 ^ b7) == 7'h7f)) begin
        failures++;
        $display("FAIL M=7 a=%h b=%h ci=%0b -> co=%0b s=%h p=%0b", a7, b7, ci7, co7, s7, p7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
