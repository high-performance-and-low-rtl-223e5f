// tb_hc_ppa: exhaustive check of a 4-bit and a 5-bit Han-Carlson prefix adder, and a
// random check of 8-bit (the default) and 13-bit ones. {co, s} must equal a + b + ci and
// p_all must be 1 exactly when a ^ b is all ones. Odd and even widths exercise both the
// odd-position tree and the final even-position level.
module tb_hc_ppa;
  logic [3:0]  a4, b4, s4;
  logic [4:0]  a5, b5, s5;
  logic [7:0]  a8, b8, s8;
  logic [12:0] a13, b13, s13;
  logic ci4, co4, p4, ci5, co5, p5, ci8, co8, p8, ci13, co13, p13;
  int checks = 0, failures = 0;

  hc_ppa #(.M(4))  dut4  (.a(a4),  .b(b4),  .ci(ci4),  .s(s4),  .co(co4),  .p_all(p4));
  hc_ppa #(.M(5))  dut5  (.a(a5),  .b(b5),  .ci(ci5),  .s(s5),  .co(co5),  .p_all(p5));
  hc_ppa           dut8  (.a(a8),  .b(b8),  .ci(ci8),  .s(s8),  .co(co8),  .p_all(p8));
  hc_ppa #(.M(13)) dut13 (.a(a13), .b(b13), .ci(ci13), .s(s13), .co(co13), .p_all(p13));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2048; v++) begin
      {a5, b5, ci5} = 11'(v);
      {a4, b4, ci4} = 9'(v);
      #1;
      checks += 2;
      if ({co4, s4} != 5'(int'(a4) + int'(b4) + int'(ci4)) || p4 != ((a4 ^ b4) == '1)) begin
        failures++;
        $display("FAIL M=4 a=%h b=%h ci=%0b -> co=%0b s=%h", a4, b4, ci4, co4, s4);
      end
      if ({co5, s5} != 6'(int'(a5) + int'(b5) + int'(ci5)) || p5 != ((a5 ^ b5) == '1)) begin
        failures++;
        $display("FAIL M=5 a=%h b=%h ci=%0b -> co=%0b s=%h", a5, b5, ci5, co5, s5);
      end
    end
    for (int n = 0; n < 5000; n++) begin
      a8 = 8'($urandom);   b8 = (n % 3 == 0) ? ~a8 : 8'($urandom);   ci8 = 1'($urandom);
      a13 = 13'($urandom); b13 = (n % 3 == 1) ? ~a13 : 13'($urandom); ci13 = 1'($urandom);
      #1;
      checks += 2;
      if ({co8, s8} != 9'(int'(a8) + int'(b8) + int'(ci8)) || p8 != ((a8 ^ b8) == '1)) begin
        failures++;
        $display("FAIL M=8 a=%h b=%h ci=%0b -> co=%0b s=%h", a8, b8, ci8, co8, s8);
      end
      if ({co13, s13} != 14'(int'(a13) + int'(b13) + int'(ci13)) || p13 != ((a13 ^ b13) == '1)) begin
        failures++;
        $display("FAIL M=13 a=%h b=%h ci=%0b -> co=%0b s=%h", a13, b13, ci13, co13, s13);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
