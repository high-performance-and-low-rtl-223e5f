// tb_incrementation_block: exhaustive check of 5-bit and 1-bit incrementation blocks.
// The output must be (z + c) modulo 2^M.
module tb_incrementation_block;
  logic [4:0] z5, s5;
  logic [0:0] z1, s1;
  logic       c5, c1;
  int checks = 0, failures = 0;

  incrementation_block #(.M(5)) dut5 (.z(z5), .c(c5), .s(s5));
  incrementation_block #(.M(1)) dut1 (.z(z1), .c(c1), .s(s1));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {z5, c5} = 6'(v);
      {z1, c1} = 2'(v);
      #1;
      checks += 2;
      if (s5 != 5'(int'(z5) + int'(c5))) begin
        failures++;
        $display("FAIL M=5 z=%h c=%0b -> s=%h", z5, c5, s5);
      end
      if (s1 != 1'(int'(z1) + int'(c1))) begin
        failures++;
        $display("FAIL M=1 z=%h c=%0b -> s=%h", z1, c1, s1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
