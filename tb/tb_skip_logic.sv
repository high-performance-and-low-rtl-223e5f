// tb_skip_logic: exhaustive check of both skip gates. With true inputs the AOI gate must
// give ~(C | P & Cprev); fed with the inverted inputs the OAI gate must give C | P & Cprev.
module tb_skip_logic;
  logic c, p, cp, y_aoi, y_oai;
  int checks = 0, failures = 0;

  skip_logic #(.USE_OAI(1'b0)) dut_aoi (.c_in(c),  .p_in(p),  .cprev_in(cp),  .y(y_aoi));
  skip_logic #(.USE_OAI(1'b1)) dut_oai (.c_in(~c), .p_in(~p), .cprev_in(~cp), .y(y_oai));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic expect_c;
      {c, p, cp} = 3'(v);
      expect_c = c | (p & cp);
      #1;
      checks += 2;
      if (y_aoi != !expect_c) begin
        failures++;
        $display("FAIL AOI c=%0b p=%0b cp=%0b -> %0b", c, p, cp, y_aoi);
      end
      if (y_oai != expect_c) begin
        failures++;
        $display("FAIL OAI c=%0b p=%0b cp=%0b -> %0b", c, p, cp, y_oai);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
