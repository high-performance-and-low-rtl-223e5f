// tb_ci_cska_stage: exhaustive check of a 4-bit stage with an AOI skip gate and one with
// an OAI skip gate. For each operand pair and incoming carry cin: s must be the low 4 bits
// of a + b + cin, the true carry out must be its fifth bit, the gate output must carry the
// polarity of its gate type (inverted for AOI, true for OAI), and p_all must be 1 exactly
// when a ^ b is all ones. Each gate is fed the previous carry in its own polarity.
module tb_ci_cska_stage;
  logic [3:0] a, b, s_aoi, s_oai;
  logic       cin, g_aoi, t_aoi, p_aoi, g_oai, t_oai, p_oai;
  int checks = 0, failures = 0;

  ci_cska_stage #(.M(4), .USE_OAI(1'b0)) dut_aoi (
    .a(a), .b(b), .cprev_t(cin), .cprev_g(cin),
    .s(s_aoi), .cout_g(g_aoi), .cout_t(t_aoi), .p_all(p_aoi)
  );
  ci_cska_stage #(.M(4), .USE_OAI(1'b1)) dut_oai (
    .a(a), .b(b), .cprev_t(cin), .cprev_g(~cin),
    .s(s_oai), .cout_g(g_oai), .cout_t(t_oai), .p_all(p_oai)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic [4:0] ref_sum;
      logic       ref_p;
      {a, b, cin} = 9'(v);
      ref_sum = 5'(int'(a) + int'(b) + int'(cin));
      ref_p   = ((a ^ b) == 4'hf);
      #1;
      checks += 2;
      if (s_aoi != ref_sum[3:0] || t_aoi != ref_sum[4] || g_aoi != !ref_sum[4] || p_aoi != ref_p) begin
        failures++;
        $display("FAIL AOI a=%h b=%h cin=%0b -> s=%h t=%0b g=%0b p=%0b", a, b, cin, s_aoi, t_aoi, g_aoi, p_aoi);
      end
      if (s_oai != ref_sum[3:0] || t_oai != ref_sum[4] || g_oai != ref_sum[4] || p_oai != ref_p) begin
        failures++;
        $display("FAIL OAI a=%h b=%h cin=%0b -> s=%h t=%0b g=%0b p=%0b", a, b, cin, s_oai, t_oai, g_oai, p_oai);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
