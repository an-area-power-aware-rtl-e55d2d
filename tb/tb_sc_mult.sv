// tb_sc_mult: exhaustive check of the AND/XOR stochastic multiplier, plus a
// stream test: two independent streams of known density multiply to the
// product density.
module tb_sc_mult;
  int checks = 0, failures = 0;
  logic a_bit, a_sign, b_bit, b_sign, p_bit, p_sign;

  sc_mult dut (.*);

  initial begin
    int ones;
    for (int v = 0; v < 16; v++) begin
      {a_bit, a_sign, b_bit, b_sign} = 4'(v);
      #1;
      checks++;
      if (p_bit !== (a_bit && b_bit) || p_sign !== (a_sign != b_sign)) begin
        failures++;
        $display("FAIL v=%0d p_bit=%b p_sign=%b", v, p_bit, p_sign);
      end
    end
    // 4 x 4 grid of bits: density 3/4 times density 1/2 gives 3/8.
    ones = 0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a_bit = (i < 3); b_bit = (j < 2); a_sign = 1'b1; b_sign = 1'b1;
        #1;
        ones += int'(p_bit);
        checks++;
        if (p_sign !== 1'b0) failures++;
      end
    checks++;
    if (ones != 6) begin
      failures++;
      $display("FAIL grid ones=%0d", ones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
