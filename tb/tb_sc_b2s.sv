// tb_sc_b2s: binary-to-stochastic converter. Checks the sign/magnitude split
// (including the clamped most negative code) and that over one full LFSR
// period of width n the stream holds exactly (|x| >> (10 - n)) ones.
module tb_sc_b2s;
  import gc_pkg::*;
  int checks = 0, failures = 0;
  sample_t x;
  nsel_t   n;
  rnd_t    rnd;
  logic    s_bit, s_sign;
  int      r [1023];

  sc_b2s dut (.*);

  task automatic run(input int xv, input int nv);
    int mag, ones;
    x = sample_t'(xv);
    n = nsel_t'(nv);
    mag = (xv < 0) ? -xv : xv;
    if (mag > 1023) mag = 1023;
    gc_ref_pkg::seq(nv, 1'b0, r);
    ones = 0;
    for (int t = 0; t < (1 << nv) - 1; t++) begin
      rnd = rnd_t'(r[t]);
      #1;
      ones += int'(s_bit);
      checks++;
      if (s_sign !== (xv < 0)) begin
        failures++;
        $display("FAIL sign x=%0d", xv);
      end
    end
    checks++;
    if (ones != (mag >> (10 - nv))) begin
      failures++;
      $display("FAIL x=%0d n=%0d ones=%0d", xv, nv, ones);
    end
  endtask

  initial begin
    run(0, 10); run(1023, 10); run(-1024, 10); run(-1, 10); run(512, 10);
    run(300, 6); run(-300, 6); run(1023, 3); run(-130, 3);
    for (int i = 0; i < 40; i++)
      run(int'($urandom_range(2047)) - 1024, int'($urandom_range(10, 3)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
