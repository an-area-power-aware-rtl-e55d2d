// tb_gc_channel: one gammachirp channel (index 27 of 32, ~11.2 kHz).
// Checks the elaborated coefficient set against independently computed
// values, then drives an impulse followed by a tone near the channel centre
// frequency, with the testbench producing the LFSR values and the timing,
// and compares every section output with the reference model of the
// 8-section cascade, operation by operation. Also checks the latency: an
// impulse reaches section s only s+1 operations after it is taken.
module tb_gc_channel;
  import gc_pkg::*;
  int checks = 0, failures = 0;
  int n_sat = 0;
  logic clk = 0, rst_n = 0;
  nsel_t n;
  logic stoch, bin;
  rnd_t rnd_x, rnd_c;
  sample_t x_in, y;
  sample_t y_sec [N_SEC];
  logic [N_SEC-1:0] sat;
  int r [1023];
  int u [1023];
  gc_ref_pkg::sec_t m [N_SEC];
  int ey [N_SEC];

  gc_channel #(.CH(27), .NCH(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int cval(input int ch, input int sec, input int tap);
    coef_t c;
    c = sec_coef(ch, 32, sec, tap);
    return c.sign ? -int'(c.mag) : int'(c.mag);
  endfunction

  task automatic chk_coef(input int ch, input int sec, input int e [5]);
    for (int t = 0; t < 5; t++)
      chk(cval(ch, sec, t) == e[t], $sformatf("coef ch%0d sec%0d tap%0d = %0d exp %0d",
                                              ch, sec, t, cval(ch, sec, t), e[t]));
  endtask

  task automatic op(input int nv, input int xn);
    int v;
    bit s, sat_m;
    n = nsel_t'(nv);
    gc_ref_pkg::seq(nv, 1'b0, r);
    gc_ref_pkg::seq(nv, 1'b1, u);
    for (int t = 0; t < (1 << nv) - 1; t++) begin
      stoch = 1; bin = 0;
      rnd_x = rnd_t'(r[t]); rnd_c = rnd_t'(u[t]);
      @(posedge clk); #1;
    end
    stoch = 0; bin = 1; x_in = sample_t'(xn);
    #1;
    v = xn; sat_m = 0;
    for (int sc = 0; sc < N_SEC; sc++) begin
      v = gc_ref_pkg::sec_step(m[sc], v, nv, r, u, s);
      ey[sc] = v;
      chk(sat[sc] == s, $sformatf("sat sec %0d", sc));
      n_sat += int'(s);
    end
    @(posedge clk); #1;
    for (int sc = 0; sc < N_SEC; sc++)
      chk(int'(y_sec[sc]) == ey[sc], $sformatf("sec %0d y=%0d exp=%0d", sc, y_sec[sc], ey[sc]));
    chk(y == y_sec[N_SEC-1], "y");
  endtask

  initial begin
    real ph;
    chk_coef(27, 0, '{64, -135, 0, 86, -368});
    chk_coef(27, 3, '{135, 36, 0, 86, -368});
    chk_coef(27, 4, '{507, -5, 368, 167, -372});
    chk_coef(27, 7, '{478, 303, 133, 403, -142});
    chk_coef(0, 0, '{3, -3, 0, 1019, -508});
    chk_coef(0, 7, '{355, -700, 345, 1009, -498});
    chk_coef(31, 4, '{667, 942, 379, -596, -291});
    for (int sc = 0; sc < N_SEC; sc++) begin
      m[sc] = '{x0: 0, x1: 0, x2: 0, y1: 0, y2: 0, c: '{0, 0, 0, 0, 0}};
      for (int t = 0; t < 5; t++) m[sc].c[t] = cval(27, sc, t);
    end
    stoch = 0; bin = 0; n = 10; x_in = '0; rnd_x = 1; rnd_c = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(posedge clk); #1;
    op(10, 1000);                    // impulse
    for (int k = 1; k <= N_SEC; k++) begin
      op(10, 0);
      for (int sc = k; sc < N_SEC; sc++)
        chk(y_sec[sc] == 0, $sformatf("latency: sec %0d busy after %0d ops", sc, k));
    end
    // tone at the channel's centre frequency (11.24 kHz at 48 kHz)
    ph = 0.0;
    for (int k = 0; k < 24; k++) begin
      op((k < 16) ? 10 : 5, $rtoi(900.0 * $sin(ph)));
      ph += 2.0 * 3.14159265 * 11239.8 / 48000.0;
    end
    $display("saturations=%0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
