// tb_sec1_163hz: first-section output for a 163 Hz tone at N_sto = 1023,
// the setting used to show the effect of fixed random-number generation.
// The tone (amplitude 800) drives the channel nearest 163 Hz (index 3,
// 152 Hz) for 700 operations. The first section's output y_sec[0] is
// compared bit for bit with the reference model, and against an ideal
// floating-point section with unrounded coefficients the error RMS is
// reported. The checks: the model matches, the output follows the tone (it
// changes sign and does not sit in saturation), and running the same input
// a second time from reset reproduces the output exactly (same random
// sequence in every operation).
module tb_sec1_163hz;
  import gc_pkg::*;
  int checks = 0, failures = 0;
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
  int first_run [700];

  localparam int CH = 3;

  gc_channel #(.CH(CH), .NCH(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic op(input int xn, output int y1);
    int v;
    bit s;
    for (int t = 0; t < 1023; t++) begin
      stoch = 1; bin = 0;
      rnd_x = rnd_t'(r[t]); rnd_c = rnd_t'(u[t]);
      @(posedge clk); #1;
    end
    stoch = 0; bin = 1; x_in = sample_t'(xn);
    v = xn;
    for (int sc = 0; sc < N_SEC; sc++) v = gc_ref_pkg::sec_step(m[sc], v, 10, r, u, s);
    @(posedge clk); #1;
    y1 = m[0].y1;
    chk(int'(y_sec[0]) == y1 && int'(y) == v, $sformatf("y1=%0d exp=%0d", y_sec[0], y1));
  endtask

  task automatic run(input int pass);
    real ph, fx0, fx1, fx2, fy1, fy2, fy, err, pwr;
    real c [5];
    int y1, sign_changes, n_sat, prev;
    for (int t = 0; t < 5; t++) c[t] = sec_tap_real(CH, 32, 0, t);
    rst_n = 0; stoch = 0; bin = 0; x_in = '0;
    for (int sc = 0; sc < N_SEC; sc++) begin
      m[sc].x0 = 0; m[sc].x1 = 0; m[sc].x2 = 0; m[sc].y1 = 0; m[sc].y2 = 0;
    end
    @(negedge clk) rst_n = 1;
    @(posedge clk); #1;
    ph = 0.0; fx0 = 0; fx1 = 0; fx2 = 0; fy1 = 0; fy2 = 0;
    err = 0.0; pwr = 0.0; sign_changes = 0; n_sat = 0; prev = 0;
    for (int k = 0; k < 700; k++) begin
      int xn;
      xn = $rtoi(800.0 * $sin(ph));
      ph += 2.0 * 3.14159265358979 * 163.0 / 48000.0;
      op(xn, y1);
      // ideal section: output of the sample held during this operation
      fy = c[0] * fx0 + c[1] * fx1 + c[2] * fx2 + c[3] * fy1 + c[4] * fy2;
      fx2 = fx1; fx1 = fx0; fx0 = real'(xn); fy2 = fy1; fy1 = fy;
      if (pass == 0) first_run[k] = y1;
      else chk(first_run[k] == y1, $sformatf("repeat k=%0d", k));
      if (k >= 300) begin
        err += (real'(y1) - fy) * (real'(y1) - fy);
        pwr += fy * fy;
        if ((y1 < 0) != (prev < 0)) sign_changes++;
        if (y1 == 1023 || y1 == -1023) n_sat++;
      end
      prev = y1;
    end
    $display("pass %0d: ideal RMS %0.1f, error RMS %0.1f, sign changes %0d, saturated %0d of 400",
             pass, $sqrt(pwr / 400.0), $sqrt(err / 400.0), sign_changes, n_sat);
    chk(sign_changes >= 4, "output follows the tone");
    chk(n_sat < 40, "output not stuck in saturation");
  endtask

  initial begin
    for (int sc = 0; sc < N_SEC; sc++) begin
      m[sc] = '{x0: 0, x1: 0, x2: 0, y1: 0, y2: 0, c: '{0, 0, 0, 0, 0}};
      for (int t = 0; t < 5; t++) begin
        coef_t cf;
        cf = sec_coef(CH, 32, sc, t);
        m[sc].c[t] = cf.sign ? -int'(cf.mag) : int'(cf.mag);
      end
    end
    n = 10;
    gc_ref_pkg::seq(10, 1'b0, r);
    gc_ref_pkg::seq(10, 1'b1, u);
    repeat (2) @(posedge clk);
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
