// tb_ch28_response: magnitude response of the channel with index 27
// (centre ~11.2 kHz) at the full stream length N_sto = 1023 and at shorter
// streams, the kind of measurement used to judge the filterbank (response of
// one channel over frequency, gain versus N_sto). For each test frequency a
// tone of amplitude 500 runs for 96 operations; the output RMS over the last
// 48 is reported in dB relative to the input. Every output sample is also
// compared with the reference model. The testbench checks that at N_sto =
// 1023 the channel passes its centre frequency near unity gain and at least
// 10 dB better than tones an octave or more away, and that shorter streams
// shrink the dynamic range: at N_sto = 63 a far tone no longer gets through
// while the centre tone does, and at N_sto = 15 even the centre tone is lost.
module tb_ch28_response;
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

  gc_channel #(.CH(27), .NCH(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic op(input int nv, input int xn, output int yo);
    int v;
    bit s;
    n = nsel_t'(nv);
    gc_ref_pkg::seq(nv, 1'b0, r);
    gc_ref_pkg::seq(nv, 1'b1, u);
    for (int t = 0; t < (1 << nv) - 1; t++) begin
      stoch = 1; bin = 0;
      rnd_x = rnd_t'(r[t]); rnd_c = rnd_t'(u[t]);
      @(posedge clk); #1;
    end
    stoch = 0; bin = 1; x_in = sample_t'(xn);
    v = xn;
    for (int sc = 0; sc < N_SEC; sc++) v = gc_ref_pkg::sec_step(m[sc], v, nv, r, u, s);
    @(posedge clk); #1;
    chk(int'(y) == v, $sformatf("t=%0t y=%0d exp=%0d", $time, y, v));
    yo = int'(y);
  endtask

  // Gain in dB of a tone at f [Hz] with width nv, from a cleared state.
  task automatic tone(input real f, input int nv, output real db);
    real ph, acc;
    int yo;
    rst_n = 0;
    stoch = 0; bin = 0; x_in = '0;
    for (int sc = 0; sc < N_SEC; sc++) begin
      m[sc].x0 = 0; m[sc].x1 = 0; m[sc].x2 = 0; m[sc].y1 = 0; m[sc].y2 = 0;
    end
    @(negedge clk) rst_n = 1;
    @(posedge clk); #1;
    ph = 0.0; acc = 0.0;
    for (int k = 0; k < 96; k++) begin
      op(nv, $rtoi(500.0 * $sin(ph)), yo);
      ph += 2.0 * 3.14159265358979 * f / 48000.0;
      if (k >= 48) acc += real'(yo) * real'(yo);
    end
    db = 10.0 * $log10(acc / 48.0 / (500.0 * 500.0 / 2.0) + 1.0e-9);
  endtask

  initial begin
    real g_c, g_lo, g_hi, g_vlo, g_c6, g_lo6, g_c4, g;
    for (int sc = 0; sc < N_SEC; sc++) begin
      m[sc] = '{x0: 0, x1: 0, x2: 0, y1: 0, y2: 0, c: '{0, 0, 0, 0, 0}};
      for (int t = 0; t < 5; t++) begin
        coef_t cf;
        cf = sec_coef(27, 32, sc, t);
        m[sc].c[t] = cf.sign ? -int'(cf.mag) : int'(cf.mag);
      end
    end
    stoch = 0; bin = 0; n = 10; x_in = '0; rnd_x = 1; rnd_c = 1;
    repeat (2) @(posedge clk);
    tone(2000.0, 10, g_vlo);  $display("f=  2000 Hz n=10 gain %6.1f dB", g_vlo);
    tone(5600.0, 10, g_lo);   $display("f=  5600 Hz n=10 gain %6.1f dB", g_lo);
    tone(8000.0, 10, g);      $display("f=  8000 Hz n=10 gain %6.1f dB", g);
    tone(11240.0, 10, g_c);   $display("f= 11240 Hz n=10 gain %6.1f dB", g_c);
    tone(14000.0, 10, g);     $display("f= 14000 Hz n=10 gain %6.1f dB", g);
    tone(22000.0, 10, g_hi);  $display("f= 22000 Hz n=10 gain %6.1f dB", g_hi);
    tone(11240.0, 6, g_c6);   $display("f= 11240 Hz n= 6 gain %6.1f dB", g_c6);
    tone(2000.0, 6, g_lo6);   $display("f=  2000 Hz n= 6 gain %6.1f dB", g_lo6);
    tone(11240.0, 4, g_c4);   $display("f= 11240 Hz n= 4 gain %6.1f dB", g_c4);
    chk(g_c > g_lo + 10.0 && g_c > g_vlo + 10.0, "centre 10 dB above lower tones");
    chk(g_c > g_hi + 10.0, "centre 10 dB above upper tone");
    chk(g_c > -3.0 && g_c < 6.0, "centre gain near unity");
    chk(g_c6 > g_lo6 + 40.0, "short stream: centre passes, far tone suppressed");
    chk(g_c4 < g_c - 40.0, "shortest stream: centre tone lost");
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
