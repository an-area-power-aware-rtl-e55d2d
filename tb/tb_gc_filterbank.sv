// tb_gc_filterbank: end-to-end test of the 32-channel filterbank at its
// default size. The filterbank runs on its own controller and LFSR; the
// testbench supplies one sample per operation when x_take is high and
// compares all 32 channel outputs (at y_valid) and the saturation flags with
// the reference model of 32 x 8 sections. It walks through the mechanisms of
// the design and counts each: an impulse and its 8-operation latency, a tone
// mixture, changes of the stream length N_sto (10 -> 6 -> 3 -> 10 bits,
// each restarting the LFSR), out-of-range N_sto requests that are clamped,
// and saturation. It also checks that an operation lasts 2^n cycles.
module tb_gc_filterbank;
  import gc_pkg::*;
  int checks = 0, failures = 0;
  int n_reseed = 0, n_clamp = 0, n_sat = 0, n_ops = 0, n_lat = 0;
  logic clk = 0, rst_n = 0;
  nsel_t n_sel, n_cur;
  sample_t x_in;
  logic x_take, y_valid;
  sample_t y [N_CH];
  logic [N_CH-1:0] sat_any;
  int r [1023];
  int u [1023];
  gc_ref_pkg::sec_t m [N_CH][N_SEC];
  int ey [N_CH];
  bit esat [N_CH];
  int n_model;

  gc_filterbank dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Wait for the binary cycle, give the sample, request width req for the
  // next operation and check the operation against the model.
  task automatic op(input int xn, input int req);
    int len, v, next_n;
    bit s;
    len = 0;
    while (!x_take) begin
      len++;
      @(posedge clk); #1;
    end
    len++;
    chk(int'(n_cur) == n_model, $sformatf("n_cur=%0d exp=%0d", n_cur, n_model));
    if (n_ops > 0)
      chk(len == (1 << n_model), $sformatf("op length %0d for n=%0d", len, n_model));
    x_in = sample_t'(xn);
    n_sel = nsel_t'(req);
    // model of this operation
    gc_ref_pkg::seq(n_model, 1'b0, r);
    gc_ref_pkg::seq(n_model, 1'b1, u);
    for (int c = 0; c < N_CH; c++) begin
      v = xn; esat[c] = 0;
      for (int sc = 0; sc < N_SEC; sc++) begin
        v = gc_ref_pkg::sec_step(m[c][sc], v, n_model, r, u, s);
        esat[c] |= s;
      end
      ey[c] = v;
    end
    next_n = (req < N_MIN) ? N_MIN : (req > N_MAX) ? N_MAX : req;
    n_reseed += int'(next_n != n_model);
    n_clamp  += int'(next_n != req);
    n_model = next_n;
    @(posedge clk); #1;
    chk(y_valid == 1'b1, "y_valid");
    for (int c = 0; c < N_CH; c++) begin
      chk(int'(y[c]) == ey[c], $sformatf("op %0d ch %0d y=%0d exp=%0d", n_ops, c, y[c], ey[c]));
      chk(sat_any[c] == esat[c], $sformatf("op %0d ch %0d sat", n_ops, c));
      n_sat += int'(esat[c]);
    end
    n_ops++;
  endtask

  initial begin
    real ph1, ph2;
    int any;
    for (int c = 0; c < N_CH; c++)
      for (int sc = 0; sc < N_SEC; sc++) begin
        m[c][sc] = '{x0: 0, x1: 0, x2: 0, y1: 0, y2: 0, c: '{0, 0, 0, 0, 0}};
        for (int t = 0; t < 5; t++) begin
          coef_t cf;
          cf = sec_coef(c, N_CH, sc, t);
          m[c][sc].c[t] = cf.sign ? -int'(cf.mag) : int'(cf.mag);
        end
      end
    n_model = N_MAX;
    n_sel = 10; x_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(posedge clk); #1;
    // impulse, then watch it reach the outputs after 8 operations
    op(1023, 10);
    for (int k = 1; k <= N_SEC; k++) begin
      op(0, 10);
      any = 0;
      for (int c = 0; c < N_CH; c++) any |= int'(y[c] != 0);
      if (k < N_SEC) chk(any == 0, $sformatf("output before latency, op %0d", k));
      else n_lat += any;
    end
    // tone mixture at full stream length, then shorter streams
    ph1 = 0.0; ph2 = 0.0;
    for (int k = 0; k < 36; k++) begin
      int req;
      req = (k < 12) ? 10 : (k < 22) ? 6 : (k < 27) ? 0 : (k < 32) ? 15 : 8;
      op($rtoi(600.0 * $sin(ph1) + 400.0 * $sin(ph2)), req);
      ph1 += 2.0 * 3.14159265 * 4019.4 / 48000.0;
      ph2 += 2.0 * 3.14159265 * 663.3 / 48000.0;
    end
    op(-1024, 10);
    op(1023, 10);
    op(0, 10);
    $display("ops=%0d reseeds=%0d clamps=%0d saturations=%0d impulse_seen=%0d",
             n_ops, n_reseed, n_clamp, n_sat, n_lat);
    chk(n_reseed > 0, "stream length change exercised");
    chk(n_clamp > 0, "clamped request exercised");
    chk(n_sat > 0, "saturation exercised");
    chk(n_lat > 0, "impulse reached the outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
