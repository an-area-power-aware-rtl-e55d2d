// tb_sc_biquad: hybrid stochastic/binary 2nd-order section. Two sections, one
// with the default coefficients and one with a high-gain set that saturates,
// are driven with random, impulse and full-scale inputs at several stream
// lengths. The testbench produces the LFSR values and the operation timing
// itself and compares y_new (binary cycle), sat and y_out with the
// reference model, operation by operation; it also checks the one-operation
// latency of an impulse and that saturation and n changes were exercised.
module tb_sc_biquad;
  import gc_pkg::*;
  int checks = 0, failures = 0;
  int n_sat = 0, n_switch = 0, n_neg = 0;
  logic clk = 0, rst_n = 0;
  nsel_t n;
  logic stoch, bin;
  rnd_t rnd_x, rnd_c;
  sample_t x_in, y_new_d, y_out_d, y_new_h, y_out_h;
  logic sat_d, sat_h;
  int r [1023];
  int u [1023];
  gc_ref_pkg::sec_t md, mh;

  localparam sec_coef_t HOT = '{'{1'b0, 10'd768}, '{1'b1, 10'd512}, '{1'b0, 10'd256},
                                '{1'b0, 10'd614}, '{1'b1, 10'd307}};

  sc_biquad dut_d (.clk, .rst_n, .n, .stoch, .bin, .rnd_x, .rnd_c, .x_in,
                   .y_new(y_new_d), .y_out(y_out_d), .sat(sat_d));
  sc_biquad #(.COEF(HOT)) dut_h (.clk, .rst_n, .n, .stoch, .bin, .rnd_x, .rnd_c, .x_in,
                   .y_new(y_new_h), .y_out(y_out_h), .sat(sat_h));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One operation of width nv; xn is taken at its end.
  task automatic op(input int nv, input int xn);
    int ed, eh;
    bit sd, sh;
    n = nsel_t'(nv);
    gc_ref_pkg::seq(nv, 1'b0, r);
    gc_ref_pkg::seq(nv, 1'b1, u);
    for (int t = 0; t < (1 << nv) - 1; t++) begin
      stoch = 1; bin = 0;
      rnd_x = rnd_t'(r[t]); rnd_c = rnd_t'(u[t]);
      @(posedge clk); #1;
    end
    stoch = 0; bin = 1; x_in = sample_t'(xn);
    ed = gc_ref_pkg::sec_step(md, xn, nv, r, u, sd);
    eh = gc_ref_pkg::sec_step(mh, xn, nv, r, u, sh);
    #1;
    chk(int'(y_new_d) == ed && sat_d == sd, $sformatf("default n=%0d y=%0d exp=%0d", nv, y_new_d, ed));
    chk(int'(y_new_h) == eh && sat_h == sh, $sformatf("hot n=%0d y=%0d exp=%0d", nv, y_new_h, eh));
    n_sat += int'(sh) + int'(sd);
    n_neg += int'(ed < 0);
    @(posedge clk); #1;
    chk(int'(y_out_d) == ed && int'(y_out_h) == eh, "y_out");
  endtask

  initial begin
    int nv, last_n;
    md.c = '{64, -135, 0, 86, -368};
    mh.c = '{768, -512, 256, 614, -307};
    md.x0 = 0; md.x1 = 0; md.x2 = 0; md.y1 = 0; md.y2 = 0;
    mh = '{x0: 0, x1: 0, x2: 0, y1: 0, y2: 0, c: mh.c};
    stoch = 0; bin = 0; n = 10; x_in = '0; rnd_x = 1; rnd_c = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(posedge clk); #1;
    // impulse: y_new of the next operation is b0 * x
    op(10, 1000);
    op(10, 0);
    chk(y_out_d > 0 && y_out_d < 200, "impulse latency");
    op(10, 0);
    last_n = 10;
    for (int i = 0; i < 30; i++) begin
      nv = (i < 10) ? 10 : (i < 20) ? 6 : int'($urandom_range(10, 3));
      n_switch += int'(nv != last_n);
      last_n = nv;
      op(nv, (i % 7 == 3) ? -1024 : int'($urandom_range(2047)) - 1024);
    end
    chk(n_sat > 0, "saturation exercised");
    chk(n_switch > 0, "n switch exercised");
    chk(n_neg > 0, "negative outputs exercised");
    $display("saturations=%0d switches=%0d negatives=%0d", n_sat, n_switch, n_neg);
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
