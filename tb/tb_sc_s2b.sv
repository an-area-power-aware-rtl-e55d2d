// tb_sc_s2b: stochastic-to-binary converter. Feeds random streams for N_sto
// cycles and checks the signed, scaled count presented in the binary cycle,
// and that the count restarts for the next operation.
module tb_sc_s2b;
  import gc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  nsel_t n;
  logic en, clr, s_bit, s_sign;
  logic signed [12:0] y;

  sc_s2b #(.OUT_W(13)) dut (.*);

  always #5 clk = ~clk;

  task automatic op(input int nv, input int dens, input bit sg);
    int ones, exp_v;
    n = nsel_t'(nv); s_sign = sg; ones = 0;
    for (int t = 0; t < (1 << nv) - 1; t++) begin
      en = 1; clr = 0;
      s_bit = ($urandom_range(99) < dens);
      ones += int'(s_bit);
      @(posedge clk); #1;
    end
    en = 0; clr = 1; s_bit = 1;   // binary cycle: s_bit must not count
    #1;
    exp_v = ones << (11 - nv);
    if (sg) exp_v = -exp_v;
    checks++;
    if (int'(y) != exp_v) begin
      failures++;
      $display("FAIL n=%0d ones=%0d y=%0d exp=%0d", nv, ones, y, exp_v);
    end
    @(posedge clk); #1;
  endtask

  initial begin
    en = 0; clr = 0; s_bit = 0; s_sign = 0; n = 10;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(posedge clk); #1;
    op(10, 100, 0); op(10, 0, 1); op(10, 50, 1); op(3, 100, 1); op(5, 30, 0);
    for (int i = 0; i < 20; i++)
      op(int'($urandom_range(10, 3)), int'($urandom_range(100)), 1'($urandom_range(1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
