// tb_sc_op_ctrl: operation sequencer. Checks that an operation lasts
// N_cyc = 2^n cycles with exactly one binary cycle at its end, that
// out_valid follows the binary cycle, that a new n is taken only in the
// binary cycle (clamped to N_MIN..N_MAX) and that reseed marks a change.
module tb_sc_op_ctrl;
  import gc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  nsel_t n_req, n;
  logic stoch, bin, reseed, out_valid;

  sc_op_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Run one operation; n_req is changed mid-operation to req.
  task automatic op(input int req, input int exp_n_now, input bit first = 0);
    int len, exp_next;
    bit prev_bin;
    len = 0;
    exp_next = (req < N_MIN) ? N_MIN : (req > N_MAX) ? N_MAX : req;
    prev_bin = !first;
    do begin
      if (len == 2) n_req = nsel_t'(req);
      chk(int'(n) == exp_n_now, $sformatf("n=%0d exp=%0d", n, exp_n_now));
      chk(stoch == !bin, "stoch/bin");
      chk(out_valid == prev_bin, "out_valid");
      chk(reseed == (bin && exp_next != exp_n_now), "reseed");
      prev_bin = bin;
      len++;
      @(posedge clk); #1;
    end while (!prev_bin || len == 0);
    chk(len == (1 << exp_n_now), $sformatf("length %0d for n=%0d", len, exp_n_now));
    chk(int'(n) == exp_next, "n update");
  endtask

  initial begin
    n_req = 10;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // first operation after reset starts at cnt 0 with out_valid low
    op(10, 10, 1);
    op(5, 10);
    op(5, 5);
    op(0, 5);     // clamped to N_MIN
    op(15, 3);    // clamped to N_MAX
    op(7, 10);
    op(3, 7);
    op(3, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
