// tb_frng_lfsr: fixed random-number generator. For every width n: the state
// sequence matches the reference LFSR, visits every value 1 .. 2^n - 1 once,
// and comes back to the seed after exactly N_sto = 2^n - 1 steps, so the
// next operation repeats the same sequence (checked over two operations);
// the second output is the bit-reversed state and also covers every value
// once. Also checks hold (adv low) and reseed (load) from mid-sequence.
module tb_frng_lfsr;
  import gc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  nsel_t n;
  logic load, adv;
  rnd_t rnd, rnd_rev;

  frng_lfsr dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int e, nsto;
    bit seen_a [1024];
    bit seen_b [1024];
    load = 0; adv = 0; n = 10;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int nv = N_MIN; nv <= N_MAX; nv++) begin
      n = nsel_t'(nv); load = 1; adv = 0;
      @(posedge clk); #1;
      load = 0;
      nsto = (1 << nv) - 1;
      e = 1;
      foreach (seen_a[i]) begin seen_a[i] = 0; seen_b[i] = 0; end
      for (int op = 0; op < 2; op++) begin
        for (int t = 0; t < nsto; t++) begin
          adv = 1;
          chk(int'(rnd) == e && int'(rnd_rev) == gc_ref_pkg::bitrev(e, nv),
              $sformatf("seq n=%0d t=%0d rnd=%0d exp=%0d", nv, t, rnd, e));
          if (op == 0) begin
            chk(!seen_a[rnd] && !seen_b[rnd_rev] && rnd != 0 && rnd_rev != 0,
                $sformatf("repeat n=%0d t=%0d", nv, t));
            seen_a[rnd] = 1; seen_b[rnd_rev] = 1;
          end
          e = gc_ref_pkg::lfsr_next(e, nv);
          @(posedge clk); #1;
        end
        // binary cycle: hold at the seed
        adv = 0;
        chk(rnd == 1, $sformatf("period n=%0d", nv));
        @(posedge clk); #1;
        chk(rnd == 1, $sformatf("hold n=%0d", nv));
      end
    end
    // reseed from the middle of a sequence
    n = 10; adv = 1;
    repeat (17) @(posedge clk);
    #1; adv = 0; load = 1;
    @(posedge clk); #1; load = 0;
    chk(rnd == 1 && rnd_rev == 10'h200, "reseed");
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
