// sc_op_ctrl: operation sequencer of the hybrid stochastic/binary datapath.
//
// One operation (one input sample, f_s) lasts N_cyc = 2^n clock cycles:
// N_sto = 2^n - 1 stochastic cycles (`stoch` high: the LFSR steps, B2S/S2B
// stream and count) followed by one binary cycle (`bin` high: S2B results
// are summed, section states and the input sample are taken at the end of
// this cycle). This split, N_sto = N_cyc - 1, follows the reference design;
// the clock is therefore f_s * N_cyc.
//
// The requested LFSR width `n_req` (the N_sto control) is sampled in the
// binary cycle and, clamped to N_MIN..N_MAX, becomes `n` for the next
// operation; when it changes, `reseed` is raised in that binary cycle so the
// LFSR restarts from its seed. `out_valid` is high in the first cycle of
// each operation, when the outputs updated by the previous binary cycle are
// new. The counter is this design's own choice of implementation.
module sc_op_ctrl
  import gc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  nsel_t n_req,     // requested LFSR width (N_sto = 2^n - 1)
  output nsel_t n,         // width in use during this operation
  output logic  stoch,     // stochastic cycle
  output logic  bin,       // binary cycle (last cycle of the operation)
  output logic  reseed,    // restart the LFSR at the end of this cycle
  output logic  out_valid  // first cycle after a binary cycle
);

  logic [N_MAX-1:0] cnt;        // cycle within the operation
  logic [N_MAX-1:0] n_sto;      // 2^n - 1
  nsel_t            n_next;

  always_comb begin
    n_sto = N_MAX'((11'd1 << n) - 11'd1);
    bin   = (cnt == n_sto);
    stoch = !bin;
    if (n_req < nsel_t'(N_MIN))      n_next = nsel_t'(N_MIN);
    else if (n_req > nsel_t'(N_MAX)) n_next = nsel_t'(N_MAX);
    else                             n_next = n_req;
    reseed = bin && (n_next != n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      n         <= nsel_t'(N_MAX);
      out_valid <= 1'b0;
    end else begin
      out_valid <= bin;
      if (bin) begin
        cnt <= '0;
        n   <= n_next;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
