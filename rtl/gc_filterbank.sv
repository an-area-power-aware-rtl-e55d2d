// gc_filterbank: 32-channel compressive gammachirp filterbank in hybrid
// stochastic/binary arithmetic (top level).
//
// A signed 11-bit audio sample enters once per operation (one operation per
// sample period, f_s = 48 kHz in the reference design) and is filtered by
// NCH gammachirp channels in parallel (gc_channel), whose centre frequencies
// run from 20 Hz to 20 kHz on the ERB-number scale. Every multiplication is
// a stochastic AND/XOR over N_sto = 2^n - 1 clock cycles; every addition is
// binary. The control input `n_sel` sets n and thus N_sto (N_sto = 1023 for
// n = 10): shorter streams cost fewer cycles per sample (less power at the
// same f_s) and lower the accuracy and hence the dynamic range, which is how
// the design realises level-dependent gain compression. One FRNG LFSR is
// shared by all sections: its state feeds the signal-stream comparators and
// its bit-reversed state the coefficient-stream comparators; its period
// equals N_sto so every operation reuses the same random sequence.
//
// Timing: the clock runs at f_s * 2^n. `x_take` is high in the binary cycle,
// at whose end `x_in` is sampled; `y_valid` is high one cycle later, when
// `y` holds the new outputs. A sample taken at one binary cycle reaches `y`
// after 8 operations (one per IIR section). `n_sel` is sampled in the binary
// cycle and applies from the next operation. The sample/valid strobes and
// the parallel output array are this design's choice of interface.
module gc_filterbank
  import gc_pkg::*;
#(
  parameter int NCH = N_CH
) (
  input  logic    clk,
  input  logic    rst_n,
  input  nsel_t   n_sel,          // requested LFSR width, N_sto = 2^n - 1
  input  sample_t x_in,           // input sample
  output logic    x_take,         // x_in is sampled at the end of this cycle
  output sample_t y [NCH],        // channel outputs
  output logic    y_valid,        // y updated (first cycle of an operation)
  output nsel_t   n_cur,          // LFSR width in use
  output logic [NCH-1:0] sat_any  // channel saturated in the last binary cycle
);

  logic stoch, bin, reseed;
  rnd_t rnd_x, rnd_c;
  logic [N_SEC-1:0] sat [NCH];

  sc_op_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .n_req(n_sel), .n(n_cur),
    .stoch(stoch), .bin(bin), .reseed(reseed), .out_valid(y_valid));

  frng_lfsr u_rng (
    .clk(clk), .rst_n(rst_n), .n(n_cur), .load(reseed), .adv(stoch),
    .rnd(rnd_x), .rnd_rev(rnd_c));

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    gc_channel #(.CH(c), .NCH(NCH)) u_ch (
      .clk(clk), .rst_n(rst_n), .n(n_cur), .stoch(stoch), .bin(bin),
      .rnd_x(rnd_x), .rnd_c(rnd_c), .x_in(x_in), .y(y[c]), .y_sec(), .sat(sat[c]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sat_any <= '0;
    else if (bin)
      for (int c = 0; c < NCH; c++) sat_any[c] <= |sat[c];
  end

  assign x_take = bin;

endmodule
