// frng_lfsr: fixed random-number generator (FRNG) for the B2S converters.
//
// A Fibonacci LFSR whose active width n (N_MIN..N_MAX) is chosen at run time.
// With a maximal-length polynomial of width n the state sequence has period
// 2^n - 1 = N_sto, exactly the number of stochastic cycles of one operation.
// The LFSR advances only during the stochastic cycles, so it comes back to
// the same state at the start of every operation and every operation sees
// the same random sequence; this is the FRNG idea of the reference design
// (LFSR width log2(N_cyc), period N_sto).
//
// Two random values come out of the one register: `rnd`, the state itself,
// drives the operand B2S converters, and `rnd_rev`, the same n bits in
// reversed order, drives the coefficient B2S converters. Bit reversal keeps
// every value 1 .. 2^n - 1 once per period but breaks the shift-register
// relation between successive values, so the two stream families are nearly
// uncorrelated and the AND gate multiplies. The polynomials, the seed (1),
// reseeding when n changes and the bit-reversed second output are this
// design's choices.
//
// Interface: `adv` steps the LFSR one state; `load` (priority) restarts it
// from the seed and is raised by the controller when n changes. Both
// outputs lie in 1 .. 2^n - 1 with the bits above n at zero.
module frng_lfsr
  import gc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  nsel_t n,        // active width, N_MIN..N_MAX
  input  logic  load,     // restart from the seed
  input  logic  adv,      // advance one state
  output rnd_t  rnd,      // random value for operand streams
  output rnd_t  rnd_rev   // bit-reversed value for coefficient streams
);

  rnd_t state, mask, width_mask, full_rev;
  logic fb;

  always_comb begin
    mask       = lfsr_mask(int'(n));
    width_mask = rnd_t'((11'd1 << n) - 11'd1);
    fb         = ^(state & mask);
    for (int i = 0; i < N_MAX; i++) full_rev[i] = state[N_MAX-1-i];
    rnd_rev    = full_rev >> (nsel_t'(N_MAX) - n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= rnd_t'(1);
    else if (load) state <= rnd_t'(1);
    else if (adv)  state <= ((state << 1) | rnd_t'(fb)) & width_mask;
  end

  assign rnd = state;

endmodule
