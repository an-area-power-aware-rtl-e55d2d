// sc_biquad: second-order IIR section in hybrid stochastic/binary arithmetic.
//
//   y[t] = b0 x[t] + b1 x[t-1] + b2 x[t-2] - a1 y[t-1] - a2 y[t-2]
//
// Each of the five products is formed in the stochastic domain: the operand
// (x[t], x[t-1], x[t-2], y[t-1] or y[t-2]) and its coefficient each go
// through a B2S converter (operands compare with the LFSR value,
// coefficients with its bit-reversed value), an AND/XOR multiplier
// combines them, and an S2B counter turns the product stream back into a
// signed binary number. The five binary products are then added in the
// binary domain, as in the reference design. The sum is saturated to the
// sample range +-(2^MAG_W - 1) (this design's choice: the B2S magnitude has
// MAG_W bits).
//
// Coefficients are fixed per instance (parameter COEF, order b0, b1, b2,
// -a1, -a2, sign/magnitude with COEF_EXP integer bits); the default is the
// first gammatone section of channel index 27.
//
// Timing: during an operation the section works on the samples it holds.
// In the binary cycle (`bin`) `y_new` carries the new output y[t]; at the end
// of that cycle the delay line shifts, `x_in` is taken as the next x[t], and
// `y_out` (registered) becomes y[t]. A cascade therefore adds one operation
// of latency per section. `sat` flags, during `bin`, that y[t] was clipped.
module sc_biquad
  import gc_pkg::*;
#(
  parameter sec_coef_t COEF = '{sec_coef(27, N_CH, 0, 0), sec_coef(27, N_CH, 0, 1),
                                sec_coef(27, N_CH, 0, 2), sec_coef(27, N_CH, 0, 3),
                                sec_coef(27, N_CH, 0, 4)}
) (
  input  logic    clk,
  input  logic    rst_n,
  input  nsel_t   n,       // LFSR width in use
  input  logic    stoch,   // stochastic cycle
  input  logic    bin,     // binary cycle
  input  rnd_t    rnd_x,   // signal-stream LFSR value
  input  rnd_t    rnd_c,   // coefficient-stream LFSR value
  input  sample_t x_in,    // next input sample, taken at the end of `bin`
  output sample_t y_new,   // y[t], valid during `bin`
  output sample_t y_out,   // registered output, y of the previous operation
  output logic    sat      // y_new was saturated (during `bin`)
);

  localparam int PW  = SIG_W + COEF_EXP + 1;     // product width
  localparam int SW  = PW + 3;                   // sum of five products
  localparam int YMX = (1 << MAG_W) - 1;

  sample_t x0, x1, x2, y1, y2;
  sample_t opnd [N_TAPS];
  logic    o_bit [N_TAPS], o_sgn [N_TAPS];
  logic    c_bit [N_TAPS], c_sgn [N_TAPS];
  logic    p_bit [N_TAPS], p_sgn [N_TAPS];
  logic signed [PW-1:0] prod [N_TAPS];
  logic signed [SW-1:0] acc;

  always_comb begin
    opnd[0] = x0;
    opnd[1] = x1;
    opnd[2] = x2;
    opnd[3] = y1;
    opnd[4] = y2;
  end

  for (genvar i = 0; i < N_TAPS; i++) begin : g_tap
    localparam sample_t CVAL = COEF[i].sign ? -sample_t'({1'b0, COEF[i].mag})
                                            :  sample_t'({1'b0, COEF[i].mag});
    sc_b2s u_b2s_x (.x(opnd[i]), .n(n), .rnd(rnd_x), .s_bit(o_bit[i]), .s_sign(o_sgn[i]));
    sc_b2s u_b2s_c (.x(CVAL),    .n(n), .rnd(rnd_c), .s_bit(c_bit[i]), .s_sign(c_sgn[i]));
    sc_mult u_mult (.a_bit(o_bit[i]), .a_sign(o_sgn[i]), .b_bit(c_bit[i]), .b_sign(c_sgn[i]),
                    .p_bit(p_bit[i]), .p_sign(p_sgn[i]));
    sc_s2b #(.OUT_W(PW)) u_s2b (.clk(clk), .rst_n(rst_n), .n(n), .en(stoch), .clr(bin),
                                .s_bit(p_bit[i]), .s_sign(p_sgn[i]), .y(prod[i]));
  end

  always_comb begin
    acc = '0;
    for (int i = 0; i < N_TAPS; i++) acc += SW'(prod[i]);
    if (acc > SW'(YMX)) begin
      y_new = sample_t'(YMX);
      sat   = bin;
    end else if (acc < -SW'(YMX)) begin
      y_new = sample_t'(-YMX);
      sat   = bin;
    end else begin
      y_new = sample_t'(acc);
      sat   = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x0 <= '0; x1 <= '0; x2 <= '0; y1 <= '0; y2 <= '0;
    end else if (bin) begin
      x0 <= x_in;
      x1 <= x0;
      x2 <= x1;
      y1 <= y_new;
      y2 <= y1;
    end
  end

  assign y_out = y1;

endmodule
