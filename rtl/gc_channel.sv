// gc_channel: one gammachirp filter of the filterbank.
//
// The gammachirp response is the product of a gammatone filter G_T and an
// asymmetric compensation filter H_C. Both are built as cascades of four
// hybrid stochastic/binary second-order IIR sections (sc_biquad): sections
// 0..3 realise the gammatone filter, sections 4..7 the compensation filter,
// as in the reference design. The coefficients of every section are computed
// at elaboration from the channel index (gc_pkg::sec_coef).
//
// Timing: the input is taken at the end of each binary cycle; each section
// adds one operation of latency, so an input sample reaches `y` N_SEC = 8
// operations after it is taken. `y_sec[s]` is the registered output of
// section s (y_sec[3] is the gammatone output alone). `sat` shows, per section, saturation during
// the binary cycle. All sections share the controller and LFSR signals.
module gc_channel
  import gc_pkg::*;
#(
  parameter int CH  = 27,     // channel index, 0 = 20 Hz .. NCH-1 = 20 kHz
  parameter int NCH = N_CH    // number of channels of the filterbank
) (
  input  logic            clk,
  input  logic            rst_n,
  input  nsel_t           n,
  input  logic            stoch,
  input  logic            bin,
  input  rnd_t            rnd_x,
  input  rnd_t            rnd_c,
  input  sample_t         x_in,    // filterbank input sample
  output sample_t         y,       // channel output (last section)
  output sample_t         y_sec [N_SEC], // output of every section
  output logic [N_SEC-1:0] sat     // per-section saturation flags
);

  sample_t link [N_SEC+1];   // link[s] = input of section s

  assign link[0] = x_in;

  for (genvar s = 0; s < N_SEC; s++) begin : g_sec
    localparam sec_coef_t C = '{sec_coef(CH, NCH, s, 0), sec_coef(CH, NCH, s, 1),
                                sec_coef(CH, NCH, s, 2), sec_coef(CH, NCH, s, 3),
                                sec_coef(CH, NCH, s, 4)};
    sc_biquad #(.COEF(C)) u_sec (
      .clk(clk), .rst_n(rst_n), .n(n), .stoch(stoch), .bin(bin),
      .rnd_x(rnd_x), .rnd_c(rnd_c), .x_in(link[s]),
      .y_new(link[s+1]), .y_out(y_sec[s]), .sat(sat[s]));
  end

  assign y = y_sec[N_SEC-1];

endmodule
