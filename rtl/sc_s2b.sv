// sc_s2b: stochastic-to-binary converter.
//
// Counts the ones of a product stream during the N_sto stochastic cycles of
// an operation and, in the binary cycle, presents the count as a signed
// binary value in sample units: count << (MAG_W - n + COEF_EXP) (a count of
// N_sto over a stream of length N_sto stands for 2^(MAG_W + COEF_EXP) sample
// LSBs, since one operand is a coefficient with COEF_EXP integer bits). The
// result is negated when the sign bit is 1. Counting for N_sto cycles and
// applying the sign afterwards follow the reference design; the scaling is
// this design's choice.
//
// Timing: `en` high counts `s_bit`; `clr` (the binary cycle) restarts the
// count at zero for the next operation. `y` is valid while `clr` is high.
module sc_s2b
  import gc_pkg::*;
#(
  parameter int OUT_W = SIG_W + COEF_EXP + 1   // width of the signed result
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  nsel_t                   n,       // LFSR width in use
  input  logic                    en,      // stochastic cycle: count
  input  logic                    clr,     // binary cycle: restart count
  input  logic                    s_bit,   // product stream bit
  input  logic                    s_sign,  // product sign
  output logic signed [OUT_W-1:0] y        // signed binary value
);

  logic [CNT_W-1:0] cnt;
  logic [OUT_W-1:0] mag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               cnt <= '0;
    else if (clr)             cnt <= '0;
    else if (en && s_bit)     cnt <= cnt + 1'b1;
  end

  always_comb begin
    mag = OUT_W'(cnt) << (nsel_t'(MAG_W + COEF_EXP) - n);
    y   = s_sign ? -$signed(mag) : $signed(mag);
  end

endmodule
