// sc_mult: stochastic multiplier in unipolar coding with sign bits.
//
// Two unipolar bit streams with independent random sources carry |a| and |b|
// as the probability of a '1'; their AND carries |a|*|b|. Negative values
// travel as a separate sign bit per stream, and the product sign is the XOR
// of the two signs (one 2-input AND and one 2-input XOR, as in the reference
// design). Purely combinational; one product bit per clock cycle.
module sc_mult (
  input  logic a_bit,   // stream of |a|
  input  logic a_sign,  // sign of a
  input  logic b_bit,   // stream of |b|
  input  logic b_sign,  // sign of b
  output logic p_bit,   // stream of |a*b|
  output logic p_sign   // sign of a*b
);

  assign p_bit  = a_bit & b_bit;
  assign p_sign = a_sign ^ b_sign;

endmodule
