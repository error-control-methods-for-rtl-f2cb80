// aop_mult_hamming -- GF(2^4) all-one-polynomial multiplier with parity
// prediction and single-error correction of its output.
//
// Two paths run side by side from the operands.  The main path is the
// standard aop_gf_mult.  The check path, parity_predictor, multiplies the
// operands as plain polynomials and predicts the three Hamming check bits
// of the correct product.  gf_parity_gen recomputes the same check bits from
// the main path's actual output, hamming_block turns the difference into a
// syndrome and a one-hot correction vector h, and c = c_raw ^ h.  One wrong
// product bit is corrected; a fault in the predicted checks is flagged but
// leaves the product untouched.  Two or more wrong product bits are beyond
// the code and may be miscorrected.  Only the syndrome decode and the
// correcting XOR add delay to the multiplier.
//
// Fault injection (this design's own addition): fault_mult is XORed onto
// the main multiplier output and fault_par onto the predicted check bits.
// Tie both to zero in normal use.
//
// Interface: a, b 4-bit operands; c corrected product; c_raw uncorrected
// product; syndrome {s2,s1,s0}; err = error detected.  Combinational.
module aop_mult_hamming (
  input  gf_aop_pkg::gf4_t  a,
  input  gf_aop_pkg::gf4_t  b,
  input  gf_aop_pkg::gf4_t  fault_mult,
  input  gf_aop_pkg::ham_chk_t fault_par,
  output logic [3:0] c,
  output logic [3:0] c_raw,
  output logic [2:0] syndrome,
  output logic       err
);

  gf_aop_pkg::gf4_t    mult_out;
  gf_aop_pkg::ham_chk_t p_pred, p, pp;
  gf_aop_pkg::gf4_t    h;

  aop_gf_mult #(.M(4)) u_mult (.a(a), .b(b), .c(mult_out));
  assign c_raw = mult_out ^ fault_mult;

  parity_predictor u_pred (.a(a), .b(b), .p(p_pred));
  assign p = p_pred ^ fault_par;

  gf_parity_gen u_gpar (.c(c_raw), .pp(pp));

  hamming_block u_ham (.p(p), .pp(pp), .syndrome(syndrome), .h(h), .err(err));

  assign c = c_raw ^ h;

endmodule
