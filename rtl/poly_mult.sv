// poly_mult -- unreduced carry-less (GF(2)[x]) product of two M-bit
// polynomials: prod_k = XOR over i+j = k of a_i & b_j, k = 0..2M-2.
//
// Used by the parity prediction path of the Hamming-protected multiplier,
// which derives its check bits from this raw product rather than from the
// reduced GF result.  Purely combinational.
module poly_mult #(
  parameter int unsigned M = gf_aop_pkg::M_DEFAULT
) (
  input  logic [M-1:0]   a,
  input  logic [M-1:0]   b,
  output logic [2*M-2:0] prod
);

  always_comb begin
    prod = '0;
    for (int unsigned i = 0; i < M; i++)
      for (int unsigned j = 0; j < M; j++)
        prod[i + j] ^= a[i] & b[j];
  end

endmodule
