// gf_parity_gen -- Hamming check bits p0'..p2' computed from the 4-bit output
// of the GF multiplier.
//
// With the data bits taken in the code order c1 = c[0], c2 = c[2],
// c3 = c[1], c4 = c[3] (see parity_predictor):
//     p0' = c3^c4^c1   p1' = c4^c2^c1   p2' = c4^c3^c2 .
// c4 enters all three checks and every other data bit exactly two, so each
// single-bit error in c gives a distinct syndrome with at least two ones.
//
// Interface: c product (bit k = coefficient of alpha^k); pp = {p2', p1', p0'}.
// Purely combinational.
module gf_parity_gen (
  input  gf_aop_pkg::gf4_t  c,
  output logic [2:0] pp
);

  logic c1, c2, c3, c4;

  always_comb begin
    c1 = c[0];
    c2 = c[2];
    c3 = c[1];
    c4 = c[3];
    pp[0] = c3 ^ c4 ^ c1;
    pp[1] = c4 ^ c2 ^ c1;
    pp[2] = c4 ^ c3 ^ c2;
  end

endmodule
