// maj_voter -- bitwise 2-out-of-3 majority voter for triple modular
// redundancy.
//
// Each output bit is o = x&y | y&z | x&z, the carry function of a full
// adder, so any single input copy that disagrees with the other two is
// outvoted bit by bit, as in the published voter.  W is the word width
// (the 4-bit multiplier output by default; making it a parameter is this
// design's own generalisation).  Purely combinational.
module maj_voter #(
  parameter int unsigned W = gf_aop_pkg::M_DEFAULT
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] o
);

  always_comb o = (x & y) | (y & z) | (x & z);

endmodule
