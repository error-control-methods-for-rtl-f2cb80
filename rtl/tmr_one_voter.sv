// tmr_one_voter -- triple modular redundancy around the AOP multiplier with a
// single majority voter.
//
// Three identical aop_gf_mult copies receive the same operands; one
// maj_voter compares their products bit by bit and passes on the majority.
// A soft error confined to one multiplier copy therefore never reaches c,
// but the voter itself is a single point of failure.  The arrangement of
// copies and voter is the published one.
//
// Fault injection (this design's own addition, for testing the masking):
// fault_mod[i] is XORed onto the product of copy i and fault_vote[0] onto
// the voter output.  Tie both to zero in normal use.
//
// Interface: a, b operands; c voted product.  Purely combinational.
module tmr_one_voter #(
  parameter int unsigned M = gf_aop_pkg::M_DEFAULT
) (
  input  logic [M-1:0]        a,
  input  logic [M-1:0]        b,
  input  logic [2:0][M-1:0]   fault_mod,
  input  logic [0:0][M-1:0]   fault_vote,
  output logic [M-1:0]        c
);

  logic [2:0][M-1:0] prod;   // product of each copy, after injection
  logic [2:0][M-1:0] raw;    // product of each copy
  logic [M-1:0]      voted;

  for (genvar i = 0; i < 3; i++) begin : g_mod
    aop_gf_mult #(.M(M)) u_mult (.a(a), .b(b), .c(raw[i]));
    assign prod[i] = raw[i] ^ fault_mod[i];
  end

  maj_voter #(.W(M)) u_vote (.x(prod[0]), .y(prod[1]), .z(prod[2]), .o(voted));

  assign c = voted ^ fault_vote[0];

endmodule
