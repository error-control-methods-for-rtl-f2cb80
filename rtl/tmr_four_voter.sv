// tmr_four_voter -- triple modular redundancy around the AOP multiplier with
// triplicated voters and one final voter (four voters in all).
//
// Three aop_gf_mult copies share the operands.  Voters V1, V2 and V3 each
// take the majority of all three products; a final voter Va takes the
// majority of V1..V3.  A fault in one multiplier copy, or in one of V1..V3,
// is masked; Va remains a single point of failure.  The voter arrangement
// is the published one.
//
// Fault injection (this design's own addition): fault_mod[i] is XORed onto
// the product of copy i; fault_vote[0..2] onto the outputs of V1..V3 and
// fault_vote[3] onto the output of Va.  Tie to zero in normal use.
//
// Interface: a, b operands; c final product.  Purely combinational.
module tmr_four_voter #(
  parameter int unsigned M = gf_aop_pkg::M_DEFAULT
) (
  input  logic [M-1:0]        a,
  input  logic [M-1:0]        b,
  input  logic [2:0][M-1:0]   fault_mod,
  input  logic [3:0][M-1:0]   fault_vote,
  output logic [M-1:0]        c
);

  logic [2:0][M-1:0] raw, prod;     // multiplier copies
  logic [2:0][M-1:0] v_raw, v;      // first-level voters V1..V3
  logic [M-1:0]      va_raw;        // final voter Va

  for (genvar i = 0; i < 3; i++) begin : g_mod
    aop_gf_mult #(.M(M)) u_mult (.a(a), .b(b), .c(raw[i]));
    assign prod[i] = raw[i] ^ fault_mod[i];
  end

  for (genvar i = 0; i < 3; i++) begin : g_v1
    maj_voter #(.W(M)) u_vote (.x(prod[0]), .y(prod[1]), .z(prod[2]), .o(v_raw[i]));
    assign v[i] = v_raw[i] ^ fault_vote[i];
  end

  maj_voter #(.W(M)) u_va (.x(v[0]), .y(v[1]), .z(v[2]), .o(va_raw));

  assign c = va_raw ^ fault_vote[3];

endmodule
