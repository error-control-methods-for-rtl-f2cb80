// tmr_seven_voter -- triple modular redundancy around the AOP multiplier with
// two triplicated voter levels and one final voter (seven voters in all).
//
// Three aop_gf_mult copies share the operands.  Voters V1, V2 and V3 each
// take the majority of the three products; voters Va, Vb and Vc each take
// the majority of V1..V3; the final voter Vf takes the majority of Va..Vc.
// A single fault in one multiplier copy or in any one of V1..V3 or Va..Vc is
// masked.  Only Vf can still pass a fault straight to the output, although
// the original description claims every single voter fault is masked; the
// voter arrangement itself is the published one.
//
// Fault injection (this design's own addition): fault_mod[i] is XORed onto
// the product of copy i; fault_vote[0..2] onto V1..V3, fault_vote[3..5] onto
// Va..Vc and fault_vote[6] onto Vf.  Tie to zero in normal use.
//
// Interface: a, b operands; c final product.  Purely combinational.
module tmr_seven_voter #(
  parameter int unsigned M = gf_aop_pkg::M_DEFAULT
) (
  input  logic [M-1:0]        a,
  input  logic [M-1:0]        b,
  input  logic [2:0][M-1:0]   fault_mod,
  input  logic [6:0][M-1:0]   fault_vote,
  output logic [M-1:0]        c
);

  logic [2:0][M-1:0] raw, prod;     // multiplier copies
  logic [2:0][M-1:0] v1_raw, v1;    // first level V1..V3
  logic [2:0][M-1:0] v2_raw, v2;    // second level Va..Vc
  logic [M-1:0]      vf_raw;        // final voter Vf

  for (genvar i = 0; i < 3; i++) begin : g_mod
    aop_gf_mult #(.M(M)) u_mult (.a(a), .b(b), .c(raw[i]));
    assign prod[i] = raw[i] ^ fault_mod[i];
  end

  for (genvar i = 0; i < 3; i++) begin : g_lvl1
    maj_voter #(.W(M)) u_vote (.x(prod[0]), .y(prod[1]), .z(prod[2]), .o(v1_raw[i]));
    assign v1[i] = v1_raw[i] ^ fault_vote[i];
  end

  for (genvar i = 0; i < 3; i++) begin : g_lvl2
    maj_voter #(.W(M)) u_vote (.x(v1[0]), .y(v1[1]), .z(v1[2]), .o(v2_raw[i]));
    assign v2[i] = v2_raw[i] ^ fault_vote[3 + i];
  end

  maj_voter #(.W(M)) u_vf (.x(v2[0]), .y(v2[1]), .z(v2[2]), .o(vf_raw));

  assign c = vf_raw ^ fault_vote[6];

endmodule
