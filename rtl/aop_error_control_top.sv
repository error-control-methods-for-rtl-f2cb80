// aop_error_control_top -- the four error-controlled GF(2^4) all-one-
// polynomial multipliers side by side on shared operands.
//
//   c_tmr1  triple modular redundancy, one voter          (tmr_one_voter)
//   c_tmr4  TMR, three voters plus a final voter          (tmr_four_voter)
//   c_tmr7  TMR, two levels of three voters plus a final  (tmr_seven_voter)
//   c_ham   parity prediction with Hamming correction     (aop_mult_hamming)
//
// The variants are alternatives that trade area, power and delay against
// each other; they are placed in one top only so that they can be built,
// compared and fault-tested together.  Each variant keeps its own fault
// injection inputs (XOR masks on multiplier copies, voters and check bits,
// this design's own test hook); all of them must be zero in normal use.
//
// Interface: a, b 4-bit operands (polynomial basis, bit k = alpha^k);
// products of the four variants; the Hamming variant's raw product,
// syndrome and error flag.  Fully combinational, no clock or reset.
module aop_error_control_top #(
  parameter int unsigned M = gf_aop_pkg::M_DEFAULT
) (
  input  logic [M-1:0]      a,
  input  logic [M-1:0]      b,
  // fault injection, TMR with one voter
  input  logic [2:0][M-1:0] fi1_mod,
  input  logic [0:0][M-1:0] fi1_vote,
  // fault injection, TMR with four voters
  input  logic [2:0][M-1:0] fi4_mod,
  input  logic [3:0][M-1:0] fi4_vote,
  // fault injection, TMR with seven voters
  input  logic [2:0][M-1:0] fi7_mod,
  input  logic [6:0][M-1:0] fi7_vote,
  // fault injection, Hamming variant
  input  logic [M-1:0]      fih_mult,
  input  logic [2:0]        fih_par,
  output logic [M-1:0]      c_tmr1,
  output logic [M-1:0]      c_tmr4,
  output logic [M-1:0]      c_tmr7,
  output logic [M-1:0]      c_ham,
  output logic [M-1:0]      c_ham_raw,
  output logic [2:0]        ham_syndrome,
  output logic              ham_err
);

  if (M != 4) begin : g_bad_m
    $error("aop_error_control_top: the Hamming variant is defined for M = 4 only");
  end

  tmr_one_voter #(.M(M)) u_tmr1 (
    .a(a), .b(b), .fault_mod(fi1_mod), .fault_vote(fi1_vote), .c(c_tmr1));

  tmr_four_voter #(.M(M)) u_tmr4 (
    .a(a), .b(b), .fault_mod(fi4_mod), .fault_vote(fi4_vote), .c(c_tmr4));

  tmr_seven_voter #(.M(M)) u_tmr7 (
    .a(a), .b(b), .fault_mod(fi7_mod), .fault_vote(fi7_vote), .c(c_tmr7));

  aop_mult_hamming u_ham (
    .a(a[3:0]), .b(b[3:0]), .fault_mult(fih_mult[3:0]), .fault_par(fih_par),
    .c(c_ham), .c_raw(c_ham_raw), .syndrome(ham_syndrome), .err(ham_err));

endmodule
