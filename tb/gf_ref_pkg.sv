// gf_ref_pkg -- reference models for the testbenches, written independently
// of the RTL's algorithms.
//
// gf_mul_ref multiplies by shift-and-add, reducing after every shift with
// x^m = 1 + x + ... + x^(m-1) (the all-one polynomial), instead of the
// RTL's cyclic convolution in the extended basis.  ham_col gives the
// column of the (7,4) parity-check matrix for each product bit, and
// ham_checks the check bits of a product as the XOR of the columns of its
// set bits, instead of the RTL's row equations.
package gf_ref_pkg;

  typedef logic [127:0] wide_t;

  function automatic wide_t gf_mul_ref(input wide_t a, input wide_t b, input int m);
    wide_t acc, sh, mask;
    mask = (wide_t'(1) << m) - 1;
    acc  = '0;
    sh   = a & mask;
    for (int i = 0; i < m; i++) begin
      if (b[i]) acc ^= sh;
      // sh = sh * x mod f
      sh = sh << 1;
      if (sh[m]) sh = (sh & mask) ^ mask;
    end
    return acc;
  endfunction

  // Syndrome pattern {s2,s1,s0} produced by an error in product bit k.
  function automatic logic [2:0] ham_col(input int k);
    case (k)
      0:       return 3'b011;
      1:       return 3'b101;
      2:       return 3'b110;
      default: return 3'b111;
    endcase
  endfunction

  function automatic logic [2:0] ham_checks(input logic [3:0] c);
    logic [2:0] r;
    r = '0;
    for (int k = 0; k < 4; k++)
      if (c[k]) r ^= ham_col(k);
    return r;
  endfunction

endpackage
