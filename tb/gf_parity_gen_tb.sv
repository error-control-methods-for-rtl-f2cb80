// gf_parity_gen_tb -- for every 4-bit product the check bits must be the XOR
// of the parity-check-matrix columns of its set bits.
module gf_parity_gen_tb;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] c;
  logic [2:0] pp;

  gf_parity_gen dut (.c(c), .pp(pp));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      c = 4'(i);
      #1;
      checks++;
      if (pp !== ham_checks(c)) begin
        failures++;
        $display("c=%b pp=%b expected %b", c, pp, ham_checks(c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
