// parity_predictor_tb -- for all 256 operand pairs the predicted check bits
// must equal the (7,4) check bits of the reference GF(2^4) product.
module parity_predictor_tb;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] a, b, r;
  logic [2:0] p;

  parity_predictor dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a, b} = 8'(i);
      #1;
      r = 4'(gf_mul_ref(wide_t'(a), wide_t'(b), 4));
      checks++;
      if (p !== ham_checks(r)) begin
        failures++;
        $display("a=%h b=%h p=%b expected %b", a, b, p, ham_checks(r));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
