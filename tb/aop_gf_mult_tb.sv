// aop_gf_mult_tb -- checks aop_gf_mult against a shift-and-add reference:
// exhaustively for GF(2^4) (the design size) and GF(2^2), and with random
// operands for GF(2^10) and GF(2^12).
module aop_gf_mult_tb;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0]  a4, b4, c4;
  logic [1:0]  a2, b2, c2;
  logic [9:0]  a10, b10, c10;
  logic [11:0] a12, b12, c12;

  aop_gf_mult dut4 (.a(a4), .b(b4), .c(c4));
  aop_gf_mult #(.M(2))  dut2  (.a(a2),  .b(b2),  .c(c2));
  aop_gf_mult #(.M(10)) dut10 (.a(a10), .b(b10), .c(c10));
  aop_gf_mult #(.M(12)) dut12 (.a(a12), .b(b12), .c(c12));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a2 = '0; b2 = '0; a10 = '0; b10 = '0; a12 = '0; b12 = '0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1;
        checks++;
        if (c4 !== 4'(gf_mul_ref(wide_t'(a4), wide_t'(b4), 4))) begin
          failures++;
          $display("M=4 mismatch a=%h b=%h c=%h", a4, b4, c4);
        end
      end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a2 = 2'(i); b2 = 2'(j);
        #1;
        checks++;
        if (c2 !== 2'(gf_mul_ref(wide_t'(a2), wide_t'(b2), 2))) failures++;
      end
    for (int n = 0; n < 500; n++) begin
      a10 = 10'($urandom); b10 = 10'($urandom);
      a12 = 12'($urandom); b12 = 12'($urandom);
      #1;
      checks += 2;
      if (c10 !== 10'(gf_mul_ref(wide_t'(a10), wide_t'(b10), 10))) failures++;
      if (c12 !== 12'(gf_mul_ref(wide_t'(a12), wide_t'(b12), 12))) failures++;
    end
    // alpha^(m+1) = 1: alpha * alpha^(m-1) = alpha^m = all ones
    a4 = 4'b0010; b4 = 4'b1000;
    #1;
    checks++;
    if (c4 !== 4'b1111) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
