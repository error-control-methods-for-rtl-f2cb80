// hamming_block_tb -- exhaustive over both 3-bit check words: the syndrome
// must be their XOR, err must flag a non-zero syndrome, and h must mark the
// product bit whose check-matrix column equals the syndrome (none when the
// syndrome is zero or has a single one).
module hamming_block_tb;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [2:0] p, pp, syndrome, s;
  logic [3:0] h, exp_h;
  logic       err;

  hamming_block dut (.p(p), .pp(pp), .syndrome(syndrome), .h(h), .err(err));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      {p, pp} = 6'(i);
      #1;
      s = p ^ pp;
      exp_h = '0;
      for (int k = 0; k < 4; k++)
        if (s == ham_col(k)) exp_h[k] = 1'b1;
      checks += 3;
      if (syndrome !== s)      begin failures++; $display("syndrome %b vs %b", syndrome, s); end
      if (h !== exp_h)         begin failures++; $display("s=%b h=%b expected %b", s, h, exp_h); end
      if (err !== (s != 3'b0)) begin failures++; $display("s=%b err=%b", s, err); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
