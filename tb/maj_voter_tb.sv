// maj_voter_tb -- exhaustive check of the 4-bit majority voter: each output
// bit must be 1 exactly when at least two of the three input bits are 1.
module maj_voter_tb;
  int checks = 0, failures = 0;
  logic [3:0] x, y, z, o, exp_o;

  maj_voter dut (.x(x), .y(y), .z(z), .o(o));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) begin
      {x, y, z} = 12'(i);
      #1;
      for (int k = 0; k < 4; k++)
        exp_o[k] = (int'(x[k]) + int'(y[k]) + int'(z[k])) >= 2;
      checks++;
      if (o !== exp_o) begin
        failures++;
        $display("mismatch x=%b y=%b z=%b o=%b", x, y, z, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
