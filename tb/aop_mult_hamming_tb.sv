// aop_mult_hamming_tb -- all 256 operand pairs, each with no fault, with
// each single-bit fault on the multiplier output (must be corrected, with
// the syndrome naming the bit) and with each single-bit fault on the
// predicted check bits (must be flagged and leave the product alone).
module aop_mult_hamming_tb;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  int corrected = 0, par_flagged = 0, clean = 0;
  logic [3:0] a, b, r, fault_mult, c, c_raw;
  logic [2:0] fault_par, syndrome;
  logic       err;

  aop_mult_hamming dut (.a(a), .b(b), .fault_mult(fault_mult), .fault_par(fault_par),
                        .c(c), .c_raw(c_raw), .syndrome(syndrome), .err(err));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [3:0] ec, input logic [3:0] eraw,
                       input logic [2:0] es, input string what);
    #1;
    checks++;
    if (c !== ec || c_raw !== eraw || syndrome !== es || err !== (es != 3'b0)) begin
      failures++;
      $display("%s: a=%h b=%h c=%h raw=%h s=%b err=%b (exp c=%h raw=%h s=%b)",
               what, a, b, c, c_raw, syndrome, err, ec, eraw, es);
    end
  endtask

  initial begin
    fault_mult = '0; fault_par = '0;
    for (int i = 0; i < 256; i++) begin
      {a, b} = 8'(i);
      r = 4'(gf_mul_ref(wide_t'(a), wide_t'(b), 4));
      fault_mult = '0; fault_par = '0;
      check(r, r, 3'b000, "fault-free");
      clean++;
      for (int k = 0; k < 4; k++) begin
        fault_mult = 4'(1 << k);
        check(r, r ^ fault_mult, ham_col(k), "product bit fault");
        corrected++;
      end
      fault_mult = '0;
      for (int k = 0; k < 3; k++) begin
        fault_par = 3'(1 << k);
        check(r, r, fault_par, "check bit fault");
        par_flagged++;
      end
      fault_par = '0;
    end
    $display("clean=%0d corrected=%0d check-bit faults flagged=%0d", clean, corrected, par_flagged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
