// aop_error_control_top_tb -- end-to-end test of the four error-controlled
// multipliers at their default size, over all 256 operand pairs of GF(2^4).
// For each pair it runs a fault-free pass on all variants, then injects
// single faults one place at a time: every multiplier copy of every TMR
// variant, every voter, every product bit and every check bit of the
// Hamming variant.  Each must be masked, corrected or (for the final voter
// of each TMR variant) passed through exactly as the architecture implies,
// and a fault in one variant must never disturb another.  It counts how
// often each mechanism acted and fails if any never did.
module aop_error_control_top_tb;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_clean = 0, n_mod_masked = 0, n_v1_masked = 0, n_v2_masked = 0;
  int n_final_exposed = 0, n_ham_corrected = 0, n_ham_par_flagged = 0;

  logic [3:0]      a, b, r;
  logic [2:0][3:0] fi1_mod, fi4_mod, fi7_mod;
  logic [0:0][3:0] fi1_vote;
  logic [3:0][3:0] fi4_vote;
  logic [6:0][3:0] fi7_vote;
  logic [3:0]      fih_mult;
  logic [2:0]      fih_par;
  logic [3:0]      c_tmr1, c_tmr4, c_tmr7, c_ham, c_ham_raw;
  logic [2:0]      ham_syndrome;
  logic            ham_err;

  aop_error_control_top dut (
    .a(a), .b(b),
    .fi1_mod(fi1_mod), .fi1_vote(fi1_vote),
    .fi4_mod(fi4_mod), .fi4_vote(fi4_vote),
    .fi7_mod(fi7_mod), .fi7_vote(fi7_vote),
    .fih_mult(fih_mult), .fih_par(fih_par),
    .c_tmr1(c_tmr1), .c_tmr4(c_tmr4), .c_tmr7(c_tmr7),
    .c_ham(c_ham), .c_ham_raw(c_ham_raw),
    .ham_syndrome(ham_syndrome), .ham_err(ham_err));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clear_faults();
    fi1_mod = '0; fi4_mod = '0; fi7_mod = '0;
    fi1_vote = '0; fi4_vote = '0; fi7_vote = '0;
    fih_mult = '0; fih_par = '0;
  endtask

  // Compare all outputs with their expected values.
  task automatic expect_all(input logic [3:0] e1, input logic [3:0] e4,
                            input logic [3:0] e7, input logic [3:0] eh_raw,
                            input logic [2:0] es, input string what);
    #1;
    checks++;
    if (c_tmr1 !== e1 || c_tmr4 !== e4 || c_tmr7 !== e7 || c_ham !== r ||
        c_ham_raw !== eh_raw || ham_syndrome !== es || ham_err !== (es != 3'b0)) begin
      failures++;
      $display("%s: a=%h b=%h got %h %h %h %h/%h s=%b; exp %h %h %h %h/%h s=%b", what, a, b,
               c_tmr1, c_tmr4, c_tmr7, c_ham, c_ham_raw, ham_syndrome,
               e1, e4, e7, r, eh_raw, es);
    end
  endtask

  initial begin
    logic [3:0] m;
    clear_faults();
    for (int i = 0; i < 256; i++) begin
      {a, b} = 8'(i);
      r = 4'(gf_mul_ref(wide_t'(a), wide_t'(b), 4));
      clear_faults();
      expect_all(r, r, r, r, 3'b000, "fault-free");
      n_clean++;
      // one faulty multiplier copy in each TMR variant at once
      for (int k = 0; k < 3; k++) begin
        clear_faults();
        fi1_mod[k] = 4'($urandom_range(1, 15));
        fi4_mod[k] = 4'($urandom_range(1, 15));
        fi7_mod[k] = 4'($urandom_range(1, 15));
        expect_all(r, r, r, r, 3'b000, "module fault");
        n_mod_masked++;
      end
      // single voter (TMR1) and final voters: exposed
      clear_faults();
      m = 4'($urandom_range(1, 15));
      fi1_vote[0] = m;
      expect_all(r ^ m, r, r, r, 3'b000, "TMR1 voter fault");
      clear_faults();
      fi4_vote[3] = m;
      expect_all(r, r ^ m, r, r, 3'b000, "TMR4 final voter fault");
      clear_faults();
      fi7_vote[6] = m;
      expect_all(r, r, r ^ m, r, 3'b000, "TMR7 final voter fault");
      n_final_exposed++;
      // first-level voters V1..V3 (TMR4 and TMR7)
      for (int k = 0; k < 3; k++) begin
        clear_faults();
        fi4_vote[k] = 4'($urandom_range(1, 15));
        fi7_vote[k] = 4'($urandom_range(1, 15));
        expect_all(r, r, r, r, 3'b000, "first-level voter fault");
        n_v1_masked++;
      end
      // second-level voters Va..Vc (TMR7)
      for (int k = 3; k < 6; k++) begin
        clear_faults();
        fi7_vote[k] = 4'($urandom_range(1, 15));
        expect_all(r, r, r, r, 3'b000, "second-level voter fault");
        n_v2_masked++;
      end
      // Hamming: product bit faults corrected
      for (int k = 0; k < 4; k++) begin
        clear_faults();
        fih_mult = 4'(1 << k);
        expect_all(r, r, r, r ^ fih_mult, ham_col(k), "product bit fault");
        n_ham_corrected++;
      end
      // Hamming: check bit faults flagged, product untouched
      for (int k = 0; k < 3; k++) begin
        clear_faults();
        fih_par = 3'(1 << k);
        expect_all(r, r, r, r, fih_par, "check bit fault");
        n_ham_par_flagged++;
      end
    end
    $display("clean=%0d module-masked=%0d V1-3-masked=%0d Va-c-masked=%0d final-exposed=%0d ham-corrected=%0d ham-check-flagged=%0d",
             n_clean, n_mod_masked, n_v1_masked, n_v2_masked, n_final_exposed,
             n_ham_corrected, n_ham_par_flagged);
    checks++;
    if (n_clean == 0 || n_mod_masked == 0 || n_v1_masked == 0 || n_v2_masked == 0 ||
        n_final_exposed == 0 || n_ham_corrected == 0 || n_ham_par_flagged == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
