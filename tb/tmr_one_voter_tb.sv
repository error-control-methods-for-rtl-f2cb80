// tmr_one_voter_tb -- self-checking test of tmr_one_voter (1 voter) over all
// 256 operand pairs of GF(2^4), against a shift-and-add reference.
// For every pair it applies: no fault; a random non-zero fault on each
// multiplier copy in turn (must be masked); a random fault on the single
// voter (passed straight to the output: no redundancy covers it); and the same fault on two copies at once (must corrupt the
// output, showing the limit of single-fault masking).
module tmr_one_voter_tb;
  import gf_ref_pkg::*;

  localparam int NV = 1;

  int checks = 0, failures = 0;
  int masked_mod = 0, masked_vote = 0, passed_final = 0, double_seen = 0;

  logic [3:0]         a, b, c, r, mask;
  logic [2:0][3:0]    fault_mod;
  logic [NV-1:0][3:0] fault_vote;

  tmr_one_voter dut (.a(a), .b(b), .fault_mod(fault_mod), .fault_vote(fault_vote), .c(c));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_c(input logic [3:0] e, input string what);
    #1;
    checks++;
    if (c !== e) begin
      failures++;
      $display("%s: a=%h b=%h c=%h expected %h", what, a, b, c, e);
    end
  endtask

  initial begin
    fault_mod = '0; fault_vote = '0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        r = 4'(gf_mul_ref(wide_t'(a), wide_t'(b), 4));
        fault_mod = '0; fault_vote = '0;
        expect_c(r, "fault-free");
        for (int m = 0; m < 3; m++) begin
          mask = 4'($urandom_range(1, 15));
          fault_mod = '0;
          fault_mod[m] = mask;
          expect_c(r, "module fault");
          masked_mod++;
        end
        fault_mod = '0;
        for (int v = 0; v < NV; v++) begin
          mask = 4'($urandom_range(1, 15));
          fault_vote = '0;
          fault_vote[v] = mask;
          if (v == NV - 1) begin
            expect_c(r ^ mask, "final voter fault");
            passed_final++;
          end else begin
            expect_c(r, "inner voter fault");
            masked_vote++;
          end
        end
        fault_vote = '0;
        mask = 4'($urandom_range(1, 15));
        fault_mod[0] = mask;
        fault_mod[2] = mask;
        expect_c(r ^ mask, "double module fault");
        double_seen++;
        fault_mod = '0;
      end
    checks++;
    if (masked_mod == 0 || passed_final == 0 || double_seen == 0 ||
        (NV > 1 && masked_vote == 0)) failures++;
    $display("module faults masked=%0d voter faults masked=%0d final voter faults=%0d double faults=%0d",
             masked_mod, masked_vote, passed_final, double_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
