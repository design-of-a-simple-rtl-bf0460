// neg_unit_tb: random register contents and every a; Input_N(Ra) must be
// the two's complement negation of Ra, other outputs 0, Set_N one-hot at a.
module neg_unit_tb;
  import sp_pkg::*;
  int checks = 0, failures = 0;
  regs_t  regs, din;
  rset_t  set;
  instr_t instr;
  word_t  expv;

  neg_unit dut (.regs(regs), .instr(instr), .din(din), .set(set));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 400; k++) begin
      foreach (regs[i]) regs[i] = $urandom;
      if (k % 5 == 0) regs[k % 8] = 32'h8000_0000;
      instr = enc_neg(ridx_t'(k));
      expv = 32'(64'h1_0000_0000 - 64'(regs[k % 8]));
      #1;
      for (int i = 0; i < NREGS; i++) begin
        checks += 2;
        if (din[i] !== ((i == k % 8) ? expv : 32'h0)) begin
          failures++; $display("FAIL neg k=%0d Input_N(R%0d)=%h", k, i, din[i]);
        end
        if (set[i] !== 1'(i == k % 8)) begin
          failures++; $display("FAIL neg k=%0d Set_N(R%0d)=%b", k, i, set[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
