// add_unit_tb: random register contents and every (a, b, c) combination;
// Input_A(Rc) must be Ra + Rb, the other Input_A outputs 0, and Set_A one-hot
// at c.
module add_unit_tb;
  import sp_pkg::*;
  int checks = 0, failures = 0;
  regs_t  regs, din;
  rset_t  set;
  instr_t instr;
  word_t  sum;

  add_unit dut (.regs(regs), .instr(instr), .din(din), .set(set));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 512; k++) begin
      foreach (regs[i]) regs[i] = $urandom;
      instr = enc_add(ridx_t'(k >> 6), ridx_t'(k >> 3), ridx_t'(k));
      sum = regs[k >> 6 & 7] + regs[k >> 3 & 7];
      #1;
      for (int i = 0; i < NREGS; i++) begin
        checks += 2;
        if (din[i] !== ((i == (k & 7)) ? sum : 32'h0)) begin
          failures++; $display("FAIL add k=%0d Input_A(R%0d)=%h", k, i, din[i]);
        end
        if (set[i] !== 1'(i == (k & 7))) begin
          failures++; $display("FAIL add k=%0d Set_A(R%0d)=%b", k, i, set[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
