// jump_unit_tb: for each a, with Ra zero or not (single set bits and
// random values), Input_J(PC) must be the target d when Ra == 0 and
// Increment(PC) otherwise.
module jump_unit_tb;
  import sp_pkg::*;
  int checks = 0, failures = 0, taken = 0, not_taken = 0;
  regs_t  regs;
  instr_t instr;
  pc_t    pc_inc, pc_next, d, expv;

  jump_unit dut (.regs(regs), .instr(instr), .pc_inc(pc_inc), .pc_next(pc_next));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 800; k++) begin
      int a;
      a = k % 8;
      foreach (regs[i]) regs[i] = $urandom;
      case (k % 4)
        0: regs[a] = 32'h0;
        1: regs[a] = 32'h1 << ((k / 4) % 32);   // a single bit set
        2: regs[a] = $urandom;
        3: regs[a] = 32'h0;
      endcase
      d      = pc_t'($urandom);
      pc_inc = pc_t'($urandom);
      instr  = enc_jiz(ridx_t'(a), d);
      #1;
      expv = (regs[a] == 32'h0) ? d : pc_inc;
      if (regs[a] == 32'h0) taken++; else not_taken++;
      checks++;
      if (pc_next !== expv) begin
        failures++;
        $display("FAIL jiz R%0d=%h d=%0d inc=%0d -> %0d", a, regs[a], d, pc_inc, pc_next);
      end
    end
    checks++;
    if (taken == 0 || not_taken == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
