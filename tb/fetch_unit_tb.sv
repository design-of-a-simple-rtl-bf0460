// fetch_unit_tb: fills a random program and checks, for every PC value,
// that the instruction of that program register comes out and that
// Increment(PC) is PC + 1 with 255 wrapping to 0.
module fetch_unit_tb;
  import sp_pkg::*;
  int checks = 0, failures = 0;
  prog_t  prog;
  pc_t    pc, pc_inc;
  instr_t instr;

  fetch_unit dut (.prog(prog), .pc(pc), .instr(instr), .pc_inc(pc_inc));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 3; rep++) begin
      foreach (prog[i]) prog[i] = 16'($urandom);
      for (int p = 0; p < NPROG; p++) begin
        pc = pc_t'(p);
        #1;
        checks += 2;
        if (instr !== prog[p]) begin failures++; $display("FAIL I at PC=%0d", p); end
        if (pc_inc !== pc_t'((p + 1) % 256)) begin
          failures++; $display("FAIL Increment(PC) at PC=%0d: %0d", p, pc_inc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
