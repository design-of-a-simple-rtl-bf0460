// writeback_unit_tb: random candidate values from the three data
// circuits and random PC candidates under each instruction type; checks
// that the chosen register inputs, set bits and next PC are those of the
// instruction type (none written for jiz, jump target only for jiz).
module writeback_unit_tb;
  import sp_pkg::*;
  int checks = 0, failures = 0;
  instr_t instr;
  regs_t  din_a, din_n, din_l, din;
  rset_t  set_a, set_n, set_l, set;
  pc_t    pc_inc, pc_jump, pc_next;
  regs_t  exp_din;
  rset_t  exp_set;
  pc_t    exp_pc;

  writeback_unit dut (.instr(instr), .din_a(din_a), .set_a(set_a), .din_n(din_n),
                      .set_n(set_n), .din_l(din_l), .set_l(set_l), .pc_inc(pc_inc),
                      .pc_jump(pc_jump), .din(din), .set(set), .pc_next(pc_next));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 400; k++) begin
      foreach (din_a[i]) begin din_a[i] = $urandom; din_n[i] = $urandom; din_l[i] = $urandom; end
      set_a = rset_t'($urandom); set_n = rset_t'($urandom); set_l = rset_t'($urandom);
      pc_inc = pc_t'($urandom); pc_jump = pc_t'($urandom);
      instr = instr_t'(16'($urandom));
      instr.r.op = opcode_e'(k % 4);
      case (k % 4)
        0: begin exp_din = din_a; exp_set = set_a; exp_pc = pc_inc;  end
        1: begin exp_din = din_n; exp_set = set_n; exp_pc = pc_inc;  end
        2: begin exp_din = din_l; exp_set = set_l; exp_pc = pc_inc;  end
        3: begin exp_din = '0;    exp_set = '0;    exp_pc = pc_jump; end
      endcase
      #1;
      checks += 3;
      if (set !== exp_set) begin failures++; $display("FAIL type %0d set=%b", k % 4, set); end
      if (exp_set != '0 && din !== exp_din) begin
        failures++; $display("FAIL type %0d register inputs", k % 4);
      end
      if (pc_next !== exp_pc) begin failures++; $display("FAIL type %0d pc_next=%0d", k % 4, pc_next); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
