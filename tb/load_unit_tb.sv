// load_unit_tb: every a and every 8-bit constant d; Input_L(Ra) must be d
// in the low 8 bits with 24 zero bits above, other outputs 0, Set_L
// one-hot at a. The encoding is assembled bit by bit from the document's
// position numbering (position 0 leftmost, position 15 least significant).
module load_unit_tb;
  import sp_pkg::*;
  int checks = 0, failures = 0;
  regs_t  din;
  rset_t  set;
  instr_t instr;
  logic [15:0] w;

  load_unit dut (.instr(instr), .din(din), .set(set));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++) begin
      for (int d = 0; d < 256; d++) begin
        // positions 0-1 = "10", 2-4 = a, 5-7 = 0, 8-15 = d
        w = '0;
        w[15 - 0] = 1'b1;
        for (int p = 0; p < 3; p++) w[15 - (2 + p)] = 1'((a >> (2 - p)) & 1);
        for (int p = 0; p < 8; p++) w[15 - (8 + p)] = 1'((d >> (7 - p)) & 1);
        instr = instr_t'(w);
        #1;
        for (int i = 0; i < NREGS; i++) begin
          checks += 2;
          if (din[i] !== ((i == a) ? 32'(d) : 32'h0)) begin
            failures++; $display("FAIL lod a=%0d d=%0d Input_L(R%0d)=%h", a, d, i, din[i]);
          end
          if (set[i] !== 1'(i == a)) begin
            failures++; $display("FAIL lod a=%0d Set_L(R%0d)=%b", a, i, set[i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
