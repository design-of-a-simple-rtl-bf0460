// data_registers_tb: random writes with random set bits; a shadow array
// in the testbench follows the set-bit rule for R2..R7 and keeps R0 = 0
// and R1 = 1 whatever is written to them.
module data_registers_tb;
  import sp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  rset_t set;
  regs_t din, dout;
  word_t model [NREGS];

  data_registers dut (.clk(clk), .rst_n(rst_n), .set(set), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string when);
    for (int i = 0; i < NREGS; i++) begin
      checks++;
      if (dout[i] !== model[i]) begin
        failures++;
        $display("FAIL %s R%0d=%h expected %h", when, i, dout[i], model[i]);
      end
    end
  endtask

  initial begin
    set = '1;
    foreach (din[i]) din[i] = $urandom;
    #12;
    model = '{0: 32'd0, 1: 32'd1, default: 32'd0};
    compare("reset");
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      set = rset_t'($urandom);
      foreach (din[i]) din[i] = $urandom;
      @(posedge clk);
      for (int i = 2; i < NREGS; i++) if (set[i]) model[i] = din[i];
      #1;
      compare("after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
