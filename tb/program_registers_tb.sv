// program_registers_tb: loads all 256 program registers with random
// words, checks every one, then runs many cycles with the load port idle
// and random data on it, checking that nothing changes; finally rewrites a
// few registers and checks that only those change.
module program_registers_tb;
  import sp_pkg::*;
  int checks = 0, failures = 0;
  logic   clk = 0, load_en;
  pc_t    load_addr;
  instr_t load_data;
  prog_t  dout;
  logic [IWIDTH-1:0] model [NPROG];

  program_registers dut (.clk(clk), .load_en(load_en), .load_addr(load_addr),
                         .load_data(load_data), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all(string when);
    for (int i = 0; i < NPROG; i++) begin
      checks++;
      if (dout[i] !== model[i]) begin
        failures++;
        $display("FAIL %s P%0d=%h expected %h", when, i, dout[i], model[i]);
      end
    end
  endtask

  initial begin
    load_en = 0; load_addr = '0; load_data = '0;
    for (int i = 0; i < NPROG; i++) begin
      @(negedge clk);
      load_en = 1; load_addr = pc_t'(i); load_data = instr_t'(16'($urandom));
      model[i] = load_data;
    end
    @(negedge clk);
    load_en = 0;
    compare_all("after load");
    for (int n = 0; n < 50; n++) begin
      @(negedge clk);
      load_addr = pc_t'($urandom); load_data = instr_t'(16'($urandom));
    end
    compare_all("while idle");
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      load_en = 1; load_addr = pc_t'($urandom); load_data = instr_t'(16'($urandom));
      model[load_addr] = load_data;
    end
    @(negedge clk);
    load_en = 0;
    compare_all("after rewrite");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
