// clocked_reg_tb: drives random 4-bit values and checks that the register
// shows each one from the clock edge after it was applied, holds it for
// the whole following cycle, and resets to 0.
module clocked_reg_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [3:0] d, q, prev;

  clocked_reg #(.WIDTH(4)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(logic [3:0] exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, exp);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 4'hF;
    #12;
    check(4'h0, "reset");
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      prev = q;
      d = 4'($urandom);
      #2;
      check(prev, "hold before edge");
      @(posedge clk);
      #1;
      check(d, "load at edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
