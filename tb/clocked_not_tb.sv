// clocked_not_tb: checks that the clocked NOT gate shows the inverse of
// its input as sampled at the last rising edge, that input changes between
// edges do not reach the output, and that reset drives the reset value.
module clocked_not_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, a, y, expv;

  clocked_not dut (.clk(clk), .rst_n(rst_n), .a(a), .y(y));

  always #5 clk = ~clk;

  task automatic check(logic e, string what);
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL %s: y=%b expected %b", what, y, e);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 1'b1;
    #12;
    check(1'b1, "reset");
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      a = 1'($urandom);
      @(posedge clk);
      expv = ~a;
      #1;
      check(expv, "after edge");
      a = ~a;               // change between edges: must not show
      #2;
      check(expv, "between edges");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
