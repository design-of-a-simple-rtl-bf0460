// set_reg_tb: random inputs and set bits; a shadow copy in the testbench
// follows the rule "take d when s = 1 at the edge, else keep" and the
// register must match it after every edge.
module set_reg_tb;
  int checks = 0, failures = 0, loads = 0, holds = 0;
  logic clk = 0, rst_n = 0, s;
  logic [3:0] d, q, model;

  set_reg #(.WIDTH(4)) dut (.clk(clk), .rst_n(rst_n), .s(s), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s = 0; d = 4'hA;
    #12;
    checks++;
    if (q !== 4'h0) begin failures++; $display("FAIL reset q=%h", q); end
    model = 4'h0;
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      s = 1'($urandom);
      d = 4'($urandom);
      @(posedge clk);
      if (s) begin model = d; loads++; end
      else holds++;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL s=%b d=%h q=%h expected %h", s, d, q, model);
      end
    end
    checks++;
    if (loads == 0 || holds == 0) begin failures++; $display("FAIL no load or no hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
