// mux2_tb: checks the 2-way 1-bit multiplexer against its full truth
// table (all eight input combinations, expected outputs written out).
module mux2_tb;
  int checks = 0, failures = 0;
  logic x0, x1, y, z;
  // Expected z for index {x0, x1, y}, straight from the truth table.
  localparam logic [7:0] EXPECT = 8'b1101_1000;  // rows 7..0

  mux2 dut (.x0(x0), .x1(x1), .y(y), .z(z));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 8; r++) begin
      {x0, x1, y} = 3'(r);
      #1;
      checks++;
      if (z !== EXPECT[r]) begin
        failures++;
        $display("FAIL x0=%b x1=%b y=%b z=%b expected %b", x0, x1, y, z, EXPECT[r]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
