// demux2_tb: checks the 2-way 1-bit demultiplexer against its truth table.
module demux2_tb;
  int checks = 0, failures = 0;
  logic x, y, z0, z1;
  // Expected {z0, z1} for rows {x, y} = 00, 01, 10, 11.
  localparam logic [1:0] EXPECT [4] = '{2'b00, 2'b00, 2'b10, 2'b01};

  demux2 dut (.x(x), .y(y), .z0(z0), .z1(z1));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      {x, y} = 2'(r);
      #1;
      checks++;
      if ({z0, z1} !== EXPECT[r]) begin
        failures++;
        $display("FAIL x=%b y=%b z0z1=%b expected %b", x, y, {z0, z1}, EXPECT[r]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
