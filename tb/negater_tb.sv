// negater_tb: checks z + x == 0 (mod 2**32) and compares with 0 - x for
// random values and the corner cases 0, 1, -1 and the most negative value.
module negater_tb;
  int checks = 0, failures = 0;
  logic [31:0] x, z;

  negater #(.WIDTH(32)) dut (.x(x), .z(z));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(logic [31:0] v);
    logic [31:0] sum;
    x = v;
    #1;
    sum = z + v;
    checks += 2;
    if (sum !== 32'h0)       begin failures++; $display("FAIL -%h = %h (sum %h)", v, z, sum); end
    if (z !== 32'(0 - v))    begin failures++; $display("FAIL -%h = %h", v, z); end
  endtask

  initial begin
    one(32'h0); one(32'h1); one(32'hFFFF_FFFF); one(32'h8000_0000); one(32'h7FFF_FFFF);
    for (int n = 0; n < 500; n++) one($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
