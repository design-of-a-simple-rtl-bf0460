// adder_tb: 32-bit and 8-bit adders against a sum computed in 64 bits and
// truncated, with random operands plus the carry corner cases.
module adder_tb;
  int checks = 0, failures = 0;
  logic [31:0] a, b, c;
  logic [7:0]  a8, b8, c8;
  longint unsigned ref64;

  adder #(.WIDTH(32)) dut   (.a(a),  .b(b),  .c(c));
  adder #(.WIDTH(8))  dut8  (.a(a8), .b(b8), .c(c8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(logic [31:0] x, logic [31:0] y);
    a = x; b = y; a8 = x[7:0]; b8 = y[7:0];
    #1;
    ref64 = longint'(x) + longint'(y);
    checks += 2;
    if (c !== ref64[31:0]) begin failures++; $display("FAIL %h + %h = %h", x, y, c); end
    if (c8 !== 8'((int'(x[7:0]) + int'(y[7:0])) % 256)) begin
      failures++; $display("FAIL 8-bit %h + %h = %h", x[7:0], y[7:0], c8);
    end
  endtask

  initial begin
    one(32'hFFFF_FFFF, 32'h1);
    one(32'h7FFF_FFFF, 32'h1);
    one(32'h0, 32'h0);
    one(32'h8000_0000, 32'h8000_0000);
    one(32'h0000_00FF, 32'h0000_0001);
    for (int n = 0; n < 500; n++) one($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
