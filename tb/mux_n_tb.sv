// mux_n_tb: checks the multiplexer at the three sizes the processor uses
// (8-way 32-bit, 256-way 16-bit, 2-way 8-bit) with random data on every
// input and every select value.
module mux_n_tb;
  int checks = 0, failures = 0;

  logic [7:0][31:0]   x8;   logic [2:0] s8;  logic [31:0] z8;
  logic [255:0][15:0] x256; logic [7:0] s256; logic [15:0] z256;
  logic [1:0][7:0]    x2;   logic       s2;  logic [7:0]  z2;

  mux_n #(.WAYS(8),   .WIDTH(32)) dut8   (.x(x8),   .sel(s8),   .z(z8));
  mux_n #(.WAYS(256), .WIDTH(16)) dut256 (.x(x256), .sel(s256), .z(z256));
  mux_n #(.WAYS(2),   .WIDTH(8))  dut2   (.x(x2),   .sel(s2),   .z(z2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      foreach (x8[i])   x8[i]   = $urandom;
      foreach (x256[i]) x256[i] = 16'($urandom);
      foreach (x2[i])   x2[i]   = 8'($urandom);
      for (int i = 0; i < 256; i++) begin
        s8 = 3'(i); s256 = 8'(i); s2 = 1'(i);
        #1;
        checks += 3;
        if (z8 !== x8[i % 8])     begin failures++; $display("FAIL 8-way sel=%0d", i % 8); end
        if (z256 !== x256[i])     begin failures++; $display("FAIL 256-way sel=%0d", i); end
        if (z2 !== x2[i % 2])     begin failures++; $display("FAIL 2-way sel=%0d", i % 2); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
