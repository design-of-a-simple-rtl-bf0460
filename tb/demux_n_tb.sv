// demux_n_tb: checks the 8-way 32-bit and 8-way 1-bit demultiplexers: the
// selected output carries the input, every other output is 0.
module demux_n_tb;
  int checks = 0, failures = 0;

  logic [31:0] x32; logic [2:0] sel; logic [7:0][31:0] z32;
  logic [7:0][0:0] z1;

  demux_n #(.WAYS(8), .WIDTH(32)) dut32 (.x(x32),  .sel(sel), .z(z32));
  demux_n #(.WAYS(8), .WIDTH(1))  dut1  (.x(1'b1), .sel(sel), .z(z1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      x32 = $urandom;
      sel = 3'(n);
      #1;
      for (int i = 0; i < 8; i++) begin
        checks += 2;
        if (z32[i] !== ((i == int'(sel)) ? x32 : 32'h0)) begin
          failures++; $display("FAIL 32-bit sel=%0d out %0d = %h", sel, i, z32[i]);
        end
        if (z1[i] !== 1'(i == int'(sel))) begin
          failures++; $display("FAIL 1-bit sel=%0d out %0d = %b", sel, i, z1[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
