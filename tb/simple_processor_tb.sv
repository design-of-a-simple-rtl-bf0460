// simple_processor_tb: end-to-end test of the processor at its full size
// (8 x 32-bit data registers, 256 program registers, 8-bit PC).
//
// Part 1 runs a multiply-by-repeated-addition program (7 * 5) and checks
// the product, the loop counter, that R1 kept its constant value after an
// attempted load into it, and the exact number of clock cycles to reach
// the final self-loop: one instruction per cycle, 27 cycles.
//
// Part 2 loads random 256-instruction programs and runs each for 1500
// cycles, comparing PC and all data registers after every clock edge with
// an instruction-set model written here from the bit-level encoding.
//
// It counts each mechanism of the design and fails if any never occurred:
// add, negate, load, jump taken, jump not taken, a write aimed at R0 or R1
// being ignored, and the PC wrapping from 255 to 0.
module simple_processor_tb;
  import sp_pkg::*;

  int checks = 0, failures = 0;
  int n_add = 0, n_neg = 0, n_lod = 0, n_jmp_taken = 0, n_jmp_not = 0;
  int n_const_kept = 0, n_wrap = 0;

  logic   clk = 0, rst_n = 0, prog_we = 0;
  pc_t    prog_addr = '0;
  instr_t prog_data = '0;
  pc_t    pc;
  instr_t instr;
  regs_t  regs;

  simple_processor dut (
    .clk(clk), .rst_n(rst_n), .prog_we(prog_we), .prog_addr(prog_addr),
    .prog_data(prog_data), .pc(pc), .instr(instr), .regs(regs)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model -------------------------------------------------
  logic [15:0] mem [256];
  logic [31:0] m_r [8];
  logic [7:0]  m_pc;

  function automatic void model_reset();
    foreach (m_r[i]) m_r[i] = 32'd0;
    m_r[1] = 32'd1;
    m_pc = 8'd0;
  endfunction

  // One instruction; also counts which mechanism it exercised.
  function automatic void model_step();
    logic [15:0] w;
    int a, b, c, typ;
    logic [31:0] res;
    int dst;
    w   = mem[m_pc];
    typ = int'(w[15:14]);
    a   = int'(w[13:11]);
    b   = int'(w[10:8]);
    c   = int'(w[7:5]);
    dst = -1;
    case (typ)
      0: begin res = m_r[a] + m_r[b]; dst = c; n_add++; end
      1: begin res = ~m_r[a] + 32'd1; dst = a; n_neg++; end
      2: begin res = {24'd0, w[7:0]}; dst = a; n_lod++; end
      default: ;
    endcase
    if (dst >= 2) m_r[dst] = res;
    else if (dst >= 0) n_const_kept++;
    if (typ == 3 && m_r[a] == 32'd0) begin
      m_pc = w[7:0];
      n_jmp_taken++;
    end else begin
      if (typ == 3) n_jmp_not++;
      if (m_pc == 8'd255) n_wrap++;
      m_pc = m_pc + 8'd1;
    end
  endfunction

  task automatic compare(string when);
    checks++;
    if (pc !== m_pc) begin
      failures++;
      $display("FAIL %s: PC=%0d expected %0d", when, pc, m_pc);
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (regs[i] !== m_r[i]) begin
        failures++;
        $display("FAIL %s: R%0d=%h expected %h", when, i, regs[i], m_r[i]);
      end
    end
  endtask

  // Hold reset, write mem[] into the program registers, release reset.
  task automatic load_and_start();
    rst_n = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = pc_t'(i); prog_data = instr_t'(mem[i]);
    end
    @(negedge clk);
    prog_we = 0;
    rst_n = 1;
    model_reset();
  endtask

  int cycles;

  initial begin
    // ---- part 1: 7 * 5 by repeated addition ---------------------------
    foreach (mem[i]) mem[i] = enc_jiz(3'd0, pc_t'(i));   // unused: self-loops
    mem[0]  = enc_lod(3'd1, 8'hAB);      // attempt to change R1: ignored
    mem[1]  = enc_lod(3'd2, 8'd7);       // R2 = 7
    mem[2]  = enc_lod(3'd3, 8'd5);       // R3 = 5 (loop counter)
    mem[3]  = enc_lod(3'd4, 8'd0);       // R4 = 0 (product)
    mem[4]  = enc_lod(3'd5, 8'd1);       // R5 = 1
    mem[5]  = enc_neg(3'd5);             // R5 = -1
    mem[6]  = enc_jiz(3'd3, 8'd10);      // loop: if R3 == 0 goto done
    mem[7]  = enc_add(3'd4, 3'd2, 3'd4); // R4 = R4 + R2
    mem[8]  = enc_add(3'd3, 3'd5, 3'd3); // R3 = R3 - 1
    mem[9]  = enc_jiz(3'd0, 8'd6);       // goto loop
    mem[10] = enc_jiz(3'd0, 8'd10);      // done: stay here
    load_and_start();
    cycles = 0;
    #1;
    compare("program 1 start");
    while (pc != 8'd10 && cycles < 200) begin
      @(posedge clk);
      model_step();
      cycles++;
      #1;
      compare("program 1");
    end
    checks += 4;
    if (cycles != 27) begin failures++; $display("FAIL program 1 took %0d cycles, expected 27", cycles); end
    if (regs[4] !== 32'd35) begin failures++; $display("FAIL product R4=%0d", regs[4]); end
    if (regs[3] !== 32'd0)  begin failures++; $display("FAIL counter R3=%0d", regs[3]); end
    if (regs[1] !== 32'd1)  begin failures++; $display("FAIL R1=%0d", regs[1]); end
    // The self-loop holds: a few more cycles change nothing.
    repeat (3) begin
      @(posedge clk); model_step(); #1; compare("program 1 halted");
    end

    // ---- part 2: random programs in lockstep with the model ------------
    for (int prog = 0; prog < 8; prog++) begin
      foreach (mem[i]) begin
        mem[i] = 16'($urandom);
        // Fewer jumps to far targets keeps long straight runs, so the PC
        // reaches 255 and wraps.
        if (mem[i][15:14] == 2'b11 && ($urandom % 2 == 0)) mem[i][15:14] = 2'b10;
        // Keep some registers small so that neg and add produce zeros.
        if (mem[i][15:14] == 2'b10 && ($urandom % 4 == 0)) mem[i][7:0] = 8'd0;
      end
      load_and_start();
      #1;
      compare("random start");
      for (int n = 0; n < 1500; n++) begin
        @(posedge clk);
        model_step();
        #1;
        compare("random");
      end
    end

    $display("mechanisms: add=%0d neg=%0d lod=%0d jiz_taken=%0d jiz_not_taken=%0d const_kept=%0d pc_wrap=%0d",
             n_add, n_neg, n_lod, n_jmp_taken, n_jmp_not, n_const_kept, n_wrap);
    checks += 7;
    if (n_add == 0)        begin failures++; $display("FAIL add never ran"); end
    if (n_neg == 0)        begin failures++; $display("FAIL neg never ran"); end
    if (n_lod == 0)        begin failures++; $display("FAIL lod never ran"); end
    if (n_jmp_taken == 0)  begin failures++; $display("FAIL no jump taken"); end
    if (n_jmp_not == 0)    begin failures++; $display("FAIL no jump not taken"); end
    if (n_const_kept == 0) begin failures++; $display("FAIL no write to R0/R1 attempted"); end
    if (n_wrap == 0)       begin failures++; $display("FAIL PC never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
