// tb_aac_dsp_top: end-to-end testbench of aac_dsp_top at its default size
// (two 9472-word memories, 512-point transform, 512-word coefficient table).
//
// The control bus runs a program that follows the transform memory map:
//   1. store a random complex vector: real parts at LEFT_BUF, imaginary parts
//      at RIGHT_BUF, both in memory A;
//   2. bit-reverse copy them into TRANSFORM_BUF (real to memory A, imaginary
//      to memory B) with the ACU's bit-reversed, modulo-512 addressing;
//   3. start the IMDCT performer on TRANSFORM_BUF, offering a control word
//      while it is busy (the core must stall and run it afterwards);
//   4. read the result back over buses A and B, compare it with a double
//      precision DFT point by point and as a relative RMS error (at most
//      0.02 %), and accumulate re*im over all points in the FPU.
// It also provokes an arbiter collision and runs the SEU, the ALU and the
// fixed-point multiplier once. Each mechanism is counted; one that never
// happens is a failure.
module tb_aac_dsp_top;
  import aac_pkg::*;
  import fp_ref_pkg::*;
  import core_prog_pkg::*;
  localparam int N = 512, LOGN = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ctrl_valid, ctrl_ready, fft_start, fft_busy, fft_done, bus_drop;
  ctrl_word_t ctrl;
  logic [AW-1:0] fft_base;
  logic [31:0] bus_c;
  logic [2:0] alu_flags;
  int checks = 0, failures = 0;
  int n_brev = 0, n_wrap = 0, n_drop = 0, n_stall = 0, n_fft = 0, n_mac = 0, n_fix = 0, n_seu = 0, n_alu = 0;

  aac_dsp_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] seen;
  task automatic exec(input ctrl_word_t w);
    ctrl = w; ctrl_valid = 1'b1;
    #1 seen = bus_c;
    @(posedge clk); #1;
    ctrl = CTRL_NOP; ctrl_valid = 1'b0;
  endtask

  task automatic nop(input int n);
    repeat (n) begin @(posedge clk); #1; end
  endtask

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] want);
    checks++;
    if (!sp_eq(got, want)) begin
      failures++;
      if (failures < 20) $display("%s: got %h want %h", what, got, want);
    end
  endtask

  function automatic int rev(int v);
    int r = 0;
    for (int b = 0; b < LOGN; b++) if ((v >> b) & 1) r |= 1 << (LOGN - 1 - b);
    return r;
  endfunction

  logic [31:0] xr[N], xi[N], yr[N], yi[N];

  initial begin
    ctrl_word_t w;
    logic [31:0] acc_ref;
    real sr, si, th, err, worst, esum, ssum;
    int cyc;
    ctrl = CTRL_NOP; ctrl_valid = 1'b0; fft_start = 1'b0; fft_base = TRANSFORM_BUF;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. input vector
    exec(w_acu(ACU_LD_RS, 0, LEFT_BUF));  exec(w_acu(ACU_LD_RD, 0, 1));
    exec(w_acu(ACU_LD_RS, 1, RIGHT_BUF)); exec(w_acu(ACU_LD_RD, 1, 1));
    for (int n = 0; n < N; n++) begin
      int a, b;
      a = int'($urandom_range(2000)) - 1000;
      b = int'($urandom_range(2000)) - 1000;
      xr[n] = r2sp(a / 1000.0);
      xi[n] = r2sp(b / 1000.0);
      exec(w_store_imm(0, 0, xr[n]));
      exec(w_store_imm(0, 1, xi[n]));
    end

    // 2. bit-reversed copies, modulo 512
    exec(w_acu(ACU_LD_RS, 0, LEFT_BUF)); exec(w_acu(ACU_LD_MPD, 0, N - 1));
    exec(w_acu(ACU_LD_RS, 2, TRANSFORM_BUF)); exec(w_acu(ACU_LD_RD, 2, 1));
    for (int n = 0; n < N; n++) begin
      exec(w_read(1, 0, 1, 0, 0));
      exec(w_move_mem(1, 0, 2));                 // real part: A -> A
    end
    exec(w_acu(ACU_LD_RS, 1, RIGHT_BUF)); exec(w_acu(ACU_LD_MPD, 1, N - 1));
    exec(w_acu(ACU_LD_RS, 3, TRANSFORM_BUF)); exec(w_acu(ACU_LD_RD, 3, 1));
    exec(w_read(1, 1, 1, 0, 0));
    for (int n = 1; n < N; n++)                  // imaginary part: A -> B, one per cycle
      exec(w_or(w_read(1, 1, 1, 0, 0), w_move_mem(1, 1, 3)));
    exec(w_move_mem(1, 1, 3));
    for (int n = 0; n < N; n++) begin
      check("bit-reversed real", dut.mem_a.mem[TRANSFORM_BUF + n], xr[rev(n)]);
      check("bit-reversed imag", dut.mem_b.mem[TRANSFORM_BUF + n], xi[rev(n)]);
      if (rev(n) != n) n_brev++;
    end
    // both pointers wrapped to the start of their 512-word block
    exec(w_read(1, 0, 0, 0, 0));
    exec(w_move_mem(0, 0, 0));
    check("modulo wrap", seen, xr[0]);
    if (sp_eq(seen, xr[0])) n_wrap++;

    // arbiter collision: a write to A at RS2 against a read of A
    w = w_or(w_store_imm(0, 2, 32'hCAFE_F00D), w_read(1, 0, 0, 0, 0));
    ctrl = w; ctrl_valid = 1; #1;
    if (bus_drop) n_drop++;
    @(posedge clk); #1; ctrl_valid = 0; ctrl = CTRL_NOP;
    check("collision write", dut.mem_a.mem[TRANSFORM_BUF + N], 32'hCAFE_F00D);

    // 3. transform; a control word offered while busy must wait
    fft_start = 1; @(posedge clk); #1; fft_start = 0;
    cyc = 1;
    ctrl = w_store_imm(0, 2, 32'h0BAD_CAFE); ctrl_valid = 1;
    while (!ctrl_ready) begin
      n_stall++;
      @(posedge clk); #1; cyc++;
    end
    @(posedge clk); #1; ctrl_valid = 0; ctrl = CTRL_NOP;
    n_fft++;
    checks++;
    if (cyc != LOGN * (N + 9) + 1) begin
      failures++;
      $display("transform took %0d cycles", cyc);
    end
    check("stalled word ran after the transform", dut.mem_a.mem[TRANSFORM_BUF + N + 1], 32'h0BAD_CAFE);

    // 4. read back, compare with the DFT, accumulate re*im in the FPU
    exec(w_acu(ACU_LD_RS, 0, TRANSFORM_BUF)); exec(w_acu(ACU_LD_MPD, 0, 0));
    exec(w_acu(ACU_LD_RS, 1, TRANSFORM_BUF)); exec(w_acu(ACU_LD_RD, 1, 1));
    w = CTRL_NOP; w.fpu.clr = 1; exec(w);
    acc_ref = 0;
    for (int m = 0; m < N; m++) begin
      exec(w_read(1, 0, 0, 1, 1));
      w = CTRL_NOP; w.a_src = A_MEM; w.b_src = B_MEM; w.c_src = C_BUSA; w.fpu.ld_x = 1; w.fpu.ld_y = 1;
      exec(w); yr[m] = seen;
      w = CTRL_NOP; w.b_src = B_MEM; w.c_src = C_BUSB; w.fpu.mul = 1;
      exec(w); yi[m] = seen;
      nop(2);
      w = CTRL_NOP; w.fpu.add = 1; w.fpu.a_sel = ADD_A_P; w.fpu.b_sel = ADD_B_ACC; exec(w);
      nop(2);
      acc_ref = add_ref(mul_ref(yr[m], yi[m]), acc_ref);
    end
    w = CTRL_NOP; w.c_src = C_ACC; exec(w);
    check("accumulated re*im", seen, acc_ref);
    if (sp_eq(seen, acc_ref)) n_mac++;
    worst = 0; esum = 0; ssum = 0;
    for (int m = 0; m < N; m++) begin
      sr = 0; si = 0;
      for (int n = 0; n < N; n++) begin
        th = 2.0 * 3.14159265358979323846 * ((n * m) % N) / N;
        sr += sp2r(xr[n]) * $cos(th) + sp2r(xi[n]) * $sin(th);
        si += sp2r(xi[n]) * $cos(th) - sp2r(xr[n]) * $sin(th);
      end
      err = (sp2r(yr[m]) - sr) ** 2 + (sp2r(yi[m]) - si) ** 2;
      if (err > worst) worst = err;
      esum += err;
      ssum += sr * sr + si * si;
      checks++;
      if (err > 0.05 * 0.05) begin
        failures++;
        if (failures < 20) $display("X[%0d] = %f %f, want %f %f", m, sp2r(yr[m]), sp2r(yi[m]), sr, si);
      end
    end
    $display("largest error magnitude of a transform output: %g", worst ** 0.5);
    // overall relative error against the 0.02 % budget of the decoder
    $display("relative RMS error of the transform: %g %%", 100.0 * (esum / ssum) ** 0.5);
    checks++;
    if ((esum / ssum) ** 0.5 > 2.0e-4) begin
      failures++;
      $display("relative error above 0.02 %%");
    end

    // SEU, ALU and fixed-point multiplier, once each
    w = CTRL_NOP; w.a_src = A_IMM; w.imm = 32'h0000_0300; w.seu = SEU_LD; exec(w);
    w = CTRL_NOP; w.seu = SEU_EXP; exec(w);
    w = CTRL_NOP; w.seu = SEU_SHE; exec(w);
    w = CTRL_NOP; w.c_src = C_SEU; exec(w);
    check("SEU normalise 0x300", seen, 32'h0060_0000);
    if (seen == 32'h0060_0000) n_seu++;
    w = CTRL_NOP; w.a_src = A_IMM; w.b_src = B_IMM; w.imm = 32'h0000_0123; w.alu_ld = 1; exec(w);
    w = CTRL_NOP; w.alu = ALU_ADD; exec(w);
    w = CTRL_NOP; w.c_src = C_ALU; exec(w);
    check("ALU 0x123+0x123", seen, 32'h246);
    if (seen == 32'h246) n_alu++;
    w = CTRL_NOP; w.a_src = A_IMM; w.b_src = B_IMM; w.imm = 32'h00E0_0000; w.fpu.ld_x = 1; w.fpu.ld_y = 1; exec(w);
    w = CTRL_NOP; w.fpu.mul = 1; w.fpu.fix = 1; exec(w);
    nop(2);
    w = CTRL_NOP; w.c_src = C_P; exec(w);
    check("fixed -0.25*-0.25", seen, 32'h0008_0000);
    if (seen == 32'h0008_0000) n_fix++;

    $display("mechanisms: bit-reverse %0d, modulo wrap %0d, arbiter drop %0d, stall cycles %0d, transforms %0d, MAC %0d, SEU %0d, ALU %0d, fixed %0d",
             n_brev, n_wrap, n_drop, n_stall, n_fft, n_mac, n_seu, n_alu, n_fix);
    if (n_brev == 0 || n_wrap == 0 || n_drop == 0 || n_stall == 0 || n_fft == 0 ||
        n_mac == 0 || n_seu == 0 || n_alu == 0 || n_fix == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
