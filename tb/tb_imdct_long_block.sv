// tb_imdct_long_block: the filter bank's long-block IMDCT run on the whole
// design at its default size.
//
// A random spectrum of M = 1024 coefficients X[k] is turned into the N = 2048
// time samples
//   x[n] = sum_k X[k] * cos(pi/M * (n + M/2 + 1/2) * (k + 1/2))
// by a program on the DSP core around one 512-point transform of the IMDCT
// performer:
//   1. pre-twiddle (core):  v[k] = (X[2k] + j X[M-1-2k]) * exp(-j*pi*(4k+1)/(4M))
//   2. bit-reverse copy (core, ACU bit-reversed addressing)
//   3. V = FFT_512(v) (performer)
//   4. post-twiddle (core): w[n] = V[n] * exp(-j*pi*n/M),
//      y[2n] = Re w[n], y[M-1-2n] = -Im w[n]      (y is the DCT-IV of X)
//   5. unfold (core):       x[n] =  y[n + M/2]        for n <  M/2
//                           x[n] = -y[3M/2 - 1 - n]   for M/2 <= n < 3M/2
//                           x[n] = -y[n - 3M/2]       for n >= 3M/2
//   6. windowing and overlap-add (core): with the sine window scaled by 2/N,
//      out[n] = win[n] * x[n] + prev[n] and the new overlap
//      ov[n] = win[M+n] * x[M+n] for n < M; prev is a random stored overlap
// The twiddle factors reach the core as control-word immediates. Memory use:
// spectrum at LEFT_BUF in both memories, v at RIGHT_BUF (real) and
// RIGHT_BUF+512 (imaginary) in memory A, the transform at TRANSFORM_BUF,
// y at 0x0000 in memory A, x at 0x0000 in memory B, the overlap-added output
// at 0x0400 in memory A and the overlap at 0x0800 in memory B.
// x is compared with the direct double-precision sum (every sample within
// 1e-3), the windowed words with the same sum windowed in double precision
// (within 1e-6); each relative RMS error must stay below 0.02 %. The window
// shape (sine) is this test's choice. The cycle count of each step is printed.
module tb_imdct_long_block;
  import aac_pkg::*;
  import fp_ref_pkg::*;
  import core_prog_pkg::*;
  localparam int NT = 2048, M = 1024, H = 512;
  localparam real PI = 3.14159265358979323846;
  localparam int OUT_Y = 0, OUT_X = 0, OUT_PCM = 'h400, OUT_OV = 'h800;

  // sine window with the 2/N output scale folded in
  function automatic real win(input int n);
    return $sin(PI * (n + 0.5) / NT) * 2.0 / NT;
  endfunction
  logic clk = 1'b0, rst_n = 1'b0;
  logic ctrl_valid, ctrl_ready, fft_start, fft_busy, fft_done, bus_drop;
  ctrl_word_t ctrl;
  logic [AW-1:0] fft_base;
  logic [31:0] bus_c;
  logic [2:0] alu_flags;
  int checks = 0, failures = 0;
  longint cycle = 0;

  aac_dsp_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic exec(input ctrl_word_t w);
    ctrl = w; ctrl_valid = 1'b1;
    @(posedge clk); #1;
    ctrl = CTRL_NOP; ctrl_valid = 1'b0;
  endtask

  task automatic nop(input int n);
    repeat (n) begin @(posedge clk); #1; end
  endtask

  task automatic set_ptr(input int p, input int rs, input int rd, input int mpd);
    exec(w_acu(ACU_LD_RS, p, rs));
    exec(w_acu(ACU_LD_RD, p, rd));
    exec(w_acu(ACU_LD_MPD, p, mpd));
  endtask

  // one complex multiply on the core: a from memory A at RS0, b from memory
  // B at RS1 (both post-modified); re = a*c1 + b*c2 is written at RS2 and
  // im = a*c3 + b*c4 at RS3, each to memory A (to_b = 0) or B (to_b = 1)
  task automatic cmul(input real c1, input real c2, input real c3, input real c4,
                      input bit re_to_b, input bit im_to_b);
    ctrl_word_t w;
    exec(w_read(1, 0, 0, 1, 1));
    // X <= a, RH1 <= b, ACC <= 0
    w = CTRL_NOP; w.a_src = A_MEM; w.fpu.ld_x = 1; w.b_src = B_MEM; w.c_src = C_BUSB;
    w.gpr_we = 1; w.gpr_w = 1; w.fpu.clr = 1; exec(w);
    // Y <= c1, RH0 <= a
    w = CTRL_NOP; w.b_src = B_IMM; w.imm = r2sp(c1); w.fpu.ld_y = 1;
    w.a_src = A_MEM; w.c_src = C_BUSA; w.gpr_we = 1; w.gpr_w = 0; exec(w);
    // P <= a*c1; X <= b, Y <= c2
    w = CTRL_NOP; w.fpu.mul = 1; w.a_src = A_GPR; w.gpr_a = 1; w.fpu.ld_x = 1;
    w.b_src = B_IMM; w.imm = r2sp(c2); w.fpu.ld_y = 1; exec(w);
    // P <= b*c2
    w = CTRL_NOP; w.fpu.mul = 1; exec(w);
    nop(1);
    w = CTRL_NOP; w.fpu.add = 1; w.fpu.a_sel = ADD_A_P; w.fpu.b_sel = ADD_B_ACC; exec(w);   // ACC <= a*c1
    nop(2);
    w = CTRL_NOP; w.fpu.add = 1; w.fpu.a_sel = ADD_A_P; w.fpu.b_sel = ADD_B_ACC; exec(w);   // ACC += b*c2
    nop(2);
    // write re; ACC <= 0; X <= a, Y <= c3
    w = CTRL_NOP; w.c_src = C_ACC; w.cpl.en = 1; w.cpl.ptr = 2; w.cpl.post = 1;
    w.wr_a = !re_to_b; w.wr_b = re_to_b; w.fpu.clr = 1;
    w.a_src = A_GPR; w.gpr_a = 0; w.fpu.ld_x = 1; w.b_src = B_IMM; w.imm = r2sp(c3); w.fpu.ld_y = 1; exec(w);
    // P <= a*c3; X <= b, Y <= c4
    w = CTRL_NOP; w.fpu.mul = 1; w.a_src = A_GPR; w.gpr_a = 1; w.fpu.ld_x = 1;
    w.b_src = B_IMM; w.imm = r2sp(c4); w.fpu.ld_y = 1; exec(w);
    w = CTRL_NOP; w.fpu.mul = 1; exec(w);                                                      // P <= b*c4
    nop(1);
    w = CTRL_NOP; w.fpu.add = 1; w.fpu.a_sel = ADD_A_P; w.fpu.b_sel = ADD_B_ACC; exec(w);
    nop(2);
    w = CTRL_NOP; w.fpu.add = 1; w.fpu.a_sel = ADD_A_P; w.fpu.b_sel = ADD_B_ACC; exec(w);
    nop(2);
    w = CTRL_NOP; w.c_src = C_ACC; w.cpl.en = 1; w.cpl.ptr = 3; w.cpl.post = 1;
    w.wr_a = !im_to_b; w.wr_b = im_to_b; exec(w);
  endtask

  // x = s * (word of memory A at RS0), written to memory B at RS2
  task automatic scale_copy(input int count, input real s);
    ctrl_word_t w;
    w = CTRL_NOP; w.b_src = B_IMM; w.imm = r2sp(s); w.fpu.ld_y = 1; exec(w);
    repeat (count) begin
      exec(w_read(1, 0, 0, 0, 0));
      w = CTRL_NOP; w.a_src = A_MEM; w.fpu.ld_x = 1; exec(w);
      w = CTRL_NOP; w.fpu.mul = 1; exec(w);
      nop(2);
      w = CTRL_NOP; w.c_src = C_P; w.cpl.en = 1; w.cpl.ptr = 2; w.cpl.post = 1; w.wr_b = 1; exec(w);
    end
  endtask

  // windowing and overlap-add: pcm[n] = win[n] * x[n] + prev[n] (memory A at
  // OUT_PCM, RS2), then the new overlap ov[n] = win[M+n] * x[M+n] replaces
  // prev in memory B at OUT_OV. x is read from memory B through RS0, prev
  // through RS1.
  task automatic window_ola();
    ctrl_word_t w;
    for (int n = 0; n < M; n++) begin
      w = w_read(0, 0, 0, 1, 0); exec(w);
      w = CTRL_NOP; w.b_src = B_MEM; w.fpu.ld_y = 1; w.a_src = A_IMM; w.imm = r2sp(win(n)); w.fpu.ld_x = 1;
      exec(w);
      w = w_read(0, 0, 0, 1, 1); w.fpu.mul = 1; exec(w);                 // P <= win * x
      w = CTRL_NOP; w.b_src = B_MEM; w.fpu.ld_y = 1; exec(w);              // Y <= prev
      nop(1);
      w = CTRL_NOP; w.fpu.add = 1; w.fpu.a_sel = ADD_A_P; w.fpu.b_sel = ADD_B_Y; exec(w);
      nop(2);
      w = CTRL_NOP; w.c_src = C_ACC; w.cpl.en = 1; w.cpl.ptr = 2; w.cpl.post = 1; w.wr_a = 1; exec(w);
    end
    set_ptr(2, OUT_OV, 1, 0);
    for (int n = 0; n < M; n++) begin
      w = w_read(0, 0, 0, 1, 0); exec(w);
      w = CTRL_NOP; w.b_src = B_MEM; w.fpu.ld_y = 1; w.a_src = A_IMM; w.imm = r2sp(win(M + n)); w.fpu.ld_x = 1;
      exec(w);
      w = CTRL_NOP; w.fpu.mul = 1; exec(w);
      nop(2);
      w = CTRL_NOP; w.c_src = C_P; w.cpl.en = 1; w.cpl.ptr = 2; w.cpl.post = 1; w.wr_b = 1; exec(w);
    end
  endtask

  logic [31:0] spec[M], prev[M];
  real x_ref[NT];

  initial begin
    longint t0;
    real th, ref_x, got, err, worst, esum, ssum;
    ctrl = CTRL_NOP; ctrl_valid = 1'b0; fft_start = 1'b0; fft_base = TRANSFORM_BUF;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // spectrum into both memories at LEFT_BUF
    t0 = cycle;
    set_ptr(0, LEFT_BUF, 1, 0);
    set_ptr(1, LEFT_BUF, 1, 0);
    for (int k = 0; k < M; k++) begin
      int r;
      r = int'($urandom_range(2000)) - 1000;
      spec[k] = r2sp(r / 1000.0);
      exec(w_store_imm(0, 0, spec[k]));
      exec(w_store_imm(1, 1, spec[k]));
    end
    set_ptr(1, OUT_OV, 1, 0);
    for (int n = 0; n < M; n++) begin
      int r;
      r = int'($urandom_range(2000)) - 1000;
      prev[n] = r2sp(r / 100000.0);
      exec(w_store_imm(1, 1, prev[n]));
    end
    $display("spectrum and previous overlap stored: %0d cycles", cycle - t0);

    // 1. pre-twiddle
    t0 = cycle;
    set_ptr(0, LEFT_BUF, 2, 0);
    set_ptr(1, LEFT_BUF + M - 1, -2, 0);
    set_ptr(2, RIGHT_BUF, 1, 0);
    set_ptr(3, RIGHT_BUF + H, 1, 0);
    for (int k = 0; k < H; k++) begin
      real c, d;
      th = PI * (4 * k + 1) / (4.0 * M);
      c = $cos(th); d = -$sin(th);
      cmul(c, -d, d, c, 0, 0);
    end
    $display("pre-twiddle: %0d cycles", cycle - t0);

    // 2. bit-reverse copy into the transform buffer
    t0 = cycle;
    set_ptr(0, RIGHT_BUF, 1, H - 1);
    set_ptr(2, TRANSFORM_BUF, 1, 0);
    for (int k = 0; k < H; k++) begin
      exec(w_read(1, 0, 1, 0, 0));
      exec(w_move_mem(1, 0, 2));
    end
    set_ptr(1, RIGHT_BUF + H, 1, H - 1);
    set_ptr(3, TRANSFORM_BUF, 1, 0);
    exec(w_read(1, 1, 1, 0, 0));
    for (int k = 1; k < H; k++) exec(w_or(w_read(1, 1, 1, 0, 0), w_move_mem(1, 1, 3)));
    exec(w_move_mem(1, 1, 3));
    $display("bit-reverse copy: %0d cycles", cycle - t0);

    // 3. transform
    t0 = cycle;
    fft_start = 1; @(posedge clk); #1; fft_start = 0;
    while (fft_busy) begin @(posedge clk); #1; end
    $display("512-point transform: %0d cycles", cycle - t0);

    // 4. post-twiddle: y[2n] = Re w, y[M-1-2n] = -Im w
    t0 = cycle;
    set_ptr(0, TRANSFORM_BUF, 1, 0);
    set_ptr(1, TRANSFORM_BUF, 1, 0);
    set_ptr(2, OUT_Y, 2, 0);
    set_ptr(3, OUT_Y + M - 1, -2, 0);
    for (int n = 0; n < H; n++) begin
      real c, s;
      th = PI * n / M;
      c = $cos(th); s = $sin(th);
      cmul(c, s, s, -c, 0, 0);
    end
    $display("post-twiddle: %0d cycles", cycle - t0);

    // 5. unfold into the 2048 time samples
    t0 = cycle;
    set_ptr(2, OUT_X, 1, 0);
    set_ptr(0, OUT_Y + M / 2, 1, 0);
    scale_copy(M / 2, 1.0);
    set_ptr(0, OUT_Y + M - 1, -1, 0);
    scale_copy(M, -1.0);
    set_ptr(0, OUT_Y, 1, 0);
    scale_copy(M / 2, -1.0);
    $display("unfold: %0d cycles", cycle - t0);

    // 6. windowing and overlap-add
    t0 = cycle;
    set_ptr(0, OUT_X, 1, 0);
    set_ptr(1, OUT_OV, 1, 0);
    set_ptr(2, OUT_PCM, 1, 0);
    window_ola();
    $display("windowing and overlap-add: %0d cycles", cycle - t0);

    // compare with the direct sum
    worst = 0; esum = 0; ssum = 0;
    for (int n = 0; n < NT; n++) begin
      ref_x = 0;
      for (int k = 0; k < M; k++)
        ref_x += sp2r(spec[k]) * $cos(PI / M * (n + M / 2 + 0.5) * (k + 0.5));
      x_ref[n] = ref_x;
      got = sp2r(dut.mem_b.mem[OUT_X + n]);
      err = (got - ref_x) < 0 ? ref_x - got : got - ref_x;
      if (err > worst) worst = err;
      esum += err * err;
      ssum += ref_x * ref_x;
      checks++;
      if (err > 1.0e-3) begin
        failures++;
        if (failures < 20) $display("x[%0d] = %f, want %f", n, got, ref_x);
      end
    end
    $display("largest sample error %g, relative RMS error %g %%", worst, 100.0 * (esum / ssum) ** 0.5);
    checks++;
    if ((esum / ssum) ** 0.5 > 2.0e-4) begin
      failures++;
      $display("relative error above 0.02 %%");
    end

    // windowed, overlapped output and the new overlap
    worst = 0; esum = 0; ssum = 0;
    for (int n = 0; n < 2 * M; n++) begin
      if (n < M) begin
        ref_x = win(n) * x_ref[n] + sp2r(prev[n]);
        got = sp2r(dut.mem_a.mem[OUT_PCM + n]);
      end else begin
        ref_x = win(n) * x_ref[n];
        got = sp2r(dut.mem_b.mem[OUT_OV + n - M]);
      end
      err = (got - ref_x) < 0 ? ref_x - got : got - ref_x;
      if (err > worst) worst = err;
      esum += err * err;
      ssum += ref_x * ref_x;
      checks++;
      if (err > 1.0e-6) begin
        failures++;
        if (failures < 20) $display("window/overlap word %0d = %g, want %g", n, got, ref_x);
      end
    end
    $display("after windowing: largest error %g, relative RMS error %g %%", worst, 100.0 * (esum / ssum) ** 0.5);
    checks++;
    if ((esum / ssum) ** 0.5 > 2.0e-4) begin
      failures++;
      $display("relative error after windowing above 0.02 %%");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
