// tb_imdct_fft: self-checking testbench of imdct_fft.
// Two memories hold a random complex vector, stored bit-reversed at a base
// address, with guard words around it. After a transform the buffer must hold
// the forward DFT of the vector (computed here in double precision) to within
// a small error bound, the guard words must be unchanged, and the transform
// must take the documented number of cycles. Two transforms run back to back.
module tb_imdct_fft;
  import aac_pkg::*;
  import fp_ref_pkg::*;
  localparam int N = 64, LOGN = 6, AWID = 14, DEPTH = 256;
  localparam int BASE = 'h40;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done;
  logic [AWID-1:0] base;
  logic a_en0, a_we0, a_en1, a_we1, b_en0, b_we0, b_en1, b_we1;
  logic [AWID-1:0] a_addr0, a_addr1, b_addr0, b_addr1;
  logic [31:0] a_wdata0, a_wdata1, b_wdata0, b_wdata1, a_rdata0, a_rdata1, b_rdata0, b_rdata1;
  int checks = 0, failures = 0;

  imdct_fft #(.N(N), .TABLE(N), .AWID(AWID)) dut (.*);

  dp_ram #(.DEPTH(DEPTH), .AWID(AWID)) mem_a (.clk, .en0(a_en0), .we0(a_we0), .addr0(a_addr0), .wdata0(a_wdata0), .rdata0(a_rdata0),
                                              .en1(a_en1), .we1(a_we1), .addr1(a_addr1), .wdata1(a_wdata1), .rdata1(a_rdata1));
  dp_ram #(.DEPTH(DEPTH), .AWID(AWID)) mem_b (.clk, .en0(b_en0), .we0(b_we0), .addr0(b_addr0), .wdata0(b_wdata0), .rdata0(b_rdata0),
                                              .en1(b_en1), .we1(b_we1), .addr1(b_addr1), .wdata1(b_wdata1), .rdata1(b_rdata1));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rev(int v);
    int r = 0;
    for (int b = 0; b < LOGN; b++) if ((v >> b) & 1) r |= 1 << (LOGN - 1 - b);
    return r;
  endfunction

  real xr[N], xi[N];

  initial begin
    int cyc, expect_cyc;
    real sr, si, th, err, mag;
    start = 0; base = AWID'(BASE);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      for (int i = 0; i < DEPTH; i++) begin
        mem_a.mem[i] = 32'hA5A5_0000 | 32'(i);
        mem_b.mem[i] = 32'h5A5A_0000 | 32'(i);
      end
      for (int n = 0; n < N; n++) begin
        int ra, rb, idx;
        logic [31:0] wa, wb;
        ra = int'($urandom_range(2000)) - 1000;
        rb = int'($urandom_range(2000)) - 1000;
        wa = r2sp(ra / 1000.0);
        wb = r2sp(rb / 1000.0);
        idx = BASE + rev(n);
        mem_a.mem[idx] = wa;
        mem_b.mem[idx] = wb;
        xr[n] = sp2r(wa);
        xi[n] = sp2r(wb);
      end
      @(posedge clk); #1;
      start = 1;
      @(posedge clk); #1;
      start = 0;
      cyc = 1;
      checks++;
      if (!busy) begin failures++; $display("busy not raised"); end
      while (!done) begin @(posedge clk); #1; cyc++; end
      @(posedge clk); #1;
      expect_cyc = LOGN * (N + 9) + 1;
      checks++;
      if (cyc != expect_cyc || busy) begin
        failures++;
        $display("transform took %0d cycles, expected %0d (busy=%0b)", cyc, expect_cyc, busy);
      end
      for (int m = 0; m < N; m++) begin
        sr = 0; si = 0;
        for (int n = 0; n < N; n++) begin
          th = 2.0 * 3.14159265358979323846 * ((n * m) % N) / N;
          sr += xr[n] * $cos(th) + xi[n] * $sin(th);
          si += xi[n] * $cos(th) - xr[n] * $sin(th);
        end
        err = (sp2r(mem_a.mem[BASE + m]) - sr) ** 2 + (sp2r(mem_b.mem[BASE + m]) - si) ** 2;
        mag = 1.0e-4 * N;
        checks++;
        if (err > mag * mag) begin
          failures++;
          if (failures < 20) $display("X[%0d] = %f %f, want %f %f", m, sp2r(mem_a.mem[BASE + m]), sp2r(mem_b.mem[BASE + m]), sr, si);
        end
      end
      for (int i = 0; i < DEPTH; i++) if (i < BASE || i >= BASE + N) begin
        checks++;
        if (mem_a.mem[i] != (32'hA5A5_0000 | 32'(i)) || mem_b.mem[i] != (32'h5A5A_0000 | 32'(i))) begin
          failures++;
          $display("guard word %0d overwritten", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
