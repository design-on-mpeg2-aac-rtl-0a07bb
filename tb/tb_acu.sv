// tb_acu: self-checking testbench of acu.
// Random sequences of register loads and APL/BPL/CPL accesses with linear,
// modulo (circular) and bit-reversed addressing, and reads colliding with
// CPL writes on the same port, against a behavioural model of the pointer
// registers written with integer arithmetic.
module tb_acu;
  import aac_pkg::*;
  localparam int AWID = 14;
  logic clk = 1'b0, rst_n = 1'b0;
  pl_ctrl_t apl, bpl, cpl;
  logic wr_a, wr_b;
  acu_ld_e ld;
  logic [1:0] ld_idx;
  logic [AWID-1:0] ld_data, addr_a, addr_b;
  logic re_a, we_a, re_b, we_b, drop_a, drop_b;
  logic [3:0][AWID-1:0] rs_q;
  int checks = 0, failures = 0;
  int n_brev = 0, n_wrap = 0, n_drop = 0;

  acu #(.AWID(AWID)) dut (.clk, .rst_n, .apl, .bpl, .cpl, .wr_a, .wr_b, .ld, .ld_idx, .ld_data,
                          .addr_a, .re_a, .we_a, .addr_b, .re_b, .we_b, .drop_a, .drop_b, .rs_q);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rs[4], rd[4], msize[4];   // msize = circular buffer length (1 = linear)

  function automatic int mdl_next(int i);
    int base, off;
    if (msize[i] <= 1) return (rs[i] + rd[i]) & 16'h3FFF;
    base = rs[i] - (rs[i] % msize[i]);
    off  = (rs[i] - base + rd[i]) % msize[i];
    if (off < 0) off += msize[i];
    return base + off;
  endfunction

  function automatic int mdl_brev(int i);
    int k, low, r;
    k = $clog2(msize[i]);
    low = rs[i] % msize[i];
    r = 0;
    for (int b = 0; b < k; b++) if ((low >> b) & 1) r += 1 << (k - 1 - b);
    return rs[i] - low + r;
  endfunction

  task automatic check(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("%s: got %h want %h", what, got, want);
    end
  endtask

  initial begin
    int ea, eb, ec, na, nb, nc;
    ld = ACU_LD_NONE; ld_idx = '0; ld_data = '0;
    apl = '0; bpl = '0; cpl = '0; wr_a = 1'b0; wr_b = 1'b0;
    foreach (rs[i]) begin rs[i] = 0; rd[i] = 0; msize[i] = 1; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int it = 0; it < 4000; it++) begin
      apl = '0; bpl = '0; cpl = '0; wr_a = 0; wr_b = 0; ld = ACU_LD_NONE;
      if (it % 16 == 0) begin
        // reprogram one pointer
        int i, m;
        i = it / 16 % 4;
        m = 1 << $urandom_range(9);
        ld = ACU_LD_RS;  ld_idx = 2'(i); ld_data = 14'($urandom); @(posedge clk); #1; rs[i] = int'(ld_data);
        ld = ACU_LD_RD;  ld_data = 14'(int'($urandom_range(6)) - 3); @(posedge clk); #1; rd[i] = int'($signed(ld_data));
        ld = ACU_LD_MPD; ld_data = 14'(m - 1); @(posedge clk); #1; msize[i] = m;
        ld = ACU_LD_NONE;
        check("load", int'(rs_q[i]), rs[i]);
      end
      // one access per unit, each on a distinct pointer
      apl.ptr = 2'($urandom); bpl.ptr = apl.ptr + 2'd1; cpl.ptr = apl.ptr + 2'd2;
      apl.en = 1; bpl.en = 1'($urandom); cpl.en = 1'($urandom);
      apl.post = 1'($urandom); bpl.post = 1'($urandom); cpl.post = 1'($urandom);
      apl.brev = 1'($urandom);
      if (cpl.en) begin wr_a = 1'($urandom); wr_b = !wr_a || 1'($urandom); end
      #1;
      ea = apl.brev ? mdl_brev(apl.ptr) : rs[apl.ptr];
      eb = rs[bpl.ptr];
      ec = rs[cpl.ptr];
      if (apl.brev && msize[apl.ptr] > 2 && ea != rs[apl.ptr]) n_brev++;
      check("addr A", int'(addr_a), (cpl.en && wr_a) ? ec : ea);
      check("we A / re A", {we_a, re_a, drop_a}, {cpl.en && wr_a, !(cpl.en && wr_a), cpl.en && wr_a});
      if (bpl.en || (cpl.en && wr_b)) check("addr B", int'(addr_b), (cpl.en && wr_b) ? ec : eb);
      check("we B / re B", {we_b, re_b, drop_b}, {cpl.en && wr_b, bpl.en && !(cpl.en && wr_b), bpl.en && cpl.en && wr_b});
      if (drop_a || drop_b) n_drop++;
      na = mdl_next(apl.ptr); nb = mdl_next(bpl.ptr); nc = mdl_next(cpl.ptr);
      if (apl.post && msize[apl.ptr] > 1 && na < rs[apl.ptr] - rd[apl.ptr] - 1) n_wrap++;
      if (apl.post && msize[apl.ptr] > 1 && na > rs[apl.ptr] + 3) n_wrap++;
      @(posedge clk); #1;
      if (apl.post) rs[apl.ptr] = na;
      if (bpl.en && bpl.post) rs[bpl.ptr] = nb;
      if (cpl.en && cpl.post) rs[cpl.ptr] = nc;
      for (int i = 0; i < 4; i++) check("pointer", int'(rs_q[i]), rs[i]);
    end
    // a fixed bit-reverse example: 9-bit reversal of 0x1401 at base 0x1400
    apl = '0; bpl = '0; cpl = '0; wr_a = 0; wr_b = 0;
    ld = ACU_LD_RS; ld_idx = 0; ld_data = 14'h1401; @(posedge clk); #1;
    ld = ACU_LD_MPD; ld_data = 14'h01FF; @(posedge clk); #1;
    ld = ACU_LD_NONE; apl = '0; apl.en = 1; apl.brev = 1; cpl = '0; bpl = '0; wr_a = 0; wr_b = 0;
    #1 check("brev 0x1401", int'(addr_a), 'h1500);
    if (n_brev == 0 || n_wrap == 0 || n_drop == 0) begin
      failures++;
      $display("mechanism not exercised: brev=%0d wrap=%0d drop=%0d", n_brev, n_wrap, n_drop);
    end
    $display("bit-reversed %0d, circular wraps %0d, arbiter drops %0d", n_brev, n_wrap, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
