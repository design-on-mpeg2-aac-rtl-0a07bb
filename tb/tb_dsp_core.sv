// tb_dsp_core: self-checking testbench of dsp_core with two data memories.
// Short control-word programs exercise every unit through the buses: stores
// and loads through CPL/APL/BPL, a floating-point dot product through the FPU
// multiply-accumulate path, a bit-reversed copy with modulo wrap-around, an
// arbiter collision, SEU normalisation, an ALU subtract from GPR operands,
// and a fixed-point multiply. Results are read on bus C or in the memories
// and compared with values computed here.
module tb_dsp_core;
  import aac_pkg::*;
  import fp_ref_pkg::*;
  import core_prog_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ctrl_valid;
  ctrl_word_t ctrl;
  logic ext_a_en, ext_a_we, ext_b_en, ext_b_we, drop;
  logic [AW-1:0] ext_a_addr, ext_b_addr;
  logic [31:0] ext_a_wdata, ext_a_rdata, ext_b_wdata, ext_b_rdata, bus_c;
  logic [2:0] flags;
  int checks = 0, failures = 0;

  dsp_core dut (.*);

  dp_ram #(.DEPTH(256), .AWID(AW)) mem_a (.clk, .en0(ext_a_en), .we0(ext_a_we), .addr0(ext_a_addr), .wdata0(ext_a_wdata),
                                          .rdata0(ext_a_rdata), .en1(1'b0), .we1(1'b0), .addr1('0), .wdata1('0), .rdata1());
  dp_ram #(.DEPTH(256), .AWID(AW)) mem_b (.clk, .en0(ext_b_en), .we0(ext_b_we), .addr0(ext_b_addr), .wdata0(ext_b_wdata),
                                          .rdata0(ext_b_rdata), .en1(1'b0), .we1(1'b0), .addr1('0), .wdata1('0), .rdata1());

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] seen;   // bus C in the last executed cycle
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

  function automatic ctrl_word_t w_obs(c_src_e s);
    ctrl_word_t w = CTRL_NOP;
    w.c_src = s;
    return w;
  endfunction

  logic [31:0] xa[16], yb[16];

  initial begin
    ctrl_word_t w;
    logic [31:0] acc_ref, v;
    int e;
    ctrl = CTRL_NOP; ctrl_valid = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---- stores: x to A[0x10..], y to B[0x10..]
    exec(w_acu(ACU_LD_RS, 0, 'h10)); exec(w_acu(ACU_LD_RD, 0, 1));
    exec(w_acu(ACU_LD_RS, 1, 'h10)); exec(w_acu(ACU_LD_RD, 1, 1));
    for (int i = 0; i < 16; i++) begin
      xa[i] = rand_sp(120, 130); yb[i] = rand_sp(120, 130);
      exec(w_store_imm(0, 0, xa[i]));
      exec(w_store_imm(1, 1, yb[i]));
    end
    for (int i = 0; i < 16; i++) begin
      check("store A", mem_a.mem['h10 + i], xa[i]);
      check("store B", mem_b.mem['h10 + i], yb[i]);
    end

    // ---- loads: every word back over bus A and bus B
    exec(w_acu(ACU_LD_RS, 0, 'h10)); exec(w_acu(ACU_LD_RS, 1, 'h10));
    for (int i = 0; i < 16; i++) begin
      ctrl_word_t r;
      exec(w_read(1, 0, 0, 1, 1));
      exec(w_move_mem(0, 0, 0));
      check("load A", seen, xa[i]);
      r = CTRL_NOP; r.b_src = B_MEM; r.c_src = C_BUSB;
      exec(r);
      check("load B", seen, yb[i]);
    end

    // ---- dot product through X/Y, P and ACC
    exec(w_acu(ACU_LD_RS, 0, 'h10)); exec(w_acu(ACU_LD_RS, 1, 'h10));
    w = CTRL_NOP; w.fpu.clr = 1'b1; exec(w);
    acc_ref = 0;
    for (int i = 0; i < 16; i++) begin
      exec(w_read(1, 0, 0, 1, 1));
      w = CTRL_NOP; w.a_src = A_MEM; w.b_src = B_MEM; w.fpu.ld_x = 1; w.fpu.ld_y = 1; exec(w);
      w = CTRL_NOP; w.fpu.mul = 1; exec(w);
      nop(2);
      w = CTRL_NOP; w.fpu.add = 1; w.fpu.a_sel = ADD_A_P; w.fpu.b_sel = ADD_B_ACC; exec(w);
      nop(2);
      acc_ref = add_ref(mul_ref(xa[i], yb[i]), acc_ref);
    end
    exec(w_obs(C_ACC));
    check("dot product", seen, acc_ref);

    // ---- bit-reversed copy A[0x10..0x1F] -> A[0x40..], modulo 16
    exec(w_acu(ACU_LD_RS, 0, 'h10)); exec(w_acu(ACU_LD_MPD, 0, 'hF));
    exec(w_acu(ACU_LD_RS, 2, 'h40)); exec(w_acu(ACU_LD_RD, 2, 1));
    for (int i = 0; i < 16; i++) begin
      exec(w_read(1, 0, 1, 0, 0));
      exec(w_move_mem(1, 0, 2));
    end
    for (int i = 0; i < 16; i++) begin
      int r;
      r = {i[0], i[1], i[2], i[3]};
      check("bit-reverse copy", mem_a.mem['h40 + i], xa[r]);
    end
    // the pointer wrapped back to the start of its 16-word block
    exec(w_read(1, 0, 0, 0, 0));
    exec(w_move_mem(0, 0, 0));
    check("modulo wrap", seen, xa[0]);

    // ---- arbiter: a CPL write to A beats an APL read of A
    exec(w_acu(ACU_LD_RS, 3, 'h80));
    w = w_or(w_store_imm(0, 3, 32'h1234_5678), w_read(1, 0, 0, 0, 0));
    ctrl = w; ctrl_valid = 1; #1;
    checks++;
    if (!drop) begin failures++; $display("collision not flagged"); end
    @(posedge clk); #1; ctrl_valid = 0; ctrl = CTRL_NOP;
    check("write wins", mem_a.mem['h80], 32'h1234_5678);

    // ---- SEU: normalise a 24-bit value
    for (int i = 0; i < 20; i++) begin
      v = 32'($urandom) >> (8 + $urandom_range(22));
      if (i % 2) v = 32'(-int'(v));
      w = CTRL_NOP; w.a_src = A_IMM; w.imm = v; w.seu = SEU_LD; exec(w);
      w = CTRL_NOP; w.seu = SEU_EXP; exec(w);
      w = CTRL_NOP; w.seu = SEU_SHE; exec(w);
      exec(w_obs(C_SE));
      e = 0;
      while (e < 23 && $signed(v[23:0]) * (2 ** (e + 1)) >= -(2 ** 23) && $signed(v[23:0]) * (2 ** (e + 1)) < 2 ** 23) e++;
      check("SEU exponent", seen, 32'(e));
      exec(w_obs(C_SEU));
      check("SEU normalised", seen, 32'($signed(v[23:0]) * (2 ** e)));
    end

    // ---- ALU: RH0 - RH1 from the GPR
    w = CTRL_NOP; w.a_src = A_IMM; w.imm = 1000; w.c_src = C_BUSA; w.gpr_we = 1; w.gpr_w = 0; exec(w);
    w = CTRL_NOP; w.a_src = A_IMM; w.imm = 1234; w.c_src = C_BUSA; w.gpr_we = 1; w.gpr_w = 1; exec(w);
    w = CTRL_NOP; w.a_src = A_GPR; w.gpr_a = 0; w.b_src = B_GPR; w.gpr_b = 1; w.alu_ld = 1; exec(w);
    w = CTRL_NOP; w.alu = ALU_SUB; exec(w);
    exec(w_obs(C_ALU));
    check("ALU 1000-1234", seen, 32'(-234));
    check("ALU flags", 32'(flags), 32'b010);

    // ---- fixed point: 0.5 * -0.25 in Q1.23
    w = CTRL_NOP; w.a_src = A_IMM; w.b_src = B_IMM; w.imm = 32'h0040_0000; w.fpu.ld_x = 1; w.fpu.ld_y = 1; exec(w);
    w = CTRL_NOP; w.b_src = B_IMM; w.imm = 32'hFFE0_0000; w.fpu.ld_y = 1; exec(w);
    w = CTRL_NOP; w.fpu.mul = 1; w.fpu.fix = 1; exec(w);
    nop(2);
    exec(w_obs(C_P));
    check("fixed 0.5*-0.25", seen, 32'hFFF0_0000);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
