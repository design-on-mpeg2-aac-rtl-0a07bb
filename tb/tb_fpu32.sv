// tb_fpu32: self-checking testbench of fpu32.
// Checks float multiply, add, subtract, the multiply-accumulate chain through
// the P and ACC feedback paths, accumulator clear, the 24-bit fixed-point
// multiply and saturating add, and the three-cycle result latency.
module tb_fpu32;
  import aac_pkg::*;
  import fp_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  fpu_ctrl_t ctl;
  logic [31:0] bus_a, bus_b, p_q, acc_q, x_q, y_q;
  int checks = 0, failures = 0;

  fpu32 dut (.clk, .rst_n, .ctl, .bus_a, .bus_b, .p_q, .acc_q, .x_q, .y_q);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    @(posedge clk); #1;
    ctl = '0;
  endtask

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] want);
    checks++;
    if (!sp_eq(got, want)) begin
      failures++;
      if (failures < 20) $display("%s: got %h want %h", what, got, want);
    end
  endtask

  task automatic load(input logic [31:0] x, input logic [31:0] y);
    ctl = '0; ctl.ld_x = 1'b1; ctl.ld_y = 1'b1; bus_a = x; bus_b = y;
    step();
  endtask

  function automatic logic [31:0] fx_mul(input logic [31:0] x, input logic [31:0] y);
    longint p;
    p = (longint'($signed(x[23:0])) * longint'($signed(y[23:0]))) >>> 23;
    if (p > 64'sd8388607) p = 8388607;
    return 32'(p);
  endfunction

  function automatic logic [31:0] fx_add(input logic [31:0] x, input logic [31:0] y, input bit s);
    int r;
    r = s ? int'($signed(x[23:0])) - int'($signed(y[23:0])) : int'($signed(x[23:0])) + int'($signed(y[23:0]));
    if (r > 8388607) r = 8388607;
    if (r < -8388608) r = -8388608;
    return 32'(r);
  endfunction

  initial begin
    logic [31:0] x, y, acc_ref, p_old;
    ctl = '0; bus_a = '0; bus_b = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    step();

    // float multiply and its latency
    for (int i = 0; i < 200; i++) begin
      x = rand_sp(90, 160); y = rand_sp(90, 160);
      load(x, y);
      p_old = p_q;
      ctl.mul = 1'b1;
      step(); step();
      check("P early", p_q, p_old);      // not yet after two edges
      step();
      check("mul", p_q, mul_ref(x, y));
    end

    // float add / subtract X +/- Y
    for (int i = 0; i < 200; i++) begin
      bit s;
      x = rand_sp(100, 140); y = rand_sp(100, 140); s = 1'($urandom);
      load(x, y);
      ctl.add = 1'b1; ctl.sub = s;
      step(); step(); step();
      check("add", acc_q, add_ref(x, y ^ {s, 31'd0}));
    end

    // multiply-accumulate: ACC = sum x_i*y_i, through P and ACC feedback
    for (int r = 0; r < 20; r++) begin
      ctl.clr = 1'b1;
      step();
      check("clr", acc_q, 32'd0);
      acc_ref = 32'd0;
      for (int i = 0; i < 16; i++) begin
        x = rand_sp(120, 130); y = rand_sp(120, 130);
        load(x, y);
        ctl.mul = 1'b1;
        step(); step(); step();
        ctl.add = 1'b1; ctl.a_sel = ADD_A_P; ctl.b_sel = ADD_B_ACC;
        step(); step(); step();
        acc_ref = add_ref(mul_ref(x, y), acc_ref);
        check("mac", acc_q, acc_ref);
      end
    end

    // 24-bit fixed point
    load(32'h0080_0000, 32'h0080_0000);               // -1 * -1 saturates
    ctl.mul = 1'b1; ctl.fix = 1'b1;
    step(); step(); step();
    check("fix sat mul", p_q, 32'h007F_FFFF);
    for (int i = 0; i < 200; i++) begin
      bit s;
      x = {8'd0, 24'($urandom)}; y = {8'd0, 24'($urandom)}; s = 1'($urandom);
      load(x, y);
      ctl.mul = 1'b1; ctl.add = 1'b1; ctl.sub = s; ctl.fix = 1'b1;
      step(); step(); step();
      check("fix mul", p_q, fx_mul(x, y));
      check("fix add", acc_q, fx_add(x, y, s));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
