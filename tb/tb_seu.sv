// tb_seu: self-checking testbench of seu.
// Loads random and edge-case 24-bit words, checks the redundant-sign-bit
// count, left and arithmetic right shifts by immediate and bus amounts
// (including amounts of 24 and more) and normalisation by SE.
module tb_seu;
  import aac_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  seu_op_e op;
  logic [23:0] bus_a, sr_q, so_q;
  logic [7:0]  amt_imm, amt_bus, se_q;
  int checks = 0, failures = 0;

  seu dut (.clk, .rst_n, .op, .bus_a, .amt_imm, .amt_bus, .sr_q, .se_q, .so_q);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_op(input seu_op_e o);
    op = o;
    @(posedge clk); #1;
    op = SEU_NOP;
  endtask

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20) $display("%s: got %h want %h", what, got, want);
    end
  endtask

  // reference: count by repeated doubling while the value stays in range
  function automatic int ref_exp(input logic [23:0] v);
    int n; longint x;
    x = longint'($signed(v));
    n = 0;
    while (n < 23 && x * 2 >= -64'sd8388608 && x * 2 <= 64'sd8388607) begin
      x = x * 2; n++;
    end
    return n;
  endfunction

  function automatic logic [23:0] ref_shift(input logic [23:0] v, input int amt);
    longint x;
    x = longint'($signed(v));
    if (amt >= 0) begin
      for (int i = 0; i < amt && i < 30; i++) x = x * 2;
      return 24'(x);
    end
    for (int i = 0; i < -amt && i < 30; i++) x = (x < 0) ? -((-x + 1) / 2) : x / 2;
    return 24'(x);
  endfunction

  initial begin
    logic [23:0] v;
    int a;
    op = SEU_NOP; bus_a = '0; amt_imm = '0; amt_bus = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 1500; i++) begin
      case (i)
        0: v = 24'h000000;
        1: v = 24'hFFFFFF;
        2: v = 24'h400000;
        3: v = 24'h800000;
        4: v = 24'h000001;
        default: v = 24'($urandom) >> $urandom_range(23);
      endcase
      if (i > 4 && $urandom_range(1)) v = ~v;
      bus_a = v;
      do_op(SEU_LD);
      check("SR", 32'(sr_q), 32'(v));
      do_op(SEU_EXP);
      check("SE", 32'(se_q), 32'(ref_exp(v)));
      do_op(SEU_SHE);
      check("normalise", 32'(so_q), 32'(ref_shift(v, ref_exp(v))));
      a = int'($urandom_range(60)) - 30;
      amt_imm = 8'(a);
      do_op(SEU_SHI);
      check("shift imm", 32'(so_q), 32'(ref_shift(v, a)));
      a = int'($urandom_range(60)) - 30;
      amt_bus = 8'(a);
      do_op(SEU_SHB);
      check("shift bus", 32'(so_q), 32'(ref_shift(v, a)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
