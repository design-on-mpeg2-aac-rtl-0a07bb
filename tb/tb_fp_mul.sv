// tb_fp_mul: self-checking testbench of fp_mul.
// Random normal operands, zeros, overflow and underflow cases are fed one per
// cycle; every result is compared, at exactly two cycles of latency, with the
// double-precision product rounded toward zero.
module tb_fp_mul;
  import fp_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  logic [31:0] a, b, y;
  logic out_valid;
  int checks = 0, failures = 0;

  fp_mul dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] exp_q[$];
  logic        vld_q[$];

  task automatic put(input logic [31:0] x, input logic [31:0] z);
    a = x; b = z; in_valid = 1'b1;
    @(posedge clk);
    #1;
  endtask

  // compare at the output, two cycles after issue
  always @(posedge clk) if (rst_n) begin
    vld_q.push_back(in_valid);
    exp_q.push_back(mul_ref(a, b));
    if (vld_q.size() > 2) begin
      logic v; logic [31:0] e;
      v = vld_q.pop_front();
      e = exp_q.pop_front();
      if (out_valid !== v) begin
        failures++;
        $display("valid mismatch: got %0b want %0b", out_valid, v);
      end else if (v) begin
        checks++;
        if (!sp_eq(y, e)) begin
          failures++;
          if (failures < 10) $display("mul mismatch: got %h want %h", y, e);
        end
      end
    end
  end

  initial begin
    in_valid = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    put(32'h3F80_0000, 32'h4000_0000);          // 1 * 2
    put(32'h3FC0_0000, 32'hBFC0_0000);          // 1.5 * -1.5
    put(32'h0000_0000, 32'h4049_0FDB);          // 0 * pi
    put(32'h7F00_0000, 32'h7F00_0000);          // overflow
    put(32'h0100_0000, 32'h0100_0000);          // underflow
    for (int i = 0; i < 3000; i++) put(rand_sp(64, 190), rand_sp(64, 190));
    in_valid = 1'b0;
    repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
