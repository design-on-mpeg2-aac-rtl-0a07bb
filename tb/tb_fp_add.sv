// tb_fp_add: self-checking testbench of fp_add.
// Random operands with small and large exponent differences, both signs and
// both operations (add, subtract), plus exact cancellation, are fed one per
// cycle; each result is compared, at exactly two cycles of latency, with a
// reference sum rounded toward zero.
module tb_fp_add;
  import fp_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, sub;
  logic [31:0] a, b, y;
  logic out_valid;
  int checks = 0, failures = 0;

  fp_add dut (.clk, .rst_n, .in_valid, .a, .b, .sub, .out_valid, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] exp_q[$];
  logic        vld_q[$];

  task automatic put(input logic [31:0] x, input logic [31:0] z, input logic s);
    a = x; b = z; sub = s; in_valid = 1'b1;
    @(posedge clk);
    #1;
  endtask

  always @(posedge clk) if (rst_n) begin
    vld_q.push_back(in_valid);
    exp_q.push_back(add_ref(a, b ^ {sub, 31'd0}));
    if (vld_q.size() > 2) begin
      logic v; logic [31:0] e;
      v = vld_q.pop_front();
      e = exp_q.pop_front();
      if (out_valid !== v) begin
        failures++;
        $display("valid mismatch");
      end else if (v) begin
        checks++;
        if (!sp_eq(y, e)) begin
          failures++;
          if (failures < 10) $display("add mismatch: got %h want %h", y, e);
        end
      end
    end
  end

  initial begin
    logic [31:0] x, z;
    in_valid = 1'b0; a = '0; b = '0; sub = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    put(32'h3F80_0000, 32'h3F80_0000, 1'b0);    // 1 + 1
    put(32'h3F80_0000, 32'h3F80_0000, 1'b1);    // 1 - 1
    put(32'h4049_0FDB, 32'h0000_0000, 1'b0);    // pi + 0
    put(32'h3F80_0000, 32'h3380_0000, 1'b1);    // 1 - 2^-24
    for (int i = 0; i < 4000; i++) begin
      x = rand_sp(60, 190);
      // mostly close exponents, sometimes far apart
      if ($urandom_range(3) == 0) z = rand_sp(60, 190);
      else begin
        z = rand_sp(0, 0);
        z[30:23] = 8'(int'(x[30:23]) - 4 + int'($urandom_range(8)));
      end
      put(x, z, 1'($urandom));
    end
    in_valid = 1'b0;
    repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
