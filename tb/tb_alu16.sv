// tb_alu16: self-checking testbench of alu16.
// Random operands through every operation; result and flags are compared
// with values computed in the testbench one cycle after the operation.
module tb_alu16;
  import aac_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  alu_op_e op;
  logic ld;
  logic [15:0] bus_a, bus_b, ar_q;
  logic z_q, n_q, c_q;
  int checks = 0, failures = 0;

  alu16 dut (.clk, .rst_n, .op, .ld, .bus_a, .bus_b, .ar_q, .z_q, .n_q, .c_q);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] a, b, r;
    logic c, cprev;
    alu_op_e o;
    op = ALU_NOP; ld = 1'b0; bus_a = '0; bus_b = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    cprev = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      a = (i % 7 == 0) ? 16'd0 : 16'($urandom);
      b = (i % 7 == 0) ? 16'd0 : 16'($urandom);
      if (i % 11 == 0) b = a;
      o = alu_op_e'(1 + $urandom_range(8));
      bus_a = a; bus_b = b; ld = 1'b1;
      @(posedge clk); #1;
      ld = 1'b0; op = o;
      @(posedge clk); #1;
      op = ALU_NOP;
      c = cprev;
      case (o)
        ALU_ADD: begin r = a + b; c = (32'(a) + 32'(b)) > 32'hFFFF; end
        ALU_SUB: begin r = a - b; c = (a >= b); end
        ALU_AND: r = a & b;
        ALU_OR:  r = a | b;
        ALU_XOR: r = a ^ b;
        ALU_SHL: r = 16'(32'(a) * (32'd1 << b[3:0]));
        ALU_SHR: r = 16'(int'($signed(a)) / (1 << b[3:0]) - ((a[15] && (int'($signed(a)) % (1 << b[3:0]) != 0)) ? 1 : 0));
        ALU_PSA: r = a;
        ALU_NOT: r = 16'hFFFF - a;
        default: r = 'x;
      endcase
      cprev = c;
      checks++;
      if (ar_q !== r || z_q !== (r == 0) || n_q !== r[15] || c_q !== c) begin
        failures++;
        if (failures < 20) $display("op %s a=%h b=%h: got %h %b%b%b want %h c=%b", o.name(), a, b, ar_q, z_q, n_q, c_q, r, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
