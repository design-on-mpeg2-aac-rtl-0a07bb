// tb_gpr: self-checking testbench of gpr.
// Random writes and reads of RH0..RH3 through both read ports against a
// shadow copy; also checks that a write shows on the read ports only after
// the clock edge.
module tb_gpr;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] ra, rb, wa;
  logic we;
  logic [31:0] wd, qa, qb;
  logic [31:0] shadow [4];
  int checks = 0, failures = 0;

  gpr #(.NREG(4)) dut (.clk, .rst_n, .ra, .rb, .we, .wa, .wd, .qa, .qb);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ra = '0; rb = '0; wa = '0; we = 1'b0; wd = '0;
    foreach (shadow[i]) shadow[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      we = 1'($urandom); wa = 2'($urandom); wd = $urandom;
      ra = 2'($urandom); rb = 2'($urandom);
      #1;
      checks++;
      if (qa !== shadow[ra] || qb !== shadow[rb]) begin
        failures++;
        if (failures < 20) $display("read mismatch RH%0d=%h RH%0d=%h", ra, qa, rb, qb);
      end
      @(posedge clk); #1;
      if (we) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
