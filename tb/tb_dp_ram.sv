// tb_dp_ram: self-checking testbench of dp_ram.
// Random reads and writes on both ports against a shadow array: one-cycle
// read latency, read-before-write on one port, port 1 winning a write
// collision, and read data holding while a port is idle or writing.
module tb_dp_ram;
  localparam int DEPTH = 64, AWID = 6;
  logic clk = 1'b0;
  logic en0, we0, en1, we1;
  logic [AWID-1:0] addr0, addr1;
  logic [31:0] wdata0, wdata1, rdata0, rdata1;
  logic [31:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  dp_ram #(.DEPTH(DEPTH), .AWID(AWID), .DWID(32)) dut (.clk, .en0, .we0, .addr0, .wdata0, .rdata0,
                                                       .en1, .we1, .addr1, .wdata1, .rdata1);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp0, exp1;
    bit r0, r1;
    foreach (shadow[i]) shadow[i] = '0;
    en0 = 0; we0 = 0; en1 = 0; we1 = 0; addr0 = '0; addr1 = '0; wdata0 = '0; wdata1 = '0;
    @(posedge clk); #1;
    // both ports read once so the read registers are defined
    en0 = 1; en1 = 1; @(posedge clk); #1;
    exp0 = 0; exp1 = 0;
    for (int i = 0; i < 5000; i++) begin
      en0 = 1'($urandom); we0 = 1'($urandom); addr0 = 6'($urandom); wdata0 = $urandom;
      en1 = 1'($urandom); we1 = 1'($urandom); addr1 = (i % 9 == 0) ? addr0 : 6'($urandom); wdata1 = $urandom;
      r0 = en0 && !we0; r1 = en1 && !we1;
      if (r0) exp0 = shadow[addr0];
      if (r1) exp1 = shadow[addr1];
      @(posedge clk); #1;
      if (en0 && we0) shadow[addr0] = wdata0;
      if (en1 && we1) shadow[addr1] = wdata1;
      checks++;
      if (rdata0 !== exp0 || rdata1 !== exp1) begin
        failures++;
        if (failures < 20) $display("read mismatch: %h/%h want %h/%h", rdata0, rdata1, exp0, exp1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
