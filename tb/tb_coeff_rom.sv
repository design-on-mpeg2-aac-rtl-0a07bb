// tb_coeff_rom: self-checking testbench of coeff_rom at its default size.
// Reads every word through both ports and checks the interleaving (even word
// = sine, odd word = cosine of 2*pi*k/512) against the simulator's own sine
// and cosine to within half a unit in the last place, and the one-cycle
// read latency.
module tb_coeff_rom;
  import fp_ref_pkg::*;
  logic clk = 1'b0;
  logic [8:0] addr0, addr1;
  logic [31:0] q0, q1;
  int checks = 0, failures = 0;

  coeff_rom dut (.clk, .addr0, .q0, .addr1, .q1);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit close(input logic [31:0] got, input real want);
    real g, tol;
    g = sp2r(got);
    tol = (want < 0 ? -want : want) * 6.0e-8 + 1.0e-30;
    return (g - want <= tol) && (want - g <= tol);
  endfunction

  initial begin
    real th;
    for (int k = 0; k < 256; k++) begin
      addr0 = 9'(2 * k); addr1 = 9'(2 * k + 1);
      @(posedge clk); #1;
      addr0 = 9'(2 * ((k + 1) % 256)); addr1 = 9'(2 * ((k + 1) % 256) + 1);  // next address must not show yet
      th = 2.0 * 3.14159265358979323846 * k / 512.0;
      checks += 2;
      if (!close(q0, $sin(th)) || !close(q1, $cos(th))) begin
        failures++;
        if (failures < 20) $display("k=%0d: sin %h cos %h", k, q0, q1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
