// tb_imdct_bfly: self-checking testbench of imdct_bfly.
// Feeds one random complex butterfly per cycle (and bursts with gaps) and
// checks even = d + w*x and odd = 2d - even bit-exactly against the same
// sequence of truncating single-precision operations computed by the
// reference package, at exactly eight cycles of latency. A second check
// bounds the error against double precision.
module tb_imdct_bfly;
  import fp_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid;
  logic [31:0] dr, di, xr, xi, wr, wi, even_r, even_i, odd_r, odd_i;
  int checks = 0, failures = 0;

  imdct_bfly dut (.clk, .rst_n, .in_valid, .dr, .di, .xr, .xi, .wr, .wi,
                  .out_valid, .even_r, .even_i, .odd_r, .odd_i);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {bit v; logic [31:0] er, ei, or_, oi; real rer, rei;} exp_t;
  exp_t q[$];

  function automatic logic [31:0] neg(input logic [31:0] v);
    return v ^ 32'h8000_0000;
  endfunction

  function automatic bit near(input logic [31:0] got, input real want, input real scale);
    real d;
    d = sp2r(got) - want;
    if (d < 0) d = -d;
    return d <= scale * 1.0e-6;
  endfunction

  always @(posedge clk) if (rst_n) begin
    exp_t e;
    logic [31:0] pr, pi;
    e.v = in_valid;
    pr = add_ref(mul_ref(xr, wr), neg(mul_ref(xi, wi)));
    pi = add_ref(mul_ref(xr, wi), mul_ref(xi, wr));
    e.er = add_ref(dr, pr);
    e.ei = add_ref(di, pi);
    e.or_ = add_ref(mul_ref(dr, 32'h4000_0000), neg(e.er));
    e.oi = add_ref(mul_ref(di, 32'h4000_0000), neg(e.ei));
    e.rer = sp2r(dr) + sp2r(xr) * sp2r(wr) - sp2r(xi) * sp2r(wi);
    e.rei = sp2r(di) + sp2r(xr) * sp2r(wi) + sp2r(xi) * sp2r(wr);
    q.push_back(e);
    if (q.size() > 8) begin
      e = q.pop_front();
      if (out_valid !== e.v) begin
        failures++;
        $display("out_valid at wrong time");
      end else if (e.v) begin
        checks++;
        if (!sp_eq(even_r, e.er) || !sp_eq(even_i, e.ei) || !sp_eq(odd_r, e.or_) || !sp_eq(odd_i, e.oi)) begin
          failures++;
          if (failures < 20) $display("bfly: got %h %h %h %h want %h %h %h %h",
                                      even_r, even_i, odd_r, odd_i, e.er, e.ei, e.or_, e.oi);
        end
        checks++;
        if (!near(even_r, e.rer, 8.0) || !near(even_i, e.rei, 8.0)) begin
          failures++;
          if (failures < 20) $display("bfly precision: %h %h", even_r, even_i);
        end
      end
    end
  end

  initial begin
    real th;
    in_valid = 0; dr = 0; di = 0; xr = 0; xi = 0; wr = 0; wi = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      in_valid = (i % 50 < 40);
      dr = rand_sp(120, 129); di = rand_sp(120, 129);
      xr = rand_sp(120, 129); xi = rand_sp(120, 129);
      th = 2.0 * 3.14159265358979323846 * $urandom_range(511) / 512.0;
      wr = r2sp($cos(th));
      wi = r2sp(-$sin(th));
      @(posedge clk); #1;
    end
    in_valid = 0;
    repeat (12) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
