// imdct_bfly: complex butterfly of the IMDCT performer.
//
// For data d = dr + j*di, x = xr + j*xi and coefficient w = wr + j*wi it
// computes
//   even = d + w*x
//   odd  = 2*d - even        (= d - w*x)
// in single-precision floating point. The complex product uses four
// multipliers, (xr*wr - xi*wi) + j*(xr*wi + xi*wr); the doubling of d is an
// exponent increment. Every result is rounded toward zero by the FP units.
//
// Pipeline: multiply (2) -> product sum (2) -> even (2) -> odd (2). A new
// butterfly can enter every cycle; even and odd appear together with
// out_valid exactly LATENCY = 8 cycles after in_valid. The d operand is
// delayed alongside.
//
// The even/odd equations, including forming odd from 2d - even, follow the
// document's butterfly diagram. That the unit is fully parallel (four
// multipliers, one butterfly per cycle) is this design's own choice.
module imdct_bfly
  import aac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] dr,
  input  logic [31:0] di,
  input  logic [31:0] xr,
  input  logic [31:0] xi,
  input  logic [31:0] wr,
  input  logic [31:0] wi,
  output logic        out_valid,
  output logic [31:0] even_r,
  output logic [31:0] even_i,
  output logic [31:0] odd_r,
  output logic [31:0] odd_i
);
  localparam int unsigned LATENCY = 8;

  // times two: exponent + 1 (zero stays zero, the top exponent saturates)
  function automatic logic [31:0] twice(input logic [31:0] v);
    if (v[30:23] == 8'h00 || v[30:23] >= 8'hFE) return (v[30:23] == 8'h00) ? v : {v[31], 8'hFF, 23'd0};
    return {v[31], v[30:23] + 8'd1, v[22:0]};
  endfunction

  // d delay line, 4 cycles to the even adders and 6 to the odd adders
  logic [5:0][31:0] dr_d, di_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dr_d <= '0;
      di_d <= '0;
    end else begin
      dr_d <= {dr_d[4:0], dr};
      di_d <= {di_d[4:0], di};
    end
  end

  logic        m_v, m_v1, m_v2, m_v3;
  logic [31:0] xrwr, xiwi, xrwi, xiwr;
  fp_mul u_m0 (.clk, .rst_n, .in_valid, .a(xr), .b(wr), .out_valid(m_v),  .y(xrwr));
  fp_mul u_m1 (.clk, .rst_n, .in_valid, .a(xi), .b(wi), .out_valid(m_v1), .y(xiwi));
  fp_mul u_m2 (.clk, .rst_n, .in_valid, .a(xr), .b(wi), .out_valid(m_v2), .y(xrwi));
  fp_mul u_m3 (.clk, .rst_n, .in_valid, .a(xi), .b(wr), .out_valid(m_v3), .y(xiwr));

  logic        p_v, p_v1;
  logic [31:0] pr, pi;
  fp_add u_a0 (.clk, .rst_n, .in_valid(m_v), .a(xrwr), .b(xiwi), .sub(1'b1), .out_valid(p_v),  .y(pr));
  fp_add u_a1 (.clk, .rst_n, .in_valid(m_v), .a(xrwi), .b(xiwr), .sub(1'b0), .out_valid(p_v1), .y(pi));

  logic        e_v, e_v1;
  logic [31:0] ev_r, ev_i;
  fp_add u_a2 (.clk, .rst_n, .in_valid(p_v), .a(dr_d[3]), .b(pr), .sub(1'b0), .out_valid(e_v),  .y(ev_r));
  fp_add u_a3 (.clk, .rst_n, .in_valid(p_v), .a(di_d[3]), .b(pi), .sub(1'b0), .out_valid(e_v1), .y(ev_i));

  logic        o_v1;
  fp_add u_a4 (.clk, .rst_n, .in_valid(e_v), .a(twice(dr_d[5])), .b(ev_r), .sub(1'b1), .out_valid(out_valid), .y(odd_r));
  fp_add u_a5 (.clk, .rst_n, .in_valid(e_v), .a(twice(di_d[5])), .b(ev_i), .sub(1'b1), .out_valid(o_v1),      .y(odd_i));

  // even is held two more cycles so that it leaves together with odd
  logic [31:0] ev_r_d, ev_i_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ev_r_d <= '0; ev_i_d <= '0;
      even_r <= '0; even_i <= '0;
    end else begin
      ev_r_d <= ev_r;   ev_i_d <= ev_i;
      even_r <= ev_r_d; even_i <= ev_i_d;
    end
  end
endmodule
