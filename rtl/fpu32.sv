// fpu32: the floating-point unit of the DSP core.
//
// Two operand registers, X loaded from bus A and Y from bus B, feed a
// pipelined multiplier and a pipelined adder. The multiplier result lands in
// the product register P, the adder result in the accumulator ACC. The adder
// takes its first operand from X or from P (multiplier feedback) and its
// second from Y or from ACC (accumulator feedback), so a multiply-accumulate
// chain runs as mul -> P, add P + ACC -> ACC. P and ACC drive bus C.
//
// With ctl.fix set, the same operations work on 24-bit two's complement Q1.23
// values held in the low 24 bits of X and Y: the product is (X*Y) >>> 23, the
// sum is saturated to 24 bits, and results are sign-extended to 32 bits.
//
// Timing: ld_x/ld_y load at the clock edge that samples them. mul and add use
// the register values current in the cycle they are issued, and their result
// appears in P or ACC LAT = 3 cycles later (after the third rising edge: two
// pipeline stages of the arithmetic unit, then the P or ACC register).
// clr zeroes ACC at the next edge. A new operation can be issued every cycle.
//
// The unit list (X/Y registers, 32-bit FP multiplier and adder, output
// registers with feedback to the adder) and the 32-bit float / 24-bit fixed
// pair follow the document's block diagram and text; the operand selection,
// saturation and latencies are this design's own.
module fpu32
  import aac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  fpu_ctrl_t   ctl,
  input  logic [31:0] bus_a,
  input  logic [31:0] bus_b,
  output logic [31:0] p_q,
  output logic [31:0] acc_q,
  output logic [31:0] x_q,
  output logic [31:0] y_q
);
  localparam logic signed [23:0] FX_MAX = 24'sh7FFFFF;
  localparam logic signed [23:0] FX_MIN = -24'sh800000;

  logic [31:0] add_a, add_b;
  assign add_a = (ctl.a_sel == ADD_A_P)   ? p_q   : x_q;
  assign add_b = (ctl.b_sel == ADD_B_ACC) ? acc_q : y_q;

  // floating point units
  logic        fm_v, fa_v;
  logic [31:0] fm_y, fa_y;

  fp_mul u_mul (
    .clk, .rst_n,
    .in_valid (ctl.mul && !ctl.fix),
    .a        (x_q),
    .b        (y_q),
    .out_valid(fm_v),
    .y        (fm_y)
  );

  fp_add u_add (
    .clk, .rst_n,
    .in_valid (ctl.add && !ctl.fix),
    .a        (add_a),
    .b        (add_b),
    .sub      (ctl.sub),
    .out_valid(fa_v),
    .y        (fa_y)
  );

  // fixed point path, two stages to match the float units
  logic signed [47:0] fx_prod;
  logic signed [24:0] fx_sum;
  logic signed [23:0] fx_prod_sat, fx_sum_sat;
  logic signed [23:0] xa, yb;
  assign xa = $signed(add_a[23:0]);
  assign yb = $signed(add_b[23:0]);

  always_comb begin
    fx_prod = $signed(x_q[23:0]) * $signed(y_q[23:0]);
    // (-1) * (-1) is the only product out of range
    if (fx_prod[47:46] == 2'b01) fx_prod_sat = FX_MAX;
    else                         fx_prod_sat = fx_prod[46:23];
    fx_sum = ctl.sub ? (25'(xa) - 25'(yb)) : (25'(xa) + 25'(yb));
    if      (fx_sum > 25'(FX_MAX)) fx_sum_sat = FX_MAX;
    else if (fx_sum < 25'(FX_MIN)) fx_sum_sat = FX_MIN;
    else                           fx_sum_sat = fx_sum[23:0];
  end

  logic [1:0]        xm_v, xa_v;
  logic [1:0][23:0]  xm_d, xa_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xm_v <= '0;
      xa_v <= '0;
      xm_d <= '0;
      xa_d <= '0;
    end else begin
      xm_v <= {xm_v[0], ctl.mul && ctl.fix};
      xa_v <= {xa_v[0], ctl.add && ctl.fix};
      xm_d <= {xm_d[0], fx_prod_sat};
      xa_d <= {xa_d[0], fx_sum_sat};
    end
  end

  // registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q   <= '0;
      y_q   <= '0;
      p_q   <= '0;
      acc_q <= '0;
    end else begin
      if (ctl.ld_x) x_q <= bus_a;
      if (ctl.ld_y) y_q <= bus_b;
      if (fm_v)         p_q <= fm_y;
      else if (xm_v[1]) p_q <= {{8{xm_d[1][23]}}, xm_d[1]};
      if (fa_v)         acc_q <= fa_y;
      else if (xa_v[1]) acc_q <= {{8{xa_d[1][23]}}, xa_d[1]};
      else if (ctl.clr) acc_q <= '0;
    end
  end
endmodule
