// fp_add: pipelined single-precision floating-point adder/subtractor of the
// FPU32.
//
// y = a + b, or a - b when sub is set. Stage 1 orders the operands by
// magnitude and aligns the smaller mantissa to the larger exponent inside a
// 50-bit field (24 mantissa bits and 26 extra bits), folding every bit shifted
// out into a sticky bit. Stage 2 adds or subtracts, finds the leading one,
// renormalises and truncates to a 24-bit mantissa. The sticky bit makes the
// truncation exact: the result is the exact sum rounded toward zero.
//
// Interface: in_valid/a/b/sub are taken on a rising clk edge; y is valid with
// out_valid exactly LATENCY = 2 cycles later. One operation per cycle.
//
// The format and the pipelining follow the document; rounding toward zero,
// flush-to-zero of denormals, +0 for an exact cancellation and infinity for
// overflow or an infinite/NaN input are this design's own choices.
module fp_add
  import aac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  output logic        out_valid,
  output logic [31:0] y
);
  localparam int unsigned XW = 50;   // aligned mantissa width

  fp32_t fa, fb, big, sml;
  logic  swap;
  logic [7:0]  ediff;
  logic [XW-1:0] mb_al, mb_full;
  logic        sticky;

  always_comb begin
    fa = fp32_t'(a);
    fb = fp32_t'(b);
    fb.sign = b[31] ^ sub;
    swap = {fb.exp, fb.frac} > {fa.exp, fa.frac};
    big  = swap ? fb : fa;
    sml  = swap ? fa : fb;
    ediff = big.exp - sml.exp;
    mb_full = (sml.exp == 8'h00) ? '0 : {1'b1, sml.frac, 26'd0};
    if (ediff >= 8'(XW)) begin
      mb_al  = '0;
      sticky = |mb_full;
    end else begin
      mb_al  = mb_full >> ediff;
      sticky = |(mb_full & ~({XW{1'b1}} << ediff));
    end
    mb_al[0] = mb_al[0] | sticky;
  end

  // stage 1 registers
  logic          s1_valid, s1_sign, s1_effsub, s1_inf;
  logic [7:0]    s1_exp;
  logic [XW-1:0] s1_ma, s1_mb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_sign   <= 1'b0;
      s1_effsub <= 1'b0;
      s1_inf    <= 1'b0;
      s1_exp    <= '0;
      s1_ma     <= '0;
      s1_mb     <= '0;
    end else begin
      s1_valid  <= in_valid;
      s1_sign   <= big.sign;
      s1_effsub <= big.sign ^ sml.sign;
      s1_inf    <= (big.exp == 8'hFF);
      s1_exp    <= big.exp;
      s1_ma     <= (big.exp == 8'h00) ? '0 : {1'b1, big.frac, 26'd0};
      s1_mb     <= mb_al;
    end
  end

  // stage 2: add, find leading one, renormalise
  logic [XW:0]   sum;
  logic [XW:0]   norm;
  logic [5:0]    lead;
  logic          found;
  logic signed [9:0] e_n;
  logic [31:0]   res;

  always_comb begin
    sum = s1_effsub ? ({1'b0, s1_ma} - {1'b0, s1_mb}) : ({1'b0, s1_ma} + {1'b0, s1_mb});
    lead  = '0;
    found = 1'b0;
    for (int i = 0; i <= XW; i++) begin
      if (sum[i]) begin
        lead  = 6'(i);
        found = 1'b1;
      end
    end
    // place the leading one at bit XW, then take 23 bits below it
    norm = sum << (6'(XW) - lead);
    e_n  = $signed({2'b00, s1_exp}) + $signed({4'b0000, lead}) - 10'sd49;
    if (s1_inf)
      res = {s1_sign, 8'hFF, 23'd0};
    else if (!found || e_n <= 10'sd0)
      res = found ? {s1_sign, 31'd0} : 32'd0;
    else if (e_n >= 10'sd255)
      res = {s1_sign, 8'hFF, 23'd0};
    else
      res = {s1_sign, e_n[7:0], norm[XW-1 -: 23]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= s1_valid;
      y         <= res;
    end
  end
endmodule
