// fp_mul: pipelined single-precision floating-point multiplier of the FPU32.
//
// Operands and result are IEEE single-precision words: 8-bit exponent and a
// 24-bit mantissa (23 stored bits plus the hidden one), the format the core
// uses for the 96 dB dynamic range of the AAC tools. Stage 1 multiplies the
// two 24-bit mantissas into a 48-bit product and adds the exponents; stage 2
// normalises by at most one place and truncates the mantissa to 24 bits.
//
// Interface: in_valid/a/b are taken on a rising clk edge; y is valid with
// out_valid exactly LATENCY = 2 cycles later. One operation per cycle.
//
// The format and the pipelining follow the document. The arithmetic details
// are this design's own: results are truncated toward zero, denormal inputs
// and results are flushed to zero, an exponent overflow gives infinity and any
// infinity or NaN input gives an infinity of the product's sign.
module fp_mul
  import aac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        out_valid,
  output logic [31:0] y
);
  fp32_t fa, fb;
  assign fa = fp32_t'(a);
  assign fb = fp32_t'(b);

  // stage 1 registers
  logic        s1_valid, s1_sign, s1_zero, s1_inf;
  logic [47:0] s1_prod;
  logic [9:0]  s1_esum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_sign  <= 1'b0;
      s1_zero  <= 1'b1;
      s1_inf   <= 1'b0;
      s1_prod  <= '0;
      s1_esum  <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_sign  <= fa.sign ^ fb.sign;
      s1_inf   <= (fa.exp == 8'hFF) || (fb.exp == 8'hFF);
      s1_zero  <= (fa.exp == 8'h00) || (fb.exp == 8'h00);
      s1_prod  <= {1'b1, fa.frac} * {1'b1, fb.frac};
      s1_esum  <= {2'b00, fa.exp} + {2'b00, fb.exp};
    end
  end

  // stage 2: normalise and pack
  logic [31:0] res;
  logic [22:0] frac_n;
  logic signed [10:0] e_n;

  always_comb begin
    if (s1_prod[47]) begin
      frac_n = s1_prod[46:24];
      e_n    = $signed({1'b0, s1_esum}) - 11'sd126;
    end else begin
      frac_n = s1_prod[45:23];
      e_n    = $signed({1'b0, s1_esum}) - 11'sd127;
    end
    if (s1_inf)
      res = {s1_sign, 8'hFF, 23'd0};
    else if (s1_zero || e_n <= 11'sd0)
      res = {s1_sign, 31'd0};
    else if (e_n >= 11'sd255)
      res = {s1_sign, 8'hFF, 23'd0};
    else
      res = {s1_sign, e_n[7:0], frac_n};
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
