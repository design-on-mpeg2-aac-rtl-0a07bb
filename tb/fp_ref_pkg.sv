// fp_ref_pkg: reference arithmetic for the testbenches.
//
// Converts between single-precision words and the simulator's double
// precision `real` by moving bit fields, and rounds a double toward zero to
// single precision by dropping the low 29 mantissa bits. For normal operands
// a single x single product is exact in double, and so is a sum whose operand
// exponents differ by less than 28, so these give the expected result of a
// truncating single-precision unit independently of the unit's own datapath.
package fp_ref_pkg;

  function automatic real sp2r(input logic [31:0] s);
    logic [63:0] d;
    if (s[30:23] == 8'h00) return 0.0;
    d = {s[31], 11'(s[30:23]) - 11'd127 + 11'd1023, s[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // round toward zero, flush to zero, infinity on overflow
  function automatic logic [31:0] r2sp(input real r);
    logic [63:0] d;
    int          e;
    d = $realtobits(r);
    if (d[62:0] == 63'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), d[51:29]};
  endfunction

  function automatic logic [31:0] mul_ref(input logic [31:0] a, input logic [31:0] b);
    return r2sp(sp2r(a) * sp2r(b));
  endfunction

  // exact for exponent differences below 28; beyond that the small operand
  // either vanishes (same signs) or takes exactly one unit off the large one
  function automatic logic [31:0] add_ref(input logic [31:0] a, input logic [31:0] b);
    int ea, eb;
    logic [31:0] big, sml;
    ea = int'(a[30:23]);
    eb = int'(b[30:23]);
    if (ea == 0) return b;
    if (eb == 0) return a;
    if (ea - eb >= 28 || eb - ea >= 28) begin
      big = (ea > eb) ? a : b;
      sml = (ea > eb) ? b : a;
      if (big[31] == sml[31]) return big;
      return big - 32'd1;
    end
    return r2sp(sp2r(a) + sp2r(b));
  endfunction

  // equality that treats +0 and -0 alike
  function automatic bit sp_eq(input logic [31:0] x, input logic [31:0] y);
    if (x[30:0] == 31'd0 && y[30:0] == 31'd0) return 1'b1;
    return x == y;
  endfunction

  function automatic logic [31:0] rand_sp(input int emin, input int emax);
    int e;
    e = emin + int'($urandom_range(emax - emin));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

endpackage
