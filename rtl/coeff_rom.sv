// coeff_rom: twiddle coefficient table of the IMDCT performer.
//
// TABLE words hold TABLE/2 coefficient pairs of the NFFT-point transform,
// theta_k = 2*pi*k/NFFT for k = 0 .. TABLE/2-1, interleaved as
//   word 2k   = sin(theta_k)
//   word 2k+1 = cos(theta_k)
// as single-precision words rounded to nearest. The table is computed when
// the design is elaborated, so it needs no data file.
//
// Two synchronous read ports let the sine and cosine of one angle be read in
// the same cycle; data appear after the rising edge.
//
// The 512-word size and the sin/cos interleaving follow the document; the
// angle step is this design's reading of it.
module coeff_rom #(
  parameter int unsigned TABLE = 512,
  parameter int unsigned NFFT  = 512,
  parameter int unsigned AWID  = $clog2(TABLE)
) (
  input  logic            clk,
  input  logic [AWID-1:0] addr0,
  output logic [31:0]     q0,
  input  logic [AWID-1:0] addr1,
  output logic [31:0]     q1
);
  // real -> single precision, round to nearest (ties away from zero)
  function automatic logic [31:0] to_sp(input real r);
    logic [63:0] d;
    logic [24:0] m;
    int          e;
    d = $realtobits(r);
    if (d[62:0] == 63'd0) return 32'd0;
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:29]} + 25'(d[28]);
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e <= 0) return 32'd0;
    return {d[63], 8'(e), m[22:0]};
  endfunction

  localparam real PI = 3.14159265358979323846;

  logic [31:0] rom [TABLE];

  initial begin
    for (int k = 0; k < int'(TABLE) / 2; k++) begin
      rom[2*k]   = to_sp($sin(2.0 * PI * real'(k) / real'(NFFT)));
      rom[2*k+1] = to_sp($cos(2.0 * PI * real'(k) / real'(NFFT)));
    end
  end

  always_ff @(posedge clk) begin
    q0 <= rom[addr0];
    q1 <= rom[addr1];
  end
endmodule
