// gpr: general purpose register file RH0..RH3 of the DSP core.
//
// Four 32-bit registers with two combinational read ports, one onto bus A and
// one onto bus B, and one write port from bus C that takes effect at the
// rising clock edge. A register written in a cycle is read with its new value
// from the next cycle on.
//
// The four registers RH0..RH3 are named in the document's block diagram; the
// port arrangement is this design's own.
module gpr #(
  parameter int unsigned NREG = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(NREG)-1:0] ra,
  input  logic [$clog2(NREG)-1:0] rb,
  input  logic                    we,
  input  logic [$clog2(NREG)-1:0] wa,
  input  logic [31:0]             wd,
  output logic [31:0]             qa,
  output logic [31:0]             qb
);
  logic [NREG-1:0][31:0] rh;

  assign qa = rh[ra];
  assign qb = rh[rb];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rh <= '0;
    else if (we) rh[wa] <= wd;
  end
endmodule
