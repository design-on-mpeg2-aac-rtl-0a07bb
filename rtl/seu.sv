// seu: shifter/exponent unit of the DSP core (24-bit exponent detector and
// 24-bit barrel shifter).
//
// The input register SR takes a 24-bit two's complement word from bus A. The
// exponent detector counts the redundant sign bits of SR (the left shift that
// normalises it; 23 for 0 and -1) into SE. The barrel shifter shifts SR by a
// signed amount into SO: a positive amount shifts left, filling zeros; a
// negative amount shifts right arithmetically. The amount comes from the
// instruction immediate, from bus B[7:0], or is SE (normalise). Shifts of 24
// places or more give 0 (left) or the sign fill (right).
//
// Timing: every operation takes effect at the next rising edge; SE and SO are
// registers, so a result is readable on bus C the cycle after it is issued.
//
// The two units and the 24-bit width follow the document's block diagram; the
// operation set and the shift amount encoding are this design's own.
module seu
  import aac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  seu_op_e     op,
  input  logic [23:0] bus_a,
  input  logic [7:0]  amt_imm,
  input  logic [7:0]  amt_bus,
  output logic [23:0] sr_q,
  output logic [7:0]  se_q,
  output logic [23:0] so_q
);
  function automatic logic [23:0] bshift(input logic [23:0] v, input logic signed [7:0] amt);
    logic [7:0] mag;
    if (amt >= 0) begin
      mag = amt;
      return (mag >= 8'd24) ? 24'd0 : (v << mag);
    end
    mag = -amt;
    return (mag >= 8'd24) ? {24{v[23]}} : 24'($signed(v) >>> mag);
  endfunction

  logic [7:0] lsb;   // redundant sign bits of SR
  always_comb begin
    lsb = 8'd23;
    for (int i = 22; i >= 0; i--) begin
      if (sr_q[i] != sr_q[23] && lsb == 8'd23) lsb = 8'(22 - i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_q <= '0;
      se_q <= '0;
      so_q <= '0;
    end else begin
      unique case (op)
        SEU_LD:  sr_q <= bus_a;
        SEU_EXP: se_q <= lsb;
        SEU_SHI: so_q <= bshift(sr_q, amt_imm);
        SEU_SHE: so_q <= bshift(sr_q, se_q);
        SEU_SHB: so_q <= bshift(sr_q, amt_bus);
        default: ;
      endcase
    end
  end
endmodule
