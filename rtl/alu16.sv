// alu16: 16-bit integer ALU of the DSP core with its input registers ARUL
// and ARUR.
//
// ARUL is loaded from bus A[15:0] and ARUR from bus B[15:0] when ld is set.
// An operation combines the current ARUL and ARUR into the result register AR
// and updates the flags: Z (zero), N (negative), C (carry out of an add, no
// borrow of a subtract). Shifts move ARUL by ARUR[3:0] places.
//
// Timing: loads and results take effect at the next rising edge; a result is
// on bus C the cycle after its operation is issued.
//
// The 16-bit width and the ARUL/ARUR registers are named in the document's
// block diagram; the operation set and flags are this design's own.
module alu16
  import aac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  alu_op_e     op,
  input  logic        ld,
  input  logic [15:0] bus_a,
  input  logic [15:0] bus_b,
  output logic [15:0] ar_q,
  output logic        z_q,
  output logic        n_q,
  output logic        c_q
);
  logic [15:0] arul, arur, r;
  logic        c;

  always_comb begin
    c = c_q;
    unique case (op)
      ALU_ADD: {c, r} = {1'b0, arul} + {1'b0, arur};
      ALU_SUB: {c, r} = {1'b0, arul} + {1'b0, ~arur} + 17'd1;
      ALU_AND: r = arul & arur;
      ALU_OR:  r = arul | arur;
      ALU_XOR: r = arul ^ arur;
      ALU_SHL: r = arul << arur[3:0];
      ALU_SHR: r = 16'($signed(arul) >>> arur[3:0]);
      ALU_PSA: r = arul;
      ALU_NOT: r = ~arul;
      default: r = ar_q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arul <= '0;
      arur <= '0;
      ar_q <= '0;
      z_q  <= 1'b0;
      n_q  <= 1'b0;
      c_q  <= 1'b0;
    end else begin
      if (ld) begin
        arul <= bus_a;
        arur <= bus_b;
      end
      if (op != ALU_NOP) begin
        ar_q <= r;
        z_q  <= (r == 16'd0);
        n_q  <= r[15];
        c_q  <= c;
      end
    end
  end
endmodule
