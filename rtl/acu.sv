// acu: address controller unit of the DSP core.
//
// Four pointer registers RS0..RS3, each with a modifier RD0..RD3 and a modulo
// mask MPD0..MPD3, are shared by three pointer units: APL addresses the read
// on external bus A, BPL the read on external bus B and CPL the write of bus C.
// A pointer unit selects one RSn, outputs it as the address and, if asked,
// post-modifies it: RSn <= RSn + RDn. With MPDn = 2^k - 1 the modification
// wraps inside the aligned block of 2^k words (circular buffer); MPDn = 0
// means linear addressing. APL can also output the address bit-reversed over
// the k low bits given by MPDn, which is the reordering an FFT needs; the
// pointer itself still steps linearly.
//
// The bus arbiter decides who uses each external port: a CPL write to that
// port has priority over the read of APL (port A) or BPL (port B); a read that
// loses is dropped and flagged in drop_a / drop_b.
//
// RSn, RDn or MPDn is loaded from bus C when ld selects it. When several
// updates hit one register in a cycle the priority is load, CPL, BPL, APL.
//
// Timing: addresses are combinational from the pointer registers; all
// register updates take effect at the rising edge.
//
// The pointer units, the RS/RD/MPD registers, the bit-reverse stage on APL and
// the bus arbiter are the blocks of the document's diagram; the register count,
// the modulo-mask encoding and the priorities are this design's own.
module acu
  import aac_pkg::*;
#(
  parameter int unsigned AWID = AW
) (
  input  logic            clk,
  input  logic            rst_n,
  input  pl_ctrl_t        apl,
  input  pl_ctrl_t        bpl,
  input  pl_ctrl_t        cpl,
  input  logic            wr_a,
  input  logic            wr_b,
  input  acu_ld_e         ld,
  input  logic [1:0]      ld_idx,
  input  logic [AWID-1:0] ld_data,
  // external port A and B requests
  output logic [AWID-1:0] addr_a,
  output logic            re_a,
  output logic            we_a,
  output logic [AWID-1:0] addr_b,
  output logic            re_b,
  output logic            we_b,
  output logic            drop_a,
  output logic            drop_b,
  output logic [3:0][AWID-1:0] rs_q
);
  logic [3:0][AWID-1:0] rd_q, mpd_q;

  function automatic logic [AWID-1:0] modify(input logic [AWID-1:0] rs,
                                             input logic [AWID-1:0] rd,
                                             input logic [AWID-1:0] m);
    logic [AWID-1:0] s;
    s = rs + rd;
    if (m == '0) return s;
    return (rs & ~m) | (s & m);
  endfunction

  function automatic logic [AWID-1:0] bitrev(input logic [AWID-1:0] rs,
                                             input logic [AWID-1:0] m);
    logic [AWID-1:0] r;
    int unsigned     k;
    k = 0;
    for (int i = 0; i < int'(AWID); i++) k += int'(m[i]);
    r = '0;
    for (int i = 0; i < int'(AWID); i++) r[i] = rs[AWID-1-i];
    r = r >> (AWID - k);
    return (rs & ~m) | (r & m);
  endfunction

  logic [AWID-1:0] a_addr, b_addr, c_addr;
  assign a_addr = apl.brev ? bitrev(rs_q[apl.ptr], mpd_q[apl.ptr]) : rs_q[apl.ptr];
  assign b_addr = rs_q[bpl.ptr];
  assign c_addr = rs_q[cpl.ptr];

  // bus arbiter
  always_comb begin
    we_a   = cpl.en && wr_a;
    we_b   = cpl.en && wr_b;
    re_a   = apl.en && !we_a;
    re_b   = bpl.en && !we_b;
    drop_a = apl.en && we_a;
    drop_b = bpl.en && we_b;
    addr_a = we_a ? c_addr : a_addr;
    addr_b = we_b ? c_addr : b_addr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs_q  <= '0;
      rd_q  <= '0;
      mpd_q <= '0;
    end else begin
      if (apl.en && apl.post)
        rs_q[apl.ptr] <= modify(rs_q[apl.ptr], rd_q[apl.ptr], mpd_q[apl.ptr]);
      if (bpl.en && bpl.post)
        rs_q[bpl.ptr] <= modify(rs_q[bpl.ptr], rd_q[bpl.ptr], mpd_q[bpl.ptr]);
      if (cpl.en && cpl.post)
        rs_q[cpl.ptr] <= modify(rs_q[cpl.ptr], rd_q[cpl.ptr], mpd_q[cpl.ptr]);
      unique case (ld)
        ACU_LD_RS:  rs_q[ld_idx]  <= ld_data;
        ACU_LD_RD:  rd_q[ld_idx]  <= ld_data;
        ACU_LD_MPD: mpd_q[ld_idx] <= ld_data;
        default: ;
      endcase
    end
  end
endmodule
