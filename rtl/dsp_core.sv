// dsp_core: the hardwired DSP core of the AAC decoder.
//
// Three internal 32-bit buses join the units. Bus A and bus B carry operands:
// each takes the word read from its external data bus (DA / DB) in the
// previous cycle, a GPR register (RH0..RH3) or the control word's immediate.
// Bus C carries a result: the FPU product P or accumulator ACC, the SEU
// shifter output or exponent, the ALU result, or a move of bus A or B. Bus C
// can be written to external memory A or B at the CPL address, to a GPR, or
// into an ACU register.
//
// Units: fpu32 (32-bit float / 24-bit fixed multiplier and adder), seu
// (24-bit exponent detector and barrel shifter), acu (pointer units APL, BPL,
// CPL with bit-reverse and modulo addressing, and the bus arbiter), alu16 and
// gpr.
//
// Control: one ctrl_word_t per clock from the control bus, executed when
// ctrl_valid is high (otherwise a no-operation). The control word exposes the
// pipeline: a read issued by APL/BPL in cycle t is on bus A/B in cycle t+1
// (select A_MEM/B_MEM then); FPU results land in P/ACC two cycles after the
// operation; SEU and ALU results are readable one cycle after. Memory is
// synchronous: ext_*_en/we/addr/wdata are presented in the cycle of the
// access and ext_*_rdata returns the read word in the following cycle.
//
// The units, the three buses, the two 32-bit external data buses and the
// control bus follow the document's block diagram of the core. The document
// gives no instruction set; the control word and its timing are this
// design's own.
module dsp_core
  import aac_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ctrl_valid,
  input  ctrl_word_t      ctrl,
  // external data bus A
  output logic            ext_a_en,
  output logic            ext_a_we,
  output logic [AW-1:0]   ext_a_addr,
  output logic [31:0]     ext_a_wdata,
  input  logic [31:0]     ext_a_rdata,
  // external data bus B
  output logic            ext_b_en,
  output logic            ext_b_we,
  output logic [AW-1:0]   ext_b_addr,
  output logic [31:0]     ext_b_wdata,
  input  logic [31:0]     ext_b_rdata,
  // observation
  output logic [31:0]     bus_c,
  output logic            drop,
  output logic [2:0]      flags     // ALU {Z, N, C}
);
  ctrl_word_t cw;
  assign cw = ctrl_valid ? ctrl : CTRL_NOP;

  logic [31:0] bus_a, bus_b;
  logic [31:0] gpr_qa, gpr_qb;
  logic [31:0] p_q, acc_q;
  logic [23:0] so_q;
  logic [7:0]  se_q;
  logic [15:0] ar_q;
  logic        z_q, n_q, c_q;

  // bus A / B sources
  always_comb begin
    unique case (cw.a_src)
      A_MEM:   bus_a = ext_a_rdata;
      A_GPR:   bus_a = gpr_qa;
      A_IMM:   bus_a = cw.imm;
      default: bus_a = '0;
    endcase
    unique case (cw.b_src)
      B_MEM:   bus_b = ext_b_rdata;
      B_GPR:   bus_b = gpr_qb;
      B_IMM:   bus_b = cw.imm;
      default: bus_b = '0;
    endcase
    unique case (cw.c_src)
      C_P:     bus_c = p_q;
      C_ACC:   bus_c = acc_q;
      C_SEU:   bus_c = {{8{so_q[23]}}, so_q};
      C_SE:    bus_c = {24'd0, se_q};
      C_ALU:   bus_c = {{16{ar_q[15]}}, ar_q};
      C_BUSA:  bus_c = bus_a;
      C_BUSB:  bus_c = bus_b;
      default: bus_c = '0;
    endcase
  end

  // address controller and bus arbiter
  logic re_a, we_a, re_b, we_b, drop_a, drop_b;
  acu u_acu (
    .clk, .rst_n,
    .apl (cw.apl), .bpl (cw.bpl), .cpl (cw.cpl),
    .wr_a (cw.wr_a), .wr_b (cw.wr_b),
    .ld (cw.acu_ld), .ld_idx (cw.acu_idx), .ld_data (bus_c[AW-1:0]),
    .addr_a (ext_a_addr), .re_a, .we_a,
    .addr_b (ext_b_addr), .re_b, .we_b,
    .drop_a, .drop_b,
    .rs_q ()
  );

  assign ext_a_en    = re_a || we_a;
  assign ext_a_we    = we_a;
  assign ext_a_wdata = bus_c;
  assign ext_b_en    = re_b || we_b;
  assign ext_b_we    = we_b;
  assign ext_b_wdata = bus_c;
  assign drop        = drop_a || drop_b;

  fpu32 u_fpu (
    .clk, .rst_n,
    .ctl (cw.fpu),
    .bus_a, .bus_b,
    .p_q, .acc_q,
    .x_q (), .y_q ()
  );

  seu u_seu (
    .clk, .rst_n,
    .op (cw.seu),
    .bus_a (bus_a[23:0]),
    .amt_imm (cw.imm[7:0]),
    .amt_bus (bus_b[7:0]),
    .sr_q (), .se_q, .so_q
  );

  alu16 u_alu (
    .clk, .rst_n,
    .op (cw.alu), .ld (cw.alu_ld),
    .bus_a (bus_a[15:0]), .bus_b (bus_b[15:0]),
    .ar_q, .z_q, .n_q, .c_q
  );

  gpr #(.NREG(4)) u_gpr (
    .clk, .rst_n,
    .ra (cw.gpr_a), .rb (cw.gpr_b),
    .we (cw.gpr_we), .wa (cw.gpr_w), .wd (bus_c),
    .qa (gpr_qa), .qb (gpr_qb)
  );

  assign flags = {z_q, n_q, c_q};

  // a CPL write must name a port, and a write and a read of one port collide
  a_cpl_port: assert property (@(posedge clk) disable iff (!rst_n)
                               (cw.wr_a || cw.wr_b) |-> cw.cpl.en);
endmodule
