// aac_dsp_top: hardware of the MPEG-2 AAC main-profile 2-channel decoder.
//
// The decoder runs its tools (bitstream parsing, noiseless decoding, inverse
// quantisation, scale factors, M/S, intensity, prediction, TNS, filter bank)
// as a program on a hardwired floating-point DSP core. This top holds:
//   * dsp_core  - the core, driven by one control word per clock from the
//                 control bus (ctrl_valid / ctrl_ready handshake);
//   * mem_a     - linear data memory on external bus A (real parts);
//   * mem_b     - linear data memory on external bus B (imaginary parts);
//   * imdct_fft - the IMDCT performer, which transforms the buffer at fft_base
//                 in place, with its butterfly and coefficient table.
//
// While the performer is busy it owns both ports of both memories, so the
// core is stalled: ctrl_ready is low and a control word is not taken. Port 0
// of each memory otherwise belongs to the core; port 1 is the performer's.
// fft_start is taken only while the performer is idle, and fft_done pulses
// for one cycle at the end.
//
// The split into core, real/imaginary memories and transform engine follows
// the document; the stall handshake and the port sharing are this design's
// own.
module aac_dsp_top
  import aac_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 9472,   // words per memory
  parameter int unsigned FFT_N     = 512,    // complex points of the transform
  parameter int unsigned TABLE     = 512     // coefficient table words
) (
  input  logic          clk,
  input  logic          rst_n,
  // control bus
  input  logic          ctrl_valid,
  input  ctrl_word_t    ctrl,
  output logic          ctrl_ready,
  // IMDCT performer
  input  logic          fft_start,
  input  logic [AW-1:0] fft_base,
  output logic          fft_busy,
  output logic          fft_done,
  // observation of the core
  output logic [31:0]   bus_c,
  output logic          bus_drop,
  output logic [2:0]    alu_flags
);
  // core side of the memories
  logic          c_a_en, c_a_we, c_b_en, c_b_we;
  logic [AW-1:0] c_a_addr, c_b_addr;
  logic [31:0]   c_a_wdata, c_b_wdata;
  logic [31:0]   a_rdata0, a_rdata1, b_rdata0, b_rdata1;

  // performer side
  logic          f_a_en0, f_a_we0, f_a_en1, f_a_we1;
  logic          f_b_en0, f_b_we0, f_b_en1, f_b_we1;
  logic [AW-1:0] f_a_addr0, f_a_addr1, f_b_addr0, f_b_addr1;
  logic [31:0]   f_a_wdata0, f_a_wdata1, f_b_wdata0, f_b_wdata1;

  assign ctrl_ready = !fft_busy;

  dsp_core u_core (
    .clk, .rst_n,
    .ctrl_valid (ctrl_valid && ctrl_ready),
    .ctrl,
    .ext_a_en (c_a_en), .ext_a_we (c_a_we), .ext_a_addr (c_a_addr),
    .ext_a_wdata (c_a_wdata), .ext_a_rdata (a_rdata0),
    .ext_b_en (c_b_en), .ext_b_we (c_b_we), .ext_b_addr (c_b_addr),
    .ext_b_wdata (c_b_wdata), .ext_b_rdata (b_rdata0),
    .bus_c, .drop (bus_drop), .flags (alu_flags)
  );

  imdct_fft #(.N(FFT_N), .TABLE(TABLE), .AWID(AW)) u_fft (
    .clk, .rst_n,
    .start (fft_start), .base (fft_base),
    .busy (fft_busy), .done (fft_done),
    .a_en0 (f_a_en0), .a_we0 (f_a_we0), .a_en1 (f_a_en1), .a_we1 (f_a_we1),
    .a_addr0 (f_a_addr0), .a_addr1 (f_a_addr1),
    .a_wdata0 (f_a_wdata0), .a_wdata1 (f_a_wdata1),
    .a_rdata0, .a_rdata1,
    .b_en0 (f_b_en0), .b_we0 (f_b_we0), .b_en1 (f_b_en1), .b_we1 (f_b_we1),
    .b_addr0 (f_b_addr0), .b_addr1 (f_b_addr1),
    .b_wdata0 (f_b_wdata0), .b_wdata1 (f_b_wdata1),
    .b_rdata0, .b_rdata1
  );

  dp_ram #(.DEPTH(MEM_DEPTH), .AWID(AW), .DWID(32)) mem_a (
    .clk,
    .en0    (fft_busy ? f_a_en0    : c_a_en),
    .we0    (fft_busy ? f_a_we0    : c_a_we),
    .addr0  (fft_busy ? f_a_addr0  : c_a_addr),
    .wdata0 (fft_busy ? f_a_wdata0 : c_a_wdata),
    .rdata0 (a_rdata0),
    .en1 (f_a_en1), .we1 (f_a_we1), .addr1 (f_a_addr1),
    .wdata1 (f_a_wdata1), .rdata1 (a_rdata1)
  );

  dp_ram #(.DEPTH(MEM_DEPTH), .AWID(AW), .DWID(32)) mem_b (
    .clk,
    .en0    (fft_busy ? f_b_en0    : c_b_en),
    .we0    (fft_busy ? f_b_we0    : c_b_we),
    .addr0  (fft_busy ? f_b_addr0  : c_b_addr),
    .wdata0 (fft_busy ? f_b_wdata0 : c_b_wdata),
    .rdata0 (b_rdata0),
    .en1 (f_b_en1), .we1 (f_b_we1), .addr1 (f_b_addr1),
    .wdata1 (f_b_wdata1), .rdata1 (b_rdata1)
  );

  // while the performer owns the memories the stalled core must not reach them
  a_core_quiet: assert property (@(posedge clk) disable iff (!rst_n)
                                 fft_busy |-> !(c_a_en || c_b_en));
endmodule
