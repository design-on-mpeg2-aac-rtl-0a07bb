// imdct_fft: the IMDCT performer, the transform step of the filter bank.
//
// It runs an in-place radix-2 decimation-in-time complex FFT of N points on
// two linear memories: real parts in memory A and imaginary parts in memory B,
// each at word addresses base .. base+N-1. The input must already be in
// bit-reversed order (the core's bit-reverse copy does this); the output is in
// natural order. With twiddle w_k = cos(2*pi*k/N) - j*sin(2*pi*k/N) it
// computes X[m] = sum_n x[n] * w^(n*m), the forward DFT. Pre- and
// post-twiddling, windowing and overlap-add are left to the core.
//
// Stage s (s = 0 .. log2(N)-1) runs N/2 butterflies; butterfly j reads
//   top = (j >> s) * 2^(s+1) + (j mod 2^s),   bot = top + 2^s,
//   k   = (j mod 2^s) * N / 2^(s+1)
// and writes top <= top + w_k*bot, bot <= 2*top_old - (top + w_k*bot).
//
// Schedule: a butterfly is issued every second cycle. In its issue cycle both
// ports of both memories read top and bot and the two coefficient ROM ports
// read sin(k) and cos(k) (words 2k and 2k+1). One cycle later the operands
// enter imdct_bfly; its results return 8 cycles after that, on a cycle in
// which no read is issued, and are written back through the same ports. A
// stage starts only when the previous one has written its last result. One
// N-point transform takes log2(N) * (N + 9) + 1 cycles, counted from the cycle
// start is high to the cycle done is high.
//
// Interface: start (one cycle, while idle) begins a transform at base; busy
// is high until the cycle done pulses. While busy the performer owns both
// ports of both memories.
//
// The butterfly, the separate real/imaginary linear memories, the
// interleaved sin/cos table of 512 words and the bit-reverse copy ahead of the
// transform follow the document; the radix-2 DIT order, the two-cycle issue
// schedule and the port ownership are this design's own.
module imdct_fft
  import aac_pkg::*;
#(
  parameter int unsigned N     = 512,
  parameter int unsigned TABLE = 512,
  parameter int unsigned AWID  = AW
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [AWID-1:0] base,
  output logic            busy,
  output logic            done,
  // memory A (real): port 0 = top, port 1 = bottom
  output logic            a_en0, a_we0, a_en1, a_we1,
  output logic [AWID-1:0] a_addr0, a_addr1,
  output logic [31:0]     a_wdata0, a_wdata1,
  input  logic [31:0]     a_rdata0, a_rdata1,
  // memory B (imaginary)
  output logic            b_en0, b_we0, b_en1, b_we1,
  output logic [AWID-1:0] b_addr0, b_addr1,
  output logic [31:0]     b_wdata0, b_wdata1,
  input  logic [31:0]     b_rdata0, b_rdata1
);
  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned TAW  = $clog2(TABLE);
  localparam int unsigned LAT  = 9;               // read (1) + butterfly (8)

  typedef enum logic [1:0] {IDLE, RUN, DRAIN} state_e;
  state_e state;

  logic [AWID-1:0]   base_q;
  logic [$clog2(LOGN+1)-1:0] stage;
  logic [LOGN-1:0]   j;          // butterfly index within the stage
  logic              jdone;      // all N/2 butterflies of the stage issued
  logic              phase;      // issue on phase 0
  logic [LAT-1:0]    inflight;

  // address generation for butterfly j of the current stage
  logic [LOGN-1:0] top, bot, half, pos;
  logic [LOGN-1:0] k;
  always_comb begin
    half = LOGN'(1) << stage;
    pos  = j & (half - LOGN'(1));
    top  = ((j >> stage) << (stage + 1)) | pos;
    bot  = top | half;
    k    = pos << (LOGN - 1 - int'(stage));
  end

  logic issue;
  assign issue = (state == RUN) && !phase && !jdone;

  // address delay line for the write-back
  logic [LAT-1:0][LOGN-1:0] top_d, bot_d;
  logic wb;
  assign wb = inflight[LAT-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      base_q   <= '0;
      stage    <= '0;
      j        <= '0;
      jdone    <= 1'b0;
      phase    <= 1'b0;
      inflight <= '0;
      top_d    <= '0;
      bot_d    <= '0;
      done     <= 1'b0;
    end else begin
      done     <= 1'b0;
      inflight <= {inflight[LAT-2:0], issue};
      top_d    <= {top_d[LAT-2:0], top};
      bot_d    <= {bot_d[LAT-2:0], bot};
      unique case (state)
        IDLE: if (start) begin
          state  <= RUN;
          base_q <= base;
          stage  <= '0;
          j      <= '0;
          jdone  <= 1'b0;
          phase  <= 1'b0;
        end
        RUN: begin
          phase <= ~phase;
          if (issue) begin
            j <= j + LOGN'(1);
            if (j == LOGN'(N / 2 - 1)) jdone <= 1'b1;
          end
          if (jdone) state <= DRAIN;
        end
        DRAIN: if (inflight == '0) begin
          if (stage == ($bits(stage))'(LOGN - 1)) begin
            state <= IDLE;
            done  <= 1'b1;
          end else begin
            state <= RUN;
            stage <= stage + 1'b1;
            j     <= '0;
            jdone <= 1'b0;
            phase <= 1'b0;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

  // coefficient table: word 2k = sin, word 2k+1 = cos
  logic [31:0] sin_q, cos_q;
  coeff_rom #(.TABLE(TABLE), .NFFT(N)) u_rom (
    .clk,
    .addr0 ({k[TAW-2:0], 1'b0}),
    .q0    (sin_q),
    .addr1 ({k[TAW-2:0], 1'b1}),
    .q1    (cos_q)
  );

  // butterfly: d = top, x = bot, w = cos - j sin
  logic        bf_v;
  logic [31:0] ev_r, ev_i, od_r, od_i;
  imdct_bfly u_bfly (
    .clk, .rst_n,
    .in_valid (inflight[0]),
    .dr (a_rdata0), .di (b_rdata0),
    .xr (a_rdata1), .xi (b_rdata1),
    .wr (cos_q),    .wi ({~sin_q[31], sin_q[30:0]}),
    .out_valid (bf_v),
    .even_r (ev_r), .even_i (ev_i),
    .odd_r  (od_r), .odd_i  (od_i)
  );

  // memory ports
  always_comb begin
    a_en0 = issue || wb;  a_we0 = wb;
    a_en1 = issue || wb;  a_we1 = wb;
    b_en0 = issue || wb;  b_we0 = wb;
    b_en1 = issue || wb;  b_we1 = wb;
    a_addr0 = base_q + AWID'(wb ? top_d[LAT-1] : top);
    a_addr1 = base_q + AWID'(wb ? bot_d[LAT-1] : bot);
    b_addr0 = a_addr0;
    b_addr1 = a_addr1;
    a_wdata0 = ev_r;  a_wdata1 = od_r;
    b_wdata0 = ev_i;  b_wdata1 = od_i;
  end

  // a write-back never meets an issue: results return on the idle phase
  a_wb_phase: assert property (@(posedge clk) disable iff (!rst_n) !(wb && issue));
  a_wb_valid: assert property (@(posedge clk) disable iff (!rst_n) wb == bf_v);
  if (TABLE < N) begin : g_tbl_chk
    $error("coefficient table must hold N/2 sin/cos pairs");
  end
endmodule
