// dp_ram: linear data memory on one external data bus of the core.
//
// A word-addressed RAM with two independent synchronous ports (0 and 1). On a
// rising edge a port with en set either writes wdata (we set) or reads; read
// data appear on rdata after that edge and hold until the port's next read.
// A read returns the word as it was before a write in the same cycle. When
// both ports write one address in a cycle, port 1 wins.
//
// The core's bus A owns one such memory, holding real parts, and bus B
// another, holding imaginary parts, as in the document's memory arrangement.
// Port 1 is used by the IMDCT performer. The memory is initialised to zero.
// The two-port organisation and the depth are this design's own choices.
module dp_ram #(
  parameter int unsigned DEPTH = 9472,
  parameter int unsigned AWID  = 14,
  parameter int unsigned DWID  = 32
) (
  input  logic            clk,
  input  logic            en0,
  input  logic            we0,
  input  logic [AWID-1:0] addr0,
  input  logic [DWID-1:0] wdata0,
  output logic [DWID-1:0] rdata0,
  input  logic            en1,
  input  logic            we1,
  input  logic [AWID-1:0] addr1,
  input  logic [DWID-1:0] wdata1,
  output logic [DWID-1:0] rdata1
);
  logic [DWID-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (en0) begin
      if (we0) mem[addr0] <= wdata0;
      else     rdata0 <= mem[addr0];
    end
    if (en1) begin
      if (we1) mem[addr1] <= wdata1;
      else     rdata1 <= mem[addr1];
    end
  end
endmodule
