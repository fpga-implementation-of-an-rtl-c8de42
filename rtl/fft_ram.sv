// fft_ram: one 128-word data memory of the FFT processor (RAMXI, RAMXII or RAMY).
//
// The processor keeps the real parts of a frame in RAMXI or RAMXII (the two are used
// in ping-pong fashion) and the intermediate imaginary parts in RAMY. Every RAM has a
// single address, chosen by the multiplexer in front of it, and computes in place.
// Interface: addr selects the word; rdata shows it combinationally (asynchronous read,
// as in distributed FPGA RAM); when we is high, wdata is written at the rising clock
// edge. The 128-word depth follows the processor description; the 16-bit word matches
// its 16-bit datapath register, and the asynchronous read is this design's choice.
module fft_ram #(
  parameter int unsigned DEPTH  = 128,
  parameter int unsigned DATA_W = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
