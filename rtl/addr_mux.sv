// addr_mux: address multiplexer in front of a RAM.
//
// RAMXI and RAMXII each have a five-input multiplexer (FI and SE from ADDRESS, COUNT,
// INP and DIS from DISP); RAMY has a four-input one (no DIS, since RAMY never feeds the
// output). The 3-bit select comes from the controller (SX1, SX2, SY). Select codes are
// the fft_pkg::addr_sel_e values; a code at or above NIN gives address 0.
// Purely combinational. The input count and select width follow the processor
// description; the code assignment is this design's own.
module addr_mux #(
  parameter int unsigned NIN = 5,
  parameter int unsigned AW  = 7
) (
  input  logic [2:0]    sel,
  input  logic [AW-1:0] din [NIN],
  output logic [AW-1:0] dout
);

  always_comb begin
    dout = '0;
    for (int i = 0; i < NIN; i++)
      if (sel == 3'(i)) dout = din[i];
  end

endmodule
