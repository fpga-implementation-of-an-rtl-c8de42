// tri_bus: a shared data bus with N enabled drivers (the processor's tristate buses).
//
// The processor joins several sources onto one RAM data bus, and onto the CORDIC input
// (TROT: from SUMDIFF, TVEC: straight from the RAMs), through buffers that connect
// their input when their control is 1 and float otherwise. Here the bus is an AND-OR
// combination, which is what an FPGA builds from tristate descriptions: the enabled
// driver's data reaches bus, an idle bus reads 0, and active tells whether any driver
// is enabled. At most one enable may be high at a time (asserted). Combinational.
module tri_bus #(
  parameter int unsigned N = 3,
  parameter int unsigned W = 16
) (
  input  logic [N-1:0] en,
  input  logic [W-1:0] d [N],
  output logic [W-1:0] bus,
  output logic         active
);

  always_comb begin
    bus = '0;
    for (int i = 0; i < N; i++)
      bus |= d[i] & {W{en[i]}};
  end

  assign active = |en;

  // Bus contention rule: never two drivers at once.
  always_comb begin
    assert ($onehot0(en)) else $error("tri_bus: more than one driver enabled (%b)", en);
  end

endmodule
