// sumdiff: the SUMDIFF block, one 16-bit register followed by an adder/subtractor.
//
// A butterfly reads P first: with load_p high the register captures the RAM data on q.
// In the following cycles the RAM data bus carries Q, and the block gives P-Q (sub=1,
// towards the CORDIC) and then P+Q (sub=0, towards SCALE), both combinationally from
// the held P and the live Q. The result is halved (arithmetic shift by one, rounding
// toward minus infinity) so that the 128-point transform cannot overflow the word; that
// halving is this design's choice, the register-plus-adder structure is the described one.
// Two instances exist: one for the real (X) and one for the imaginary (Y) data.
module sumdiff #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                load_p,
  input  logic                sub,
  input  logic signed [W-1:0] q,
  output logic signed [W-1:0] y
);

  logic signed [W-1:0] p_reg;
  logic signed [W:0]   full;

  always_ff @(posedge clk) begin
    if (load_p) p_reg <= q;
  end

  always_comb begin
    if (sub) full = (W+1)'(p_reg) - (W+1)'(q);
    else     full = (W+1)'(p_reg) + (W+1)'(q);
    y = W'(full >>> 1);
  end

endmodule
