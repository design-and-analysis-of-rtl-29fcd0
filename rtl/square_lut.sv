// square_lut: power of one signed sample component by table look-up.
//
// The OFDM detector needs |r|^2 = re^2 + im^2 for every sample. Instead of a
// multiplier, the square of a component is read from a constant table
// indexed by its magnitude; the table holds v*v for v = 0..2^(W-1), so it
// covers the most negative input too. Two instances (I and Q) plus one adder
// give the sample power. Purely combinational.
module square_lut #(
  parameter int unsigned W = 8
) (
  input  logic signed [W-1:0]  x,
  output logic [2*W-2:0]       x_sq
);

  localparam int unsigned ENTRIES = (1 << (W-1)) + 1;

  logic [2*W-2:0] table_q [ENTRIES];
  logic [W-1:0]   mag;

  for (genvar v = 0; v < ENTRIES; v++) begin : g_tab
    assign table_q[v] = (2*W-1)'(v * v);
  end

  always_comb begin
    mag  = x[W-1] ? W'(-x) : W'(x);
    x_sq = table_q[mag];
  end

endmodule
