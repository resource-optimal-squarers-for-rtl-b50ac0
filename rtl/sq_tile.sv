// sq_tile: LUT-based squarer tile, sq = x * x for an N-bit slice (N = 1..6).
//
// A squarer tile sits on the diagonal of the squarer board, so both of its
// operands are the same slice and it is a function of only N inputs; this is
// what makes it cheaper than a multiplier tile of the same area. It is
// written as the simplified partial-product matrix of a squarer: a diagonal
// product x_i * x_i is just x_i (weight 2^(2i)), and the two equal products
// x_i * x_j and x_j * x_i (i < j) are merged into one AND term of weight
// 2^(i+j+1). The sum of these terms is left to synthesis, which maps the
// whole N-input function into LUTs (bits 0 and 1 need no logic: bit 0 is x_0
// and bit 1 is always zero). Purely combinational, no latency.
//
// The tile sizes 1..6 and the simplification rules follow the source design;
// writing the tile as a summed matrix instead of an explicit LUT netlist is
// this implementation's choice.
module sq_tile #(
  parameter int unsigned N = 6
) (
  input  logic [N-1:0]   x,
  output logic [2*N-1:0] sq
);

  if (N < 1 || N > 6) begin : g_bad_size
    $error("sq_tile: N must be 1..6");
  end

  always_comb begin
    sq = '0;
    for (int i = 0; i < int'(N); i++) begin
      // diagonal term x_i * x_i = x_i
      sq = sq + ((2*N)'(x[i]) << (2*i));
      // merged pair x_i*x_j + x_j*x_i = 2 * x_i*x_j
      for (int j = i + 1; j < int'(N); j++) begin
        sq = sq + ((2*N)'(x[i] & x[j]) << (i + j + 1));
      end
    end
  end

endmodule
