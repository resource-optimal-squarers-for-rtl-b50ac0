// lut_mult_tile: LUT-based unsigned sub-multiplier tile, p = a * b.
//
// One of the small logic multipliers a tiling may place on the squarer board:
// 1x1, 1x2, 2x3, 3x3 or 2xk (and the transposed shapes 2x1, 3x2, kx2). The
// shapes are those of the source design's tile library. The 1x1 tile is a
// single AND gate, the 3x3 tile fits six-input LUTs as a plain table, and the
// 2xk tile multiplies a k-bit operand by a 2-bit digit (radix-4 style). How
// each shape is mapped into LUTs is not specified here: the tile is written
// as a behavioural product and synthesis chooses the mapping. Purely
// combinational, no latency. Other shapes are rejected at elaboration.
module lut_mult_tile #(
  parameter int unsigned WA = 3,
  parameter int unsigned WB = 3
) (
  input  logic [WA-1:0]    a,
  input  logic [WB-1:0]    b,
  output logic [WA+WB-1:0] p
);

  localparam bit ShapeOk =
      (WA == 1 && WB == 1) ||
      (WA == 1 && WB == 2) || (WA == 2 && WB == 1) ||
      (WA == 2 && WB == 3) || (WA == 3 && WB == 2) ||
      (WA == 3 && WB == 3) ||
      (WA == 2 && WB >= 1) || (WB == 2 && WA >= 1);

  if (!ShapeOk) begin : g_bad_shape
    $error("lut_mult_tile: unsupported tile shape");
  end

  assign p = (WA+WB)'(a) * (WA+WB)'(b);

endmodule
