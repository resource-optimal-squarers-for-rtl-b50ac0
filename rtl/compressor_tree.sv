// compressor_tree: adds NROWS W-bit rows of a bit heap, sum = sum(rows) mod 2^W.
//
// The rows are the placed, weighted outputs of the squarer's tiles plus one
// row of constant sign-extension bits. They are reduced in carry-save form by
// layers of 3:2 counters (full adders applied bitwise to groups of three rows;
// each group yields a sum row and a carry row shifted left by one) until two
// rows remain, which a final carry-propagate adder combines. Rows that are
// constant zero in some columns cost nothing after synthesis, so a bit heap
// with ragged column heights can be fed as full-width rows. The number of
// layers is fixed at elaboration (NROWS -> 2*floor(NROWS/3) + NROWS mod 3 per
// layer). Purely combinational.
//
// The source design takes its compressor trees from an existing optimizing
// generator and gives only their role and cost; this Wallace-style reduction
// is the simplest structure with the same function.
module compressor_tree #(
  parameter int unsigned NROWS = 8,
  parameter int unsigned W     = 16
) (
  input  logic [NROWS-1:0][W-1:0] rows,
  output logic [W-1:0]            sum
);

  // Rows left after l reduction layers.
  function automatic int unsigned rows_after(input int unsigned l);
    int unsigned c;
    c = NROWS;
    for (int unsigned i = 0; i < l; i++) begin
      if (c > 2) c = 2 * (c / 3) + (c % 3);
    end
    return c;
  endfunction

  function automatic int unsigned num_layers();
    int unsigned l;
    l = 0;
    while (rows_after(l) > 2) l++;
    return l;
  endfunction

  localparam int unsigned Layers = num_layers();

  // Layer l reduces rows_after(l) rows (lin) to rows_after(l+1) rows (lout).
  for (genvar l = 0; l < int'(Layers); l++) begin : g_layer
    localparam int unsigned Cin    = rows_after(l);
    localparam int unsigned Groups = Cin / 3;
    localparam int unsigned Cout   = rows_after(l + 1);
    logic [W-1:0] lin  [Cin];
    logic [W-1:0] lout [Cout];
    for (genvar r = 0; r < int'(Cin); r++) begin : g_in
      if (l == 0) begin : g_first
        assign lin[r] = rows[r];
      end else begin : g_next
        assign lin[r] = g_layer[l-1].lout[r];
      end
    end
    for (genvar g = 0; g < int'(Groups); g++) begin : g_fa
      logic [W-1:0] ra, rb, rc;
      assign ra = lin[3*g];
      assign rb = lin[3*g+1];
      assign rc = lin[3*g+2];
      assign lout[2*g]   = ra ^ rb ^ rc;
      assign lout[2*g+1] = W'({((ra & rb) | (ra & rc) | (rb & rc)), 1'b0});
    end
    for (genvar r = 0; r < int'(Cin - 3*Groups); r++) begin : g_pass
      assign lout[2*Groups + r] = lin[3*Groups + r];
    end
  end

  // Final carry-propagate adder on the last two rows.
  if (Layers > 0) begin : g_final
    assign sum = g_layer[Layers-1].lout[0] + g_layer[Layers-1].lout[1];
  end else if (NROWS == 2) begin : g_two
    assign sum = rows[0] + rows[1];
  end else begin : g_one
    assign sum = rows[0];
  end

endmodule
