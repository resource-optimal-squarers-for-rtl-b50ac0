// tiled_squarer: unsigned squarer sq = x * x built from a tiling of the
// squarer board with DSP, LUT-multiplier and LUT-squarer tiles.
//
// How it works. The WX x WX board of partial products x_i * x_j is symmetric,
// so only the diagonal (needed once) and the cells above it (needed twice)
// are covered. Each entry of TILES names a tile kind, two input slices
// A = x[x +: wa] and B = x[y +: wb] and a weight w in {-2, -1, 1, 2}; the
// tile's product A*B is placed at bit x+y, shifted one more bit for |w| = 2.
// Weight 2 lets one multiplier stand for a block and its mirror image;
// negative weights subtract a region that two tiles (or one tile and its
// mirror) covered too often, for instance where a multiplier crosses the
// diagonal. A subtracted product is added as its one's complement over the
// product's own bit range; the missing "+1" and the all-ones sign extension
// of every such term are gathered into one constant row (the sign-extension
// vector). All rows go through a carry-save compressor tree and a final
// adder. The tiling is checked at elaboration: the mirrored coverage of every
// diagonal cell must be exactly 1 and of every cell above it exactly 2, which
// guarantees sq = x^2. A square LUT multiplier placed on the diagonal has
// equal operands and is built as a squarer tile.
//
// Interface. x / in_valid in, sq / out_valid out, sq is 2*WX bits.
// Timing. PIPE_STAGES = 0: purely combinational (clk and rst_n unused,
// out_valid = in_valid). PIPE_STAGES = 1: a register after the tiles (the bit
// heap), latency 1 cycle. PIPE_STAGES = 2: one more register on the result,
// latency 2 cycles. One new input per cycle in every case. rst_n (active low,
// synchronous) clears only the valid pipeline.
//
// The coverage rule, tile library, weights and sign-extension constant follow
// the source design. The default tiling (a 53-bit squarer with four DSPs) is
// this implementation's own valid tiling, not the optimum the design's ILP
// model would find; any other valid tiling can be passed in TILES. The
// pipeline register placement is this implementation's choice.
module tiled_squarer
  import sq_pkg::*;
#(
  parameter int unsigned    WX          = T53_4D_WX,
  parameter int unsigned    NT          = T53_4D_NT,
  parameter tile_t [NT-1:0] TILES       = T53_4D,
  parameter int unsigned    PIPE_STAGES = 0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [WX-1:0]   x,
  output logic            out_valid,
  output logic [2*WX-1:0] sq
);

  localparam int unsigned W   = 2 * WX;   // result width

  // ---------------------------------------------------------------------
  // Elaboration-time checks of the tiling
  // ---------------------------------------------------------------------

  // Shift of a tile's product: its board position plus one for |w| = 2.
  function automatic int tile_shift(input logic [7:0] px, input logic [7:0] py,
                                    input logic signed [7:0] tw);
    int w;
    w = int'(tw);
    return int'(px) + int'(py) + ((w == 2 || w == -2) ? 1 : 0);
  endfunction

  // 1 when the mirrored coverage equals 1 on the diagonal and 2 above it.
  function automatic bit tiling_covers_board();
    int    cov [WX*WX];
    tile_t tt;
    bit    ok;
    for (int i = 0; i < int'(WX*WX); i++) cov[i] = 0;
    for (int t = 0; t < int'(NT); t++) begin
      tt = TILES[t];
      for (int i = int'(tt.x); i < int'(tt.x) + int'(tt.wa); i++) begin
        for (int j = int'(tt.y); j < int'(tt.y) + int'(tt.wb); j++) begin
          if (i < int'(WX) && j < int'(WX)) begin
            if (i >= j) cov[i*int'(WX) + j] += int'($signed(tt.w));
            else        cov[j*int'(WX) + i] += int'($signed(tt.w));
          end
        end
      end
    end
    ok = 1'b1;
    for (int i = 0; i < int'(WX); i++)
      for (int j = 0; j <= i; j++)
        if (cov[i*int'(WX) + j] != ((i == j) ? 1 : 2)) ok = 1'b0;
    return ok;
  endfunction

  // Sign-extension vector: for each tile with w < 0, placed at shift s with
  // p product bits, the constant 2^s - 2^(s+p) (mod 2^W). Added to the
  // one's complement of the product over bits [s, s+p) this gives -P*2^s.
  function automatic logic [W-1:0] sign_extension_vector();
    logic [W-1:0] c;
    tile_t        tt;
    int           s, p;
    c = '0;
    for (int t = 0; t < int'(NT); t++) begin
      tt = TILES[t];
      if ($signed(tt.w) < 0) begin
        s = tile_shift(tt.x, tt.y, tt.w);
        p = int'(tt.wa) + int'(tt.wb);
        if (s < int'(W)) c = c + (W'(1) << s);
        if (s + p < int'(W)) c = c - (W'(1) << (s + p));
      end
    end
    return c;
  endfunction

  // Highest input bit position any tile reads, at least WX.
  function automatic int unsigned input_extent();
    int unsigned e;
    tile_t       tt;
    e = WX;
    for (int t = 0; t < int'(NT); t++) begin
      tt = TILES[t];
      if (int'(tt.x) + int'(tt.wa) > int'(e)) e = int'(tt.x) + int'(tt.wa);
      if (int'(tt.y) + int'(tt.wb) > int'(e)) e = int'(tt.y) + int'(tt.wb);
    end
    return e;
  endfunction

  localparam logic [W-1:0] SignExt = sign_extension_vector();
  localparam int unsigned  XE      = input_extent();  // board plus border overlap

  if (!tiling_covers_board()) begin : g_bad_tiling
    $error("tiled_squarer: TILES does not cover the squarer board exactly");
  end
  if (PIPE_STAGES > 2) begin : g_bad_pipe
    $error("tiled_squarer: PIPE_STAGES must be 0, 1 or 2");
  end

  // ---------------------------------------------------------------------
  // Tiles: partial product generation
  // ---------------------------------------------------------------------

  logic [XE-1:0]              xe;       // input, zero beyond the board
  logic [NT:0][W-1:0]         heap;     // placed tile rows + constant row

  assign xe = XE'(x);

  for (genvar t = 0; t < int'(NT); t++) begin : g_tile
    localparam tile_t T  = TILES[t];
    localparam int    WA = int'(T.wa);
    localparam int    WB = int'(T.wb);
    localparam int    PX = int'(T.x);
    localparam int    PY = int'(T.y);
    localparam int    TW = int'($signed(T.w));
    localparam int    PW = WA + WB;
    localparam int    SH = tile_shift(T.x, T.y, T.w);

    logic [WA-1:0]  a;
    logic [WB-1:0]  b;
    logic [PW-1:0]  prod;
    logic [W-1:0]   placed;
    logic [W-1:0]   mask;

    assign a = xe[PX +: WA];
    assign b = xe[PY +: WB];

    if (TW != 1 && TW != 2 && TW != -1 && TW != -2) begin : g_bad_weight
      $error("tiled_squarer: tile weight must be -2, -1, 1 or 2");
    end

    if (T.kind == TILE_SQR) begin : g_sqr
      if (PX != PY || WA != WB || (TW != 1 && TW != -1)) begin : g_bad_sqr
        $error("tiled_squarer: squarer tile must be square, on the diagonal, weight +-1");
      end
      sq_tile #(.N(WA)) u_sq (.x(a), .sq(prod));
      logic unused_b;
      assign unused_b = ^b;
    end else if (T.kind == TILE_LUT && PX == PY && WA == WB && WA <= 6) begin : g_lut_diag
      // A square LUT multiplier on the diagonal sees equal operands: it is
      // built as the cheaper squarer tile of the same size.
      sq_tile #(.N(WA)) u_sq (.x(a), .sq(prod));
      logic unused_b;
      assign unused_b = ^b;
    end else if (T.kind == TILE_LUT) begin : g_lut
      lut_mult_tile #(.WA(WA), .WB(WB)) u_mul (.a(a), .b(b), .p(prod));
    end else begin : g_dsp
      if (WA >= WB) begin : g_ab
        dsp_mult_tile #(.WA(WA), .WB(WB)) u_dsp (.a(a), .b(b), .p(prod));
      end else begin : g_ba
        dsp_mult_tile #(.WA(WB), .WB(WA)) u_dsp (.a(b), .b(a), .p(prod));
      end
    end

    // Place the product at bit SH of the W-bit row; invert it for w < 0.
    assign placed = W'({{W{1'b0}}, prod} << SH);
    assign mask   = W'({{W{1'b0}}, {PW{1'b1}}} << SH);
    assign heap[t] = (TW < 0) ? (mask & ~placed) : placed;
  end

  assign heap[NT] = SignExt;

  // ---------------------------------------------------------------------
  // Optional register after the tiles, compressor tree, optional output reg
  // ---------------------------------------------------------------------

  logic [NT:0][W-1:0] heap_s;
  logic               valid_s;
  logic [W-1:0]       sum;

  if (PIPE_STAGES >= 1) begin : g_pipe_heap
    always_ff @(posedge clk) begin
      heap_s <= heap;
      if (!rst_n) valid_s <= 1'b0;
      else        valid_s <= in_valid;
    end
  end else begin : g_comb_heap
    assign heap_s  = heap;
    assign valid_s = in_valid;
  end

  compressor_tree #(.NROWS(NT + 1), .W(W)) u_tree (
    .rows (heap_s),
    .sum  (sum)
  );

  if (PIPE_STAGES >= 2) begin : g_pipe_out
    always_ff @(posedge clk) begin
      sq <= sum;
      if (!rst_n) out_valid <= 1'b0;
      else        out_valid <= valid_s;
    end
  end else begin : g_comb_out
    assign sq        = sum;
    assign out_valid = valid_s;
  end

  if (PIPE_STAGES == 0) begin : g_unused_clk
    logic unused_clk;
    assign unused_clk = clk ^ rst_n;
  end

endmodule
