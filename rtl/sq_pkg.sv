// sq_pkg: shared types and the tilings that configure the tiled squarer.
//
// A squarer of a WX-bit input X is seen as a WX x WX board whose cell (i, j)
// holds the partial product x_i * x_j of weight 2^(i+j). Because the board is
// symmetric, only the cells with i >= j are accounted for: every diagonal cell
// must be covered with total weight 1 and every cell above the diagonal
// (i > j) with total weight 2. A tile computes the product of two slices of X,
// A = X[x +: wa] and B = X[y +: wb], and adds it to the result with a signed
// weight w in {-2, -1, 1, 2} (2 is a one-bit shift, negative weights subtract).
// A tile cell (i, j) with i < j is counted at its mirror (j, i). Cells that fall
// outside the board read input bits that are zero (border overlap).
//
// Tile kinds:
//   TILE_SQR  LUT squarer tile on the diagonal (x = y, wa = wb = 1..6), w = +-1
//   TILE_LUT  LUT multiplier tile: 1x1, 1x2, 2x3, 3x3 or 2xk (wa x wb)
//   TILE_DSP  embedded DSP multiplier, 24x17 unsigned (either orientation);
//             a square DSP tile on the diagonal acts as a squarer
//
// The tilings below satisfy that coverage rule (the squarer checks it at
// elaboration). They are not cost-optimal: they come from a simple greedy
// covering. DSP placements are fixed first; the remaining weight is covered
// by the largest squarer tile (6 down to 1 bits) that matches the remaining
// pattern on the diagonal (which may be negative where a DSP counted twice
// crosses the diagonal), then by 2xk tiles on column pairs (k <= 24), and
// finally by 1x1 tiles for isolated cells. T8_R2 uses 1x1 tiles only, which
// is the classic radix-2 squarer; T8_NEG places a 2x3 multiplier across the
// diagonal; T53_4D is the default 53-bit squarer with four DSPs. The
// function greedy_tiling() at the end of the package runs the same covering
// at elaboration for any width, logic only or with one DSP.
package sq_pkg;

  typedef enum logic [1:0] {
    TILE_SQR = 2'd0,
    TILE_LUT = 2'd1,
    TILE_DSP = 2'd2
  } tile_kind_e;

  typedef struct packed {
    tile_kind_e        kind;
    logic [7:0]        wa;   // width of slice A (board x extent)
    logic [7:0]        wb;   // width of slice B (board y extent)
    logic [7:0]        x;    // LSB position of slice A
    logic [7:0]        y;    // LSB position of slice B
    logic signed [7:0] w;    // weight: -2, -1, 1 or 2
  } tile_t;

  // DSP multiplier size, unsigned operands (one 25x18 signed DSP).
  localparam int unsigned DSP_WA = 24;
  localparam int unsigned DSP_WB = 17;

  // 8-bit radix-2 squarer: only 1x1 tiles (Fig. 6 weights): 36 tiles, 0 DSP, 0 with negative weight
  localparam int unsigned T8_R2_WX = 8;
  localparam int unsigned T8_R2_NT = 36;
  localparam tile_t [T8_R2_NT-1:0] T8_R2 = '{
    '{TILE_LUT, 8'd1, 8'd1, 8'd7, 8'd6, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd7, 8'd5, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd7, 8'd4, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd7, 8'd3, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd7, 8'd2, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd7, 8'd1, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd7, 8'd0, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd6, 8'd5, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd6, 8'd4, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd6, 8'd3, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd6, 8'd2, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd6, 8'd1, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd6, 8'd0, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd5, 8'd4, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd5, 8'd3, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd5, 8'd2, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd5, 8'd1, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd5, 8'd0, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd4, 8'd3, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd4, 8'd2, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd4, 8'd1, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd4, 8'd0, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd3, 8'd2, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd3, 8'd1, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd3, 8'd0, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd2, 8'd1, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd2, 8'd0, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd1, 8'd0, 8'sd2},
    '{TILE_SQR, 8'd1, 8'd1, 8'd7, 8'd7, 8'sd1},
    '{TILE_SQR, 8'd1, 8'd1, 8'd6, 8'd6, 8'sd1},
    '{TILE_SQR, 8'd1, 8'd1, 8'd5, 8'd5, 8'sd1},
    '{TILE_SQR, 8'd1, 8'd1, 8'd4, 8'd4, 8'sd1},
    '{TILE_SQR, 8'd1, 8'd1, 8'd3, 8'd3, 8'sd1},
    '{TILE_SQR, 8'd1, 8'd1, 8'd2, 8'd2, 8'sd1},
    '{TILE_SQR, 8'd1, 8'd1, 8'd1, 8'd1, 8'sd1},
    '{TILE_SQR, 8'd1, 8'd1, 8'd0, 8'd0, 8'sd1}
  };

  // 8-bit, a 2x3 multiplier across the diagonal counted twice, overlap subtracted (Fig. 7 M2/M3): 6 tiles, 0 DSP, 1 with negative weight
  localparam int unsigned T8_NEG_WX = 8;
  localparam int unsigned T8_NEG_NT = 6;
  localparam tile_t [T8_NEG_NT-1:0] T8_NEG = '{
    '{TILE_LUT, 8'd2, 8'd5, 8'd7, 8'd0, 8'sd2},
    '{TILE_LUT, 8'd2, 8'd5, 8'd5, 8'd0, 8'sd2},
    '{TILE_SQR, 8'd1, 8'd1, 8'd7, 8'd7, 8'sd1},
    '{TILE_SQR, 8'd2, 8'd2, 8'd5, 8'd5, -8'sd1},
    '{TILE_SQR, 8'd5, 8'd5, 8'd0, 8'd0, 8'sd1},
    '{TILE_LUT, 8'd2, 8'd3, 8'd5, 8'd5, 8'sd2}
  };

  // 53-bit, four DSPs (double precision): 38 tiles, 4 DSP, 1 with negative weight
  localparam int unsigned T53_4D_WX = 53;
  localparam int unsigned T53_4D_NT = 38;
  localparam tile_t [T53_4D_NT-1:0] T53_4D = '{
    '{TILE_LUT, 8'd1, 8'd1, 8'd52, 8'd51, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd52, 8'd50, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd52, 8'd49, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd52, 8'd48, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd52, 8'd47, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd52, 8'd46, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd46, 8'd45, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd46, 8'd44, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd46, 8'd43, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd46, 8'd42, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd46, 8'd41, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd46, 8'd40, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd40, 8'd39, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd40, 8'd38, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd40, 8'd37, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd40, 8'd36, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd40, 8'd35, 8'sd2},
    '{TILE_LUT, 8'd1, 8'd1, 8'd40, 8'd34, 8'sd2},
    '{TILE_LUT, 8'd2, 8'd12, 8'd51, 8'd34, 8'sd2},
    '{TILE_LUT, 8'd2, 8'd12, 8'd49, 8'd34, 8'sd2},
    '{TILE_LUT, 8'd2, 8'd12, 8'd47, 8'd34, 8'sd2},
    '{TILE_LUT, 8'd2, 8'd6, 8'd45, 8'd34, 8'sd2},
    '{TILE_LUT, 8'd2, 8'd6, 8'd43, 8'd34, 8'sd2},
    '{TILE_LUT, 8'd2, 8'd6, 8'd41, 8'd34, 8'sd2},
    '{TILE_LUT, 8'd2, 8'd6, 8'd27, 8'd17, 8'sd2},
    '{TILE_LUT, 8'd2, 8'd6, 8'd25, 8'd17, 8'sd2},
    '{TILE_LUT, 8'd2, 8'd6, 8'd23, 8'd17, 8'sd2},
    '{TILE_SQR, 8'd1, 8'd1, 8'd52, 8'd52, 8'sd1},
    '{TILE_SQR, 8'd6, 8'd6, 8'd46, 8'd46, 8'sd1},
    '{TILE_SQR, 8'd6, 8'd6, 8'd40, 8'd40, 8'sd1},
    '{TILE_SQR, 8'd6, 8'd6, 8'd34, 8'd34, 8'sd1},
    '{TILE_SQR, 8'd5, 8'd5, 8'd29, 8'd29, -8'sd1},
    '{TILE_SQR, 8'd6, 8'd6, 8'd23, 8'd23, 8'sd1},
    '{TILE_SQR, 8'd6, 8'd6, 8'd17, 8'd17, 8'sd1},
    '{TILE_DSP, 8'd24, 8'd17, 8'd29, 8'd17, 8'sd2},
    '{TILE_DSP, 8'd24, 8'd17, 8'd41, 8'd0, 8'sd2},
    '{TILE_DSP, 8'd24, 8'd17, 8'd17, 8'd0, 8'sd2},
    '{TILE_DSP, 8'd17, 8'd17, 8'd0, 8'd0, 8'sd1}
  };

  // ---------------------------------------------------------------------
  // Greedy tiling for any width, computed at elaboration.
  //
  // greedy_tiling(wx, ndsp) returns a valid tiling of a wx-bit squarer
  // (wx <= GT_MAX_WX) in entries [greedy_count(wx, ndsp)-1:0]; the other
  // entries are zero. With ndsp >= 1 one DSP is used as a min(wx,17)-bit
  // squarer at the origin; with ndsp = 0 the tiling is logic only. The
  // remaining weight is covered exactly as described at the top of this
  // package: squarer tiles of 6 down to 1 bits along the diagonal, then
  // 2xk tiles (k <= 24) on column pairs (1,2), (3,4), ..., then 1x1 tiles.
  // ---------------------------------------------------------------------
  localparam int unsigned GT_MAX_WX = 64;
  localparam int unsigned GT_MAX_NT = 256;

  function automatic tile_t [GT_MAX_NT-1:0] greedy_tiling(input int wx, input int ndsp);
    int                    rem [GT_MAX_WX*GT_MAX_WX];
    tile_t [GT_MAX_NT-1:0] res;
    tile_t                 t;
    int                    n, phase, p, cc, j, i1, j1, s, v, v2, k, m, sz;
    bit                    found, ok;
    for (int i = 0; i < int'(GT_MAX_NT); i++) res[i] = '0;
    n   = 0;
    for (int i = 0; i < wx; i++)
      for (int jj = 0; jj < wx; jj++)
        rem[i*GT_MAX_WX + jj] = (i == jj) ? 1 : ((i > jj) ? 2 : 0);
    phase = (ndsp >= 1) ? 0 : 1;
    p = 0; cc = 1; j = 0; i1 = 1; j1 = 0;
    for (int it = 0; it < 40000 && phase < 5; it++) begin
      found = 1'b0;
      t     = '0;
      case (phase)
        0: begin  // one DSP used as a squarer at the origin
          m = (wx < int'(DSP_WB)) ? wx : int'(DSP_WB);
          t = '{TILE_DSP, 8'(m), 8'(m), 8'd0, 8'd0, 8'sd1};
          found = 1'b1;
          phase = 1;
        end
        1: begin  // squarer tiles along the diagonal
          if (p >= wx) begin
            phase = 2;
          end else begin
            s = rem[p*GT_MAX_WX + p];
            if (s == 0) begin
              p++;
            end else if (s == 1 || s == -1) begin
              for (sz = 6; sz >= 1; sz--) begin
                ok = (p + sz <= wx);
                for (int a = p; a < p + sz && ok; a++)
                  for (int b = p; b <= a; b++)
                    if (rem[a*GT_MAX_WX + b] != s * ((a == b) ? 1 : 2)) ok = 1'b0;
                if (ok) break;
              end
              t = '{TILE_SQR, 8'(sz), 8'(sz), 8'(p), 8'(p), 8'(s)};
              found = 1'b1;
              p += sz;
            end else begin
              t = '{TILE_SQR, 8'd1, 8'd1, 8'(p), 8'(p), (s > 0) ? 8'sd1 : -8'sd1};
              found = 1'b1;
            end
          end
        end
        2: begin  // 2xk multipliers on column pairs (cc, cc+1)
          if (cc >= wx) begin
            phase = 3;
          end else if (j >= cc) begin
            cc += 2;
            j = 0;
          end else begin
            v  = rem[cc*GT_MAX_WX + j];
            v2 = (cc + 1 < wx) ? rem[(cc+1)*GT_MAX_WX + j] : v;
            if (v != 0 && v == v2 && v >= -2 && v <= 2) begin
              k = 0;
              while (j + k < cc && k < 24 && rem[cc*GT_MAX_WX + j + k] == v &&
                     (cc + 1 >= wx || rem[(cc+1)*GT_MAX_WX + j + k] == v))
                k++;
              t = '{TILE_LUT, 8'd2, 8'(k), 8'(cc), 8'(j), 8'(v)};
              found = 1'b1;
              j += k;
            end else begin
              j++;
            end
          end
        end
        default: begin  // 1x1 tiles for what is left
          if (i1 >= wx) begin
            phase = 5;
          end else if (j1 >= i1) begin
            i1++;
            j1 = 0;
          end else if (rem[i1*GT_MAX_WX + j1] != 0) begin
            v = rem[i1*GT_MAX_WX + j1];
            v = (v > 2) ? 2 : ((v < -2) ? -2 : v);
            t = '{TILE_LUT, 8'd1, 8'd1, 8'(i1), 8'(j1), 8'(v)};
            found = 1'b1;
          end else begin
            j1++;
          end
        end
      endcase
      if (found && n < int'(GT_MAX_NT)) begin
        res[n] = t;
        n++;
        for (int a = int'(t.x); a < int'(t.x) + int'(t.wa); a++)
          for (int b = int'(t.y); b < int'(t.y) + int'(t.wb); b++)
            if (a < wx && b < wx) begin
              if (a >= b) rem[a*GT_MAX_WX + b] -= int'(t.w);
              else        rem[b*GT_MAX_WX + a] -= int'(t.w);
            end
      end
    end
    return res;
  endfunction

  // Number of tiles in greedy_tiling(wx, ndsp).
  function automatic int unsigned greedy_count(input int wx, input int ndsp);
    tile_t [GT_MAX_NT-1:0] r;
    int unsigned           c;
    r = greedy_tiling(wx, ndsp);
    c = 0;
    for (int i = 0; i < int'(GT_MAX_NT); i++)
      if (r[i].wa != 8'd0) c++;
    return c;
  endfunction

  // Estimated LUT cost of one tile, in hundredths of a LUT:
  // cost_tile = cost_mult + 0.65 * w_out (tile LUTs plus its share of the
  // compressor tree), from the tile library table. A tiling's estimate is
  // the sum over its tiles plus 0.65 LUT for each set bit of its
  // sign-extension vector. Informational only.
  function automatic int unsigned tile_cost_x100(input tile_t t);
    int wa, wb, lo, hi;
    wa = int'(t.wa);
    wb = int'(t.wb);
    lo = (wa < wb) ? wa : wb;
    hi = (wa < wb) ? wb : wa;
    case (t.kind)
      TILE_DSP: return 2665;
      TILE_SQR: case (wa)
        1: return 65;   2: return 360;  3: return 590;
        4: return 820;  5: return 1050; default: return 1480;
      endcase
      default: begin
        if (lo == 1 && hi == 1) return 165;
        if (lo == 1 && hi == 2) return 230;
        if (lo == 3 && hi == 3) return 890;
        if (lo == 2 && hi == 3) return 625;
        return 165 * hi + 230;  // 2xk
      end
    endcase
  endfunction

endpackage
