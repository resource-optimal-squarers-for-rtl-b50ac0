// tb_squarer_sizes: the evaluated size range. For every input width
// wx = 2..32, once logic only and once with one DSP, a squarer is built from
// the elaboration-time greedy tiling and checked against x*x computed here
// (all inputs for wx <= 10, otherwise all-ones plus random inputs). It also
// checks that with one DSP a squarer of up to 17 bits needs no LUT tile at
// all (the whole square fits one DSP), and prints the tile count and the
// estimated LUT cost of every configuration.
module tb_squarer_sizes;
  import sq_pkg::*;

  localparam int WMIN = 2;
  localparam int WMAX = 32;
  localparam int NCFG = (WMAX - WMIN + 1) * 2;

  int checks = 0, failures = 0;
  int n_dsp_only = 0, n_logic = 0;
  bit done [NCFG];

  logic clk = 1'b0;
  always #5 clk = ~clk;

  for (genvar wx = WMIN; wx <= WMAX; wx++) begin : g_w
    for (genvar nd = 0; nd < 2; nd++) begin : g_d
      localparam int                    NTG = greedy_count(wx, nd);
      localparam tile_t [GT_MAX_NT-1:0] G   = greedy_tiling(wx, nd);
      localparam int                    IDX = (wx - WMIN) * 2 + nd;

      logic [wx-1:0]   x;
      logic [2*wx-1:0] sq;
      logic            ov;

      tiled_squarer #(.WX(wx), .NT(NTG), .TILES(G[NTG-1:0])) dut
        (.clk(clk), .rst_n(1'b1), .in_valid(1'b1), .x(x), .out_valid(ov), .sq(sq));

      initial begin
        int          cost;
        int          nt_dsp, nt_lut;
        logic [63:0] e;
        int          nvec;
        done[IDX] = 1'b0;
        x = '0;
        #1;
        nvec = (wx <= 10) ? (1 << wx) : 400;
        for (int i = 0; i < nvec; i++) begin
          if (wx <= 10)   x = wx'(i);
          else if (i == 0) x = '1;
          else            x = wx'({$urandom, $urandom});
          #1;
          e = 64'(x) * 64'(x);
          checks++;
          if (64'(sq) != e || !ov) begin
            failures++;
            if (failures < 20) $display("FAIL wx=%0d dsp=%0d x=%h got %h expected %h", wx, nd, x, sq, e);
          end
        end
        cost = 0; nt_dsp = 0; nt_lut = 0;
        for (int k = 0; k < NTG; k++) begin
          cost += int'(tile_cost_x100(G[k]));
          if (G[k].kind == TILE_DSP) nt_dsp++;
          else                       nt_lut++;
        end
        $display("wx=%0d dsp=%0d tiles=%0d (dsp %0d, logic %0d) est. LUT cost %0d.%02d",
                 wx, nd, NTG, nt_dsp, nt_lut, cost / 100, cost % 100);
        checks++;
        if (nt_dsp != nd) begin
          failures++;
          $display("FAIL wx=%0d: %0d DSP tiles, budget %0d", wx, nt_dsp, nd);
        end
        if (nd == 1 && wx <= 17) begin
          checks++;
          if (nt_lut != 0) begin
            failures++;
            $display("FAIL wx=%0d: LUT tiles although the square fits one DSP", wx);
          end else n_dsp_only++;
        end
        if (nt_lut > 0) n_logic++;
        done[IDX] = 1'b1;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    #2;
    do begin
      @(posedge clk);
      all = 1'b1;
      for (int i = 0; i < NCFG; i++) if (!done[i]) all = 1'b0;
    end while (!all);
    $display("configurations: DSP only %0d, with logic tiles %0d", n_dsp_only, n_logic);
    if (n_dsp_only == 0) begin failures++; $display("FAIL never: DSP-only squarer"); end
    if (n_logic == 0)    begin failures++; $display("FAIL never: logic tiles"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
