// tb_tiled_squarer: end-to-end self-check of the tiled squarer.
//
// Instances:
//   u_full  the default configuration (53-bit, four DSP tiles, combinational),
//           no parameter overrides; directed corner values and random inputs
//   u_r2    8-bit radix-2 tiling (1x1 tiles only), exhaustive
//   u_neg   8-bit tiling with a multiplier across the diagonal and a
//           subtracted squarer tile (negative weight), exhaustive
//   u_diag  4-bit tiling with a 3x3 LUT multiplier on the diagonal, exhaustive
//   u_l8    8-bit logic-only greedy tiling, exhaustive
//   u_17    17-bit greedy tiling, one DSP as squarer, random
//   u_32a/b 32-bit greedy tilings, logic only / one DSP, random
//   u_p1    default 53-bit tiling with one pipeline register (latency 1)
//   u_p2    8-bit negative-weight tiling with two registers (latency 2)
// Every result is compared with x*x computed here. The testbench also counts
// how often each mechanism of the design was exercised by a nonzero operand:
// a negative-weight tile, a weight-2 (shifted) tile, a DSP tile, a squarer
// tile, a tile reaching past the board edge, a square multiplier on the
// diagonal, and results of both pipelined
// instances arriving with the expected latency. A mechanism never exercised
// counts as a failure.
module tb_tiled_squarer;
  import sq_pkg::*;

  // 4-bit tiling with a 3x3 LUT multiplier on the diagonal (built as a
  // squarer tile) and a 2x3 multiplier hanging over the board edge.
  localparam tile_t [2:0] T4_DIAG = '{
    '{TILE_LUT, 8'd3, 8'd3, 8'd0, 8'd0, 8'sd1},
    '{TILE_SQR, 8'd1, 8'd1, 8'd3, 8'd3, 8'sd1},
    '{TILE_LUT, 8'd2, 8'd3, 8'd3, 8'd0, 8'sd2}
  };

  localparam int                    T8_L_NT   = greedy_count(8, 0);
  localparam tile_t [GT_MAX_NT-1:0] T8_L_G    = greedy_tiling(8, 0);
  localparam int                    T17_1D_NT = greedy_count(17, 1);
  localparam tile_t [GT_MAX_NT-1:0] T17_1D_G  = greedy_tiling(17, 1);
  localparam int                    T32_0D_NT = greedy_count(32, 0);
  localparam tile_t [GT_MAX_NT-1:0] T32_0D_G  = greedy_tiling(32, 0);
  localparam int                    T32_1D_NT = greedy_count(32, 1);
  localparam tile_t [GT_MAX_NT-1:0] T32_1D_G  = greedy_tiling(32, 1);

  int checks = 0, failures = 0;
  int n_neg = 0, n_w2 = 0, n_dsp = 0, n_sqr = 0, n_border = 0;
  int n_lat1 = 0, n_lat2 = 0, n_diag = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  // ---------------- combinational instances ----------------
  logic [52:0]  x53;
  logic [105:0] sq53;
  logic         v53;
  tiled_squarer u_full (.clk(clk), .rst_n(rst_n), .in_valid(1'b1), .x(x53),
                        .out_valid(v53), .sq(sq53));

  logic [7:0]  x8;
  logic [15:0] sq_r2, sq_neg, sq_l8;
  logic        v_r2, v_neg, v_l8;
  tiled_squarer #(.WX(T8_R2_WX), .NT(T8_R2_NT), .TILES(T8_R2)) u_r2
    (.clk(clk), .rst_n(rst_n), .in_valid(1'b1), .x(x8), .out_valid(v_r2), .sq(sq_r2));
  tiled_squarer #(.WX(T8_NEG_WX), .NT(T8_NEG_NT), .TILES(T8_NEG)) u_neg
    (.clk(clk), .rst_n(rst_n), .in_valid(1'b1), .x(x8), .out_valid(v_neg), .sq(sq_neg));
  tiled_squarer #(.WX(8), .NT(T8_L_NT), .TILES(T8_L_G[T8_L_NT-1:0])) u_l8
    (.clk(clk), .rst_n(rst_n), .in_valid(1'b1), .x(x8), .out_valid(v_l8), .sq(sq_l8));

  logic [3:0] x4;
  logic [7:0] sq4;
  logic       v4;
  tiled_squarer #(.WX(4), .NT(3), .TILES(T4_DIAG)) u_diag
    (.clk(clk), .rst_n(rst_n), .in_valid(1'b1), .x(x4), .out_valid(v4), .sq(sq4));

  logic [16:0] x17;
  logic [33:0] sq17;
  logic        v17;
  tiled_squarer #(.WX(17), .NT(T17_1D_NT), .TILES(T17_1D_G[T17_1D_NT-1:0])) u_17
    (.clk(clk), .rst_n(rst_n), .in_valid(1'b1), .x(x17), .out_valid(v17), .sq(sq17));

  logic [31:0] x32;
  logic [63:0] sq32a, sq32b;
  logic        v32a, v32b;
  tiled_squarer #(.WX(32), .NT(T32_0D_NT), .TILES(T32_0D_G[T32_0D_NT-1:0])) u_32a
    (.clk(clk), .rst_n(rst_n), .in_valid(1'b1), .x(x32), .out_valid(v32a), .sq(sq32a));
  tiled_squarer #(.WX(32), .NT(T32_1D_NT), .TILES(T32_1D_G[T32_1D_NT-1:0])) u_32b
    (.clk(clk), .rst_n(rst_n), .in_valid(1'b1), .x(x32), .out_valid(v32b), .sq(sq32b));

  // ---------------- pipelined instances ----------------
  logic [52:0]  xp1;
  logic [105:0] sqp1;
  logic         ivp1, ovp1;
  tiled_squarer #(.PIPE_STAGES(1)) u_p1
    (.clk(clk), .rst_n(rst_n), .in_valid(ivp1), .x(xp1), .out_valid(ovp1), .sq(sqp1));

  logic [7:0]  xp2;
  logic [15:0] sqp2;
  logic        ivp2, ovp2;
  tiled_squarer #(.WX(T8_NEG_WX), .NT(T8_NEG_NT), .TILES(T8_NEG), .PIPE_STAGES(2)) u_p2
    (.clk(clk), .rst_n(rst_n), .in_valid(ivp2), .x(xp2), .out_valid(ovp2), .sq(sqp2));

  // ---------------- helpers ----------------
  function automatic logic [63:0] slice(input logic [52:0] v, input int lsb, input int w);
    logic [127:0] e;
    e = 128'(v) >> lsb;
    return 64'(e) & ((64'd1 << w) - 64'd1);
  endfunction

  // Count mechanisms exercised by input v in tiling t (nonzero tile operands).
  task automatic count_mech(input tile_t t [], input int wx, input logic [52:0] v);
    for (int k = 0; k < t.size(); k++) begin
      if (slice(v, int'(t[k].x), int'(t[k].wa)) != 0 && slice(v, int'(t[k].y), int'(t[k].wb)) != 0) begin
        if ($signed(t[k].w) < 0) n_neg++;
        if ($signed(t[k].w) == 2 || $signed(t[k].w) == -2) n_w2++;
        if (t[k].kind == TILE_DSP) n_dsp++;
        if (t[k].kind == TILE_SQR) n_sqr++;
        if (int'(t[k].x) + int'(t[k].wa) > wx || int'(t[k].y) + int'(t[k].wb) > wx) n_border++;
      end
    end
  endtask

  tile_t t53 [], tneg [];

  task automatic chk(input string name, input logic [105:0] got, input logic [105:0] exp_v,
                     input logic valid);
    checks++;
    if (got !== exp_v || !valid) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h expected %h valid %b", name, got, exp_v, valid);
    end
  endtask

  task automatic apply53(input logic [52:0] v);
    x53 = v;
    #1;
    chk("53", sq53, 106'(v) * 106'(v), v53);
    count_mech(t53, 53, v);
  endtask

  // ---------------- pipelined stream checking ----------------
  logic [52:0] exp_p1 [$];
  logic [7:0]  exp_p2 [$];
  int          lat_p1 [$];
  int          lat_p2 [$];
  int          cycle = 0;
  bit          stream_on = 1'b0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (stream_on) begin
      if (ovp1) begin
        if (exp_p1.size() == 0) begin
          failures++; $display("FAIL p1: unexpected output");
        end else begin
          logic [52:0] e;
          int          c0;
          e  = exp_p1.pop_front();
          c0 = lat_p1.pop_front();
          chk("p1", sqp1, 106'(e) * 106'(e), 1'b1);
          checks++;
          if (cycle - c0 != 1) begin
            failures++; $display("FAIL p1 latency %0d", cycle - c0);
          end else n_lat1++;
        end
      end
      if (ovp2) begin
        if (exp_p2.size() == 0) begin
          failures++; $display("FAIL p2: unexpected output");
        end else begin
          logic [7:0] e;
          int         c0;
          e  = exp_p2.pop_front();
          c0 = lat_p2.pop_front();
          chk("p2", 106'(sqp2), 106'(16'(e) * 16'(e)), 1'b1);
          checks++;
          if (cycle - c0 != 2) begin
            failures++; $display("FAIL p2 latency %0d", cycle - c0);
          end else n_lat2++;
        end
      end
      // drive next inputs, valid about 3 cycles in 4
      ivp1 <= ($urandom % 4) != 0;
      ivp2 <= ($urandom % 4) != 0;
      xp1  <= 53'({$urandom, $urandom});
      xp2  <= 8'($urandom);
    end
  end
  // record what was applied: sampled at the same edge the DUT registers it
  always @(posedge clk) begin
    if (stream_on && rst_n) begin
      if (ivp1) begin exp_p1.push_back(xp1); lat_p1.push_back(cycle); end
      if (ivp2) begin exp_p2.push_back(xp2); lat_p2.push_back(cycle); end
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t53  = new[T53_4D_NT];
    for (int k = 0; k < int'(T53_4D_NT); k++) t53[k] = T53_4D[k];
    tneg = new[T8_NEG_NT];
    for (int k = 0; k < int'(T8_NEG_NT); k++) tneg[k] = T8_NEG[k];

    rst_n = 1'b0; ivp1 = 1'b0; ivp2 = 1'b0; xp1 = '0; xp2 = '0;
    x53 = '0; x8 = '0; x17 = '0; x32 = '0;

    // default 53-bit squarer: directed values
    apply53('0);
    apply53('1);
    for (int b = 0; b < 53; b++) apply53(53'd1 << b);
    for (int b = 0; b < 53; b++) apply53(~(53'd1 << b));
    apply53(53'h0AAAAAAAAAAAAA);
    apply53(53'h15555555555555);
    for (int i = 0; i < 4000; i++) apply53(53'({$urandom, $urandom}));

    // 8-bit tilings, exhaustive
    for (int v = 0; v < 256; v++) begin
      x8 = 8'(v);
      #1;
      chk("r2",  106'(sq_r2),  106'(v * v), v_r2);
      chk("neg", 106'(sq_neg), 106'(v * v), v_neg);
      chk("l8",  106'(sq_l8),  106'(v * v), v_l8);
      count_mech(tneg, 8, 53'(v));
    end

    // 4-bit tiling with a square multiplier on the diagonal, exhaustive
    for (int v = 0; v < 16; v++) begin
      x4 = 4'(v);
      #1;
      chk("diag", 106'(sq4), 106'(v * v), v4);
      if ((v & 7) != 0) n_diag++;
    end

    // 17- and 32-bit tilings
    for (int i = 0; i < 3000; i++) begin
      x17 = (i == 0) ? '1 : 17'($urandom);
      x32 = (i == 0) ? '1 : $urandom;
      #1;
      chk("17",  106'(sq17),  106'(x17) * 106'(x17), v17);
      chk("32a", 106'(sq32a), 106'(x32) * 106'(x32), v32a);
      chk("32b", 106'(sq32b), 106'(x32) * 106'(x32), v32b);
    end

    // pipelined instances: streaming with bubbles
    @(negedge clk);
    rst_n = 1'b1;
    stream_on = 1'b1;
    repeat (500) @(posedge clk);
    stream_on = 1'b0;
    repeat (4) @(posedge clk);

    $display("mechanisms: negative-weight %0d, weight-2 %0d, DSP %0d, squarer tile %0d, border %0d, diagonal multiplier %0d, latency1 %0d, latency2 %0d",
             n_neg, n_w2, n_dsp, n_sqr, n_border, n_diag, n_lat1, n_lat2);
    if (n_neg == 0)    begin failures++; $display("FAIL never: negative weight"); end
    if (n_w2 == 0)     begin failures++; $display("FAIL never: weight 2"); end
    if (n_dsp == 0)    begin failures++; $display("FAIL never: DSP tile"); end
    if (n_sqr == 0)    begin failures++; $display("FAIL never: squarer tile"); end
    if (n_border == 0) begin failures++; $display("FAIL never: border overlap"); end
    if (n_diag == 0)   begin failures++; $display("FAIL never: square multiplier on the diagonal"); end
    if (n_lat1 == 0)   begin failures++; $display("FAIL never: pipelined result, 1 stage"); end
    if (n_lat2 == 0)   begin failures++; $display("FAIL never: pipelined result, 2 stages"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
