// tb_tiled_squarer_full: the squarer exactly as delivered (53-bit input,
// four DSP tiles, combinational, no parameter overrides). Applies zero,
// all-ones, every single-bit and single-zero-bit pattern, alternating bit
// patterns, values with one nonzero 6-bit group (so each tile is exercised
// alone) and random inputs, and compares each result with x*x computed here.
// It also counts how often a subtracted (negative-weight) tile, a DSP tile
// and a tile reaching past the board edge saw nonzero operands.
module tb_tiled_squarer_full;
  import sq_pkg::*;

  int checks = 0, failures = 0;
  int n_neg = 0, n_dsp = 0, n_border = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [52:0]  x;
  logic [105:0] sq;
  logic         out_valid;
  logic         in_valid;

  tiled_squarer dut (.clk(clk), .rst_n(1'b1), .in_valid(in_valid), .x(x),
                     .out_valid(out_valid), .sq(sq));

  function automatic bit nonzero_slice(input logic [52:0] v, input int lsb, input int w);
    logic [127:0] e;
    e = (128'(v) >> lsb) & ((128'd1 << w) - 128'd1);
    return e != '0;
  endfunction

  task automatic apply(input logic [52:0] v);
    tile_t t;
    x = v;
    in_valid = 1'b1;
    #1;
    checks++;
    if (sq != 106'(v) * 106'(v) || !out_valid) begin
      failures++;
      if (failures < 20) $display("FAIL x=%h got %h expected %h", v, sq, 106'(v) * 106'(v));
    end
    for (int k = 0; k < int'(T53_4D_NT); k++) begin
      t = T53_4D[k];
      if (nonzero_slice(v, int'(t.x), int'(t.wa)) && nonzero_slice(v, int'(t.y), int'(t.wb))) begin
        if ($signed(t.w) < 0) n_neg++;
        if (t.kind == TILE_DSP) n_dsp++;
        if (int'(t.x) + int'(t.wa) > 53) n_border++;
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0;
    x = '0;
    apply('0);
    apply('1);
    for (int b = 0; b < 53; b++) apply(53'd1 << b);
    for (int b = 0; b < 53; b++) apply(~(53'd1 << b));
    apply(53'h0AAAAAAAAAAAAA);
    apply(53'h15555555555555);
    for (int g = 0; g < 9; g++) apply(53'(64'h3F << (6 * g)));
    for (int g = 0; g < 9; g++) apply(53'(64'h3F << (6 * g)) | 53'(64'h3F << (6 * ((g + 4) % 9))));
    for (int i = 0; i < 5000; i++) apply(53'({$urandom, $urandom}));
    $display("exercised: negative-weight tile %0d, DSP tile %0d, border tile %0d", n_neg, n_dsp, n_border);
    if (n_neg == 0)    begin failures++; $display("FAIL never: negative-weight tile"); end
    if (n_dsp == 0)    begin failures++; $display("FAIL never: DSP tile"); end
    if (n_border == 0) begin failures++; $display("FAIL never: border tile"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
