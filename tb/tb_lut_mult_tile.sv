// tb_lut_mult_tile: exhaustive self-check of the LUT multiplier tile shapes
// 1x1, 1x2, 2x3, 3x3, 3x2, 2x8 and 8x2 against products computed here.
module tb_lut_mult_tile;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NS = 7;
  localparam int SA [NS] = '{1, 1, 2, 3, 3, 2, 8};
  localparam int SB [NS] = '{1, 2, 3, 3, 2, 8, 2};

  logic [7:0]  a, b;
  logic [15:0] p [NS];

  for (genvar s = 0; s < NS; s++) begin : g_s
    localparam int WA = SA[s];
    localparam int WB = SB[s];
    logic [WA+WB-1:0] ps;
    lut_mult_tile #(.WA(WA), .WB(WB)) dut (.a(a[WA-1:0]), .b(b[WB-1:0]), .p(ps));
    assign p[s] = 16'(ps);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < NS; s++) begin
      for (int va = 0; va < (1 << SA[s]); va++) begin
        for (int vb = 0; vb < (1 << SB[s]); vb++) begin
          a = 8'(va);
          b = 8'(vb);
          #1;
          checks++;
          if (int'(p[s]) != va * vb) begin
            failures++;
            $display("FAIL %0dx%0d a=%0d b=%0d got %0d", SA[s], SB[s], va, vb, p[s]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
