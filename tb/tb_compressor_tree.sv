// tb_compressor_tree: self-check of the carry-save compressor tree for row
// counts 1, 2, 3, 8 (default) and 39 (the size the 53-bit squarer uses),
// against sums computed here, with all-ones rows and random rows.
module tb_compressor_tree;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NC = 5;
  localparam int NR [NC] = '{1, 2, 3, 8, 39};
  localparam int W = 106;

  logic [38:0][W-1:0] rows;
  logic [W-1:0]       sums [NC];

  for (genvar c = 0; c < NC; c++) begin : g_c
    if (NR[c] == 8 && c == 3) begin : g_default
      logic [7:0][15:0] rows16;
      logic [15:0]      s16;
      for (genvar r = 0; r < 8; r++) begin : g_r
        assign rows16[r] = rows[r][15:0];
      end
      compressor_tree dut (.rows(rows16), .sum(s16));
      assign sums[c] = W'(s16);
    end else begin : g_sized
      compressor_tree #(.NROWS(NR[c]), .W(W)) dut (.rows(rows[NR[c]-1:0]), .sum(sums[c]));
    end
  end

  task automatic check_all();
    logic [W-1:0] e;
    #1;
    for (int c = 0; c < NC; c++) begin
      e = '0;
      for (int r = 0; r < NR[c]; r++) begin
        if (c == 3) e = e + W'(rows[r][15:0]);
        else        e = e + rows[r];
      end
      if (c == 3) e = W'(e[15:0]);
      checks++;
      if (sums[c] != e) begin
        failures++;
        $display("FAIL NROWS=%0d got %h expected %h", NR[c], sums[c], e);
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
    rows = '0;
    check_all();
    for (int r = 0; r < 39; r++) rows[r] = '1;
    check_all();
    for (int i = 0; i < 2000; i++) begin
      for (int r = 0; r < 39; r++)
        rows[r] = {$urandom, $urandom, $urandom, $urandom};
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
