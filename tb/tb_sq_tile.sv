// tb_sq_tile: exhaustive self-check of the LUT squarer tiles of sizes 1..6.
// Every input value of every tile size is applied and the output compared
// with the square computed by the testbench itself.
module tb_sq_tile;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [5:0]  x;
  logic [11:0] sq [1:6];

  for (genvar n = 1; n <= 6; n++) begin : g_n
    sq_tile #(.N(n)) dut (.x(x[n-1:0]), .sq(sq[n][2*n-1:0]));
    if (n < 6) begin : g_hi
      assign sq[n][11:2*n] = '0;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 1; n <= 6; n++) begin
      for (int v = 0; v < (1 << n); v++) begin
        x = 6'(v);
        #1;
        checks++;
        if (int'(sq[n]) != v * v) begin
          failures++;
          $display("FAIL N=%0d x=%0d got %0d expected %0d", n, v, sq[n], v * v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
