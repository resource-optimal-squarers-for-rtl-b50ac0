// tb_dsp_mult_tile: self-check of the DSP multiplier tile at its full 24x17
// size and in a reduced 17x17 use (a DSP used as a squarer on the diagonal),
// with corner values and random operands.
module tb_dsp_mult_tile;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [23:0] a;
  logic [16:0] b;
  logic [40:0] p_full;
  logic [33:0] p_sq;

  dsp_mult_tile                     dut_full (.a(a),        .b(b), .p(p_full));
  dsp_mult_tile #(.WA(17), .WB(17)) dut_sq   (.a(a[16:0]),  .b(b), .p(p_sq));

  task automatic apply(input logic [23:0] va, input logic [16:0] vb);
    logic [63:0] e_full, e_sq;
    a = va;
    b = vb;
    #1;
    e_full = 64'(va) * 64'(vb);
    e_sq   = 64'(va[16:0]) * 64'(vb);
    checks += 2;
    if (64'(p_full) != e_full) begin
      failures++;
      $display("FAIL 24x17 a=%h b=%h got %h expected %h", va, vb, p_full, e_full);
    end
    if (64'(p_sq) != e_sq) begin
      failures++;
      $display("FAIL 17x17 a=%h b=%h got %h expected %h", va, vb, p_sq, e_sq);
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
    apply('0, '0);
    apply('1, '1);
    apply('1, 17'd1);
    apply(24'd1, '1);
    apply(24'h800000, 17'h10000);
    for (int i = 0; i < 3000; i++) apply(24'($urandom), 17'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
