// dsp_mult_tile: embedded-DSP multiplier tile, p = a * b, unsigned.
//
// Stands for one DSP block of the target FPGA. Its signed 25x18 multiplier
// gives a 24x17 unsigned product, which is the DSP tile of the source design's
// tile library (one DSP, 41 output bits). A tile that is placed partly outside
// the squarer board uses narrower operands; they are zero-extended to the full
// 24x17 here, as the under-used DSP would be. The orientation is fixed: the
// 24-bit operand on a, the 17-bit operand on b (the squarer swaps operands for
// a 17x24 placement). Written as a behavioural product for synthesis to map
// onto the DSP; purely combinational, no internal pipeline registers.
module dsp_mult_tile #(
  parameter int unsigned WA = 24,
  parameter int unsigned WB = 17
) (
  input  logic [WA-1:0]    a,
  input  logic [WB-1:0]    b,
  output logic [WA+WB-1:0] p
);

  localparam int unsigned DspA = 24;
  localparam int unsigned DspB = 17;

  if (WA < 1 || WB < 1 || WA > DspA || WB > DspB) begin : g_bad_size
    $error("dsp_mult_tile: operands exceed the 24x17 DSP multiplier");
  end

  logic [DspA-1:0]      a_full;
  logic [DspB-1:0]      b_full;
  logic [DspA+DspB-1:0] p_full;

  assign a_full = DspA'(a);
  assign b_full = DspB'(b);
  assign p_full = (DspA+DspB)'(a_full) * (DspA+DspB)'(b_full);
  assign p      = p_full[WA+WB-1:0];

endmodule
