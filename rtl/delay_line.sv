// delay_line: the "nD" boxes of the MDC pipeline. Delays a complex sample by
// DEPTH enabled clock cycles: a sample presented while en is high appears at
// the output DEPTH enabled cycles later. Cycles with en low freeze the line.
//
// It is a shift register of DEPTH complex words (registered output, no
// combinational path from input to output). DEPTH is set per stage by the
// instantiating stage (64, 32, ... 1 for the 128-point FFT). Reset clears the
// contents to zero; the reset value is this design's choice.
module delay_line #(
  parameter int W     = 16,
  parameter int DEPTH = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);

  logic signed [W-1:0] sr_re [DEPTH];
  logic signed [W-1:0] sr_im [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        sr_re[i] <= '0;
        sr_im[i] <= '0;
      end
    end else if (en) begin
      sr_re[0] <= in_re;
      sr_im[0] <= in_im;
      for (int i = 1; i < DEPTH; i++) begin
        sr_re[i] <= sr_re[i-1];
        sr_im[i] <= sr_im[i-1];
      end
    end
  end

  assign out_re = sr_re[DEPTH-1];
  assign out_im = sr_im[DEPTH-1];

endmodule
