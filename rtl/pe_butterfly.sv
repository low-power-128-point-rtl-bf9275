// pe_butterfly: the processing element (PE) of an MDC stage. A radix-2
// butterfly: s = x + y and d = x - y on complex inputs, registered.
//
// The output is one bit wider than the input, so no butterfly can overflow
// and no scaling is needed. Latency one enabled cycle; with en low the output
// holds. The PE doing only additions and subtractions follows the source
// design; the bit growth and the output register are this design's choice.
module pe_butterfly #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] x_re,
  input  logic signed [W-1:0] x_im,
  input  logic signed [W-1:0] y_re,
  input  logic signed [W-1:0] y_im,
  output logic signed [W:0]   s_re,
  output logic signed [W:0]   s_im,
  output logic signed [W:0]   d_re,
  output logic signed [W:0]   d_im
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_re <= '0; s_im <= '0; d_re <= '0; d_im <= '0;
    end else if (en) begin
      s_re <= (W+1)'(x_re) + (W+1)'(y_re);
      s_im <= (W+1)'(x_im) + (W+1)'(y_im);
      d_re <= (W+1)'(x_re) - (W+1)'(y_re);
      d_im <= (W+1)'(x_im) - (W+1)'(y_im);
    end
  end

endmodule
