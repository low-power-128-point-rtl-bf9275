// commutator: the C2 switch of an MDC stage together with its two delay lines
// (the crossed box and the nD boxes of each row of the architecture).
//
// Both input lanes carry blocks of 2*D samples, each block one sub-DFT. The
// lower lane is delayed by D, then a 2x2 switch passes straight for D cycles
// and crosses (swap high) for D cycles, then the upper switch output is delayed by D. The
// result: samples k and k+D of the same block leave together (upper, lower),
// first the pairs of the upper-lane block, then those of the lower-lane block.
//
// Timing: 'swap' (switch crossed) must be high when the stage-local time (enabled cycles since
// the first block started at this input) has (t mod 2D) >= D. Latency D enabled
// cycles. The delay of D on each side follows the architecture drawing; the
// control rule is derived from it.
module commutator #(
  parameter int W = 16,
  parameter int D = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                swap,
  input  logic signed [W-1:0] a_re,   // upper lane in
  input  logic signed [W-1:0] a_im,
  input  logic signed [W-1:0] b_re,   // lower lane in
  input  logic signed [W-1:0] b_im,
  output logic signed [W-1:0] x_re,   // sample k of a pair
  output logic signed [W-1:0] x_im,
  output logic signed [W-1:0] y_re,   // sample k+D of a pair
  output logic signed [W-1:0] y_im
);

  logic signed [W-1:0] bd_re, bd_im;   // lower lane after D
  logic signed [W-1:0] su_re, su_im;   // switch upper output

  delay_line #(.W(W), .DEPTH(D)) u_din (
    .clk, .rst_n, .en,
    .in_re(b_re), .in_im(b_im), .out_re(bd_re), .out_im(bd_im)
  );

  always_comb begin
    if (swap) begin
      su_re = bd_re;  su_im = bd_im;
      y_re  = a_re;   y_im  = a_im;
    end else begin
      su_re = a_re;   su_im = a_im;
      y_re  = bd_re;  y_im  = bd_im;
    end
  end

  delay_line #(.W(W), .DEPTH(D)) u_dout (
    .clk, .rst_n, .en,
    .in_re(su_re), .in_im(su_im), .out_re(x_re), .out_im(x_im)
  );

endmodule
