// srfft128_mdc: 128-point split-radix FFT in a multipath delay commutator
// (MDC) pipeline.
//
// Two lanes enter, each carrying a stream of N-sample frames (natural order,
// sample n taken when in_index == n). log2(N) stages follow; stage s pairs
// samples N >> (s+1) apart through its commutator, adds and subtracts them in
// its processing element and rotates each result by 1, -j or a split-radix
// twiddle W_N^e. Both lanes' frames are transformed: one frame from each lane
// every N enabled cycles, i.e. two samples per cycle in and out.
//
// Interface: in_valid is a clock enable for the whole pipeline; a cycle with
// in_valid low freezes every register (a stall). out_valid is high in each
// enabled cycle once the pipeline is full (after N - 1 + 2*log2(N) = 141
// enabled cycles at N = 128). Per output period of N enabled cycles, the first
// N/2 cycles carry the lane-0 frame, the last N/2 the lane-1 frame, two bins per
// cycle in bit-reversed order: out0 holds bin out_bin0, out1 holds out_bin1.
// The results are unscaled: out = DFT(in), DW + 1 + log2(N) bits wide.
//
// The stage structure (delays 64, 32, ... 1, commutator, PE, twiddle, mux per
// row) follows the published architecture; word widths, control, the output
// tagging and the stall are this design's own.
// Each stage's swap/kind0/kind1 are kept as named signals in g_st[s] so that a
// simulation can observe the commutator and twiddle multiplexer; they drive no
// logic, which is why lint reports them as unused.
module srfft128_mdc
  import srfft_pkg::*;
#(
  parameter int N   = 128,
  parameter int DW  = 16,
  parameter int TW  = 16,
  localparam int SB = $clog2(N),
  localparam int OW = DW + 1 + SB
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in0_re,
  input  logic signed [DW-1:0] in0_im,
  input  logic signed [DW-1:0] in1_re,
  input  logic signed [DW-1:0] in1_im,
  output logic [SB-1:0]        in_index,
  output logic                 out_valid,
  output logic                 out_frame_lane,
  output logic                 out_frame_start,
  output logic [SB-1:0]        out_bin0,
  output logic [SB-1:0]        out_bin1,
  output logic signed [OW-1:0] out0_re,
  output logic signed [OW-1:0] out0_im,
  output logic signed [OW-1:0] out1_re,
  output logic signed [OW-1:0] out1_im
);

  logic [SB-1:0] t_loc [SB];

  srfft_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n, .en(in_valid),
    .in_index, .t_loc,
    .out_valid, .out_frame_lane, .out_frame_start, .out_bin0, .out_bin1
  );

  for (genvar s = 0; s < SB; s++) begin : g_st
    localparam int WI = DW + 1 + s;
    logic signed [WI-1:0] a_re, a_im, b_re, b_im;
    logic signed [WI:0]   u_re, u_im, l_re, l_im;
    logic                 swap;
    rot_kind_e            kind0, kind1;

    if (s == 0) begin : g_in
      // One guard bit, so that twiddle rotations can never overflow.
      assign a_re = WI'(in0_re);
      assign a_im = WI'(in0_im);
      assign b_re = WI'(in1_re);
      assign b_im = WI'(in1_im);
    end else begin : g_link
      assign a_re = g_st[s-1].u_re;
      assign a_im = g_st[s-1].u_im;
      assign b_re = g_st[s-1].l_re;
      assign b_im = g_st[s-1].l_im;
    end

    sr_stage #(.N(N), .STAGE(s), .WI(WI), .TW(TW)) u_stage (
      .clk, .rst_n, .en(in_valid), .t_loc(t_loc[s]),
      .a_re, .a_im, .b_re, .b_im,
      .u_re, .u_im, .l_re, .l_im,
      .swap, .kind0, .kind1
    );
  end

  assign out0_re = g_st[SB-1].u_re;
  assign out0_im = g_st[SB-1].u_im;
  assign out1_re = g_st[SB-1].l_re;
  assign out1_im = g_st[SB-1].l_im;

endmodule
