// sr_stage: one stage of the split-radix MDC pipeline (one row of the
// architecture drawing): commutator with its two D-deep delay lines, the
// processing element (butterfly) and the twiddle multiplication with its
// multiplexer on each of the two butterfly outputs.
//
// Inputs: two lanes of WI-bit complex samples carrying blocks of 2*D samples,
// D = N >> (STAGE+1), and t_loc, the stage-local time (enabled cycles, mod N)
// at which the block that starts at t_loc = 0 enters. Outputs: two lanes of
// (WI+1)-bit samples carrying blocks of D samples; the stage output slot 0
// (first half of the upper block) appears at t_loc = D + 2, so the next stage's
// t_loc is this stage's minus D + 2. Latency D + 2 enabled cycles.
// The row structure is taken from the architecture drawing; putting a twiddle
// multiplier on both outputs is this design's choice, needed because a
// split-radix L butterfly multiplies one output by W^n and the other by W^3n
// in the same slot.
module sr_stage
  import srfft_pkg::*;
#(
  parameter int N     = 128,
  parameter int STAGE = 0,
  parameter int WI    = 17,
  parameter int TW    = 16,
  localparam int SB   = $clog2(N),
  localparam int D    = N >> (STAGE + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [SB-1:0]        t_loc,
  input  logic signed [WI-1:0] a_re,
  input  logic signed [WI-1:0] a_im,
  input  logic signed [WI-1:0] b_re,
  input  logic signed [WI-1:0] b_im,
  output logic signed [WI:0]   u_re,    // sum lane out
  output logic signed [WI:0]   u_im,
  output logic signed [WI:0]   l_re,    // difference lane out
  output logic signed [WI:0]   l_im,
  output logic                 swap,   // commutator state (observability)
  output rot_kind_e            kind0,   // rotation applied this slot, sum lane
  output rot_kind_e            kind1    // rotation applied this slot, difference lane
);

  localparam int LD = SB - 1 - STAGE;   // log2(D)

  logic signed [WI-1:0] x_re, x_im, y_re, y_im;
  logic signed [WI:0]   s_re, s_im, d_re, d_im;
  logic signed [TW-1:0] w0_re, w0_im, w1_re, w1_im;
  logic [SB-1:0]        tau;

  assign swap = t_loc[LD];

  commutator #(.W(WI), .D(D)) u_comm (
    .clk, .rst_n, .en, .swap,
    .a_re, .a_im, .b_re, .b_im,
    .x_re, .x_im, .y_re, .y_im
  );

  pe_butterfly #(.W(WI)) u_pe (
    .clk, .rst_n, .en,
    .x_re, .x_im, .y_re, .y_im,
    .s_re, .s_im, .d_re, .d_im
  );

  // The butterfly output now on s/d belongs to slot t_loc - D - 1.
  assign tau = t_loc - SB'(D + 1);

  twiddle_rom #(.N(N), .STAGE(STAGE), .TW(TW)) u_rom (
    .tau,
    .kind0, .w0_re, .w0_im,
    .kind1, .w1_re, .w1_im
  );

  rotator #(.W(WI+1), .TW(TW)) u_rot0 (
    .clk, .rst_n, .en, .kind(kind0), .w_re(w0_re), .w_im(w0_im),
    .x_re(s_re), .x_im(s_im), .y_re(u_re), .y_im(u_im)
  );

  rotator #(.W(WI+1), .TW(TW)) u_rot1 (
    .clk, .rst_n, .en, .kind(kind1), .w_re(w1_re), .w_im(w1_im),
    .x_re(d_re), .x_im(d_im), .y_re(l_re), .y_im(l_im)
  );

endmodule
