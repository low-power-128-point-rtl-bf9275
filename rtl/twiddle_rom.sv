// twiddle_rom: split-radix twiddle schedule of one pipeline stage, as a
// constant table indexed by the stage-local time slot of the butterfly output.
//
// For each of the N slots of a stage and each of the two butterfly outputs it
// gives the rotation kind (1, -j or a multiplier) and, for a multiplier, the
// coefficient W_N^e as TW-bit real and imaginary parts (1.0 = 2^(TW-2)). The
// tables are computed at elaboration by the srfft_pkg functions rot_kind,
// rot_exp, tw_re and tw_im; the read is combinational (a ROM, no clock).
// The schedule follows the split-radix decomposition; table layout, index
// and coefficient format are this design's choice.
module twiddle_rom
  import srfft_pkg::*;
#(
  parameter int N     = 128,
  parameter int STAGE = 1,
  parameter int TW    = 16,
  localparam int SB   = $clog2(N)
) (
  input  logic [SB-1:0]        tau,
  output rot_kind_e            kind0,   // for the sum output (upper lane)
  output logic signed [TW-1:0] w0_re,
  output logic signed [TW-1:0] w0_im,
  output rot_kind_e            kind1,   // for the difference output (lower lane)
  output logic signed [TW-1:0] w1_re,
  output logic signed [TW-1:0] w1_im
);

  typedef logic [1:0]           kind_tab_t [N];
  typedef logic signed [TW-1:0] coef_tab_t [N];

  function automatic kind_tab_t build_kind(int lane);
    kind_tab_t t;
    for (int i = 0; i < N; i++) t[i] = 2'(rot_kind(N, STAGE, i, lane));
    return t;
  endfunction

  function automatic coef_tab_t build_coef(int lane, bit imag);
    coef_tab_t t;
    int        e;
    for (int i = 0; i < N; i++) begin
      e    = rot_exp(N, STAGE, i, lane);
      t[i] = imag ? TW'(tw_im(N, e, TW)) : TW'(tw_re(N, e, TW));
    end
    return t;
  endfunction

  localparam kind_tab_t KIND0 = build_kind(0);
  localparam kind_tab_t KIND1 = build_kind(1);
  localparam coef_tab_t W0_RE = build_coef(0, 1'b0);
  localparam coef_tab_t W0_IM = build_coef(0, 1'b1);
  localparam coef_tab_t W1_RE = build_coef(1, 1'b0);
  localparam coef_tab_t W1_IM = build_coef(1, 1'b1);

  assign kind0 = rot_kind_e'(KIND0[tau]);
  assign kind1 = rot_kind_e'(KIND1[tau]);
  assign w0_re = W0_RE[tau];
  assign w0_im = W0_IM[tau];
  assign w1_re = W1_RE[tau];
  assign w1_im = W1_IM[tau];

endmodule
