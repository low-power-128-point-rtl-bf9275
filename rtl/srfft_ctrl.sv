// srfft_ctrl: timing controller of the MDC FFT. Counts enabled cycles and
// gives every stage its stage-local time, and tags the samples leaving the
// last stage.
//
// cnt counts cycles with en high, mod N, from reset; input sample n of a frame
// is taken when cnt == n. Stage s runs OFFSET(s) = sum over j < s of
// (N >> (j+1)) + 2 cycles behind stage 0, so its local time is cnt - OFFSET(s).
// After OFFSET(S) = N - 1 + 2*S enabled cycles the last stage delivers data:
// out_valid is then high in every enabled cycle. In output slot t (0..N-1) the
// first N/2 slots hold the frame that entered on lane 0, the last N/2 the frame
// of lane 1; lane 0 carries bin bitrev({t, 0}) and lane 1 bin bitrev({t, 1}).
// The source names no controller; this whole block is this design's own.
module srfft_ctrl #(
  parameter int N  = 128,
  localparam int SB = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  output logic [SB-1:0]       in_index,        // sample index expected now
  output logic [SB-1:0]       t_loc [SB],      // per-stage local time
  output logic                out_valid,
  output logic                out_frame_lane,  // input lane of the frame now output
  output logic                out_frame_start, // first slot of an output period
  output logic [SB-1:0]       out_bin0,
  output logic [SB-1:0]       out_bin1
);

  function automatic int offset(int s);
    int o;
    o = 0;
    for (int j = 0; j < s; j++) o += (N >> (j + 1)) + 2;
    return o;
  endfunction

  localparam int LAT = offset(SB);
  localparam int FW  = $clog2(LAT + 1);

  logic [SB-1:0] cnt, t_out;
  logic [FW-1:0] fill;
  logic          filled;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      fill <= '0;
    end else if (en) begin
      cnt <= cnt + 1'b1;
      if (!filled) fill <= fill + 1'b1;
    end
  end

  assign filled   = (fill == FW'(LAT));
  assign in_index = cnt;

  for (genvar s = 0; s < SB; s++) begin : g_t
    assign t_loc[s] = cnt - SB'(offset(s));
  end

  assign t_out           = cnt - SB'(LAT);
  assign out_valid       = en && filled;
  assign out_frame_lane  = t_out[SB-1];
  assign out_frame_start = (t_out == '0);

  always_comb begin
    out_bin0 = SB'(srfft_pkg::bitrev({t_out[SB-2:0], 1'b0}, SB));
    out_bin1 = SB'(srfft_pkg::bitrev({t_out[SB-2:0], 1'b1}, SB));
  end

endmodule
