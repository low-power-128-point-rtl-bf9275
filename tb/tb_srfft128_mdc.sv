// tb_srfft128_mdc: end-to-end test of the 128-point split-radix MDC FFT at its
// default parameters.
//
// Six frames are fed on each of the two input lanes (random full-scale data,
// an impulse, a constant, a single complex tone, and the corner values), first
// with in_valid held high, then with random stall cycles. Every output bin of
// every frame is compared with a double-precision DFT computed here, within a
// tolerance that covers twiddle quantisation and product rounding. Also
// checked: the first output appears exactly N - 1 + 2*log2(N) enabled cycles
// after the first input; each (frame, bin) is delivered exactly once; the
// mechanisms of the pipeline (commutator swaps, -j rotations, multiplier
// rotations, stalls) each happen.
module tb_srfft128_mdc;
  import srfft_pkg::*;

  localparam int N   = 128;
  localparam int DW  = 16;
  localparam int SB  = $clog2(N);
  localparam int OW  = DW + 1 + SB;
  localparam int NF  = 6;
  localparam int LAT = N - 1 + 2 * SB;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [DW-1:0] in0_re = '0, in0_im = '0, in1_re = '0, in1_im = '0;
  logic [SB-1:0] in_index, out_bin0, out_bin1;
  logic out_valid, out_frame_lane, out_frame_start;
  logic signed [OW-1:0] out0_re, out0_im, out1_re, out1_im;

  srfft128_mdc dut (.*);

  always #5 clk = ~clk;

  int  checks = 0, failures = 0;
  int  xre [2][NF][N];
  int  xim [2][NF][N];
  real yre [2][NF][N];
  real yim [2][NF][N];
  bit  seen[2][NF][N];
  real max_err = 0.0;

  int  in_frame = 0;
  int  out_period = -1;
  int  en_cycles = 0;
  int  first_out_at = -1;
  bit  stall_phase = 1'b0;
  int  n_stall = 0, n_swap = 0, n_mj = 0, n_mult = 0, n_out = 0;

  function automatic int clip(int v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  task automatic make_frames();
    for (int l = 0; l < 2; l++)
      for (int f = 0; f < NF; f++)
        for (int n = 0; n < N; n++) begin
          int r, i;
          case ((f + 3 * l) % 6)
            0: begin r = int'($urandom % 65536) - 32768; i = int'($urandom % 65536) - 32768; end
            1: begin r = (n == 5) ? 30000 : 0; i = (n == 5) ? -20000 : 0; end
            2: begin r = 12345; i = -321; end
            3: begin r = clip($rtoi(20000.0 * $cos(2.0 * PI * 9 * n / N)));
                     i = clip($rtoi(20000.0 * $sin(2.0 * PI * 9 * n / N))); end
            4: begin r = (n % 2 == 0) ? -32768 : 32767; i = (n % 3 == 0) ? -32768 : 32767; end
            default: begin r = int'($urandom % 2001) - 1000; i = int'($urandom % 2001) - 1000; end
          endcase
          xre[l][f][n] = r;
          xim[l][f][n] = i;
        end
  endtask

  task automatic ref_dft();
    for (int l = 0; l < 2; l++)
      for (int f = 0; f < NF; f++)
        for (int k = 0; k < N; k++) begin
          real sr, si, c, s;
          sr = 0.0; si = 0.0;
          for (int n = 0; n < N; n++) begin
            c = $cos(2.0 * PI * ((k * n) % N) / N);
            s = -$sin(2.0 * PI * ((k * n) % N) / N);
            sr += xre[l][f][n] * c - xim[l][f][n] * s;
            si += xre[l][f][n] * s + xim[l][f][n] * c;
          end
          yre[l][f][k] = sr;
          yim[l][f][k] = si;
          seen[l][f][k] = 1'b0;
        end
  endtask

  // Drive on the falling edge.
  always @(negedge clk) if (rst_n) begin
    in_valid <= stall_phase ? (($urandom % 4) != 0) : 1'b1;
    if (in_frame < NF) begin
      in0_re <= DW'(xre[0][in_frame][in_index]);
      in0_im <= DW'(xim[0][in_frame][in_index]);
      in1_re <= DW'(xre[1][in_frame][in_index]);
      in1_im <= DW'(xim[1][in_frame][in_index]);
    end else begin
      in0_re <= '0; in0_im <= '0; in1_re <= '0; in1_im <= '0;
    end
  end

  task automatic check_bin(int lane_frame, int period, int bin, logic signed [OW-1:0] re,
                           logic signed [OW-1:0] im);
    real er, ei, e, tol;
    if (period >= NF) return;
    er = real'(re) - yre[lane_frame][period][bin];
    ei = real'(im) - yim[lane_frame][period][bin];
    e  = (er < 0 ? -er : er) + (ei < 0 ? -ei : ei);
    tol = 256.0;  // about 4e-5 of the largest possible bin
    if (e > max_err) max_err = e;
    checks++;
    if (e > tol || seen[lane_frame][period][bin]) begin
      failures++;
      if (failures < 10)
        $display("FAIL lane %0d frame %0d bin %0d: got (%0d,%0d) want (%f,%f)%s",
                 lane_frame, period, bin, re, im, yre[lane_frame][period][bin],
                 yim[lane_frame][period][bin], seen[lane_frame][period][bin] ? " twice" : "");
    end
    seen[lane_frame][period][bin] = 1'b1;
  endtask

  // Sample on the rising edge.
  always @(posedge clk) if (rst_n) begin
    if (in_valid) begin
      if (in_index == SB'(N - 1)) in_frame++;
      en_cycles++;
    end else if (in_frame > 0) begin
      n_stall++;
    end
    if (out_valid) begin
      if (first_out_at < 0) first_out_at = en_cycles;
      if (out_frame_start) out_period++;
      n_out++;
      check_bin(int'(out_frame_lane), out_period, int'(out_bin0), out0_re, out0_im);
      check_bin(int'(out_frame_lane), out_period, int'(out_bin1), out1_re, out1_im);
    end
  end

  // Mechanism counters, read from inside each stage.
  for (genvar s = 0; s < SB; s++) begin : g_mon
    logic swap_q = 1'b0;
    always @(posedge clk) if (rst_n && in_valid) begin
      if (dut.g_st[s].swap != swap_q) n_swap++;
      swap_q <= dut.g_st[s].swap;
      if (dut.g_st[s].kind0 == ROT_MJ)   n_mj++;
      if (dut.g_st[s].kind1 == ROT_MJ)   n_mj++;
      if (dut.g_st[s].kind0 == ROT_MULT) n_mult++;
      if (dut.g_st[s].kind1 == ROT_MULT) n_mult++;
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    make_frames();
    ref_dft();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // Continuous input for three frames, then random stalls.
    wait (in_frame == 3);
    stall_phase = 1'b1;
    wait (out_period == NF);
    @(posedge clk);
    stall_phase = 1'b0;

    checks++;
    if (first_out_at != LAT + 1) begin
      failures++;
      $display("FAIL latency: first output after %0d enabled cycles, want %0d", first_out_at - 1, LAT);
    end
    for (int l = 0; l < 2; l++)
      for (int f = 0; f < NF; f++)
        for (int k = 0; k < N; k++) begin
          checks++;
          if (!seen[l][f][k]) begin
            failures++;
            if (failures < 20) $display("FAIL missing lane %0d frame %0d bin %0d", l, f, k);
          end
        end
    checks += 4;
    if (n_stall == 0) begin failures++; $display("FAIL no stall"); end
    if (n_swap  == 0) begin failures++; $display("FAIL no commutator swap"); end
    if (n_mj    == 0) begin failures++; $display("FAIL no -j rotation"); end
    if (n_mult  == 0) begin failures++; $display("FAIL no multiplier rotation"); end
    $display("outputs=%0d stalls=%0d swaps=%0d mj=%0d mult=%0d max_err=%f latency=%0d",
             n_out, n_stall, n_swap, n_mj, n_mult, max_err, first_out_at - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
