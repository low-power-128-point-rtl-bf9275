// srfft_size_check: testbench helper that builds the MDC FFT for one size N,
// feeds NF random frames on each lane (with random stall cycles from the
// second frame on), compares every bin with a double-precision DFT and checks
// the pipeline latency N - 1 + 2*log2(N). Reports its counts when done.
module srfft_size_check #(
  parameter int N  = 256,
  parameter int NF = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int DW = 16, SB = $clog2(N), OW = DW + 1 + SB, LAT = N - 1 + 2 * SB;
  localparam real PI = 3.14159265358979323846;

  logic in_valid = 1'b0;
  logic signed [DW-1:0] in0_re = '0, in0_im = '0, in1_re = '0, in1_im = '0;
  logic [SB-1:0] in_index, out_bin0, out_bin1;
  logic out_valid, out_frame_lane, out_frame_start;
  logic signed [OW-1:0] out0_re, out0_im, out1_re, out1_im;

  srfft128_mdc #(.N(N)) dut (.*);

  int  xre [2][NF][N], xim [2][NF][N];
  real yre [2][NF][N], yim [2][NF][N];
  bit  seen [2][NF][N];
  real ct [N], st [N];
  int  in_frame = 0, out_period = -1, en_cycles = 0, first_out = -1;
  real max_err = 0.0;

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin ct[i] = $cos(2.0 * PI * i / N); st[i] = $sin(2.0 * PI * i / N); end
    for (int l = 0; l < 2; l++)
      for (int f = 0; f < NF; f++) begin
        for (int n = 0; n < N; n++) begin
          xre[l][f][n] = int'($urandom % 65536) - 32768;
          xim[l][f][n] = int'($urandom % 65536) - 32768;
        end
        for (int k = 0; k < N; k++) begin
          real sr, si;
          sr = 0.0; si = 0.0;
          for (int n = 0; n < N; n++) begin
            int p;
            p = (k * n) % N;
            sr += xre[l][f][n] * ct[p] + xim[l][f][n] * st[p];
            si += xim[l][f][n] * ct[p] - xre[l][f][n] * st[p];
          end
          yre[l][f][k] = sr; yim[l][f][k] = si; seen[l][f][k] = 1'b0;
        end
      end
  end

  always @(negedge clk) if (rst_n) begin
    in_valid <= (in_frame == 0) ? 1'b1 : (($urandom % 8) != 0);
    if (in_frame < NF) begin
      in0_re <= DW'(xre[0][in_frame][in_index]); in0_im <= DW'(xim[0][in_frame][in_index]);
      in1_re <= DW'(xre[1][in_frame][in_index]); in1_im <= DW'(xim[1][in_frame][in_index]);
    end else begin
      in0_re <= '0; in0_im <= '0; in1_re <= '0; in1_im <= '0;
    end
  end

  task automatic check_bin(int l, int f, int k, logic signed [OW-1:0] re, logic signed [OW-1:0] im);
    real e;
    if (f >= NF) return;
    e = (real'(re) - yre[l][f][k]) ** 2 + (real'(im) - yim[l][f][k]) ** 2;
    if (e > max_err) max_err = e;
    checks++;
    // Tolerance grows with the number of stages and their word growth.
    if (e > (real'(N) / 4.0) ** 2 || seen[l][f][k]) begin
      failures++;
      if (failures < 5) $display("N=%0d FAIL lane %0d frame %0d bin %0d: got (%0d,%0d) want (%f,%f)",
                                 N, l, f, k, re, im, yre[l][f][k], yim[l][f][k]);
    end
    seen[l][f][k] = 1'b1;
  endtask

  always @(posedge clk) if (rst_n && !done) begin
    if (in_valid) begin
      if (in_index == SB'(N - 1)) in_frame++;
      en_cycles++;
    end
    if (out_valid) begin
      if (first_out < 0) first_out = en_cycles - 1;
      if (out_frame_start) out_period++;
      check_bin(int'(out_frame_lane), out_period, int'(out_bin0), out0_re, out0_im);
      check_bin(int'(out_frame_lane), out_period, int'(out_bin1), out1_re, out1_im);
      if (out_period == NF) begin
        checks++;
        if (first_out != LAT) begin
          failures++;
          $display("N=%0d FAIL latency %0d, want %0d", N, first_out, LAT);
        end
        for (int l = 0; l < 2; l++)
          for (int f = 0; f < NF; f++)
            for (int k = 0; k < N; k++) begin
              checks++;
              if (!seen[l][f][k]) failures++;
            end
        $display("N=%0d: latency %0d, largest squared error %f", N, first_out, max_err);
        done = 1'b1;
      end
    end
  end
endmodule
