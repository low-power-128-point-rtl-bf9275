// tb_sr_stage: one pipeline stage (N = 16, stage 1: D = 4, with -j and
// multiplier slots) driven with random data and enable gaps. For each output
// slot the expected pair is taken from the input history, added and
// subtracted here, and rotated with the split-radix schedule of the package
// and a coefficient computed here with cos/sin; results must match within one
// LSB. The stage latency D + 2 is part of the reference timing.
module tb_sr_stage;
  import srfft_pkg::*;
  localparam int N = 16, STAGE = 1, WI = 12, TW = 16, SB = 4, D = N >> (STAGE + 1);
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, swap;
  logic [SB-1:0] t_loc;
  logic signed [WI-1:0] a_re = '0, a_im = '0, b_re = '0, b_im = '0;
  logic signed [WI:0] u_re, u_im, l_re, l_im;
  rot_kind_e kind0, kind1;
  int ha_re [4096], ha_im [4096], hb_re [4096], hb_im [4096];
  int checks = 0, failures = 0, t = 0, n_mult = 0, n_mj = 0;

  sr_stage #(.N(N), .STAGE(STAGE), .WI(WI), .TW(TW)) dut (.*);
  assign t_loc = SB'(t);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (8000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_rot(int lane, int tp, real re, real im, output real orr, output real oi);
    rot_kind_e k;
    int        e;
    k = rot_kind(N, STAGE, tp % N, lane);
    e = rot_exp(N, STAGE, tp % N, lane);
    case (k)
      ROT_ONE: begin orr = re; oi = im; end
      ROT_MJ:  begin orr = im; oi = -re; n_mj++; end
      default: begin
        orr = re * $cos(2.0 * PI * e / N) + im * $sin(2.0 * PI * e / N);
        oi  = im * $cos(2.0 * PI * e / N) - re * $sin(2.0 * PI * e / N);
        n_mult++;
      end
    endcase
  endtask

  function automatic bit close(real a, logic signed [WI:0] b);
    real d;
    d = a - real'(b);
    return d <= 1.0 && d >= -1.0;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (t < 2000) begin
      @(negedge clk);
      if (en) t++;
      en = ($urandom % 4) != 0;
      a_re = WI'(int'($urandom % 1024) - 512); a_im = WI'(int'($urandom % 1024) - 512);
      b_re = WI'(int'($urandom % 1024) - 512); b_im = WI'(int'($urandom % 1024) - 512);
      ha_re[t] = a_re; ha_im[t] = a_im; hb_re[t] = b_re; hb_im[t] = b_im;
      #1;
      if (en && t >= D + 2) begin
        int  tp, base, k, xr, xi, yr, yi;
        real sr, si, dr, di;
        tp   = t - D - 2;
        base = (tp / (2 * D)) * (2 * D);
        k    = tp % D;
        if ((tp % (2 * D)) < D) begin
          xr = ha_re[base + k]; xi = ha_im[base + k]; yr = ha_re[base + k + D]; yi = ha_im[base + k + D];
        end else begin
          xr = hb_re[base + k]; xi = hb_im[base + k]; yr = hb_re[base + k + D]; yi = hb_im[base + k + D];
        end
        expect_rot(0, tp, real'(xr + yr), real'(xi + yi), sr, si);
        expect_rot(1, tp, real'(xr - yr), real'(xi - yi), dr, di);
        checks++;
        if (!close(sr, u_re) || !close(si, u_im) || !close(dr, l_re) || !close(di, l_im)) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d: u=(%0d,%0d) l=(%0d,%0d) want u=(%f,%f) l=(%f,%f)",
                                      t, u_re, u_im, l_re, l_im, sr, si, dr, di);
        end
      end
    end
    checks++;
    if (n_mult == 0 || n_mj == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
