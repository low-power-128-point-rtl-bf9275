// tb_rotator: checks the three rotation kinds. Multiply by 1 and by -j must be
// exact; a non-trivial twiddle W_N^e, built here from cos/sin, must match the
// real-valued product to within one LSB per component. The result is
// registered: it is checked one enabled cycle after the operands.
module tb_rotator;
  import srfft_pkg::*;
  localparam int W = 18, TW = 16, N = 128;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  rot_kind_e kind = ROT_ONE;
  logic signed [TW-1:0] w_re = '0, w_im = '0;
  logic signed [W-1:0] x_re = '0, x_im = '0, y_re, y_im;
  int checks = 0, failures = 0, n_kind[3] = '{0, 0, 0};
  real er = 0.0, ei = 0.0;

  rotator #(.W(W), .TW(TW)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      if (c > 0) begin
        real dr, di;
        dr = real'(y_re) - er; di = real'(y_im) - ei;
        checks++;
        if (dr > 1.0 || dr < -1.0 || di > 1.0 || di < -1.0) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d kind %s: got (%0d,%0d) want (%f,%f)", c, kind.name(), y_re, y_im, er, ei);
        end
      end
      en = ($urandom % 4) != 0;
      // Keep |x| within the headroom the pipeline guarantees (|x| < 2^(W-1) / sqrt 2).
      x_re = W'(int'($urandom % (1 << (W - 1))) - (1 << (W - 2)));
      x_im = W'(int'($urandom % (1 << (W - 1))) - (1 << (W - 2)));
      kind = rot_kind_e'($urandom % 3);
      begin
        int  e;
        real wr, wi;
        e  = 1 + int'($urandom % (N - 1));
        wr = $cos(2.0 * PI * e / N);
        wi = -$sin(2.0 * PI * e / N);
        w_re = TW'($rtoi($floor(wr * 16384.0 + 0.5)));
        w_im = TW'($rtoi($floor(wi * 16384.0 + 0.5)));
        if (en) begin
          n_kind[int'(kind)]++;
          case (kind)
            ROT_ONE: begin er = real'(x_re); ei = real'(x_im); end
            ROT_MJ:  begin er = real'(x_im); ei = -real'(x_re); end
            default: begin
              er = (real'(x_re) * real'(w_re) - real'(x_im) * real'(w_im)) / 16384.0;
              ei = (real'(x_re) * real'(w_im) + real'(x_im) * real'(w_re)) / 16384.0;
            end
          endcase
        end
      end
    end
    checks++;
    if (n_kind[0] == 0 || n_kind[1] == 0 || n_kind[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
