// tb_twiddle_rom: checks that the per-stage twiddle tables, taken together,
// compute a DFT. It runs an in-place decimation-in-frequency FFT in real
// arithmetic here, taking the rotation of every butterfly output from the
// tables of all log2(N) stages, and compares the bit-reversed result with a
// direct DFT. Also checks that the coefficients of multiplier slots are unit
// magnitude, that both frame halves of the slot index give the same schedule,
// and that the -j and multiplier slots both occur.
module tb_twiddle_rom;
  import srfft_pkg::*;
  localparam int N = 128, TW = 16, SB = $clog2(N);
  localparam real PI = 3.14159265358979323846;

  logic [SB-1:0]        tau [SB];
  rot_kind_e            kind0 [SB], kind1 [SB];
  logic signed [TW-1:0] w0_re [SB], w0_im [SB], w1_re [SB], w1_im [SB];
  int checks = 0, failures = 0, n_mj = 0, n_mult = 0;

  for (genvar s = 0; s < SB; s++) begin : g_rom
    twiddle_rom #(.N(N), .STAGE(s), .TW(TW)) dut (
      .tau(tau[s]), .kind0(kind0[s]), .w0_re(w0_re[s]), .w0_im(w0_im[s]),
      .kind1(kind1[s]), .w1_re(w1_re[s]), .w1_im(w1_im[s]));
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rot(rot_kind_e k, logic signed [TW-1:0] wr, logic signed [TW-1:0] wi,
                     inout real re, inout real im);
    real t;
    case (k)
      ROT_ONE: ;
      ROT_MJ:  begin t = re; re = im; im = -t; end
      default: begin
        t  = (re * wr - im * wi) / 16384.0;
        im = (re * wi + im * wr) / 16384.0;
        re = t;
      end
    endcase
  endtask

  initial begin
    real xr [N], xi [N], zr [N], zi [N];
    for (int trial = 0; trial < 3; trial++) begin
      for (int n = 0; n < N; n++) begin
        xr[n] = real'(int'($urandom % 2001) - 1000);
        xi[n] = real'(int'($urandom % 2001) - 1000);
        zr[n] = xr[n]; zi[n] = xi[n];
      end
      for (int s = 0; s < SB; s++) begin
        int d;
        d = N >> (s + 1);
        for (int i = 0; i < N; i++) if (((i / d) % 2) == 0) begin
          real ar, ai, br, bi;
          rot_kind_e k0, k1;
          logic signed [TW-1:0] a0r, a0i, a1r, a1i;
          // Slot of this butterfly: path bits of i above the pair, then k.
          for (int fr = 0; fr < 2; fr++) begin
            tau[s] = SB'((fr << (SB - 1)) | ((i >> (SB - s)) << (SB - 1 - s)) | (i % d));
            #1;
            if (fr == 0) begin
              k0 = kind0[s]; k1 = kind1[s]; a0r = w0_re[s]; a0i = w0_im[s]; a1r = w1_re[s]; a1i = w1_im[s];
            end else begin
              checks++;
              if (k0 != kind0[s] || k1 != kind1[s] || a0r != w0_re[s] || a1r != w1_re[s]
                  || a0i != w0_im[s] || a1i != w1_im[s]) failures++;
            end
          end
          if (k0 == ROT_MULT || k1 == ROT_MULT) begin
            real m0, m1;
            m0 = (real'(a0r) ** 2 + real'(a0i) ** 2) / (16384.0 ** 2);
            m1 = (real'(a1r) ** 2 + real'(a1i) ** 2) / (16384.0 ** 2);
            checks++;
            if ((k0 == ROT_MULT && (m0 < 0.9998 || m0 > 1.0002)) ||
                (k1 == ROT_MULT && (m1 < 0.9998 || m1 > 1.0002))) failures++;
          end
          if (trial == 0) begin
            n_mj   += int'(k0 == ROT_MJ) + int'(k1 == ROT_MJ);
            n_mult += int'(k0 == ROT_MULT) + int'(k1 == ROT_MULT);
          end
          ar = zr[i] + zr[i + d]; ai = zi[i] + zi[i + d];
          br = zr[i] - zr[i + d]; bi = zi[i] - zi[i + d];
          rot(k0, a0r, a0i, ar, ai);
          rot(k1, a1r, a1i, br, bi);
          zr[i] = ar; zi[i] = ai; zr[i + d] = br; zi[i + d] = bi;
        end
      end
      for (int k = 0; k < N; k++) begin
        real sr, si, e;
        int  p;
        sr = 0.0; si = 0.0;
        for (int n = 0; n < N; n++) begin
          sr += xr[n] * $cos(2.0 * PI * ((k * n) % N) / N) + xi[n] * $sin(2.0 * PI * ((k * n) % N) / N);
          si += xi[n] * $cos(2.0 * PI * ((k * n) % N) / N) - xr[n] * $sin(2.0 * PI * ((k * n) % N) / N);
        end
        p = int'(bitrev(k, SB));
        e = (zr[p] - sr) ** 2 + (zi[p] - si) ** 2;
        checks++;
        if (e > 4.0) begin
          failures++;
          if (failures < 10) $display("FAIL bin %0d: got (%f,%f) want (%f,%f)", k, zr[p], zi[p], sr, si);
        end
      end
    end
    checks++;
    if (n_mj == 0 || n_mult == 0) failures++;
    $display("rotations per frame: -j %0d, multiplier %0d", n_mj, n_mult);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
