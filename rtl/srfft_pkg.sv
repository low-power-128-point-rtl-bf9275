// srfft_pkg: shared constants, types and constant functions of the split-radix
// multipath delay commutator (MDC) FFT.
//
// The pipeline is a radix-2 decimation-in-frequency MDC with log2(N) stages.
// Stage s pairs samples D = N >> (s+1) apart. The split-radix algorithm shows up
// only in the twiddle schedule: every sub-DFT in the pipeline is either a
// "fresh" block (F, the start of a split-radix decomposition) or the odd half of
// a larger block (S, the second column of a split-radix L butterfly).
//   F block, size M: outputs 0..M/2-1 stay F, outputs M/2..M-1 become S;
//                    the difference output is multiplied by -j for its second
//                    quarter (n >= M/4), by 1 otherwise.
//   S block, size M: the sum output is multiplied by W_2M^n, the difference
//                    output by W_2M^3n; both halves become F blocks.
// The schedule follows the split-radix equation of Duhamel and Hollmann; the
// mapping to pipeline time slots and all number formats are this design's own.
//
// Twiddles are signed TW-bit numbers with 1.0 = 2^(TW-2), so that +/-1 and 0
// are exact.
package srfft_pkg;

  // Kind of rotation a sample gets after a butterfly.
  typedef enum logic [1:0] {
    ROT_ONE  = 2'd0,   // multiply by 1 (pass)
    ROT_MJ   = 2'd1,   // multiply by -j (swap and negate, no multiplier)
    ROT_MULT = 2'd2    // multiply by a non-trivial twiddle W_N^e
  } rot_kind_e;

  // Reverse the low 'bits' bits of v.
  function automatic int unsigned bitrev(int unsigned v, int bits);
    int unsigned r;
    r = 0;
    for (int i = 0; i < bits; i++)
      if (((v >> i) & 1) == 1) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  // Twiddle schedule of stage 'stage' of an n_pts-point FFT, for the sample that
  // leaves the butterfly at stage-local slot 'tau' (0..n_pts-1) on lane 'lane'
  // (0 = sum output, 1 = difference output).
  //   tau[S-1]          : which of the two interleaved frames
  //   tau[S-2 : S-1-s]  : path bits b0..b(s-1) of the sub-DFT (b0 first)
  //   tau[S-2-s : 0]    : pair index k inside the butterfly, 0..D-1
  // rot_exp gives the exponent e of W_N^e (0 for a multiply by 1 or -j in an F
  // block), rot_kind the rotation kind.
  function automatic bit is_s_block(int n_pts, int stage, int unsigned tau);
    int nst;
    bit is_s;
    nst  = $clog2(n_pts);
    is_s = 1'b0;
    for (int j = 0; j < stage; j++)
      is_s = !is_s && (((tau >> (nst - 2 - j)) & 1) == 1);
    return is_s;
  endfunction

  function automatic int rot_exp(int n_pts, int stage, int unsigned tau, int lane);
    int d, k;
    d = n_pts >> (stage + 1);
    k = int'(tau) % d;
    if (!is_s_block(n_pts, stage, tau)) return 0;
    return ((lane == 0 ? k : 3 * k) * (1 << (stage - 1))) % n_pts;
  endfunction

  function automatic rot_kind_e rot_kind(int n_pts, int stage, int unsigned tau, int lane);
    int d, k, e;
    d = n_pts >> (stage + 1);
    k = int'(tau) % d;
    if (!is_s_block(n_pts, stage, tau))
      return (lane == 1 && 2 * k >= d) ? ROT_MJ : ROT_ONE;
    e = rot_exp(n_pts, stage, tau, lane);
    if (e == 0)          return ROT_ONE;
    if (e == n_pts / 4)  return ROT_MJ;
    return ROT_MULT;
  endfunction

  // Real and imaginary part of W_N^e = exp(-j 2 pi e / N), 1.0 = 2^(tw-2).
  function automatic int tw_re(int n_pts, int e, int tw);
    real x;
    x = 2.0 * 3.14159265358979323846 * real'(e) / real'(n_pts);
    return $rtoi($floor($cos(x) * (2.0 ** (tw - 2)) + 0.5));
  endfunction

  function automatic int tw_im(int n_pts, int e, int tw);
    real x;
    x = 2.0 * 3.14159265358979323846 * real'(e) / real'(n_pts);
    return $rtoi($floor(-$sin(x) * (2.0 ** (tw - 2)) + 0.5));
  endfunction

endpackage
