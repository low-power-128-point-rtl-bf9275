// rotator: the twiddle multiplier and its multiplexer. Multiplies a complex
// sample by 1, by -j, or by a non-trivial twiddle w, as 'kind' selects, and
// registers the result.
//
// Trivial rotations take no multiplier: -j(a + jb) = b - ja is a swap and a
// negation, picked by the output multiplexer. The complex multiplier's
// operands are forced to zero whenever its result is not selected, so it does
// not toggle on trivial slots (operand isolation, for power). The product is
// rounded to nearest and shifted back by TW-2 bits, keeping width W; the
// caller guarantees |x| leaves headroom for |w| <= 1. Latency one enabled
// cycle. Using the multiplexer to bypass the multiplier for trivial factors is
// how this design reads the source's "multiplexer"; formats are its own.
module rotator
  import srfft_pkg::*;
#(
  parameter int W  = 16,
  parameter int TW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  rot_kind_e            kind,
  input  logic signed [TW-1:0] w_re,
  input  logic signed [TW-1:0] w_im,
  input  logic signed [W-1:0]  x_re,
  input  logic signed [W-1:0]  x_im,
  output logic signed [W-1:0]  y_re,
  output logic signed [W-1:0]  y_im
);

  localparam int PW = W + TW + 1;

  logic signed [W-1:0]  m_xre, m_xim;
  logic signed [TW-1:0] m_wre, m_wim;
  logic signed [PW-1:0] p_re, p_im;
  logic signed [W-1:0]  r_re, r_im;

  always_comb begin
    if (kind == ROT_MULT) begin
      m_xre = x_re; m_xim = x_im; m_wre = w_re; m_wim = w_im;
    end else begin
      m_xre = '0;   m_xim = '0;   m_wre = '0;   m_wim = '0;
    end
    p_re = PW'(m_xre) * PW'(m_wre) - PW'(m_xim) * PW'(m_wim)
           + (PW'(1) <<< (TW - 3));
    p_im = PW'(m_xre) * PW'(m_wim) + PW'(m_xim) * PW'(m_wre)
           + (PW'(1) <<< (TW - 3));
    p_re = p_re >>> (TW - 2);
    p_im = p_im >>> (TW - 2);
    unique case (kind)
      ROT_MJ:   begin r_re = x_im;        r_im = -x_re;       end
      ROT_MULT: begin r_re = W'(p_re);    r_im = W'(p_im);    end
      default:  begin r_re = x_re;        r_im = x_im;        end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_re <= '0; y_im <= '0;
    end else if (en) begin
      y_re <= r_re;
      y_im <= r_im;
    end
  end

endmodule
