// fft_pu: processing unit of the 8-point FFT core, one radix-2
// decimation-in-time butterfly.
//
// Each cycle it takes two complex samples a and b, read from the memory
// management unit over two 16-bit buses, and returns
//     a' = (a + W8^k * b) / 2      b' = (a - W8^k * b) / 2
// over two more 16-bit buses, so the four PU<->MMU buses of the core carry
// one butterfly per cycle. The division by two at every stage scales the full
// transform by 1/8 so that results stay in 8-bit parts; a part that would
// still leave the 8-bit range is saturated.
//
// Interface: purely combinational; a, b, tw in, a_o, b_o out.
// Timing: no clock, the result is registered by the MMU.
//
// The butterfly as the arithmetic unit and the four 16-bit PU<->MMU buses
// follow the FFT example. The twiddle format (10-bit, 8 fraction bits,
// round-to-nearest product), the per-stage scaling and the saturation are
// this design's own choices.
module fft_pu
  import ipi_pkg::*;
(
  input  cplx_t      a,
  input  cplx_t      b,
  input  logic [1:0] tw,    // k of W8^k = cos(2*pi*k/8) - j*sin(2*pi*k/8)
  output cplx_t      a_o,
  output cplx_t      b_o
);

  localparam int PROD_W = PART_W + TW_W + 1;
  localparam int SUM_W  = PROD_W - TW_FRAC + 1;

  // W8^k in TW_FRAC fractional bits: 181 = round(256 / sqrt(2)).
  logic signed [TW_W-1:0] w_re, w_im;
  always_comb begin
    unique case (tw)
      2'd0: begin w_re =  10'sd256; w_im =  10'sd0;   end
      2'd1: begin w_re =  10'sd181; w_im = -10'sd181; end
      2'd2: begin w_re =  10'sd0;   w_im = -10'sd256; end
      default: begin w_re = -10'sd181; w_im = -10'sd181; end
    endcase
  end

  logic signed [PROD_W-1:0] p_re_full, p_im_full;
  logic signed [SUM_W-1:0]  p_re, p_im;
  logic signed [SUM_W-1:0]  s_re, s_im, d_re, d_im;

  // Saturate a value with one extra fraction bit: drop it, clip to 8 bits.
  function automatic logic signed [PART_W-1:0] half_sat(input logic signed [SUM_W-1:0] v);
    logic signed [SUM_W-1:0] h;
    h = v >>> 1;
    if (h > SUM_W'(2**(PART_W-1) - 1))
      return PART_W'(2**(PART_W-1) - 1);
    else if (h < -SUM_W'(2**(PART_W-1)))
      return PART_W'(-(2**(PART_W-1)));
    else
      return h[PART_W-1:0];
  endfunction

  always_comb begin
    p_re_full = PROD_W'(b.re * w_re) - PROD_W'(b.im * w_im) + PROD_W'(1 <<< (TW_FRAC - 1));
    p_im_full = PROD_W'(b.re * w_im) + PROD_W'(b.im * w_re) + PROD_W'(1 <<< (TW_FRAC - 1));
    p_re = SUM_W'(p_re_full >>> TW_FRAC);
    p_im = SUM_W'(p_im_full >>> TW_FRAC);
    s_re = SUM_W'(a.re) + p_re;
    s_im = SUM_W'(a.im) + p_im;
    d_re = SUM_W'(a.re) - p_re;
    d_im = SUM_W'(a.im) - p_im;
    a_o.re = half_sat(s_re);
    a_o.im = half_sat(s_im);
    b_o.re = half_sat(d_re);
    b_o.im = half_sat(d_im);
  end

endmodule
