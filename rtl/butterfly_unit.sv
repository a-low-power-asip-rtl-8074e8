// butterfly_unit -- radix-2/4 decimation-in-time butterfly.
//
// Three complex multipliers apply the twiddles: B*w1, C*w2, D*w3. Eight
// complex adders follow, as in the published structure:
//   s0 = A + C*w2     s1 = A - C*w2     s2 = B*w1 + D*w3     s3 = B*w1 - D*w3
//   radix-4: A' = s0 + s2   B' = s1 - j*s3   C' = s0 - s2   D' = s1 + j*s3
//   radix-2: A' = s0        B' = s2          C' = s1        D' = s3
// i.e. in radix-2 mode it computes the two radix-2 butterflies (A, C) and
// (B, D) and the four output multiplexers bypass the second adder level.
// Results are 19-bit components (38-bit complex); in 8-bit mode the values
// stay within 11 bits (22-bit complex), and the inputs use only [7:0] of each
// component. Combinational; the caller registers the results.
module butterfly_unit
  import fft_pkg::*;
(
  input  logic    mode8,    // precision select (sel_p)
  input  logic    radix2,   // 1: two radix-2 butterflies, 0: one radix-4
  input  cplx_t   a, b, c, d,
  input  cplx_t   w1, w2, w3,
  output cplx_x_t a_o, b_o, c_o, d_o
);
  logic signed [16:0] bw_re, bw_im, cw_re, cw_im, dw_re, dw_im;
  logic signed [XW-1:0] a_re, a_im;
  logic signed [XW-1:0] s0_re, s0_im, s1_re, s1_im, s2_re, s2_im, s3_re, s3_im;

  complex_mult u_mb (.mode8, .x(b), .w(w1), .y_re(bw_re), .y_im(bw_im));
  complex_mult u_mc (.mode8, .x(c), .w(w2), .y_re(cw_re), .y_im(cw_im));
  complex_mult u_md (.mode8, .x(d), .w(w3), .y_re(dw_re), .y_im(dw_im));

  always_comb begin
    a_re  = mode8 ? XW'(signed'(a.re[7:0])) : XW'(a.re);
    a_im  = mode8 ? XW'(signed'(a.im[7:0])) : XW'(a.im);
    s0_re = a_re + XW'(cw_re);   s0_im = a_im + XW'(cw_im);
    s1_re = a_re - XW'(cw_re);   s1_im = a_im - XW'(cw_im);
    s2_re = XW'(bw_re) + XW'(dw_re);   s2_im = XW'(bw_im) + XW'(dw_im);
    s3_re = XW'(bw_re) - XW'(dw_re);   s3_im = XW'(bw_im) - XW'(dw_im);
    if (radix2) begin
      a_o = '{re: s0_re, im: s0_im};
      b_o = '{re: s2_re, im: s2_im};
      c_o = '{re: s1_re, im: s1_im};
      d_o = '{re: s3_re, im: s3_im};
    end else begin
      // -j*s3 = (s3_im, -s3_re)
      a_o = '{re: s0_re + s2_re, im: s0_im + s2_im};
      b_o = '{re: s1_re + s3_im, im: s1_im - s3_re};
      c_o = '{re: s0_re - s2_re, im: s0_im - s2_im};
      d_o = '{re: s1_re - s3_im, im: s1_im + s3_re};
    end
  end
endmodule
