// complex_mult -- multiplies a complex data word by a twiddle factor.
//
// y = x * w with x = {re, im} and w a unit-magnitude twiddle in Q1.15.
// 16-bit mode: four 16x16 products, result rounded back to the data scale
// (>> 15). 8-bit mode: x and w are 8 bits each (x[7:0], and the twiddle's
// upper byte, Q1.7), the product is rounded by >> 7. The published design
// gives only that the complex multipliers are configurable for 8- or 16-bit
// multiplication; four real multipliers and round-half-up are this design's
// choice. The result fits 17 bits (|x*w| <= sqrt(2) * 2^15). Combinational.
module complex_mult
  import fft_pkg::*;
(
  input  logic  mode8,
  input  cplx_t x,
  input  cplx_t w,
  output logic signed [16:0] y_re,
  output logic signed [16:0] y_im
);
  logic signed [15:0] wr, wi;
  logic signed [31:0] p_rr, p_ii, p_ri, p_ir;
  logic signed [33:0] acc_re, acc_im;
  logic signed [33:0] rnd;
  int unsigned        sh;

  // 8-bit mode uses the twiddle's upper byte (Q1.7)
  assign wr = mode8 ? 16'(signed'(w.re[15:8])) : w.re;
  assign wi = mode8 ? 16'(signed'(w.im[15:8])) : w.im;

  scalable_mult u_rr (.mode8, .a(x.re), .b(wr), .p(p_rr));
  scalable_mult u_ii (.mode8, .a(x.im), .b(wi), .p(p_ii));
  scalable_mult u_ri (.mode8, .a(x.re), .b(wi), .p(p_ri));
  scalable_mult u_ir (.mode8, .a(x.im), .b(wr), .p(p_ir));

  always_comb begin
    sh     = mode8 ? 23 : 15;             // 8-bit products sit at bit 16
    rnd    = 34'sd1 <<< (sh - 1);
    acc_re = 34'(p_rr) - 34'(p_ii) + rnd;
    acc_im = 34'(p_ri) + 34'(p_ir) + rnd;
    y_re   = 17'(acc_re >>> sh);
    y_im   = 17'(acc_im >>> sh);
  end
endmodule
