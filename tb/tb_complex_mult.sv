// tb_complex_mult -- checks complex_mult against a real-valued product,
// rounded half up to the data scale (2^-15 in 16-bit mode, 2^-7 in 8-bit
// mode, where the twiddle's upper byte is used).
module tb_complex_mult;
  import fft_pkg::*;
  logic  mode8;
  cplx_t x, w;
  logic signed [16:0] y_re, y_im;
  int checks = 0, failures = 0;

  complex_mult dut (.mode8, .x, .w, .y_re, .y_im);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_div(input longint v, input int sh);
    return int'($floor(real'(v) / real'(longint'(1) << sh) + 0.5));
  endfunction

  task automatic try(input bit m8, input real ang, input int xr, input int xi);
    int wr, wi, er, ei;
    longint xr_l, xi_l, wr_l, wi_l;
    wr = int'($floor($cos(ang) * 32767.0));
    wi = int'($floor(-$sin(ang) * 32767.0));
    mode8 = m8;
    x.re = 16'(xr); x.im = 16'(xi);
    w.re = 16'(wr); w.im = 16'(wi);
    #1;
    if (m8) begin
      xr_l = longint'(signed'(8'(xr))); xi_l = longint'(signed'(8'(xi)));
      wr_l = longint'(wr >>> 8);        wi_l = longint'(wi >>> 8);
      er = rnd_div(xr_l * wr_l - xi_l * wi_l, 7);
      ei = rnd_div(xr_l * wi_l + xi_l * wr_l, 7);
    end else begin
      xr_l = longint'(signed'(16'(xr))); xi_l = longint'(signed'(16'(xi)));
      er = rnd_div(xr_l * wr - xi_l * wi, 15);
      ei = rnd_div(xr_l * wi + xi_l * wr, 15);
    end
    checks++;
    if (int'(y_re) != er || int'(y_im) != ei) begin
      failures++;
      $display("FAIL m8=%0d x=(%0d,%0d) w=(%0d,%0d): (%0d,%0d) expected (%0d,%0d)",
               m8, x.re, x.im, w.re, w.im, y_re, y_im, er, ei);
    end
  endtask

  initial begin
    try(1'b0, 0.0, 32767, -32768);
    try(1'b0, 3.14159265358979 / 4.0, -32768, -32768);
    try(1'b1, 3.14159265358979 / 2.0, 127, -128);
    for (int i = 0; i < 2000; i++)
      try(i[0], 6.283185307 * real'($urandom_range(4095)) / 4096.0,
          int'($urandom_range(65535)) - 32768, int'($urandom_range(65535)) - 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
