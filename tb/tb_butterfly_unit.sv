// tb_butterfly_unit -- checks the radix-4 butterfly against the 4-point DFT
// of (A, B*w1, C*w2, D*w3), X_k = sum_q y_q (-j)^(qk), and the radix-2 mode
// against the two 2-point butterflies (A, C*w2) and (B*w1, D*w3), in both
// precisions. The twiddle products are modelled here with round-half-up.
module tb_butterfly_unit;
  import fft_pkg::*;
  logic mode8, radix2;
  cplx_t a, b, c, d, w1, w2, w3;
  cplx_x_t a_o, b_o, c_o, d_o;
  int checks = 0, failures = 0;

  butterfly_unit dut (.mode8, .radix2, .a, .b, .c, .d, .w1, .w2, .w3, .a_o, .b_o, .c_o, .d_o);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_div(input longint v, input int sh);
    return int'($floor(real'(v) / real'(longint'(1) << sh) + 0.5));
  endfunction

  // model product of data x by twiddle w, precision m8
  task automatic cmul(input bit m8, input cplx_t x, input cplx_t w, output int yr, output int yi);
    longint xr, xi, wr, wi;
    if (m8) begin
      xr = longint'(signed'(x.re[7:0])); xi = longint'(signed'(x.im[7:0]));
      wr = longint'(signed'(w.re[15:8])); wi = longint'(signed'(w.im[15:8]));
      yr = rnd_div(xr * wr - xi * wi, 7);  yi = rnd_div(xr * wi + xi * wr, 7);
    end else begin
      xr = longint'(x.re); xi = longint'(x.im); wr = longint'(w.re); wi = longint'(w.im);
      yr = rnd_div(xr * wr - xi * wi, 15); yi = rnd_div(xr * wi + xi * wr, 15);
    end
  endtask

  function automatic cplx_t rnd_tw();
    real ang;
    cplx_t v;
    ang = 6.283185307179586 * real'($urandom_range(4095)) / 4096.0;
    v.re = 16'(int'($floor($cos(ang) * 32767.0 + 0.5)));
    v.im = 16'(int'($floor(-$sin(ang) * 32767.0 + 0.5)));
    return v;
  endfunction

  function automatic cplx_t rnd_x(input bit m8);
    cplx_t v;
    v.re = m8 ? 16'(signed'(8'($urandom))) : 16'($urandom);
    v.im = m8 ? 16'(signed'(8'($urandom))) : 16'($urandom);
    return v;
  endfunction

  task automatic try(input bit m8, input bit r2);
    int yr [4], yi [4], er [4], ei [4];
    int ar, ai;
    mode8 = m8; radix2 = r2;
    a = rnd_x(m8); b = rnd_x(m8); c = rnd_x(m8); d = rnd_x(m8);
    w1 = rnd_tw(); w2 = rnd_tw(); w3 = rnd_tw();
    #1;
    ar = m8 ? int'(signed'(a.re[7:0])) : int'(a.re);
    ai = m8 ? int'(signed'(a.im[7:0])) : int'(a.im);
    yr[0] = ar; yi[0] = ai;
    cmul(m8, b, w1, yr[1], yi[1]);
    cmul(m8, c, w2, yr[2], yi[2]);
    cmul(m8, d, w3, yr[3], yi[3]);
    if (r2) begin
      er[0] = yr[0] + yr[2]; ei[0] = yi[0] + yi[2];   // A'
      er[2] = yr[0] - yr[2]; ei[2] = yi[0] - yi[2];   // C'
      er[1] = yr[1] + yr[3]; ei[1] = yi[1] + yi[3];   // B'
      er[3] = yr[1] - yr[3]; ei[3] = yi[1] - yi[3];   // D'
    end else begin
      for (int k = 0; k < 4; k++) begin
        er[k] = 0; ei[k] = 0;
        for (int q = 0; q < 4; q++) begin
          case ((q * k) % 4)      // multiply y_q by (-j)^(qk)
            0: begin er[k] += yr[q]; ei[k] += yi[q]; end
            1: begin er[k] += yi[q]; ei[k] -= yr[q]; end
            2: begin er[k] -= yr[q]; ei[k] -= yi[q]; end
            default: begin er[k] -= yi[q]; ei[k] += yr[q]; end
          endcase
        end
      end
    end
    checks++;
    if (int'(a_o.re) != er[0] || int'(a_o.im) != ei[0] || int'(b_o.re) != er[1] || int'(b_o.im) != ei[1] ||
        int'(c_o.re) != er[2] || int'(c_o.im) != ei[2] || int'(d_o.re) != er[3] || int'(d_o.im) != ei[3]) begin
      failures++;
      $display("FAIL m8=%0d r2=%0d A'=(%0d,%0d)/(%0d,%0d) B'=(%0d,%0d)/(%0d,%0d) C'=(%0d,%0d)/(%0d,%0d) D'=(%0d,%0d)/(%0d,%0d)",
               m8, r2, a_o.re, a_o.im, er[0], ei[0], b_o.re, b_o.im, er[1], ei[1],
               c_o.re, c_o.im, er[2], ei[2], d_o.re, d_o.im, er[3], ei[3]);
    end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) try(i[0], i[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
