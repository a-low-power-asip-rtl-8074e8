// tb_twiddle_rom -- checks ROM words against cos/sin (within one LSB), the
// one-cycle read, that the output holds while `en` is low, and that in 8-bit
// mode the upper bytes follow the address while the lower bytes are not read.
module tb_twiddle_rom;
  import fft_pkg::*;
  logic clk = 1'b0, en = 1'b0, mode8 = 1'b0;
  waddr_t addr = '0;
  cplx_t w1, w2, w3;
  int checks = 0, failures = 0;

  twiddle_rom dut (.clk, .en, .mode8, .addr, .w1, .w2, .w3);
  always #5 clk = ~clk;

  initial begin
    #(10 * 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit close(input cplx_t w, input int m);
    real ang, c, s;
    ang = 2.0 * 3.14159265358979323846 * real'(m) / real'(NMAX);
    c = $cos(ang) * 32768.0;
    s = -$sin(ang) * 32768.0;
    return (real'(w.re) - c <= 1.0) && (c - real'(w.re) <= 1.0) &&
           (real'(w.im) - s <= 1.0) && (s - real'(w.im) <= 1.0);
  endfunction

  // expected 16-bit part: round half away from zero, +1.0 saturated
  function automatic int q15(input real v);
    real r;
    r = v * 32768.0;
    r = (r >= 0.0) ? r + 0.5 : r - 0.5;
    if (r > 32767.0) r = 32767.0;
    return $rtoi(r);
  endfunction

  task automatic check_mode8(input int k);
    cplx_t p1, p2, p3;
    real ang;
    int er, ei;
    p1 = w1; p2 = w2; p3 = w3;
    @(negedge clk);
    mode8 = 1'b1; en = 1'b1; addr = waddr_t'(k);
    @(negedge clk);
    en = 1'b0; mode8 = 1'b0;
    ang = 2.0 * 3.14159265358979323846 * real'(2 * k) / real'(NMAX);
    er = q15($cos(ang)); ei = q15(-$sin(ang));
    checks++;
    if (w2.re[15:8] != 8'(er >>> 8) || w2.im[15:8] != 8'(ei >>> 8) ||
        w1[7:0] != p1[7:0] || w1[23:16] != p1[23:16] || w2[7:0] != p2[7:0] ||
        w2[23:16] != p2[23:16] || w3[7:0] != p3[7:0] || w3[23:16] != p3[23:16]) begin
      failures++;
      $display("FAIL 8-bit read k=%0d: w2=(%h,%h) expected upper (%h,%h)", k, w2.re, w2.im,
               8'(er >>> 8), 8'(ei >>> 8));
    end
  endtask

  initial begin
    cplx_t h1;
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk);
      addr = waddr_t'(k); en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      checks++;
      if (!(close(w1, k) && close(w2, 2 * k) && close(w3, 3 * k))) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d w1=(%0d,%0d) w2=(%0d,%0d) w3=(%0d,%0d)",
                                    k, w1.re, w1.im, w2.re, w2.im, w3.re, w3.im);
      end
      // hold while en is low
      h1 = w1;
      addr = waddr_t'(k + 7);
      @(negedge clk);
      checks++;
      if (w1 != h1) begin failures++; $display("FAIL output changed with en low"); end
    end
    for (int i = 0; i < 200; i++) check_mode8(int'($urandom_range(DEPTH - 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
