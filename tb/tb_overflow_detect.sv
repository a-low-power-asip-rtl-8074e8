// tb_overflow_detect -- checks the per-result shift and the stage maximum of
// overflow_detect on boundary values of both precisions.
module tb_overflow_detect;
  import fft_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, mode8 = 1'b0, clear = 1'b0, valid = 1'b0;
  cplx_x_t res [4];
  logic [1:0] flag, cur_need;
  int checks = 0, failures = 0;

  overflow_detect dut (.clk, .rst_n, .mode8, .clear, .valid, .res, .flag, .cur_need);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected shift for one value: smallest f with -2^(w-1+f) <= v < 2^(w-1+f), max 3
  function automatic int ref_need(input int v, input bit m8);
    int w;
    w = m8 ? 8 : 16;
    for (int f = 0; f < 3; f++)
      if (v >= -(1 << (w - 1 + f)) && v < (1 << (w - 1 + f))) return f;
    return 3;
  endfunction

  task automatic one(input bit m8, input int v, input int slot);
    @(negedge clk);
    mode8 = m8;
    foreach (res[i]) res[i] = '0;
    if (slot < 4) res[slot].re = XW'(v); else res[slot - 4].im = XW'(v);
    #1;
    check(int'(cur_need) == ref_need(v, m8), $sformatf("m8=%0d v=%0d need=%0d", m8, v, cur_need));
  endtask

  initial begin
    int vals [10] = '{0, 32767, 32768, -32768, -32769, 65535, 65536, -131072, -131073, 262143};
    int v8   [8]  = '{127, 128, -128, -129, 255, 256, 511, -513};
    int mx;
    foreach (res[i]) res[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (vals[i]) one(1'b0, vals[i], i % 8);
    foreach (v8[i])   one(1'b1, v8[i], i % 8);
    // stage maximum: clear, feed several result sets, flag keeps the largest
    @(negedge clk); mode8 = 1'b0; clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    check(flag == 2'd0, "flag cleared");
    mx = 0;
    for (int i = 0; i < 50; i++) begin
      int v;
      v = int'($urandom_range(70000)) - 35000;
      foreach (res[j]) begin res[j].re = XW'(v / (j + 1)); res[j].im = XW'(-v / (j + 2)); end
      valid = i[0];
      if (i[0] && ref_need(v, 1'b0) > mx) mx = ref_need(v, 1'b0);
      @(negedge clk);
    end
    valid = 1'b0;
    check(int'(flag) == mx, $sformatf("stage maximum %0d expected %0d", flag, mx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
