// tb_fft_asip_top -- end-to-end test of the FFT ASIP top at its real sizes.
//
// For every transform size 16..4096 in 16-bit mode and 16..64 in 8-bit mode
// the test loads random samples through the processor port, issues one FFT
// instruction per stage (alternating gated and ungated), reads the spectrum
// back and compares it, scaled by 2^scale_exp, with a double-precision DFT
// computed here. It checks
//   * the signal-to-quantisation-noise ratio (>= 45 dB 16-bit, >= 18 dB 8-bit),
//   * N/4 + 4 cycles, instruction cycle to finish cycle inclusive, per stage (plus the
//     stall cycles when fft_oe is held low), and the total cycles per FFT
//     against the published counts (16: 16 ... 4096: 6200 cycles),
//   * one twiddle ROM read per butterfly counter value, not per butterfly,
//   * that gated_clk is stopped during gated stages and runs during ungated
//     ones,
// and counts the radix-2 stages, overflow shifts, stalls and both gating
// modes, failing if any of them never occurred.
`timescale 1ns/1ps
module tb_fft_asip_top;
  import fft_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic fft_os = 1'b0, fft_gated = 1'b0, fft_oe = 1'b1, oe = 1'b0, we = 1'b0;
  fft_cfg_t fft_cs = '0;
  pos_t fft_ram_addr = '0;
  cplx_t wdata = '0, fft_data_out;
  logic data_valid, fft_busy, finish, gated_clk;
  logic [1:0] ovf_flag;
  logic [4:0] scale_exp;

  fft_asip_top dut (
    .clk, .rst_n, .test_en(1'b0), .fft_os, .fft_cs, .fft_gated, .fft_oe,
    .fft_ram_addr, .oe, .we, .wdata, .fft_data_out, .data_valid,
    .fft_busy, .finish, .ovf_flag, .scale_exp, .gated_clk
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_radix2 = 0, n_ovf = 0, n_stall = 0, n_gated = 0, n_ungated = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // twiddle ROM reads and pipeline clock edges, counted from outside
  int rom_reads = 0, gclk_edges = 0;
  always @(posedge clk) if (dut.u_fft.u_agu.rom_en) rom_reads <= rom_reads + 1;
  always @(posedge gated_clk) gclk_edges <= gclk_edges + 1;

  initial begin
    #(10 * 400000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int xr [NMAX], xi [NMAX], yr [NMAX], yi [NMAX];
  real ct [NMAX], st [NMAX];

  // published cycles per FFT (16-bit mode)
  function automatic int paper_cycles(int n);
    case (n)
      4: return 16;    5: return 48;    6: return 62;    7: return 168;
      8: return 296;   9: return 688;   10: return 1328; 11: return 3128;
      default: return 6200;
    endcase
  endfunction

  task automatic run_fft(input int n, input bit prec8, input bit stall);
    int N, S, amp, total, stall_cycles;
    real sig, err, sqnr, sc;
    N = 1 << n;
    S = (n + 1) / 2;
    amp = prec8 ? 64 : 16384;
    // load
    @(negedge clk);
    fft_cs = '{prec8: prec8, log2n: 4'(n), stage: 3'd0};
    for (int i = 0; i < N; i++) begin
      xr[i] = int'($urandom_range(2 * amp - 1)) - amp;
      xi[i] = int'($urandom_range(2 * amp - 1)) - amp;
      we = 1'b1; fft_ram_addr = pos_t'(i);
      wdata.re = 16'(xr[i]); wdata.im = 16'(xi[i]);
      @(negedge clk);
    end
    we = 1'b0;
    // one instruction per stage
    total = 0;
    for (int s = 0; s < S; s++) begin
      longint t0;
      int bn_count, r0, g0, cycles;
      bit gated;
      gated = (s % 2) == 0;
      fft_cs.stage = 3'(s);
      fft_os = 1'b1; fft_gated = gated;
      r0 = rom_reads;
      t0 = cyc;
      @(negedge clk);
      fft_os = 1'b0;
      g0 = gclk_edges;
      stall_cycles = 0;
      while (!finish) begin
        if (stall && s == S - 1 && fft_busy && (cyc - t0) == 5) begin
          fft_oe = 1'b0;
          repeat (4) @(negedge clk);
          fft_oe = 1'b1;
          stall_cycles = 4;
          n_stall++;
        end
        @(negedge clk);
      end
      cycles = int'(cyc - t0);
      check(cycles == N / 4 + 4 + stall_cycles,
            $sformatf("N=%0d stage %0d took %0d cycles, expected %0d", N, s, cycles, N/4+4+stall_cycles));
      total += cycles;
      // one ROM read per butterfly-counter value
      if (n % 2 == 0)  bn_count = 1 << (2 * s);
      else if (s == 0) bn_count = 1;
      else             bn_count = 1 << (2 * s - 1);
      check(rom_reads - r0 == bn_count,
            $sformatf("N=%0d stage %0d: %0d ROM reads, expected %0d", N, s, rom_reads - r0, bn_count));
      if (n % 2 == 1 && s == 0) n_radix2++;
      if (ovf_flag != 2'd0) n_ovf++;
      // the pipeline clock: stopped in gated stages (one edge at finish),
      // running in ungated ones
      if (gated) begin
        check(gclk_edges - g0 <= 1, $sformatf("gated stage: %0d pipeline clock edges", gclk_edges - g0));
        n_gated++;
      end else begin
        check(gclk_edges - g0 >= cycles - 1, $sformatf("ungated stage: only %0d pipeline clock edges", gclk_edges - g0));
        n_ungated++;
      end
      @(negedge clk);
    end
    if (!prec8 && !stall)
      check(total <= paper_cycles(n) + S,
            $sformatf("N=%0d: %0d cycles per FFT, published %0d", N, total, paper_cycles(n)));
    // read back
    for (int k = 0; k < N; k++) begin
      oe = 1'b1; fft_ram_addr = pos_t'(k);
      @(negedge clk);
      oe = 1'b0;
      check(data_valid, "read data valid");
      yr[k] = int'(fft_data_out.re);
      yi[k] = int'(fft_data_out.im);
    end
    // double-precision reference
    for (int i = 0; i < N; i++) begin
      ct[i] = $cos(2.0 * 3.14159265358979323846 * i / N);
      st[i] = $sin(2.0 * 3.14159265358979323846 * i / N);
    end
    sc = real'(longint'(1) << scale_exp);
    sig = 0.0; err = 0.0;
    for (int k = 0; k < N; k++) begin
      real ar, ai, dr, di;
      ar = 0.0; ai = 0.0;
      for (int i = 0; i < N; i++) begin
        int m;
        m = (i * k) % N;
        ar += xr[i] * ct[m] + xi[i] * st[m];
        ai += xi[i] * ct[m] - xr[i] * st[m];
      end
      dr = yr[k] * sc - ar;
      di = yi[k] * sc - ai;
      sig += ar * ar + ai * ai;
      err += dr * dr + di * di;
    end
    sqnr = 10.0 * $log10(sig / (err + 1.0e-9));
    $display("N=%0d %0s-bit: %0d cycles, scale 2^%0d, SQNR %0.2f dB", N, prec8 ? "8" : "16",
             total, scale_exp, sqnr);
    check(sqnr >= (prec8 ? 18.0 : 45.0), $sformatf("N=%0d SQNR %0.2f dB too low", N, sqnr));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 4; n <= 12; n++) run_fft(n, 1'b0, n == 7);
    for (int n = 4; n <= 6; n++)  run_fft(n, 1'b1, 1'b0);
    check(n_radix2 > 0, "no radix-2 stage ran");
    check(n_ovf > 0,    "no overflow shift occurred");
    check(n_stall > 0,  "no stall occurred");
    check(n_gated > 0,  "no gated stage ran");
    check(n_ungated > 0, "no ungated stage ran");
    $display("mechanisms: radix2=%0d overflow_shift=%0d stall=%0d gated=%0d ungated=%0d",
             n_radix2, n_ovf, n_stall, n_gated, n_ungated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
