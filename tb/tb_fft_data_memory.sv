// tb_fft_data_memory -- writes random 38-bit words into both memories of the
// ping-pong pair (four banks in parallel, then single banks), reads them back
// with every shift (0..3) in 16-bit mode and in 8-bit mode, and checks the
// selected bits, that the two memories are independent, and that in 8-bit
// mode the 16-bit part of the word is not written.
module tb_fft_data_memory;
  import fft_pkg::*;
  logic clk = 1'b0, mode8 = 1'b0, rsel = 1'b0;
  logic cen_n [2];
  logic [3:0] wen_n [2];
  waddr_t addr [2][4];
  mword_t din [4];
  logic [1:0] bitflag = '0;
  cplx_t dout [4];
  int checks = 0, failures = 0;

  fft_data_memory dut (.clk, .mode8, .cen_n, .wen_n, .addr, .din, .rsel, .bitflag, .dout);
  always #5 clk = ~clk;

  initial begin
    #(10 * 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference copy: 19-bit components
  int ref_re [2][4][64], ref_im [2][4][64];

  task automatic idle();
    for (int m = 0; m < 2; m++) begin
      cen_n[m] = 1'b1; wen_n[m] = 4'hF;
      for (int b = 0; b < 4; b++) addr[m][b] = '0;
    end
    for (int b = 0; b < 4; b++) din[b] = '0;
  endtask

  function automatic int expect_c(input int v, input bit m8, input int f);
    if (m8) begin
      int v11;
      v11 = int'(signed'(11'(v)));
      return int'(signed'(8'(v11 >>> f)));
    end
    return int'(signed'(16'(v >>> f)));
  endfunction

  task automatic write_all(input bit m8, input int m, input int a);
    cplx_x_t v;
    @(negedge clk);
    idle();
    mode8 = m8;
    cen_n[m] = 1'b0; wen_n[m] = 4'h0;
    for (int b = 0; b < 4; b++) begin
      addr[m][b] = waddr_t'(a + b);   // different address per bank
      v.re = XW'($urandom); v.im = XW'($urandom);
      if (m8) begin v.re = XW'(signed'(11'(v.re))); v.im = XW'(signed'(11'(v.im))); end
      din[b] = pack_word(v);
      ref_re[m][b][a + b] = int'(v.re); ref_im[m][b][a + b] = int'(v.im);
    end
  endtask

  task automatic read_all(input bit m8, input int m, input int a, input int f);
    @(negedge clk);
    idle();
    mode8 = m8; bitflag = 2'(f); rsel = m[0];
    cen_n[m] = 1'b0;
    for (int b = 0; b < 4; b++) addr[m][b] = waddr_t'(a + b);
    @(negedge clk);
    idle();
    for (int b = 0; b < 4; b++) begin
      int er, ei;
      er = expect_c(ref_re[m][b][a + b], m8, f);
      ei = expect_c(ref_im[m][b][a + b], m8, f);
      checks++;
      if (int'(dout[b].re) != er || int'(dout[b].im) != ei) begin
        failures++;
        $display("FAIL m8=%0d mem%0d bank%0d addr%0d f=%0d: (%0d,%0d) expected (%0d,%0d)",
                 m8, m, b, a + b, f, dout[b].re, dout[b].im, er, ei);
      end
    end
  endtask

  initial begin
    idle();
    // 16-bit mode: both memories, every shift
    for (int a = 0; a < 32; a += 4) begin write_all(1'b0, 0, a); write_all(1'b0, 1, a); end
    for (int a = 0; a < 32; a += 4)
      for (int f = 0; f < 4; f++) begin read_all(1'b0, 0, a, f); read_all(1'b0, 1, a, f); end
    // 8-bit mode
    for (int a = 32; a < 60; a += 4) write_all(1'b1, 1, a);
    for (int a = 32; a < 60; a += 4)
      for (int f = 0; f < 4; f++) read_all(1'b1, 1, a, f);
    // single-bank write leaves the other banks alone
    @(negedge clk);
    idle();
    mode8 = 1'b0;
    cen_n[0] = 1'b0; wen_n[0] = 4'b1011;           // bank 2 only
    for (int b = 0; b < 4; b++) begin addr[0][b] = 10'd10; din[b] = '0; end
    ref_re[0][2][10] = 0; ref_im[0][2][10] = 0;
    // read_all(a=8) reads bank b at 8+b: only bank 2 (address 10) has changed
    read_all(1'b0, 0, 8, 0);
    // 16-bit part is not written in 8-bit mode: write 8-bit, read 16-bit
    @(negedge clk);
    idle();
    mode8 = 1'b1; cen_n[0] = 1'b0; wen_n[0] = 4'h0;
    for (int b = 0; b < 4; b++) begin addr[0][b] = waddr_t'(b); din[b] = '0; end
    for (int b = 0; b < 4; b++) begin
      ref_re[0][b][b] = int'(signed'({19'(ref_re[0][b][b]) >> 11, 11'd0}));
      ref_im[0][b][b] = int'(signed'({19'(ref_im[0][b][b]) >> 11, 11'd0}));
    end
    read_all(1'b0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
