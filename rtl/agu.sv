// agu -- address generation unit of the FFT accelerator.
//
// One `start` runs one FFT stage: the stage's N/4 butterflies are issued one
// per cycle. Following the published modified control flow, the butterfly
// counter bn is the outer loop and the group counter g the inner loop, so a
// set of twiddle factors is fetched once per bn (rom_en high only when g = 0)
// and reused for every group. For each butterfly the unit outputs the four
// storage positions (inputs A, B, C, D), their banks and bank word addresses
// (fft_pkg::bank_of, addr_of) and the twiddle ROM address.
//
// Stage s of a 2^n-point transform (see fft_pkg for the digit fields):
//   even n:        lb = 2s,   pos_q = g<<(lb+2) | q<<lb | bn
//   odd n, s >= 1: lb = 2s-1, pos_q = bn[0]<<(n-1) | g<<(lb+1) | q<<(lb-1) | bn>>1
//   odd n, s = 0:  radix-2 stage, lb = 0,
//                  pos_q = q[1]<<(n-1) | (g>>1)<<2 | q[0]<<1 | g[0]
// with BN = 2^lb butterflies per group and G = N/4/BN groups. The twiddles
// of butterfly bn are W^k, W^2k, W^3k of the NMAX-point transform with
// k = rom_addr = bn << (LOG2_NMAX-2-lb). The loop order and the modulo-4 bank
// rule are the published design; the digit fields are this design's choice.
//
// Timing: `start` is taken when idle; the first butterfly is presented the
// cycle after. While `enable` is low the counters hold and `valid` is low
// (the issuing pauses). `last` marks the final butterfly of the stage.
module agu
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [3:0] log2n,
  input  logic [2:0] stage,
  input  logic       enable,
  output logic       busy,
  output logic       valid,
  output logic       last,
  output logic       radix2,
  output pos_t       pos   [4],
  output bank_t      bank  [4],
  output waddr_t     addr  [4],
  output logic       rom_en,
  output waddr_t     rom_addr
);
  logic [3:0] n_r;
  logic [3:0] lb_r;
  logic       odd_r;
  pos_t       bn, g, bn_max, g_max;
  logic [3:0] lb;         // log2 of the butterflies per group of the requested stage

  always_comb begin
    if (!log2n[0])          lb = 4'(2 * stage);
    else if (stage == 3'd0) lb = 4'd0;
    else                    lb = 4'(2 * stage - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      radix2 <= 1'b0;
      n_r    <= 4'd4;
      lb_r   <= 4'd0;
      odd_r  <= 1'b0;
      bn     <= '0;
      g      <= '0;
      bn_max <= '0;
      g_max  <= '0;
    end else if (!busy) begin
      if (start) begin
        busy   <= 1'b1;
        radix2 <= log2n[0] && stage == 3'd0;
        n_r    <= log2n;
        lb_r   <= lb;
        odd_r  <= log2n[0];
        bn     <= '0;
        g      <= '0;
        bn_max <= (pos_t'(1) << lb) - pos_t'(1);
        g_max  <= (pos_t'(1) << (log2n - 4'd2 - lb)) - pos_t'(1);
      end
    end else if (enable) begin
      if (g == g_max) begin
        g <= '0;
        if (bn == bn_max) busy <= 1'b0;
        else              bn   <= bn + pos_t'(1);
      end else begin
        g <= g + pos_t'(1);
      end
    end
  end

  assign valid    = busy && enable;
  assign last     = valid && g == g_max && bn == bn_max;
  assign rom_en   = valid && g == '0;
  assign rom_addr = waddr_t'(bn << (4'(LOG2_NMAX - 2) - lb_r));

  always_comb begin
    for (int q = 0; q < 4; q++) begin
      pos_t qq;
      qq = pos_t'(q);
      if (radix2)
        pos[q] = (pos_t'(qq[1]) << (n_r - 4'd1)) | ((g >> 1) << 2) | (pos_t'(qq[0]) << 1) | pos_t'(g[0]);
      else if (odd_r)
        pos[q] = (pos_t'(bn[0]) << (n_r - 4'd1)) | (g << (lb_r + 4'd1)) | (qq << (lb_r - 4'd1)) | (bn >> 1);
      else
        pos[q] = (g << (lb_r + 4'd2)) | (qq << lb_r) | bn;
      bank[q] = bank_of(pos[q]);
      addr[q] = addr_of(pos[q]);
    end
  end

  // The four operands of a butterfly always sit in four different banks.
  a_banks_distinct: assert property (@(posedge clk) disable iff (!rst_n)
    valid |-> (bank[0] != bank[1] && bank[0] != bank[2] && bank[0] != bank[3] &&
               bank[1] != bank[2] && bank[1] != bank[3] && bank[2] != bank[3]));
endmodule
