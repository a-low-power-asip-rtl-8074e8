// twiddle_rom -- twiddle-factor ROM of the FFT accelerator.
//
// Word k (0 <= k < NMAX/4) holds the three twiddles a radix-4 butterfly
// needs, W^k, W^2k and W^3k with W = exp(-j*2*pi/NMAX), each as a complex
// Q1.15 pair {re, im}; +1.0 is stored as 32767. Smaller transforms use the
// same table at a strided address. The table is computed at elaboration
// from cos/sin, re = round(32768*cos(2*pi*m/NMAX)), im = round(-32768*sin(..)).
// The published design has one ROM with address waddr and outputs w1, w2,
// w3; packing all three into one word is taken from that picture, the
// contents and format are this design's choice.
// The table is stored as two ROMs, one with the upper bytes and one with the
// lower bytes of the six components. In 8-bit precision mode only the upper
// ROM is read (the 8-bit datapath uses only the upper byte), which is how
// the published design's twiddle ROM scaling in 8-bit mode is done here; the
// lower bytes then keep their last value.
// Timing: synchronous read; the word addressed while `en` is high appears
// on w1..w3 after the clock edge and is held while `en` is low, so the
// butterfly keeps its twiddles without new ROM accesses.
module twiddle_rom
  import fft_pkg::*;
(
  input  logic   clk,
  input  logic   en,
  input  logic   mode8,     // 1: read only the upper-byte ROM
  input  waddr_t addr,
  output cplx_t  w1,
  output cplx_t  w2,
  output cplx_t  w3
);
  typedef logic [3*2*DW-1:0] tw_word_t;   // {W^3k, W^2k, W^k}
  typedef logic [3*DW-1:0]   tw_half_t;   // one byte of each of the six parts
  typedef tw_word_t    tw_table_t [DEPTH];

  function automatic logic [2*DW-1:0] tw(input int m);
    real  ang, c, s;
    logic [DW-1:0] re, im;
    ang = 2.0 * 3.14159265358979323846 * real'(m) / real'(NMAX);
    c   = $cos(ang) * 32768.0;
    s   = -$sin(ang) * 32768.0;
    c   = (c >= 0.0) ? c + 0.5 : c - 0.5;
    s   = (s >= 0.0) ? s + 0.5 : s - 0.5;
    if (c > 32767.0) c = 32767.0;
    if (s > 32767.0) s = 32767.0;
    re = DW'($rtoi(c));
    im = DW'($rtoi(s));
    return {re, im};
  endfunction

  function automatic tw_table_t build();
    tw_table_t t;
    for (int k = 0; k < DEPTH; k++) t[k] = {tw(3 * k), tw(2 * k), tw(k)};
    return t;
  endfunction

  localparam tw_table_t TABLE = build();

  // byte h (1: upper, 0: lower) of every 16-bit part of a word
  function automatic tw_half_t half(input tw_word_t w, input int h);
    tw_half_t r;
    for (int i = 0; i < 6; i++) r[8*i +: 8] = w[DW*i + 8*h +: 8];
    return r;
  endfunction

  typedef tw_half_t tw_half_table_t [DEPTH];

  function automatic tw_half_table_t split(input int h);
    tw_half_table_t t;
    for (int k = 0; k < DEPTH; k++) t[k] = half(TABLE[k], h);
    return t;
  endfunction

  localparam tw_half_table_t ROM_HI = split(1);
  localparam tw_half_table_t ROM_LO = split(0);

  tw_half_t q_hi, q_lo;
  always_ff @(posedge clk) begin
    if (en)           q_hi <= ROM_HI[addr];
    if (en && !mode8) q_lo <= ROM_LO[addr];
  end

  tw_word_t q;
  always_comb
    for (int i = 0; i < 6; i++) q[DW*i +: DW] = {q_hi[8*i +: 8], q_lo[8*i +: 8]};

  assign w1 = cplx_t'(q[0 +: 2*DW]);
  assign w2 = cplx_t'(q[2*DW +: 2*DW]);
  assign w3 = cplx_t'(q[4*DW +: 2*DW]);
endmodule
