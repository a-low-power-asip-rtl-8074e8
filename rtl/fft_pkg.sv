// fft_pkg -- types, sizes and index mappings shared by the FFT accelerator.
//
// The accelerator computes 2^n-point FFTs, 16 <= N <= NMAX = 4096, as a
// mixed radix-2/4 decimation-in-time transform. Data live in four memory
// banks so that the four inputs of a butterfly can be read, and its four
// outputs written, in one cycle. A point at storage position p (an n-bit
// number) sits in bank  bank_of(p) = sum of the 2-bit digits of p, modulo 4,
// at word address p >> 2 of that bank. The modulo-4 digit sum and the
// address rule are the published scheme; for odd n the top digit is the single
// bit p[n-1] (a zero-extended 2-bit digit), which is this design's reading.
//
// Every stage operates on one digit field of the position: for even n stage s
// uses p[2s+1:2s]; for odd n stage 0 is the radix-2 stage on p[n-1] and stage
// s >= 1 uses p[2s-1:2s-2]. Input sample x[i] is therefore stored at
// load_pos(i) (a digit reversal) and spectrum bin X[k] is found at
// result_pos(k). Both maps are this design's choice, made so that the twiddle
// factors of a butterfly depend only on the stage and the butterfly counter.
//
// Memory words are 38 bits: {hi16, lo22} with lo22 = {re[10:0], im[10:0]} and
// hi16 = {re[18:11], im[18:11]}, so the 8-bit precision mode needs only lo22.
package fft_pkg;

  localparam int NMAX      = 4096;            // largest transform
  localparam int LOG2_NMAX = 12;
  localparam int AW        = LOG2_NMAX - 2;   // word address bits per bank
  localparam int DEPTH     = NMAX / 4;        // words per bank
  localparam int DW        = 16;              // data component width (16-bit mode)
  localparam int XW        = 19;              // butterfly result component width
  localparam int MW        = 2 * XW;          // memory word width, 38
  localparam int LOW_W     = 22;              // 8-bit-mode part of the word
  localparam int HIGH_W    = MW - LOW_W;      // 16-bit part, gated off in 8-bit mode

  typedef logic [LOG2_NMAX-1:0] pos_t;        // storage position / sample index
  typedef logic [AW-1:0]        waddr_t;      // bank word address
  typedef logic [1:0]           bank_t;
  typedef logic [MW-1:0]        mword_t;

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;                                    // 32-bit complex operand

  typedef struct packed {
    logic signed [XW-1:0] re;
    logic signed [XW-1:0] im;
  } cplx_x_t;                                  // 38-bit complex butterfly result

  // Instruction configuration carried on fft_cs.
  typedef struct packed {
    logic       prec8;     // 1: 8-bit precision mode (FFT8_*), 0: 16-bit (FFT16_*)
    logic [3:0] log2n;     // transform size, 4..12
    logic [2:0] stage;     // stage computed by this instruction
  } fft_cfg_t;

  // Number of stages of a 2^log2n-point transform (radix-2 stage first if odd).
  function automatic int unsigned num_stages(input logic [3:0] log2n);
    return (int'(log2n) + 1) / 2;
  endfunction

  function automatic bank_t bank_of(input pos_t p);
    bank_t b;
    b = '0;
    for (int i = 0; i < LOG2_NMAX / 2; i++) b = b + p[2*i +: 2];
    return b;
  endfunction

  function automatic waddr_t addr_of(input pos_t p);
    return p[LOG2_NMAX-1:2];
  endfunction

  // Where input sample x[i] of a 2^log2n-point transform is stored.
  function automatic pos_t load_pos(input pos_t i, input logic [3:0] log2n);
    pos_t p;
    int   nd;              // number of 2-bit digits that are reversed
    p  = '0;
    nd = int'(log2n) / 2;        // for odd sizes the top bit stays in place
    for (int d = 0; d < LOG2_NMAX / 2; d++)
      if (d < nd) p[2*d +: 2] = i[2*(nd-1-d) +: 2];
    if (log2n[0]) p[int'(log2n)-1] = i[int'(log2n)-1];
    return p;
  endfunction

  // Where spectrum bin X[k] of a 2^log2n-point transform is found.
  function automatic pos_t result_pos(input pos_t k, input logic [3:0] log2n);
    pos_t p;
    if (log2n[0]) begin
      p = k >> 1;
      p[int'(log2n)-1] = k[0];
    end else begin
      p = k;
    end
    return p;
  endfunction

  function automatic mword_t pack_word(input cplx_x_t v);
    return {v.re[XW-1:11], v.im[XW-1:11], v.re[10:0], v.im[10:0]};
  endfunction

endpackage
