// fft_data_memory -- ping-pong FFT data memory with block-shift read path.
//
// Two memories (0 and 1), each of four banks of DEPTH words by 38 bits. While
// one stage runs, the butterfly unit reads four words from one memory and
// writes its four results into the other; the next stage swaps the roles.
// Every bank is built as a 22-bit part (re[10:0], im[10:0]) and a 16-bit
// part (re[18:11], im[18:11]); in 8-bit precision mode the 16-bit part is
// neither read nor written, as the published design does to save power.
//
// Read path: the selected memory's four words go through a shifter that takes
// bits [15+f:f] of each 19-bit component (8-bit mode: [7+f:f] of the 11-bit
// component, sign-extended to 16 bits), f = bitflag, giving four 32-bit
// complex words DATA_out0..3. The ping-pong pair, the 38-bit word, the 22/16
// split and the shift choices follow the published design. Its figure draws
// one address bus per bank shared by both memories; here each memory has its
// own four address buses so that a read and a write of different butterflies
// can share a cycle, and each bank has its own write enable so that single
// words can be loaded. Bank addresses are AW = log2(NMAX)-2 = 10 bits.
//
// Timing: synchronous single-port banks. cen_n[m] low enables memory m; with
// wen_n[m][b] low bank b of memory m writes din[b] at the clock edge,
// otherwise it reads and the word is on dout the cycle after (the read
// memory is chosen by rsel in the cycle of the read).
module fft_data_memory
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       mode8,
  input  logic       cen_n [2],
  input  logic [3:0] wen_n [2],
  input  waddr_t     addr  [2][4],
  input  mword_t     din   [4],
  input  logic       rsel,
  input  logic [1:0] bitflag,
  output cplx_t      dout  [4]
);
  logic [LOW_W-1:0]  q_lo   [2][4];
  logic [HIGH_W-1:0] q_hi   [2][4];
  logic              rsel_q;

  for (genvar m = 0; m < 2; m++) begin : g_mem
    for (genvar b = 0; b < 4; b++) begin : g_bank
      // 22-bit part: always in use
      fft_mem_bank #(.WIDTH(LOW_W), .DEPTH_W(DEPTH)) u_lo (
        .clk, .ce(!cen_n[m]), .we(!wen_n[m][b]), .addr(addr[m][b]),
        .din(din[b][LOW_W-1:0]), .dout(q_lo[m][b])
      );
      // 16-bit part: disabled in 8-bit mode
      fft_mem_bank #(.WIDTH(HIGH_W), .DEPTH_W(DEPTH)) u_hi (
        .clk, .ce(!cen_n[m] && !mode8), .we(!wen_n[m][b]), .addr(addr[m][b]),
        .din(din[b][MW-1:LOW_W]), .dout(q_hi[m][b])
      );
    end
  end

  always_ff @(posedge clk) rsel_q <= rsel;

  function automatic logic [DW-1:0] pick(input logic [HIGH_W/2-1:0] hi,
                                         input logic [LOW_W/2-1:0]  lo,
                                         input logic m8, input logic [1:0] f);
    logic signed [XW-1:0]          v19;
    logic signed [LOW_W/2-1:0]     v11;
    v19 = {hi, lo};
    v11 = lo;
    if (m8) return DW'(signed'(8'(v11 >>> f)));
    return DW'(v19 >>> f);
  endfunction

  always_comb begin
    for (int b = 0; b < 4; b++) begin
      logic [LOW_W-1:0]  lo;
      logic [HIGH_W-1:0] hi;
      lo = q_lo[rsel_q][b];
      hi = q_hi[rsel_q][b];
      dout[b].re = pick(hi[HIGH_W-1:HIGH_W/2], lo[LOW_W-1:LOW_W/2], mode8, bitflag);
      dout[b].im = pick(hi[HIGH_W/2-1:0],      lo[LOW_W/2-1:0],     mode8, bitflag);
    end
  end
endmodule
