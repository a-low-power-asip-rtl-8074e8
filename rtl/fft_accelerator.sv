// fft_accelerator -- memory-based radix-2/4 FFT engine of the ASIP.
//
// Holds one 16..4096-point complex transform in a ping-pong data memory and
// computes it one stage per instruction: each pulse on fft_os runs the stage
// named in fft_cs (stages 0 .. num_stages-1 in order, a radix-2 stage first
// when log2 N is odd) and ends with a one-cycle `finish`. One butterfly (one
// radix-4, or two radix-2) is issued per cycle: finish rises N/4 + 3 clock
// edges after the edge that samples fft_os, so with the instruction cycle
// and the finish cycle a stage occupies N/4 + 4 cycles.
//
//   agu             butterfly/group counters (twiddles fetched once per bn)
//   twiddle_rom     W^k, W^2k, W^3k for the current butterfly
//   fft_data_memory 2 x 4 banks, read memory `cur`, write memory ~cur
//   butterfly_unit  3 complex multipliers, 8 complex adders, radix mux
//   overflow_detect block shift for the next stage
//
// Pipeline of a butterfly: P0 the AGU presents positions, the banks of
// memory `cur` are addressed (bank b gets the address of the operand that
// lives in bank b) and, for a new bn, the ROM is read; P1 the shifted words
// are routed back to A..D and the butterfly computes, result registered; P2
// the results are written in place (same positions) into the other memory
// and checked for overflow. At the end of the stage the overflow flag is
// kept (it sets the read shift of the next stage and of the read-out) and
// added to `scale_exp`: the read-out value times 2^scale_exp is the DFT.
//
// Host port (used by the processor while no stage runs): `we` stores sample
// x[fft_ram_addr] = wdata, `oe` reads bin X[fft_ram_addr], returned on
// fft_data_out with data_valid one cycle later. Addresses are natural
// indices; the digit reversal is done here (fft_pkg::load_pos/result_pos).
// fft_cs must carry the transform size and precision during host accesses.
// fft_oe low pauses the issue of butterflies (a stall).
// The block split, the ping-pong memory, the per-stage instructions, the
// overflow-selected read shift and the modified loop order follow the
// published design; the pipeline, the host port and the meaning of fft_oe
// are this design's choices.
module fft_accelerator
  import fft_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // from the instruction decoder
  input  logic     fft_os,        // start: compute one stage
  input  fft_cfg_t fft_cs,        // precision, size, stage
  input  logic     fft_oe,        // 1: issue butterflies, 0: pause
  // data port of the processor
  input  pos_t     fft_ram_addr,
  input  logic     oe,
  input  logic     we,
  input  cplx_t    wdata,
  output cplx_t    fft_data_out,
  output logic     data_valid,
  // status
  output logic     busy,
  output logic     finish,
  output logic [1:0] ovf_flag,    // shift chosen after the last stage
  output logic [4:0] scale_exp    // total block-floating-point exponent
);
  logic     cfg_prec8;
  logic [2:0] cfg_stage;
  logic     running;
  logic     cur;
  logic     fin_pend;
  logic [1:0] flag_saved;
  logic     mode8;

  // ---------------- AGU and twiddle ROM (P0) ----------------
  logic   agu_busy, agu_valid, agu_last, agu_radix2, rom_en;
  bank_t  agu_bank [4];
  waddr_t agu_addr [4];
  waddr_t rom_addr;
  logic   start;

  assign start = fft_os && !running;

  agu u_agu (
    .clk, .rst_n, .start, .log2n(fft_cs.log2n), .stage(fft_cs.stage), .enable(fft_oe),
    .busy(agu_busy), .valid(agu_valid), .last(agu_last), .radix2(agu_radix2),
    .pos(), .bank(agu_bank), .addr(agu_addr), .rom_en, .rom_addr
  );

  cplx_t w1, w2, w3;
  twiddle_rom u_rom (.clk, .en(rom_en), .mode8, .addr(rom_addr), .w1, .w2, .w3);

  // ---------------- P1 / P2 pipeline registers ----------------
  logic    p1_valid, p1_last, p1_radix2;
  bank_t   p1_bank [4];
  waddr_t  p1_addr [4];
  logic    p2_valid, p2_last;
  bank_t   p2_bank [4];
  waddr_t  p2_addr [4];
  cplx_x_t p2_res  [4];

  // ---------------- data memory ----------------
  logic       mem_cen_n [2];
  logic [3:0] mem_wen_n [2];
  waddr_t     mem_addr  [2][4];
  mword_t     mem_din   [4];
  logic [1:0] mem_flag;
  cplx_t      mem_dout  [4];

  cplx_x_t host_w;
  pos_t   host_pos;
  bank_t  host_bank, host_bank_q;
  logic   host_rd_q;

  assign mode8 = running ? cfg_prec8 : fft_cs.prec8;

  // a sample from the processor, sign-extended to the 19-bit memory format
  always_comb begin
    host_w.re = mode8 ? XW'(signed'(wdata.re[7:0])) : XW'(wdata.re);
    host_w.im = mode8 ? XW'(signed'(wdata.im[7:0])) : XW'(wdata.im);
  end

  always_comb begin
    host_pos  = we ? load_pos(fft_ram_addr, fft_cs.log2n) : result_pos(fft_ram_addr, fft_cs.log2n);
    host_bank = bank_of(host_pos);
    for (int m = 0; m < 2; m++) begin
      mem_cen_n[m] = 1'b1;
      mem_wen_n[m] = 4'hF;
      for (int b = 0; b < 4; b++) mem_addr[m][b] = '0;
    end
    for (int b = 0; b < 4; b++) mem_din[b] = '0;
    if (running) begin
      // read side: memory cur, bank b addressed by the operand stored in it
      mem_cen_n[cur] = !agu_valid;
      for (int q = 0; q < 4; q++) mem_addr[cur][agu_bank[q]] = agu_addr[q];
      // write side: memory ~cur, results written back to their positions
      mem_cen_n[!cur] = !p2_valid;
      if (p2_valid) mem_wen_n[!cur] = 4'h0;
      for (int q = 0; q < 4; q++) begin
        mem_addr[!cur][p2_bank[q]] = p2_addr[q];
        mem_din[p2_bank[q]]        = pack_word(p2_res[q]);
      end
    end else if (we || oe) begin
      mem_cen_n[cur] = 1'b0;
      if (we) mem_wen_n[cur][host_bank] = 1'b0;
      for (int b = 0; b < 4; b++) mem_addr[cur][b] = addr_of(host_pos);
      mem_din[host_bank] = pack_word(host_w);
    end
    // stage 0 reads the raw samples; later stages and the read-out use the flag
    mem_flag = (running && cfg_stage == 3'd0) ? 2'd0 : flag_saved;
  end

  fft_data_memory u_mem (
    .clk, .mode8, .cen_n(mem_cen_n), .wen_n(mem_wen_n), .addr(mem_addr), .din(mem_din),
    .rsel(cur), .bitflag(mem_flag), .dout(mem_dout)
  );

  // ---------------- butterfly (P1) ----------------
  cplx_t   bf_in  [4];
  cplx_x_t bf_out [4];
  always_comb for (int q = 0; q < 4; q++) bf_in[q] = mem_dout[p1_bank[q]];

  butterfly_unit u_bf (
    .mode8, .radix2(p1_radix2),
    .a(bf_in[0]), .b(bf_in[1]), .c(bf_in[2]), .d(bf_in[3]),
    .w1, .w2, .w3,
    .a_o(bf_out[0]), .b_o(bf_out[1]), .c_o(bf_out[2]), .d_o(bf_out[3])
  );

  // ---------------- overflow detection (P2) ----------------
  logic [1:0] ovf_now;
  overflow_detect u_ovf (
    .clk, .rst_n, .mode8, .clear(start), .valid(p2_valid), .res(p2_res),
    .flag(ovf_now), .cur_need()
  );

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_prec8  <= 1'b0;
      cfg_stage  <= '0;
      running    <= 1'b0;
      cur        <= 1'b0;
      fin_pend   <= 1'b0;
      flag_saved <= 2'd0;
      scale_exp  <= '0;
      finish     <= 1'b0;
      p1_valid   <= 1'b0;
      p1_last    <= 1'b0;
      p1_radix2  <= 1'b0;
      p2_valid   <= 1'b0;
      p2_last    <= 1'b0;
      host_rd_q  <= 1'b0;
      host_bank_q <= '0;
    end else begin
      finish    <= 1'b0;
      host_rd_q <= !running && oe && !we;
      if (!running && (oe || we)) host_bank_q <= host_bank;
      if (!running && we) begin
        flag_saved <= 2'd0;
        scale_exp  <= '0;
      end
      if (start) begin
        cfg_prec8 <= fft_cs.prec8;
        cfg_stage <= fft_cs.stage;
        running <= 1'b1;
        if (fft_cs.stage == 3'd0) scale_exp <= '0;
      end
      p1_valid  <= agu_valid;
      p1_last   <= agu_last;
      p1_radix2 <= agu_radix2;
      p2_valid  <= p1_valid;
      p2_last   <= p1_valid && p1_last;
      fin_pend  <= p2_valid && p2_last;
      if (fin_pend) begin
        running    <= 1'b0;
        finish     <= 1'b1;
        cur        <= !cur;
        flag_saved <= ovf_now;
        scale_exp  <= scale_exp + 5'(ovf_now);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (agu_valid) begin
      p1_bank <= agu_bank;
      p1_addr <= agu_addr;
    end
    if (p1_valid) begin
      p2_bank <= p1_bank;
      p2_addr <= p1_addr;
      p2_res  <= bf_out;
    end
  end

  assign busy         = running;
  assign ovf_flag     = flag_saved;
  assign fft_data_out = mem_dout[host_bank_q];
  assign data_valid   = host_rd_q;

  // Host accesses are only allowed while no stage runs.
  a_no_host_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    running |-> !(we || oe));
  // The AGU is running exactly while a stage is in flight.
  a_agu_within_stage: assert property (@(posedge clk) disable iff (!rst_n)
    agu_busy |-> running);
endmodule
