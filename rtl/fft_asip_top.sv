// fft_asip_top -- FFT accelerator and pipeline clock gating of the FFT ASIP.
//
// The ASIP is a 5-stage, 16-bit-instruction processor with an FFT
// accelerator. Four multi-cycle SIMD instructions each compute one FFT stage:
// FFT16_gated, FFT16_ungated (32-bit complex data, 16-bit parts) and
// FFT8_gated, FFT8_ungated (16-bit complex data, 8-bit parts). A *_gated
// instruction stops the clock of the processor pipeline until the
// accelerator's `finish`, a *_ungated one lets the processor go on with other
// instructions while the stage runs.
//
// This top holds the accelerator and the clock gate with its control. The
// processor pipeline itself (fetch, decoder, register file, ALU, data RAM,
// forwarding, FSM) is not part of it: its connections to the accelerator
// are the ports below, and it runs on `gated_clk`.
//
//   fft_os, fft_cs, fft_gated  an FFT instruction issued by the decoder:
//                              start, {prec8, log2n, stage}, 1 for *_gated
//   fft_oe                     1: the accelerator issues butterflies
//   fft_ram_addr, oe, we,      the processor's access to the FFT data
//   wdata, fft_data_out        memory (x[i] in, X[k] out, 1-cycle read)
//   gated_clk                  clock of the processor pipeline
//
// Gating: when a gated instruction starts, the gate enable drops, so
// gated_clk stops from the next rising edge. It is raised again during the
// accelerator's one-cycle `finish`, so the pipeline sees the rising edge that
// ends the finish cycle and resumes. The gating rule (finish re-enables the
// pipeline clock) follows the published design; the exact cycle is this
// design's choice.
module fft_asip_top
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       test_en,
  // FFT instruction from the decoder
  input  logic       fft_os,
  input  fft_cfg_t   fft_cs,
  input  logic       fft_gated,
  input  logic       fft_oe,
  // processor access to the FFT data memory
  input  pos_t       fft_ram_addr,
  input  logic       oe,
  input  logic       we,
  input  cplx_t      wdata,
  output cplx_t      fft_data_out,
  output logic       data_valid,
  // status and clocks
  output logic       fft_busy,
  output logic       finish,
  output logic [1:0] ovf_flag,
  output logic [4:0] scale_exp,
  output logic       gated_clk
);
  logic gate_off;

  fft_accelerator u_fft (
    .clk, .rst_n, .fft_os, .fft_cs, .fft_oe,
    .fft_ram_addr, .oe, .we, .wdata, .fft_data_out, .data_valid,
    .busy(fft_busy), .finish, .ovf_flag, .scale_exp
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                              gate_off <= 1'b0;
    else if (fft_os && fft_gated && !fft_busy) gate_off <= 1'b1;
    else if (finish)                         gate_off <= 1'b0;
  end

  clock_gate u_cg (.clk, .en(!gate_off || finish), .test_en, .gclk(gated_clk));
endmodule
