// overflow_detect -- block-floating-point shift finder.
//
// While a stage runs, every butterfly result is inspected. For each component
// the number of extra bits beyond the operand width (16 bits, or 8 in 8-bit
// mode) is found, 0..3, and the largest over the whole stage is kept in
// `flag`. The next stage, and the final read-out, take bits [15+flag:flag]
// (8-bit mode: [7+flag:flag]) of each stored component, so the operands of
// every stage are back at full width. The published design states that an
// overflow flag from the previous stage selects the [16:1], [17:2] or [18:3]
// bits; how the flag is computed is this design's choice.
// Timing: `clear` (synchronous) resets the maximum at the start of a stage;
// results with `valid` high are folded in at the clock edge.
module overflow_detect
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       mode8,
  input  logic       clear,
  input  logic       valid,
  input  cplx_x_t    res [4],
  output logic [1:0] flag,      // shift the next stage needs
  output logic [1:0] cur_need   // shift this set of results alone needs
);
  function automatic logic [1:0] need(input logic signed [XW-1:0] v, input logic m8);
    int w;
    w = m8 ? 8 : 16;
    if (v >= -(XW'(1) <<< (w - 1)) && v < (XW'(1) <<< (w - 1))) return 2'd0;
    if (v >= -(XW'(1) <<< w)       && v < (XW'(1) <<< w))       return 2'd1;
    if (v >= -(XW'(1) <<< (w + 1)) && v < (XW'(1) <<< (w + 1))) return 2'd2;
    return 2'd3;
  endfunction

  always_comb begin
    cur_need = 2'd0;
    for (int i = 0; i < 4; i++) begin
      if (need(res[i].re, mode8) > cur_need) cur_need = need(res[i].re, mode8);
      if (need(res[i].im, mode8) > cur_need) cur_need = need(res[i].im, mode8);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         flag <= 2'd0;
    else if (clear)                     flag <= 2'd0;
    else if (valid && cur_need > flag)  flag <= cur_need;
  end
endmodule
