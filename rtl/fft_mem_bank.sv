// fft_mem_bank -- one single-port synchronous RAM bank of the FFT data memory.
//
// DEPTH_W words of WIDTH bits. With ce high the bank writes din at addr when
// we is high, otherwise reads addr; the read word appears on dout after the
// clock edge and is held while ce is low. This stands for one SRAM macro
// (one part of one bank in the ping-pong memory); the published design does
// not describe the macro itself.
module fft_mem_bank #(
  parameter int WIDTH = 22,
  parameter int DEPTH_W = 1024,
  parameter int AW_B = $clog2(DEPTH_W)
) (
  input  logic             clk,
  input  logic             ce,
  input  logic             we,
  input  logic [AW_B-1:0]  addr,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  logic [WIDTH-1:0] mem [DEPTH_W];

  always_ff @(posedge clk) begin
    if (ce) begin
      if (we) mem[addr] <= din;
      else    dout <= mem[addr];
    end
  end
endmodule
