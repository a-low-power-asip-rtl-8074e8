// tb_agu -- checks the address generation unit for every size and stage:
// each position 0..N-1 is issued exactly once per stage, the four operands
// of a butterfly are in four different banks at address pos>>2, they differ
// only in the stage's digit field, the group counter is the inner loop (the
// ROM address changes only on a ROM read, one read per butterfly counter
// value, with the expected stride), a stage takes N/4 issue cycles, and
// holding `enable` low pauses the issue.
module tb_agu;
  import fft_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, enable = 1'b1;
  logic [3:0] log2n = 4'd4;
  logic [2:0] stage = '0;
  logic busy, valid, last, radix2, rom_en;
  pos_t pos [4];
  bank_t bank [4];
  waddr_t addr [4], rom_addr;
  int checks = 0, failures = 0;

  agu dut (.clk, .rst_n, .start, .log2n, .stage, .enable, .busy, .valid, .last, .radix2,
           .pos, .bank, .addr, .rom_en, .rom_addr);
  always #5 clk = ~clk;

  initial begin
    #(10 * 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // bits of the digit field used by stage s
  function automatic pos_t field_mask(int n, int s);
    if (n % 2 == 0)  return pos_t'(3) << (2 * s);
    if (s == 0)      return (pos_t'(1) << (n - 1)) | pos_t'(2);   // two radix-2 butterflies
    return pos_t'(3) << (2 * s - 2);
  endfunction

  task automatic run_stage(input int n, input int s, input bit pause);
    bit seen [NMAX];
    int N, issued, reads, bn_exp, lb, cycles;
    waddr_t cur_rom;
    N = 1 << n;
    foreach (seen[i]) seen[i] = 1'b0;
    lb = (n % 2 == 0) ? 2 * s : (s == 0 ? 0 : 2 * s - 1);
    bn_exp = 1 << lb;
    @(negedge clk);
    log2n = 4'(n); stage = 3'(s); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    issued = 0; reads = 0; cycles = 0;
    cur_rom = '0;
    while (busy) begin
      if (pause) enable = (cycles % 3) != 1;
      #1;
      if (valid) begin
        check(radix2 == (n % 2 == 1 && s == 0), "radix2 flag");
        if (rom_en) begin
          reads++;
          cur_rom = rom_addr;
          check(rom_addr == waddr_t'((reads - 1) << (LOG2_NMAX - 2 - lb)),
                $sformatf("n=%0d s=%0d rom_addr %0d at read %0d", n, s, rom_addr, reads));
        end else begin
          check(rom_addr == cur_rom, "twiddle address changed without a ROM read");
        end
        for (int q = 0; q < 4; q++) begin
          check(int'(pos[q]) < N, "position in range");
          check(!seen[pos[q]], $sformatf("n=%0d s=%0d position %0d twice", n, s, pos[q]));
          seen[pos[q]] = 1'b1;
          check(addr[q] == waddr_t'(pos[q] >> 2), "bank address");
          check((pos[q] & ~field_mask(n, s)) == (pos[0] & ~field_mask(n, s)),
                "operands differ outside the stage field");
          for (int r = 0; r < q; r++) check(bank[q] != bank[r], "bank conflict");
        end
        check(last == (issued == N / 4 - 1), "last flag");
        issued++;
      end
      @(negedge clk);
      cycles++;
    end
    enable = 1'b1;
    check(issued == N / 4, $sformatf("n=%0d s=%0d issued %0d butterflies", n, s, issued));
    check(reads == bn_exp, $sformatf("n=%0d s=%0d %0d ROM reads, expected %0d", n, s, reads, bn_exp));
    if (!pause) check(cycles == N / 4, $sformatf("n=%0d s=%0d took %0d cycles", n, s, cycles));
    else        check(cycles > N / 4, "pause did not stretch the stage");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 4; n <= 12; n++)
      for (int s = 0; s < (n + 1) / 2; s++) run_stage(n, s, 1'b0);
    run_stage(6, 1, 1'b1);
    run_stage(7, 0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
