// tb_scalable_mult -- checks the 16x16 and 8x8 modes of scalable_mult
// against the plain product of the operands, on corner and random values.
module tb_scalable_mult;
  logic mode8;
  logic signed [15:0] a, b;
  logic signed [31:0] p;
  int checks = 0, failures = 0;

  scalable_mult dut (.mode8, .a, .b, .p);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input bit m8, input int va, input int vb);
    longint expv;
    mode8 = m8; a = 16'(va); b = 16'(vb);
    #1;
    if (m8) expv = longint'(int'(signed'(8'(va))) * int'(signed'(8'(vb)))) * 65536;
    else    expv = longint'(int'(signed'(16'(va)))) * longint'(int'(signed'(16'(vb))));
    checks++;
    if (longint'(p) != expv) begin
      failures++;
      $display("FAIL mode8=%0d a=%0d b=%0d p=%0d expected %0d", m8, a, b, p, expv);
    end
  endtask

  initial begin
    int corners [6] = '{0, 1, -1, 32767, -32768, 255};
    foreach (corners[i]) foreach (corners[j]) begin
      try(1'b0, corners[i], corners[j]);
      try(1'b1, corners[i], corners[j]);
    end
    try(1'b1, -128, -128);
    try(1'b1, 127, -128);
    for (int i = 0; i < 2000; i++) try(i[0], int'($urandom), int'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
