// tb_booth_r8_mult: checks the radix-8 Booth multiplier against the
// simulator's own signed multiplication, for the default 32 x 18 size and
// for a 12 x 16 instance whose multiplier width is not a multiple of 3.
// Corner operands (most negative, most positive, 0, +-1, values that give
// every Booth digit) come first, then random operands.
module tb_booth_r8_mult;
  logic signed [31:0] a;
  logic signed [17:0] b;
  logic signed [49:0] p;
  logic signed [11:0] a2;
  logic signed [15:0] b2;
  logic signed [27:0] p2;

  booth_r8_mult dut (.a(a), .b(b), .p(p));
  booth_r8_mult #(.AW(12), .BW(16)) dut2 (.a(a2), .b(b2), .p(p2));

  int checks = 0, failures = 0;

  task automatic try(logic signed [31:0] x, logic signed [17:0] y);
    longint expv;
    a = x; b = y;
    a2 = x[11:0]; b2 = y[15:0];
    #1;
    expv = longint'(x) * longint'(y);
    checks++;
    if (p !== 50'(expv)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d = %0d, got %0d", x, y, expv, p);
    end
    expv = longint'(a2) * longint'(b2);
    checks++;
    if (p2 !== 28'(expv)) begin
      failures++;
      if (failures < 10) $display("FAIL (12x16) %0d * %0d = %0d, got %0d", a2, b2, expv, p2);
    end
  endtask

  initial begin
    logic signed [31:0] av [6] = '{32'sh8000_0000, 32'sh7fff_ffff, 0, 1, -1, 12345};
    logic signed [17:0] bv [9] = '{18'sh20000, 18'sh1ffff, 0, 1, -1, 18'sh0_7777, -18'sd2582, 18'sd48742, -18'sd87565};
    foreach (av[i]) foreach (bv[k]) try(av[i], bv[k]);
    // Every digit value in every position: b = d * 8^i.
    for (int i = 0; i < 6; i++)
      for (int d = -4; d <= 3; d++) try(32'sd1000003, 18'(d * (8 ** i)));
    repeat (4000) try($urandom, 18'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
