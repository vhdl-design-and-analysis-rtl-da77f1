// tb_row_filter: checks one row filter stage (gamma/delta constants) on two
// interleaved rows, as the transposing buffer delivers them: the pairs of
// the column-low row (line 0) and of the column-high row (line 1) alternate.
// First rows of 6 pairs, then rows of a single pair (first and last at
// once). Expected outputs come from an integer model of the flipped lifting
// pair in its textbook flipped form, written here with plain multiplication
// (the design uses the merged form with CE + 1 on the even node):
//   po = round(CO*o), pe = round(CE*e)    (12 fraction bits)
//   hi(n) = po(n) + e(n) + e(n+1),  e(M) = e(M-1)
//   lo(n) = pe(n) + hi(n-1) + hi(n), hi(-1) = hi(0)
// Also checked: first/last flags, the three-cycle latency, and that of the
// four flush tokens after each row pair two close the rows and two are
// passed on.
module tb_row_filter;
  import dwt_pkg::*;

  localparam int AUXW = 5;         // {line, n[3:0]}

  logic clk = 0, rst_n;
  logic in_valid, in_flush, in_first, in_last;
  logic signed [31:0] in_e, in_o;
  logic [AUXW-1:0] in_aux;
  logic out_valid, out_flush, out_first, out_last;
  logic signed [31:0] out_lo, out_hi;
  logic [AUXW-1:0] out_aux;

  row_filter #(.STAGE(1), .AUXW(AUXW)) dut (.*);

  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int checks = 0, failures = 0;
  int xe [2][16], xo [2][16];
  longint exp_lo [2][16], exp_hi [2][16];
  int got [2][16];
  int in_cycle [2][16];
  int npairs;
  int tokens_out = 0;

  function automatic longint rnd12(longint x);
    return (x + 2048) >>> 12;
  endfunction

  function automatic void model(int ms);
    longint hi_prev;
    for (int b = 0; b < 2; b++)
      for (int n = 0; n < ms; n++) begin
        longint en, en1, h;
        en  = xe[b][n];
        en1 = (n + 1 < ms) ? xe[b][n+1] : xe[b][n];
        h   = rnd12(longint'(xo[b][n]) * C_ODD_2) + en + en1;
        exp_hi[b][n] = h;
        exp_lo[b][n] = rnd12(en * (longint'(C_EVEN_2) - 4096)) + ((n == 0) ? h : hi_prev) + h;
        hi_prev = h;
      end
  endfunction

  task automatic idle();
    @(negedge clk);
    in_valid = 0; in_flush = 0; in_first = 0; in_last = 0;
  endtask

  task automatic run_rows(int ms);
    npairs = ms;
    foreach (got[i, k]) got[i][k] = 0;
    for (int b = 0; b < 2; b++)
      for (int n = 0; n < ms; n++) begin
        xe[b][n] = $urandom_range(0, 40000) - 20000;
        xo[b][n] = $urandom_range(0, 40000) - 20000;
      end
    model(ms);
    for (int n = 0; n < ms + 2; n++)
      for (int b = 0; b < 2; b++) begin
        if ($urandom_range(0, 3) == 0) idle();
        @(negedge clk);
        in_valid = 1;
        in_flush = (n >= ms);
        in_first = (n == 0);
        in_last  = (n == ms - 1);
        in_e = (n < ms) ? xe[b][n] : $urandom;
        in_o = (n < ms) ? xo[b][n] : $urandom;
        in_aux = {1'(b), 4'(n)};
        if (n > 0) in_cycle[b][n-1] = cycle;
      end
    repeat (6) idle();
    for (int b = 0; b < 2; b++)
      for (int n = 0; n < ms; n++) begin
        checks++;
        if (got[b][n] != 1) begin
          failures++;
          $display("FAIL line %0d pair %0d delivered %0d times", b, n, got[b][n]);
        end
      end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    if (out_flush) tokens_out++;
    else begin
      int n, b;
      b = int'(out_aux[4]);
      n = int'(out_aux[3:0]);
      got[b][n]++;
      checks++;
      if (out_lo != 32'(exp_lo[b][n]) || out_hi != 32'(exp_hi[b][n])) begin
        failures++;
        $display("FAIL line %0d pair %0d: lo %0d/%0d hi %0d/%0d", b, n,
                 out_lo, exp_lo[b][n], out_hi, exp_hi[b][n]);
      end
      checks++;
      if (out_first != (n == 0) || out_last != (n == npairs - 1)) begin
        failures++;
        $display("FAIL flags at line %0d pair %0d", b, n);
      end
      checks++;
      if (cycle - in_cycle[b][n] != 3) begin
        failures++;
        $display("FAIL latency %0d at line %0d pair %0d", cycle - in_cycle[b][n], b, n);
      end
    end
  end

  initial begin
    rst_n = 0;
    in_valid = 0; in_flush = 0; in_first = 0; in_last = 0;
    in_e = 0; in_o = 0; in_aux = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run_rows(6);
    run_rows(1);
    run_rows(3);
    checks++;
    if (tokens_out != 3 * 2) begin
      failures++;
      $display("FAIL %0d flush tokens passed on, expected 6", tokens_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
