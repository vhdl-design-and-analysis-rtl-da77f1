// tb_column_filter: checks one column filter stage (alpha/beta constants)
// on a 4-column image of 10 rows (5 scans), then on a second image of 2 rows
// (a single scan, first and last at once). Each column is a lifting line;
// the expected outputs come from an integer model of the flipped lifting
// pair in its textbook flipped form, written here with plain multiplication
// (the design uses the merged form with CE + 1 on the even node):
//   po = round(CO*o), pe = round(CE*e)    (12 fraction bits)
//   hi(n) = po(n) + e(n) + e(n+1),  e(M) = e(M-1)
//   lo(n) = pe(n) + hi(n-1) + hi(n), hi(-1) = hi(0)
// Outputs are matched by their position tag. Also checked: the first and
// last flags, the three-cycle latency from the pair that completes an
// output, two flush scans of which the second must be passed on as tokens,
// and random idle cycles.
module tb_column_filter;
  import dwt_pkg::*;

  localparam int IW = 4;           // image width = lines
  localparam int AUXW = 8;         // {m[3:0], j[3:0]}

  logic clk = 0, rst_n;
  logic in_valid, in_flush, in_first, in_last;
  logic signed [31:0] in_e, in_o;
  logic [AUXW-1:0] in_aux;
  logic out_valid, out_flush, out_first, out_last;
  logic signed [31:0] out_lo, out_hi;
  logic [AUXW-1:0] out_aux;

  column_filter #(.IMG_W(IW), .STAGE(0), .AUXW(AUXW)) dut (.*);

  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int checks = 0, failures = 0;
  int xe [16][IW], xo [16][IW];    // per scan, per column
  longint exp_lo [16][IW], exp_hi [16][IW];
  int got [16][IW];
  int in_cycle [16][IW];
  int nscan;
  int tokens_out = 0;

  function automatic longint rnd12(longint x);
    return (x + 2048) >>> 12;
  endfunction

  function automatic void model(int ms);
    longint hi_prev;
    for (int j = 0; j < IW; j++)
      for (int n = 0; n < ms; n++) begin
        longint en, en1, h;
        en  = xe[n][j];
        en1 = (n + 1 < ms) ? xe[n+1][j] : xe[n][j];
        h   = rnd12(longint'(xo[n][j]) * C_ODD_1) + en + en1;
        exp_hi[n][j] = h;
        exp_lo[n][j] = rnd12(en * (longint'(C_EVEN_1) - 4096)) + ((n == 0) ? h : hi_prev) + h;
        hi_prev = h;
      end
  endfunction

  task automatic idle();
    @(negedge clk);
    in_valid = 0; in_flush = 0; in_first = 0; in_last = 0;
  endtask

  task automatic run_image(int ms);
    nscan = ms;
    foreach (got[i, k]) got[i][k] = 0;
    for (int n = 0; n < ms; n++)
      for (int j = 0; j < IW; j++) begin
        xe[n][j] = $urandom_range(0, 4000) - 2000;
        xo[n][j] = $urandom_range(0, 4000) - 2000;
      end
    model(ms);
    for (int n = 0; n < ms + 2; n++)
      for (int j = 0; j < IW; j++) begin
        while ($urandom_range(0, 3) == 0) idle();
        @(negedge clk);
        in_valid = 1;
        in_flush = (n >= ms);
        in_first = (n == 0);
        in_last  = (n == ms - 1);
        in_e = (n < ms) ? xe[n][j] : $urandom;
        in_o = (n < ms) ? xo[n][j] : $urandom;
        in_aux = {4'(n), 4'(j)};
        if (n > 0) in_cycle[n-1][j] = cycle;
      end
    repeat (6) idle();
    for (int n = 0; n < ms; n++)
      for (int j = 0; j < IW; j++) begin
        checks++;
        if (got[n][j] != 1) begin
          failures++;
          $display("FAIL scan %0d column %0d delivered %0d times", n, j, got[n][j]);
        end
      end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    if (out_flush) tokens_out++;
    else begin
      int n, j;
      n = int'(out_aux[7:4]);
      j = int'(out_aux[3:0]);
      got[n][j]++;
      checks++;
      if (out_lo != 32'(exp_lo[n][j]) || out_hi != 32'(exp_hi[n][j])) begin
        failures++;
        $display("FAIL scan %0d col %0d: lo %0d/%0d hi %0d/%0d", n, j,
                 out_lo, exp_lo[n][j], out_hi, exp_hi[n][j]);
      end
      checks++;
      if (out_first != (n == 0) || out_last != (n == nscan - 1)) begin
        failures++;
        $display("FAIL flags at scan %0d col %0d", n, j);
      end
      checks++;
      if (cycle - in_cycle[n][j] != 3) begin
        failures++;
        $display("FAIL latency %0d at scan %0d col %0d", cycle - in_cycle[n][j], n, j);
      end
    end
  end

  initial begin
    rst_n = 0;
    in_valid = 0; in_flush = 0; in_first = 0; in_last = 0;
    in_e = 0; in_o = 0; in_aux = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run_image(5);
    run_image(1);
    checks++;
    if (tokens_out != 2 * IW) begin
      failures++;
      $display("FAIL %0d flush tokens passed on, expected %0d", tokens_out, 2 * IW);
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
