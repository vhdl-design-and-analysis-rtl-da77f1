// tb_transposing_buffer: feeds column-order samples (L(j), H(j) of column j
// per cycle) of an 8-wide image, three scans, with idle cycles and
// column-side flush tokens in between, and checks the row-order output in
// sequence: for each column pair k the low row pair (L(2k), L(2k+1)) and,
// on the next cycle, the high row pair (H(2k), H(2k+1)), with tags
// {band, m, k} and first/last flags; after the last pair of a scan, four
// flush tokens on consecutive cycles. The low pair must leave one cycle
// after the odd column enters. Column tokens must not come out.
module tb_transposing_buffer;
  localparam int W = 8, H = 8;   // MW = 2, KW = 2, JW = 3

  logic clk = 0, rst_n;
  logic in_valid, in_flush;
  logic signed [31:0] in_lo, in_hi;
  logic [4:0] in_aux;            // {m[1:0], j[2:0]}
  logic out_valid, out_flush, out_first, out_last;
  logic signed [31:0] out_e, out_o;
  logic [4:0] out_aux;           // {band, m[1:0], k[1:0]}

  transposing_buffer #(.IMG_W(W), .IMG_H(H), .NTOK(4)) dut (.*);

  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int checks = 0, failures = 0;

  typedef struct { bit flush, first, last; int e, o, band, m, k, due; } rec_t;
  rec_t expq [$];
  int last_out_cycle = 0;
  bit prev_was_lowpair = 0, prev_was_tail = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    rec_t r;
    checks++;
    if (expq.size() == 0) begin
      failures++;
      $display("FAIL unexpected output");
    end else begin
      r = expq.pop_front();
      if (out_flush != r.flush ||
          (!r.flush && (out_aux != {1'(r.band), 2'(r.m), 2'(r.k)} || out_first != r.first ||
                        out_last != r.last || out_e != r.e || out_o != r.o))) begin
        failures++;
        $display("FAIL step flush %0d/%0d aux %h band %0d m %0d k %0d", out_flush, r.flush,
                 out_aux, r.band, r.m, r.k);
      end
      // Timing: low pairs one cycle after the odd column, everything else
      // right after the previous output.
      checks++;
      if ((r.due != 0 && cycle != r.due) || (r.due == 0 && cycle != last_out_cycle + 1)) begin
        failures++;
        $display("FAIL output at cycle %0d (previous %0d, due %0d)", cycle, last_out_cycle, r.due);
      end
    end
    last_out_cycle = cycle;
  end

  initial begin
    int lo [W], hi [W];
    rst_n = 0; in_valid = 0; in_flush = 0; in_lo = 0; in_hi = 0; in_aux = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int m = 0; m < 3; m++) begin
      for (int j = 0; j < W; j++) begin
        lo[j] = $urandom; hi[j] = $urandom;
        @(negedge clk);
        in_valid = 1; in_flush = 0; in_lo = lo[j]; in_hi = hi[j]; in_aux = {2'(m), 3'(j)};
        if (j % 2 == 1) begin
          expq.push_back('{0, j == 1, j == W - 1, lo[j-1], lo[j], 0, m, j / 2, cycle + 1});
          expq.push_back('{0, j == 1, j == W - 1, hi[j-1], hi[j], 1, m, j / 2, 0});
        end
      end
      for (int t = 0; t < 4; t++) expq.push_back('{1, 0, 0, 0, 0, 0, 0, 0, 0});
      // Idle gap, with one column-side token that must be dropped.
      @(negedge clk) in_valid = 0;
      @(negedge clk) begin in_valid = 1; in_flush = 1; end
      @(negedge clk) begin in_valid = 0; in_flush = 0; end
      repeat (2 + m) @(negedge clk);
    end
    repeat (10) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d expected outputs missing", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
