// tb_input_unit: checks the input unit on 4 x 6 frames with GAP = 3.
// Every output step is compared, in order, with the expected stream: the
// accepted pixel pairs with their {m, j} tag and first/last flags, then two
// scans of flush tokens per frame. With pixels always offered (first frame)
// the pix_ready low periods must be GAP cycles after each scan and
// GAP + 2*(W + GAP) after the last one, and the next frame must start
// (H/2 + 2)*(W + GAP) cycles after the first. The second frame is offered
// with random idle cycles.
module tb_input_unit;
  localparam int W = 4, H = 6, GAP = 3;

  logic clk = 0, rst_n;
  logic pix_valid, pix_ready;
  logic [7:0] pix_e, pix_o;
  logic out_valid, out_flush, out_first, out_last;
  logic signed [31:0] out_e, out_o;
  logic [3:0] out_aux;   // {m[1:0], j[1:0]}

  input_unit #(.IMG_W(W), .IMG_H(H), .GAP(GAP), .NFLUSH(2)) dut (.*);

  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int checks = 0, failures = 0;

  typedef struct { bit flush, first, last; int e, o, m, j; } rec_t;
  rec_t expq [$];

  // Expected stream.
  task automatic push_frame_tokens();
    for (int s = 0; s < 2; s++)
      for (int j = 0; j < W; j++) expq.push_back('{1, 0, 0, 0, 0, H/2 - 1, j});
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    rec_t r;
    checks++;
    if (expq.size() == 0) begin
      failures++;
      $display("FAIL unexpected output");
    end else begin
      r = expq.pop_front();
      if (out_flush != r.flush || out_aux != {2'(r.m), 2'(r.j)} ||
          (!r.flush && (out_first != r.first || out_last != r.last ||
                        out_e != r.e || out_o != r.o))) begin
        failures++;
        $display("FAIL step: flush %0d/%0d aux %h/m%0d j%0d e %0d/%0d", out_flush, r.flush,
                 out_aux, r.m, r.j, out_e, r.e);
      end
    end
  end

  // Ready-low run lengths.
  int low_run = 0;
  int runs [$];
  always @(posedge clk) if (rst_n) begin
    if (!pix_ready) low_run++;
    else if (low_run != 0) begin
      runs.push_back(low_run);
      low_run = 0;
    end
  end

  int start_cycle [2];

  initial begin
    rst_n = 0; pix_valid = 0; pix_e = 0; pix_o = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int m = 0; m < H / 2; m++)
        for (int j = 0; j < W; j++) begin
          @(negedge clk);
          while (f == 1 && $urandom_range(0, 2) == 0) begin
            pix_valid = 0;
            @(negedge clk);
          end
          pix_valid = 1;
          pix_e = 8'($urandom);
          pix_o = 8'($urandom);
          @(posedge clk);
          while (!pix_ready) @(posedge clk);
          if (m == 0 && j == 0) start_cycle[f] = cycle;
          expq.push_back('{0, m == 0, m == H/2 - 1, int'(pix_e), int'(pix_o), m, j});
        end
      push_frame_tokens();
      @(negedge clk) pix_valid = 0;
    end
    repeat (2 * (W + GAP) + GAP + 4) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d expected steps never came", expq.size());
    end
    checks++;
    if (start_cycle[1] - start_cycle[0] != (H / 2 + 2) * (W + GAP)) begin
      failures++;
      $display("FAIL frame period %0d", start_cycle[1] - start_cycle[0]);
    end
    for (int i = 0; i < H / 2; i++) begin
      int want;
      want = (i < H / 2 - 1) ? GAP : GAP + 2 * (W + GAP);
      checks++;
      if (runs[i] != want) begin
        failures++;
        $display("FAIL ready low for %0d cycles after scan %0d, expected %0d", runs[i], i, want);
      end
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
