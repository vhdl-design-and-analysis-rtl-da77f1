// dwt2d_tb_body.svh: shared body of the end-to-end testbenches of
// dwt2d_top. The including module declares localparams W, H, GAP and
// NFRAMES and instantiates the design as "dut" with the signals below.
//
// Frames of W x H pixels are generated (a gradient plus noise, then pure
// noise, then a constant), streamed in, and every output coefficient is
// compared with a floating-point 9/7 lifting transform with symmetric
// extension and JPEG 2000 scaling (low-pass 1/K, high-pass K/2), computed
// here. A coefficient passes if it is within 1 of the rounded reference.
// Also checked: every subband position arrives exactly once per frame, the
// input accepts one pixel pair per ready cycle, frames start
// (H/2 + 2) * (W + GAP) cycles apart when pixels are always offered, and
// each mechanism (column and row flush, token pass-through, left/top border
// mirroring, input wait, both output bands) happens at least once.

  import dwt_pkg::*;

  localparam real ALPHA = -1.586134342059924;
  localparam real BETA  = -0.052980118572961;
  localparam real GAMMA =  0.882911075530934;
  localparam real DELTA =  0.443506852043971;
  localparam real KNORM =  1.230174104914001;
  localparam int  MW    = (H > 2) ? $clog2(H / 2) : 1;
  localparam int  KW    = (W > 2) ? $clog2(W / 2) : 1;

  logic                    clk = 1'b0;
  logic                    rst_n;
  logic                    pix_valid;
  logic                    pix_ready;
  logic [7:0]              pix_e, pix_o;
  logic                    out_valid;
  logic                    out_band;
  logic [MW-1:0]           out_row;
  logic [KW-1:0]           out_col;
  logic signed [OUT_W-1:0] out_lo, out_hi;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Images and references, one per frame.
  int  img  [NFRAMES][H][W];
  real ref_c[NFRAMES][H][W];
  bit  seen [NFRAMES][H][W];

  function automatic void lift_1d(ref real v[], input int n);
    for (int i = 1; i < n; i += 2) v[i] += ALPHA * (v[i-1] + ((i+1 < n) ? v[i+1] : v[i-1]));
    for (int i = 0; i < n; i += 2) v[i] += BETA  * (((i > 0) ? v[i-1] : v[i+1]) + ((i+1 < n) ? v[i+1] : v[i-1]));
    for (int i = 1; i < n; i += 2) v[i] += GAMMA * (v[i-1] + ((i+1 < n) ? v[i+1] : v[i-1]));
    for (int i = 0; i < n; i += 2) v[i] += DELTA * (((i > 0) ? v[i-1] : v[i+1]) + ((i+1 < n) ? v[i+1] : v[i-1]));
    for (int i = 0; i < n; i++) v[i] = (i % 2 == 0) ? v[i] / KNORM : v[i] * KNORM / 2.0;
  endfunction

  function automatic void make_frame(int f);
    real v[];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        case (f % 3)
          0: img[f][y][x] = (x * 7 + y * 3 + int'($urandom_range(0, 40))) % 256;
          1: img[f][y][x] = int'($urandom_range(0, 255));
          default: img[f][y][x] = 200;
        endcase
        ref_c[f][y][x] = real'(img[f][y][x]);
        seen[f][y][x] = 1'b0;
      end
    v = new[H];
    for (int x = 0; x < W; x++) begin
      for (int y = 0; y < H; y++) v[y] = ref_c[f][y][x];
      lift_1d(v, H);
      for (int y = 0; y < H; y++) ref_c[f][y][x] = v[y];
    end
    v = new[W];
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) v[x] = ref_c[f][y][x];
      lift_1d(v, W);
      for (int x = 0; x < W; x++) ref_c[f][y][x] = v[x];
    end
  endfunction

  function automatic void check_coef(int f, int y, int x, int got, string name);
    int expv;
    real r;
    r = ref_c[f][y][x];
    expv = (r >= 0.0) ? int'($floor(r + 0.5)) : -int'($floor(-r + 0.5));
    checks++;
    if (seen[f][y][x]) begin
      failures++;
      $display("FAIL frame %0d %s(%0d,%0d) delivered twice", f, name, y/2, x/2);
    end
    seen[f][y][x] = 1'b1;
    if (got > expv + 1 || got < expv - 1) begin
      failures++;
      if (failures < 20)
        $display("FAIL frame %0d %s(row %0d, col %0d): got %0d, expected %0d (%f)",
                 f, name, y/2, x/2, got, expv, r);
    end
  endfunction

  // ---------------- stimulus ----------------
  int accept_cycle[NFRAMES];
  int accepted = 0;
  int wait_cycles = 0;
  bit stimulus_done = 1'b0;
  bit random_idle = 1'b0;

  initial begin
    rst_n = 1'b0;
    pix_valid = 1'b0;
    pix_e = '0;
    pix_o = '0;
    for (int f = 0; f < NFRAMES; f++) make_frame(f);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < NFRAMES; f++) begin
      random_idle = (f == NFRAMES - 1) && (NFRAMES > 1);
      for (int m = 0; m < H / 2; m++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          while (random_idle && $urandom_range(0, 7) == 0) begin
            pix_valid = 1'b0;
            @(negedge clk);
          end
          pix_valid = 1'b1;
          pix_e = 8'(img[f][2*m][x]);
          pix_o = 8'(img[f][2*m+1][x]);
          @(posedge clk);
          while (!pix_ready) begin
            wait_cycles++;
            @(posedge clk);
          end
          if (m == 0 && x == 0) accept_cycle[f] = cycle;
          accepted++;
        end
      @(negedge clk) pix_valid = 1'b0;
    end
    stimulus_done = 1'b1;
  end

  // ---------------- output checking ----------------
  int out_frame = 0;
  int out_count = 0;
  int band_cnt[2] = '{0, 0};

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int y0;
      y0 = 2 * int'(out_row) + int'(out_band);
      if (out_frame < NFRAMES) begin
        check_coef(out_frame, y0, 2 * int'(out_col),     int'(out_lo), out_band ? "LH" : "LL");
        check_coef(out_frame, y0, 2 * int'(out_col) + 1, int'(out_hi), out_band ? "HH" : "HL");
      end else begin
        failures++;
        $display("FAIL output beyond the last frame");
      end
      band_cnt[out_band]++;
      out_count++;
      if (out_count == W * H / 2) begin
        out_count = 0;
        out_frame++;
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_col_flush = 0, n_row_flush = 0, n_pass = 0, n_col_first = 0, n_row_first = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_col1.u_lift.do_flush || dut.u_col2.u_lift.do_flush) n_col_flush++;
    if (dut.u_row1.u_lift.do_flush || dut.u_row2.u_lift.do_flush) n_row_flush++;
    if (dut.u_col1.u_lift.do_pass  || dut.u_row1.u_lift.do_pass)  n_pass++;
    if (dut.u_col1.out_valid && dut.u_col1.out_first) n_col_first++;
    if (dut.u_row1.out_valid && dut.u_row1.out_first) n_row_first++;
  end

  task automatic need(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else
      $display("  %-34s %0d", what, count);
  endtask

  task automatic finish_report();
    // All positions of all frames delivered.
    for (int f = 0; f < NFRAMES; f++) begin
      int missing = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) if (!seen[f][y][x]) missing++;
      checks++;
      if (missing != 0) begin
        failures++;
        $display("FAIL frame %0d: %0d coefficients never delivered", f, missing);
      end
    end
    // Throughput: two pixels per cycle and the frame period.
    checks++;
    if (accepted != NFRAMES * W * H / 2) begin
      failures++;
      $display("FAIL accepted %0d pixel pairs", accepted);
    end
    if (NFRAMES > 1) begin
      checks++;
      if (accept_cycle[1] - accept_cycle[0] != (H / 2 + 2) * (W + GAP)) begin
        failures++;
        $display("FAIL frame period %0d cycles, expected %0d",
                 accept_cycle[1] - accept_cycle[0], (H / 2 + 2) * (W + GAP));
      end
    end
    $display("Mechanisms:");
    need("column flush steps", n_col_flush);
    need("row flush steps", n_row_flush);
    need("flush tokens passed on", n_pass);
    need("column top-border outputs", n_col_first);
    need("row left-border outputs", n_row_first);
    need("input wait cycles", wait_cycles);
    need("LL/HL output steps", band_cnt[0]);
    need("LH/HH output steps", band_cnt[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    wait (stimulus_done && out_frame == NFRAMES);
    repeat (10) @(posedge clk);
    finish_report();
  end

  // Watchdog.
  initial begin
    repeat (NFRAMES * (H / 2 + 4) * (W + GAP) * 2 + 2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d of %0d frames out", out_frame, NFRAMES);
    finish_report();
  end
