// tb_scaling_unit: drives random flipped-domain samples of both bands
// (and a few large ones that must saturate) into the scaling unit and
// compares each output with round(x * S / 2^24), saturated to 16 bits,
// where S is the subband constant (band 0: LL and HL, band 1: LH and HH)
// given here as the real-valued factor it encodes. Also checks the
// one-cycle latency, that the tag follows the data and that flush tokens
// produce no output.
module tb_scaling_unit;
  localparam int AUXW = 9;        // {band, m[3:0], k[3:0]}

  logic clk = 0, rst_n;
  logic in_valid, in_flush;
  logic signed [31:0] in_lo, in_hi;
  logic [AUXW-1:0] in_aux;
  logic out_valid;
  logic signed [15:0] out_lo, out_hi;
  logic [AUXW-1:0] out_aux;

  scaling_unit #(.AUXW(AUXW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Real-valued factors (alpha..delta, K of the 9/7 lifting scheme).
  localparam real FL = 0.0267488;   // alpha*beta*gamma*delta / K
  localparam real FH = 0.0456360;   // alpha*beta*gamma * K / 2

  function automatic real rabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic int expect_val(longint x, int s);
    longint t;
    t = (x * s + (longint'(1) << 23)) >>> 24;
    if (t > 32767) t = 32767;
    if (t < -32768) t = -32768;
    return int'(t);
  endfunction

  initial begin
    int tokens_seen;
    rst_n = 0; in_valid = 0; in_flush = 0; in_lo = 0; in_hi = 0; in_aux = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // The integer constants must encode the factors.
    checks++;
    if (rabs(real'(dwt_pkg::S_LL) / 16777216.0 - FL * FL) > 1e-7 ||
        rabs(real'(dwt_pkg::S_LH) / 16777216.0 - FL * FH) > 1e-7 ||
        rabs(real'(dwt_pkg::S_HH) / 16777216.0 - FH * FH) > 1e-7) begin
      failures++;
      $display("FAIL scaling constants");
    end
    for (int i = 0; i < 600; i++) begin
      logic signed [31:0] a, b;
      bit band, tok;
      logic [7:0] pos;
      int s_lo, s_hi;
      a = (i < 8) ? ((i % 2) ? -32'sd60000000 : 32'sd60000000) : $urandom_range(0, 2000000) - 1000000;
      b = $urandom_range(0, 2000000) - 1000000;
      band = $urandom_range(0, 1);
      tok = ($urandom_range(0, 9) == 0);
      pos = 8'($urandom);
      @(negedge clk);
      in_valid = 1; in_flush = tok; in_lo = a; in_hi = b; in_aux = {band, pos};
      @(posedge clk); #1;
      s_lo = band ? dwt_pkg::S_LH : dwt_pkg::S_LL;
      s_hi = band ? dwt_pkg::S_HH : dwt_pkg::S_LH;
      checks++;
      if (tok) begin
        if (out_valid) begin
          failures++;
          $display("FAIL token produced an output");
        end
      end else if (!out_valid || out_aux != {band, pos} ||
                   out_lo != 16'(expect_val(a, s_lo)) || out_hi != 16'(expect_val(b, s_hi))) begin
        failures++;
        $display("FAIL band %0d: %0d -> %0d (exp %0d), %0d -> %0d (exp %0d)", band,
                 a, out_lo, expect_val(a, s_lo), b, out_hi, expect_val(b, s_hi));
      end
    end
    @(negedge clk) in_valid = 0;
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin
      failures++;
      $display("FAIL output without input");
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
