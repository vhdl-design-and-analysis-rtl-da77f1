// dwt2d_top: one level of the two-dimensional 9/7 discrete wavelet
// transform of an IMG_W x IMG_H image, two pixels in and two coefficients
// out per cycle.
//
// Chain: input_unit -> column_filter (alpha/beta) -> column_filter
// (gamma/delta) -> transposing_buffer -> row_filter (alpha/beta) ->
// row_filter (gamma/delta) -> scaling_unit. The column filters work on two
// rows at once (rows 2m and 2m+1, one column per cycle) and keep one state
// word per image column; the transposing buffer regroups their output into
// pairs of horizontally adjacent samples; the row filters process the
// column-low and the column-high row of each scan interleaved; the scaling
// unit removes the flipping factors and normalises.
//
// Input: pix_e = x(2m, j), pix_o = x(2m+1, j), 8-bit unsigned, in order of
// j within m; valid/ready handshake. Output per valid cycle: row m and column
// k of the subbands, out_band 0 -> out_lo = LL(m,k), out_hi = HL(m,k);
// out_band 1 -> out_lo = LH(m,k), out_hi = HH(m,k) (first letter: horizontal
// band, second: vertical; HL = high-pass along rows, low-pass along columns).
// Both bands of a row of pairs come out interleaved. Subband row m appears
// about two scans after input row pair m+1; a full frame takes
// (IMG_H/2 + 2) * (IMG_W + GAP) cycles with pixels always available.
// Symmetric extension is used at all four image borders. IMG_W must be even
// and at least 4, IMG_H even and at least 2, and GAP at least 4: the
// transposing buffer needs four idle cycles after each scan to send the row
// filters their flush tokens (checked at elaboration and by assertions).
module dwt2d_top
  import dwt_pkg::*;
#(
  parameter int unsigned IMG_W = 256,
  parameter int unsigned IMG_H = 256,
  parameter int unsigned GAP   = 4,
  localparam int unsigned JW   = (IMG_W > 1) ? $clog2(IMG_W) : 1,
  localparam int unsigned KW   = (IMG_W > 2) ? $clog2(IMG_W / 2) : 1,
  localparam int unsigned MW   = (IMG_H > 2) ? $clog2(IMG_H / 2) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    pix_valid,
  output logic                    pix_ready,
  input  logic [PIX_W-1:0]        pix_e,
  input  logic [PIX_W-1:0]        pix_o,
  output logic                    out_valid,
  output logic                    out_band,
  output logic [MW-1:0]           out_row,
  output logic [KW-1:0]           out_col,
  output logic signed [OUT_W-1:0] out_lo,
  output logic signed [OUT_W-1:0] out_hi
);

  if (IMG_W < 4 || IMG_W % 2 != 0 || IMG_H < 2 || IMG_H % 2 != 0 || GAP < 4) begin : g_bad_size
    $error("dwt2d_top: IMG_W must be even and >= 4, IMG_H even and >= 2, GAP >= 4");
  end

  localparam int unsigned CAW = MW + JW;       // column tag {m, j}
  localparam int unsigned RAW = 1 + MW + KW;   // row tag {band, m, k}

  // One stream between two units.
  typedef struct packed {
    logic valid, flush, first, last;
  } ctl_t;

  ctl_t                     s0, s1, s2, s3, s4, s5;
  logic signed [DATA_W-1:0] e0, o0, lo1, hi1, lo2, hi2, e3, o3, lo4, hi4, lo5, hi5;
  logic [CAW-1:0]           a0, a1, a2;
  logic [RAW-1:0]           a3, a4, a5, a6;

  input_unit #(.IMG_W(IMG_W), .IMG_H(IMG_H), .GAP(GAP), .NFLUSH(2)) u_in (
    .clk, .rst_n,
    .pix_valid, .pix_ready, .pix_e, .pix_o,
    .out_valid (s0.valid), .out_flush (s0.flush), .out_first (s0.first), .out_last (s0.last),
    .out_e (e0), .out_o (o0), .out_aux (a0)
  );

  column_filter #(.IMG_W(IMG_W), .STAGE(0), .AUXW(CAW)) u_col1 (
    .clk, .rst_n,
    .in_valid (s0.valid), .in_flush (s0.flush), .in_first (s0.first), .in_last (s0.last),
    .in_e (e0), .in_o (o0), .in_aux (a0),
    .out_valid (s1.valid), .out_flush (s1.flush), .out_first (s1.first), .out_last (s1.last),
    .out_lo (lo1), .out_hi (hi1), .out_aux (a1)
  );

  column_filter #(.IMG_W(IMG_W), .STAGE(1), .AUXW(CAW)) u_col2 (
    .clk, .rst_n,
    .in_valid (s1.valid), .in_flush (s1.flush), .in_first (s1.first), .in_last (s1.last),
    .in_e (lo1), .in_o (hi1), .in_aux (a1),
    .out_valid (s2.valid), .out_flush (s2.flush), .out_first (s2.first), .out_last (s2.last),
    .out_lo (lo2), .out_hi (hi2), .out_aux (a2)
  );

  transposing_buffer #(.IMG_W(IMG_W), .IMG_H(IMG_H), .NTOK(4)) u_tbuf (
    .clk, .rst_n,
    .in_valid (s2.valid), .in_flush (s2.flush), .in_lo (lo2), .in_hi (hi2), .in_aux (a2),
    .out_valid (s3.valid), .out_flush (s3.flush), .out_first (s3.first), .out_last (s3.last),
    .out_e (e3), .out_o (o3), .out_aux (a3)
  );

  row_filter #(.STAGE(0), .AUXW(RAW)) u_row1 (
    .clk, .rst_n,
    .in_valid (s3.valid), .in_flush (s3.flush), .in_first (s3.first), .in_last (s3.last),
    .in_e (e3), .in_o (o3), .in_aux (a3),
    .out_valid (s4.valid), .out_flush (s4.flush), .out_first (s4.first), .out_last (s4.last),
    .out_lo (lo4), .out_hi (hi4), .out_aux (a4)
  );

  row_filter #(.STAGE(1), .AUXW(RAW)) u_row2 (
    .clk, .rst_n,
    .in_valid (s4.valid), .in_flush (s4.flush), .in_first (s4.first), .in_last (s4.last),
    .in_e (lo4), .in_o (hi4), .in_aux (a4),
    .out_valid (s5.valid), .out_flush (s5.flush), .out_first (s5.first), .out_last (s5.last),
    .out_lo (lo5), .out_hi (hi5), .out_aux (a5)
  );

  scaling_unit #(.AUXW(RAW)) u_scale (
    .clk, .rst_n,
    .in_valid (s5.valid), .in_flush (s5.flush), .in_lo (lo5), .in_hi (hi5), .in_aux (a5),
    .out_valid, .out_lo, .out_hi, .out_aux (a6)
  );

  assign {out_band, out_row, out_col} = a6;

endmodule
