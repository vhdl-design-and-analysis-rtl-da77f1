// row_filter: one lifting pair of the horizontal (row) 9/7 transform.
//
// The transposing buffer delivers two horizontally adjacent samples
// (columns 2k and 2k+1) of one row per step, alternating between the row of
// column-low samples and the row of column-high samples of the same scan.
// These two rows are the filter's two lifting lines, so its state buffer has
// two words. STAGE 0 is the alpha/beta lifting pair, STAGE 1 the
// gamma/delta pair; two instances in series form the row transform.
//
// Timing: output for pair k of a row appears three cycles after pair k+1
// enters; a row is closed by one flush token per line (two per row pair,
// four for the two-stage chain). See lifting_filter for the step protocol.
// The buffer, Booth multipliers, adders and registers follow the row filter
// unit of the architecture; number formats and the flush protocol are
// choices of this design.
module row_filter
  import dwt_pkg::*;
#(
  parameter int unsigned STAGE = 0,
  parameter int unsigned DW    = DATA_W,
  parameter int unsigned AUXW  = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_flush,
  input  logic                 in_first,
  input  logic                 in_last,
  input  logic signed [DW-1:0] in_e,      // column 2k
  input  logic signed [DW-1:0] in_o,      // column 2k+1
  input  logic [AUXW-1:0]      in_aux,
  output logic                 out_valid,
  output logic                 out_flush,
  output logic                 out_first,
  output logic                 out_last,
  output logic signed [DW-1:0] out_lo,
  output logic signed [DW-1:0] out_hi,
  output logic [AUXW-1:0]      out_aux
);

  lifting_filter #(
    .DW    (DW),
    .CW    (COEF_W),
    .CF    (COEF_F),
    .CO    (odd_coef(STAGE)),
    .CE    (even_coef(STAGE)),
    .DEPTH (2),
    .AUXW  (AUXW)
  ) u_lift (
    .clk, .rst_n,
    .in_valid, .in_flush, .in_first, .in_last, .in_e, .in_o, .in_aux,
    .out_valid, .out_flush, .out_first, .out_last, .out_lo, .out_hi, .out_aux
  );

endmodule
