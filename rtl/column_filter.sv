// column_filter: one lifting pair of the vertical (column) 9/7 transform.
//
// The image enters two rows at a time: on each step the filter receives
// x(2m, j) and x(2m+1, j), the pixels of column j in rows 2m and 2m+1 (one
// "scan" covers all IMG_W columns of a row pair). Column j is one lifting
// line, so the filter keeps IMG_W lines of state in its RAM memory unit and
// visits them in column order. STAGE 0 is the alpha/beta lifting pair with
// constants 1/alpha and 1/(alpha*beta); STAGE 1 is the gamma/delta pair with
// 1/(beta*gamma) and 1/(gamma*delta). Two instances in series form the
// complete column transform.
//
// Timing: outputs for scan m appear during scan m+1 (three cycles after the
// input of the same column), so the first scan gives no output and the last
// scan is emitted on a scan of flush tokens. See lifting_filter for the step
// protocol. The state memory, the Booth multipliers, the adders and the
// pipeline registers follow the column filter unit of the architecture;
// number formats, the flush-token protocol and the position tag are choices
// of this design.
module column_filter
  import dwt_pkg::*;
#(
  parameter int unsigned IMG_W = 256,
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
  input  logic signed [DW-1:0] in_e,      // row 2m
  input  logic signed [DW-1:0] in_o,      // row 2m+1
  input  logic [AUXW-1:0]      in_aux,
  output logic                 out_valid,
  output logic                 out_flush,
  output logic                 out_first,
  output logic                 out_last,
  output logic signed [DW-1:0] out_lo,    // low (even) output of column j
  output logic signed [DW-1:0] out_hi,    // high (odd) output of column j
  output logic [AUXW-1:0]      out_aux
);

  lifting_filter #(
    .DW    (DW),
    .CW    (COEF_W),
    .CF    (COEF_F),
    .CO    (odd_coef(STAGE)),
    .CE    (even_coef(STAGE)),
    .DEPTH (IMG_W),
    .AUXW  (AUXW)
  ) u_lift (
    .clk, .rst_n,
    .in_valid, .in_flush, .in_first, .in_last, .in_e, .in_o, .in_aux,
    .out_valid, .out_flush, .out_first, .out_last, .out_lo, .out_hi, .out_aux
  );

endmodule
