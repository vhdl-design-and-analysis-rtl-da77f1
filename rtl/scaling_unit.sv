// scaling_unit: the final scaling step of the 9/7 transform.
//
// The row filter outputs are flipped-domain values: each carries the factor
// 1/(alpha*beta*gamma*delta) for a low-pass direction and 1/(alpha*beta*gamma)
// for a high-pass direction, once for the columns and once for the rows. This
// unit multiplies each of the two samples of a step by one constant that
// removes both factors and applies the JPEG 2000 normalisation (low-pass by
// 1/K, high-pass by K/2): LL by S_LL, HL and LH by S_LH, HH by S_HH (see
// dwt_pkg). Two radix-8 Booth multipliers are used; the constant is chosen by
// the band tag. The product is rounded to an integer and saturated to OW bits.
//
// Inputs: one row-filter step, lo/hi of column pair k of a row, with tag
// {band, m, k}; band 0 (column-low row) gives (LL, HL), band 1 (column-high
// row) gives (LH, HH). Flush tokens are dropped. Latency one cycle.
module scaling_unit
  import dwt_pkg::*;
#(
  parameter int unsigned DW   = DATA_W,
  parameter int unsigned OW   = OUT_W,
  parameter int unsigned AUXW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_flush,
  input  logic signed [DW-1:0] in_lo,
  input  logic signed [DW-1:0] in_hi,
  input  logic [AUXW-1:0]      in_aux,    // {band, m, k}
  output logic                 out_valid,
  output logic signed [OW-1:0] out_lo,    // LL (band 0) or LH (band 1)
  output logic signed [OW-1:0] out_hi,    // HL (band 0) or HH (band 1)
  output logic [AUXW-1:0]      out_aux
);

  wire   band_h = in_aux[AUXW-1];
  coef_t k_lo, k_hi;
  assign k_lo = band_h ? S_LH : S_LL;
  assign k_hi = band_h ? S_HH : S_LH;

  logic signed [DW+COEF_W-1:0] p_lo, p_hi;

  booth_r8_mult #(.AW(DW), .BW(COEF_W)) u_mult_lo (.a(in_lo), .b(k_lo), .p(p_lo));
  booth_r8_mult #(.AW(DW), .BW(COEF_W)) u_mult_hi (.a(in_hi), .b(k_hi), .p(p_hi));

  // Round to nearest, drop SCALE_F fraction bits, saturate to OW bits.
  function automatic logic signed [OW-1:0] scale_out(input logic signed [DW+COEF_W-1:0] x);
    logic signed [DW+COEF_W-1:0] t;
    t = (x + (DW+COEF_W)'(1 << (SCALE_F - 1))) >>> SCALE_F;
    if (t > (DW+COEF_W)'(2**(OW-1) - 1))        return {1'b0, {(OW-1){1'b1}}};
    else if (t < -(DW+COEF_W)'(2**(OW-1)))      return {1'b1, {(OW-1){1'b0}}};
    else                                        return t[OW-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid && !in_flush;
  end

  always_ff @(posedge clk) begin
    out_lo  <= scale_out(p_lo);
    out_hi  <= scale_out(p_hi);
    out_aux <= in_aux;
  end

endmodule
