// transposing_buffer: turns the column filter's output order into the order
// the row filter needs.
//
// The column filter emits, for column j of scan m, one column-low sample L(j)
// and one column-high sample H(j) per cycle. The row filter wants two
// horizontally adjacent samples of one row per cycle. Three registers and
// two output multiplexers do this: on an even column, L(j) and H(j) are
// stored (regs le, he); on the following odd column the pair
// (L(j-1), L(j)) leaves at once and H(j) is stored (reg ho); on the next
// cycle the pair (H(j-1), H(j)) leaves. The row filter thus sees the
// column-low row and the column-high row of a scan interleaved pair by pair,
// two samples per cycle, like the input. After the last pair of each row,
// NTOK flush tokens (two per row filter stage, low row first) are sent in the
// idle cycles the input unit leaves between scans.
//
// Output tag {band, m, k}: band 0 = column-low row, 1 = column-high row;
// k = column pair index. out_first / out_last mark k = 0 and
// k = IMG_W/2 - 1. Latency: one cycle from the odd column to the low pair.
// Column-side flush tokens are not forwarded.
module transposing_buffer
  import dwt_pkg::*;
#(
  parameter int unsigned IMG_W = 256,
  parameter int unsigned IMG_H = 256,
  parameter int unsigned DW    = DATA_W,
  parameter int unsigned NTOK  = 4,
  localparam int unsigned JW   = (IMG_W > 1) ? $clog2(IMG_W) : 1,
  localparam int unsigned KW   = (IMG_W > 2) ? $clog2(IMG_W / 2) : 1,
  localparam int unsigned MW   = (IMG_H > 2) ? $clog2(IMG_H / 2) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_flush,
  input  logic signed [DW-1:0] in_lo,
  input  logic signed [DW-1:0] in_hi,
  input  logic [MW+JW-1:0]     in_aux,    // {m, j}
  output logic                 out_valid,
  output logic                 out_flush,
  output logic                 out_first,
  output logic                 out_last,
  output logic signed [DW-1:0] out_e,     // column 2k
  output logic signed [DW-1:0] out_o,     // column 2k+1
  output logic [1+MW+KW-1:0]   out_aux    // {band, m, k}
);

  localparam int unsigned TW = $clog2(NTOK + 1);

  logic [MW-1:0] in_m;
  logic [JW-1:0] in_j;
  assign {in_m, in_j} = in_aux;

  wire           data    = in_valid && !in_flush;
  wire           odd_col = in_j[0];
  wire [KW-1:0]  in_k    = KW'(in_j >> 1);

  logic signed [DW-1:0] le, he, ho;   // the three registers
  logic                 h_due;        // high pair waits in he/ho
  logic [MW-1:0]        h_m;
  logic [KW-1:0]        h_k;
  logic [TW-1:0]        tok;          // flush tokens still to send

  wire k_last_in = (in_k == KW'(IMG_W / 2 - 1));
  wire k_last_h  = (h_k  == KW'(IMG_W / 2 - 1));

  always_ff @(posedge clk) begin
    if (data && !odd_col) begin
      le <= in_lo;
      he <= in_hi;
    end
    if (data && odd_col) begin
      ho  <= in_hi;
      h_m <= in_m;
      h_k <= in_k;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_due     <= 1'b0;
      tok       <= '0;
      out_valid <= 1'b0;
      out_flush <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_flush <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      if (data && odd_col) begin            // low row pair, straight through
        out_valid <= 1'b1;
        out_first <= (in_k == '0);
        out_last  <= k_last_in;
        h_due     <= 1'b1;
      end else if (h_due) begin             // high row pair from the registers
        out_valid <= 1'b1;
        out_first <= (h_k == '0);
        out_last  <= k_last_h;
        h_due     <= 1'b0;
        if (k_last_h) tok <= TW'(NTOK);
      end else if (tok != '0) begin         // row flush tokens
        out_valid <= 1'b1;
        out_flush <= 1'b1;
        tok       <= tok - 1'b1;
      end
    end
  end

  // Output multiplexers (registered).
  always_ff @(posedge clk) begin
    if (data && odd_col) begin
      out_e   <= le;
      out_o   <= in_lo;
      out_aux <= {1'b0, in_m, in_k};
    end else if (h_due) begin
      out_e   <= he;
      out_o   <= ho;
      out_aux <= {1'b1, h_m, h_k};
    end else begin
      out_aux <= {tok[0], h_m, h_k};  // tokens alternate low row, high row
    end
  end

  a_no_overlap: assert property (
    @(posedge clk) disable iff (!rst_n) (data && odd_col) |-> (!h_due && tok == '0))
    else $error("transposing_buffer: row data arrived before the previous row was closed");

endmodule
