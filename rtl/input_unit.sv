// input_unit: front end of the 2-D DWT; accepts the pixels, tags them and
// paces the stream so that the lifting filters can close every line.
//
// Pixels enter two per cycle, x(2m, j) on pix_e and x(2m+1, j) on pix_o:
// column j of the row pair m, columns in order, row pairs in order (a
// "scan" is one row pair). Each accepted pair is registered and sent on
// with its position tag {m, j} and the flags first (m == 0) and last
// (m == IMG_H/2 - 1) that the column filters need for symmetric extension.
// After every scan the unit drops pix_ready for GAP cycles; the transposing
// buffer uses these cycles to send the row filters their flush tokens.
// After the last scan of a frame it sends NFLUSH scans of flush tokens (one
// per column filter stage), each again followed by GAP idle cycles, and then
// accepts the next frame. A frame of IMG_W x IMG_H pixels therefore takes
// (IMG_H/2 + NFLUSH) * (IMG_W + GAP) cycles when pixels are always offered.
//
// Interface: pix_valid/pix_ready handshake (a pair moves when both are 1;
// pix_ready does not depend on pix_valid). The output is valid-only with a
// one-cycle latency. Pixels are zero-extended to DW bits, so the upper
// DW - PW bits of out_e/out_o are constant zero. The pacing scheme is this
// design's choice.
module input_unit
  import dwt_pkg::*;
#(
  parameter int unsigned IMG_W  = 256,
  parameter int unsigned IMG_H  = 256,
  parameter int unsigned PW     = PIX_W,
  parameter int unsigned DW     = DATA_W,
  parameter int unsigned GAP    = 4,
  parameter int unsigned NFLUSH = 2,
  localparam int unsigned JW    = (IMG_W > 1) ? $clog2(IMG_W) : 1,
  localparam int unsigned MW    = (IMG_H > 2) ? $clog2(IMG_H / 2) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 pix_valid,
  output logic                 pix_ready,
  input  logic [PW-1:0]        pix_e,     // row 2m, column j
  input  logic [PW-1:0]        pix_o,     // row 2m+1, column j
  output logic                 out_valid,
  output logic                 out_flush,
  output logic                 out_first,
  output logic                 out_last,
  output logic signed [DW-1:0] out_e,
  output logic signed [DW-1:0] out_o,
  output logic [MW+JW-1:0]     out_aux    // {m, j}
);

  typedef enum logic [1:0] {S_SCAN, S_GAP, S_FLUSH} state_e;

  localparam int unsigned GW = (GAP > 0) ? $clog2(GAP + 1) : 1;
  localparam int unsigned FW = $clog2(NFLUSH + 1);

  state_e          state;
  logic [JW-1:0]   j;
  logic [MW-1:0]   m;
  logic [GW-1:0]   gcnt;
  logic [FW-1:0]   fcnt;     // flush scans sent so far
  logic            in_tail;  // the gap follows a flush scan

  wire take      = (state == S_SCAN) && pix_valid;
  wire tok       = (state == S_FLUSH);
  wire end_of_ln = (j == JW'(IMG_W - 1));
  wire last_scan = (m == MW'(IMG_H / 2 - 1));

  assign pix_ready = (state == S_SCAN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_SCAN;
      j       <= '0;
      m       <= '0;
      gcnt    <= '0;
      fcnt    <= '0;
      in_tail <= 1'b0;
    end else begin
      unique case (state)
        S_SCAN: if (take) begin
          j <= end_of_ln ? '0 : j + 1'b1;
          if (end_of_ln) begin
            gcnt    <= GW'(GAP);
            in_tail <= last_scan;
            if (!last_scan) m <= m + 1'b1;
            if (GAP > 0)        state <= S_GAP;
            else if (last_scan) state <= S_FLUSH;
          end
        end
        S_GAP: begin
          gcnt <= gcnt - 1'b1;
          if (gcnt <= GW'(1)) begin
            if (!in_tail) begin
              state <= S_SCAN;
            end else if (fcnt < FW'(NFLUSH)) begin
              state <= S_FLUSH;
            end else begin           // frame complete
              state   <= S_SCAN;
              m       <= '0;
              fcnt    <= '0;
              in_tail <= 1'b0;
            end
          end
        end
        S_FLUSH: begin
          j <= end_of_ln ? '0 : j + 1'b1;
          if (end_of_ln) begin
            fcnt <= fcnt + 1'b1;
            gcnt <= GW'(GAP);
            if (GAP > 0) begin
              state <= S_GAP;
            end else if (fcnt + 1'b1 == FW'(NFLUSH)) begin
              state   <= S_SCAN;
              m       <= '0;
              fcnt    <= '0;
              in_tail <= 1'b0;
            end
          end
        end
        default: state <= S_SCAN;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_flush <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= take || tok;
      out_flush <= tok;
      out_first <= take && (m == '0);
      out_last  <= take && last_scan;
    end
  end

  always_ff @(posedge clk) begin
    out_e   <= DW'(pix_e);
    out_o   <= DW'(pix_o);
    out_aux <= {m, j};
  end

endmodule
