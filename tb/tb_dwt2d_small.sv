// tb_dwt2d_small: end-to-end test of dwt2d_top on small, non-square frames
// (8 x 6 pixels), three frames, where every border case is close to every
// other. See dwt2d_tb_body.svh for what is checked.
module tb_dwt2d_small;
  localparam int W = 8;
  localparam int H = 6;
  localparam int GAP = 4;
  localparam int NFRAMES = 3;

  `include "dwt2d_tb_body.svh"

  dwt2d_top #(.IMG_W(W), .IMG_H(H), .GAP(GAP)) dut (
    .clk, .rst_n, .pix_valid, .pix_ready, .pix_e, .pix_o,
    .out_valid, .out_band, .out_row, .out_col, .out_lo, .out_hi
  );

  // The design needs at least two column pairs per row.
  initial begin
    if (W < 4 || W % 2 != 0 || H % 2 != 0) begin
      $display("FAIL unsupported frame size %0d x %0d", W, H);
      $display("TB_RESULT checks=1 failures=1");
      $finish;
    end
  end
endmodule
