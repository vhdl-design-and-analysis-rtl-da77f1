// tb_dwt2d_top: end-to-end test of dwt2d_top at its default size
// (256 x 256 pixels), three frames. See dwt2d_tb_body.svh for what is
// checked.
module tb_dwt2d_top;
  localparam int W = 256;
  localparam int H = 256;
  localparam int GAP = 4;
  localparam int NFRAMES = 3;

  `include "dwt2d_tb_body.svh"

  dwt2d_top dut (
    .clk, .rst_n, .pix_valid, .pix_ready, .pix_e, .pix_o,
    .out_valid, .out_band, .out_row, .out_col, .out_lo, .out_hi
  );

  initial begin
    if (dut.IMG_W != W || dut.IMG_H != H) begin
      $display("FAIL testbench size does not match the design defaults");
      failures++;
    end
  end
endmodule
