// lift_state_mem: the per-line state store of a lifting filter.
//
// A line-based lifting filter visits its lines in a fixed round-robin order
// and, on each visit, needs what it saved on the previous visit of the same
// line. This memory holds that state: DEPTH words of W bits, one synchronous
// write port and one asynchronous (same-cycle) read port. In the column
// filter DEPTH is the image width (one word per image column: the "RAM
// memory unit"); in the row filter DEPTH is 2 (one word for the row of
// column-low samples and one for the row of column-high samples: the row
// filter's buffer). The memory is not reset: the filter keeps the valid
// flags in flip-flops and reads a word only after writing it.
module lift_state_mem #(
  parameter int unsigned W     = 79,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
