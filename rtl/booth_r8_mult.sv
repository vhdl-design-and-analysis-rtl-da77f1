// booth_r8_mult: signed multiplier with radix-8 Booth recoding and a
// Wallace-style carry-save reduction tree.
//
// The multiplier operand b is cut into overlapping 4-bit windows
// {b[3i+2], b[3i+1], b[3i], b[3i-1]} (b[-1] = 0), each recoded into one digit
// d_i = -4*b[3i+2] + 2*b[3i+1] + b[3i] + b[3i-1] in -4..+4. The product is
// sum_i d_i * a * 8^i, so an n-bit multiplier gives ceil(n/3) partial products
// instead of n. The only multiple that is not a shift of a is 3a, formed once
// by an adder. The partial products are reduced with rows of 3:2 carry-save
// adders until two rows remain, which one carry-propagate adder sums.
//
// Interface: a (AW bits) and b (BW bits) are two's complement; p = a*b
// (AW+BW bits) is combinational. The surrounding filter registers the
// operands and the product so that one multiplier is the whole stage.
// Operand widths are parameters; the defaults fit a 32-bit sample times an
// 18-bit constant as used by the lifting filters.
module booth_r8_mult #(
  parameter int unsigned AW = 32,
  parameter int unsigned BW = 18
) (
  input  logic signed [AW-1:0]    a,
  input  logic signed [BW-1:0]    b,
  output logic signed [AW+BW-1:0] p
);

  localparam int unsigned PW  = AW + BW;       // product width
  localparam int unsigned NPP = (BW + 2) / 3;  // number of Booth digits
  localparam int unsigned BX  = 3 * NPP + 1;   // b sign-extended, plus b[-1]

  logic signed [PW-1:0] a1, a2, a3, a4;
  logic signed [BX-1:0] bx;
  logic        [PW-1:0] pp [NPP];

  assign a1 = PW'(a);
  assign a2 = a1 <<< 1;
  assign a3 = a1 + a2;           // the one "hard" multiple
  assign a4 = a1 <<< 2;
  assign bx = BX'(signed'({b, 1'b0}));   // b*2, sign-extended

  // Booth recoding: one partial product per 3 multiplier bits.
  always_comb begin
    for (int i = 0; i < NPP; i++) begin
      logic [3:0]           win;
      logic signed [PW-1:0] mag;
      win = bx[3*i +: 4];
      unique case (win)
        4'b0000, 4'b1111: mag = '0;
        4'b0001, 4'b0010: mag = a1;
        4'b0011, 4'b0100: mag = a2;
        4'b0101, 4'b0110: mag = a3;
        4'b0111:          mag = a4;
        4'b1000:          mag = -a4;
        4'b1001, 4'b1010: mag = -a3;
        4'b1011, 4'b1100: mag = -a2;
        default:          mag = -a1;   // 4'b1101, 4'b1110
      endcase
      pp[i] = mag << (3 * i);
    end
  end

  // Carry-save (3:2) reduction, level by level, down to two rows. A level
  // with n rows has n/3 full-adder groups (3 rows -> sum and carry rows) and
  // passes the n%3 remaining rows on.
  function automatic int unsigned rows_at(int unsigned lvl);
    int unsigned n;
    n = NPP;
    for (int unsigned i = 0; i < lvl; i++) n = 2 * (n / 3) + n % 3;
    return n;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned l;
    l = 0;
    while (rows_at(l) > 2) l++;
    return l;
  endfunction

  localparam int unsigned NLEV = num_levels();

  logic [PW-1:0] sum_row, carry_row;

  for (genvar l = 0; l < NLEV; l++) begin : g_lvl
    localparam int unsigned N  = rows_at(l);
    localparam int unsigned G  = N / 3;
    localparam int unsigned NN = rows_at(l + 1);
    logic [PW-1:0] src [N];
    logic [PW-1:0] dst [NN];
    for (genvar i = 0; i < N; i++) begin : g_src
      if (l == 0) begin : g_first
        assign src[i] = pp[i];
      end else begin : g_next
        assign src[i] = g_lvl[l-1].dst[i];
      end
    end
    for (genvar g = 0; g < G; g++) begin : g_csa
      assign dst[2*g]   = src[3*g] ^ src[3*g+1] ^ src[3*g+2];
      assign dst[2*g+1] = ((src[3*g]   & src[3*g+1]) |
                           (src[3*g]   & src[3*g+2]) |
                           (src[3*g+1] & src[3*g+2])) << 1;
    end
    for (genvar g = 0; g < N % 3; g++) begin : g_pass
      assign dst[2*G+g] = src[3*G+g];
    end
  end

  if (NLEV == 0) begin : g_no_tree
    assign sum_row   = pp[0];
    assign carry_row = (NPP > 1) ? pp[NPP-1] : '0;
  end else begin : g_tree
    assign sum_row   = g_lvl[NLEV-1].dst[0];
    assign carry_row = g_lvl[NLEV-1].dst[1];
  end

  assign p = signed'(sum_row + carry_row);

endmodule
