// lifting_filter: one flipped lifting pair (predict + update) of the 9/7
// wavelet, two samples in and two samples out per step, for DEPTH
// interleaved lines.
//
// For one line with even samples e(n) = x(2n) and odd samples o(n) = x(2n+1)
// it computes, with constants CO (odd node) and CE (even node, already
// holding the "+1" of the merged form):
//   D1(n)   = CO*o(n) + e(n)
//   D2(n)   = CE*e(n) + D1(n-1)
//   hi(n-1) = D1(n-1) + e(n)
//   lo(n-1) = D2(n-1) + hi(n-1)
// This is the predict step and the update step after both were divided by
// their lifting constants (flipping) and merged: with CE = c + 1 it equals
//   hi(n) = CO*o(n) + e(n) + e(n+1),  lo(n) = c*e(n) + hi(n-1) + hi(n).
// With CO = 1/alpha and c = 1/(alpha*beta) this gives y(2n+1)/alpha and
// y(2n)/(alpha*beta); with CO = 1/(beta*gamma) and c = 1/(gamma*delta)
// applied to those, it gives the high-pass and low-pass outputs up to
// constant factors that the scaling unit removes. Only D1 and D2 are kept
// between two steps of a line: two words per line.
//
// Line ends use symmetric extension. Left end, hi(-1) = hi(0): on the first
// pair D2 is stored as c*e(0) = CE*e(0) - e(0), and the next step adds hi(0)
// twice. Right end, e(N) = e(N-1): on the last pair D1 is stored as
// CO*o + 2e, which is already hi of that pair.
//
// Pipeline (three register stages, one multiplier per stage at most):
//   S0  input registers.
//   S1  radix-8 Booth multipliers: CO*o and CE*e, rounded to integers.
//   S2  state step: the word {D1, D2} saved for this line on its previous
//       step is read from the state memory, four adders form D1, D2 of the
//       new pair and hi, lo of the previous pair, the new word is written
//       back, and the results go to the output registers.
// So output (lo(n-1), hi(n-1)) leaves 3 cycles after input pair n enters.
// The first pair of a line (in_first) produces no output. The last pair's
// outputs need one more step: after in_last the line is marked pending, and
// the next step addressed to that line must be a flush token (in_flush), on
// which the filter emits the last outputs with out_last. A flush token that
// finds no pending line is passed on unchanged, so a chain of k filters is
// closed by k flush tokens per line. Lines are served round-robin: the state
// memory pointer advances on every step (data or token). out_first marks
// the output of pair index 0.
//
// Interface: valid-only streaming, no back-pressure; the source must send
// exactly one step (data or token) per line in turn, and must not send data
// to a line that is waiting for its flush (an assertion checks this).
// in_aux/out_aux carry a tag (such as the sample position); out_aux is the
// tag that came with the pair the outputs belong to.
module lifting_filter
  import dwt_pkg::*;
#(
  parameter int unsigned DW    = DATA_W,
  parameter int unsigned CW    = COEF_W,
  parameter int unsigned CF    = COEF_F,
  parameter logic signed [CW-1:0] CO = C_ODD_1,
  parameter logic signed [CW-1:0] CE = C_EVEN_1,
  parameter int unsigned DEPTH = 2,
  parameter int unsigned AUXW  = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_flush,
  input  logic                 in_first,
  input  logic                 in_last,
  input  logic signed [DW-1:0] in_e,
  input  logic signed [DW-1:0] in_o,
  input  logic [AUXW-1:0]      in_aux,
  output logic                 out_valid,
  output logic                 out_flush,
  output logic                 out_first,
  output logic                 out_last,
  output logic signed [DW-1:0] out_lo,
  output logic signed [DW-1:0] out_hi,
  output logic [AUXW-1:0]      out_aux
);

  localparam int unsigned PTRW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef struct packed {
    logic signed [DW-1:0] d1;    // D1(n), or hi(n) after the last pair
    logic signed [DW-1:0] d2;    // D2(n)
    logic [AUXW-1:0]      aux;   // tag of pair n
  } state_t;

  typedef struct packed {
    logic valid, flush, first, last;
  } ctl_t;

  // ---------------- S0: input registers ----------------
  ctl_t                 c0;
  logic signed [DW-1:0] e0, o0;
  logic [AUXW-1:0]      aux0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c0 <= '0;
    else        c0 <= '{in_valid, in_flush, in_first, in_last};
  end

  always_ff @(posedge clk) begin
    e0   <= in_e;
    o0   <= in_o;
    aux0 <= in_aux;
  end

  // ---------------- S1: Booth multipliers ----------------
  logic signed [DW+CW-1:0] prod_o, prod_e;

  booth_r8_mult #(.AW(DW), .BW(CW)) u_mult_odd  (.a(o0), .b(CO), .p(prod_o));
  booth_r8_mult #(.AW(DW), .BW(CW)) u_mult_even (.a(e0), .b(CE), .p(prod_e));

  // Round to nearest (ties up) and drop the CF fraction bits.
  function automatic logic signed [DW-1:0] rnd(input logic signed [DW+CW-1:0] x);
    logic signed [DW+CW-1:0] t;
    t = (x + (DW+CW)'(1 << (CF - 1))) >>> CF;
    return t[DW-1:0];
  endfunction

  ctl_t                 c1;
  logic signed [DW-1:0] e1, po1, pe1;
  logic [AUXW-1:0]      aux1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c1 <= '0;
    else        c1 <= c0;
  end

  always_ff @(posedge clk) begin
    e1   <= e0;
    po1  <= rnd(prod_o);
    pe1  <= rnd(prod_e);
    aux1 <= aux0;
  end

  // ---------------- S2: state step ----------------
  logic [PTRW-1:0]  ptr;
  logic [DEPTH-1:0] pend;   // line waits for its flush token
  logic [DEPTH-1:0] fst;    // saved word belongs to pair index 0
  state_t           rd, wr;
  logic             we;

  lift_state_mem #(.W($bits(state_t)), .DEPTH(DEPTH)) u_state (
    .clk   (clk),
    .we    (we),
    .waddr (ptr),
    .wdata (wr),
    .raddr (ptr),
    .rdata (rd)
  );

  logic                 step, do_data, do_emit, do_flush, do_pass;
  logic signed [DW-1:0] d1_c, d2_c, hi_c, lo_c;

  always_comb begin
    step     = c1.valid;
    do_data  = c1.valid && !c1.flush;
    do_flush = c1.valid &&  c1.flush && pend[ptr];
    do_pass  = c1.valid &&  c1.flush && !pend[ptr];
    do_emit  = (do_data && !c1.first) || do_flush;
    // Adder 1: D1 of the new pair; on the last pair hi = CO*o + 2e.
    d1_c = po1 + (c1.last ? (e1 <<< 1) : e1);
    // Adder 2: D2 of the new pair; on the first pair c*e = CE*e - e.
    d2_c = pe1 + (c1.first ? -e1 : rd.d1);
    // Adder 3: hi of the previous pair (already complete after a last pair).
    hi_c = rd.d1 + (do_flush ? '0 : e1);
    // Adder 4: lo of the previous pair; hi(-1) = hi(0) at the line start.
    lo_c = rd.d2 + (fst[ptr] ? (hi_c <<< 1) : hi_c);
    we   = do_data;
    wr   = '{d1: d1_c, d2: d2_c, aux: aux1};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr  <= '0;
      pend <= '0;
      fst  <= '0;
    end else if (step) begin
      ptr <= (ptr == PTRW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
      if (do_data) begin
        pend[ptr] <= c1.last;
        fst[ptr]  <= c1.first;
      end else if (do_flush) begin
        pend[ptr] <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_flush <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= do_emit || do_pass;
      out_flush <= do_pass;
      out_first <= do_emit && fst[ptr];
      out_last  <= do_flush;
    end
  end

  always_ff @(posedge clk) begin
    out_lo  <= lo_c;
    out_hi  <= hi_c;
    out_aux <= do_pass ? aux1 : rd.aux;
  end

  // A line must receive its flush token before new data.
  a_no_data_on_pending: assert property (
    @(posedge clk) disable iff (!rst_n) !(do_data && pend[ptr]))
    else $error("lifting_filter: data step for a line still waiting for its flush");

  // A flush token carries no first or last flag.
  a_first_flag: assert property (
    @(posedge clk) disable iff (!rst_n) c1.valid |-> !(c1.flush && (c1.first || c1.last)))
    else $error("lifting_filter: flush token with first/last flag");

endmodule
