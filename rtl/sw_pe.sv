// Smith-Waterman Processing Element: one column of the similarity matrix.
//
// The PE holds one query symbol and sees the target sequence stream past, one
// token per cycle. For target symbol b_j arriving with the left neighbour's
// H(i-1,j) it computes
//     H(i,j) = max(0, H(i-1,j-1) + s(a_i,b_j), H(i,j-1) - GAP, H(i-1,j) - GAP)
// where H(i,j-1) is the value this PE produced for the previous row and
// H(i-1,j-1) is the left value it received with the previous row. It passes
// b_j on with H(i,j) and tracks the largest H of its column.
//
// A New Read (NR) token ends an alignment. The NR token carries the running
// maximum of the alignment in its h field; an active PE replaces it with
// max(h, column maximum), so the token leaving the last PE holds the best
// score. The PE then clears its state and waits for the next alignment. On the
// first token of that alignment it compares its position PE_IDX with the
// query length carried by the token: if PE_IDX < qlen it is active and takes
// its next query symbol from its queue (q_pop), stalling while the queue is
// empty; otherwise it only forwards tokens for that alignment.
//
// Interface: valid/ready token stream in and out; out is a register, so each
// PE adds one cycle of latency and the array sustains one token per cycle.
// in_ready depends combinationally on out_ready and on the queue state.
//
// The cell equation, the per-PE query queue, the NR token and the
// activity check against the query length follow the accelerator description.
// Scores MATCH=+2, MISMATCH=-1, GAP=1 (linear gap) reproduce the worked example
// of the description; the token format and carrying the query length in every
// token are this design's choices.
module sw_pe
  import sw_pkg::*;
#(
  parameter int unsigned PE_IDX   = 0,
  parameter int          MATCH    = 2,
  parameter int          MISMATCH = -1,
  parameter int          GAP      = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  // from the left neighbour (or the target channel)
  input  logic    in_valid,
  output logic    in_ready,
  input  sw_tok_t in_tok,
  // to the right neighbour (or the PE_Exit channel)
  output logic    out_valid,
  input  logic    out_ready,
  output sw_tok_t out_tok,
  // head of this PE's query queue
  input  logic    q_valid,
  input  sym_t    q_sym,
  output logic    q_pop
);
  localparam int CW = SCORE_W + 2;        // signed working width

  logic   need_load;                      // next token starts an alignment
  logic   active;                         // this PE holds a query symbol
  sym_t   qsym;
  score_t h_up;                           // H(i, j-1)
  score_t h_diag;                         // H(i-1, j-1)
  score_t col_max;

  logic   down_ok, in_range, need_q, fire;
  logic   cur_active;
  sym_t   cur_q;
  score_t h_new, nr_max;

  assign down_ok  = !out_valid || out_ready;
  assign in_range = (PE_IDX < int'(in_tok.qlen));
  assign need_q   = need_load && in_range;
  assign in_ready = down_ok && (!need_q || q_valid);
  assign fire     = in_valid && in_ready;
  assign q_pop    = fire && need_q;

  assign cur_active = need_load ? in_range : active;
  assign cur_q      = need_load ? q_sym    : qsym;

  // Cell update.
  always_comb begin
    logic signed [CW-1:0] diag, up, left, best;
    diag = signed'(CW'(h_diag)) + ((cur_q == in_tok.sym) ? CW'(MATCH) : CW'(MISMATCH));
    up   = signed'(CW'(h_up))      - CW'(GAP);
    left = signed'(CW'(in_tok.h))  - CW'(GAP);
    best = '0;
    if (diag > best) best = diag;
    if (up   > best) best = up;
    if (left > best) best = left;
    h_new = score_t'(best);
  end

  // Maximum carried on by an NR token.
  assign nr_max = (cur_active && col_max > in_tok.h) ? col_max : in_tok.h;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tok   <= '0;
      need_load <= 1'b1;
      active    <= 1'b0;
      qsym      <= '0;
      h_up      <= '0;
      h_diag    <= '0;
      col_max   <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fire) begin
        out_valid   <= 1'b1;
        out_tok     <= in_tok;
        if (in_tok.nr) begin
          // End of alignment: report, then clear for the next one.
          out_tok.h <= nr_max;
          need_load <= 1'b1;
          active    <= 1'b0;
          h_up      <= '0;
          h_diag    <= '0;
          col_max   <= '0;
        end else begin
          need_load <= 1'b0;
          active    <= cur_active;
          qsym      <= cur_q;
          if (cur_active) begin
            out_tok.h <= h_new;
            h_up      <= h_new;
            h_diag    <= in_tok.h;
            if (h_new > col_max) col_max <= h_new;
          end else begin
            out_tok.h <= '0;
          end
        end
      end
    end
  end

  // A PE that is to be active never starts an alignment without its symbol.
  a_query_present: assert property (@(posedge clk) disable iff (!rst_n)
                                    q_pop |-> q_valid);
endmodule
