// Query Buffer: one queue of upcoming query symbols per Processing Element.
//
// Queue i holds the query symbols that PE i will use in the coming alignments,
// oldest first. Because the symbols for several alignments wait here, the
// array can start a new alignment the cycle after the previous one ends,
// without reloading the whole query first.
//
// Write side: the Query Loader presents a memory word of packed symbols with
// the queue index of its first symbol (wr_base) and the number of symbols in
// it (wr_count); symbol k goes to queue wr_base+k. wr_ready is high when every
// addressed queue below NUM_PE has room, and then all of them are written in
// the same cycle; addressed queues at or beyond NUM_PE do not exist and their
// symbols are dropped. Read side: each PE sees the head of its queue
// (q_valid, q_sym) and pops it with q_pop; pops of different queues are
// independent. A written symbol is visible at the head on the next cycle.
//
// A separate queue per PE follows the accelerator description. The depth is
// this design's choice: a queue must hold the symbols of every alignment that
// the Query Loader has placed but that has not yet reached its PE. The last PE
// starts an alignment about NUM_PE cycles after the first, so with targets of
// length tlen about NUM_PE/(tlen+1) alignments are pending; 64 entries keep
// the array at full rate down to targets of 2 symbols with 131 PEs. The
// word-wide shared write port is also this design's choice.
module sw_query_buffer
  import sw_pkg::*;
#(
  parameter int unsigned NUM_PE = 131,
  parameter int unsigned DEPTH  = 64
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    wr_valid,
  output logic    wr_ready,
  input  qlen_t   wr_base,
  input  logic [$clog2(SYM_PER_WORD):0] wr_count,
  input  word_t   wr_syms,
  output logic [NUM_PE-1:0] q_valid,
  output sym_t    q_sym [NUM_PE],
  input  logic [NUM_PE-1:0] q_pop
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [NUM_PE-1:0] sel;                 // queue addressed by this write
  logic [NUM_PE-1:0] full;

  assign wr_ready = ((sel & full) == '0);

  for (genvar i = 0; i < NUM_PE; i++) begin : g_q
    sym_t          mem [DEPTH];
    logic [AW-1:0] wp, rp;
    logic [AW:0]   cnt;
    logic          wr, rd;
    int            k;                     // position of this queue's symbol in the word

    assign k          = i - int'(wr_base);
    assign sel[i]     = (k >= 0) && (k < int'(wr_count));
    assign wr         = wr_valid && wr_ready && sel[i];
    assign rd         = q_pop[i] && q_valid[i];
    assign full[i]    = (cnt == (AW+1)'(DEPTH));
    assign q_valid[i] = (cnt != '0);
    assign q_sym[i]   = mem[rp];

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        wp  <= '0;
        rp  <= '0;
        cnt <= '0;
      end else begin
        if (wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
        if (rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
        if (wr && !rd)      cnt <= cnt + 1'b1;
        else if (!wr && rd) cnt <= cnt - 1'b1;
      end
    end

    always_ff @(posedge clk) begin
      if (wr) mem[wp] <= wr_syms[(k % SYM_PER_WORD)*SYM_W +: SYM_W];
    end
  end
endmodule
