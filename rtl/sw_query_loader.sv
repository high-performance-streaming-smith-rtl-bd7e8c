// Query Loader: hands each query symbol to the queue of the PE that uses it.
//
// From the Q_load channel it takes a header (query length qlen) and the packed
// query words. Symbol i of the query goes into the Query Buffer queue of PE i.
// A whole memory word is placed in one cycle: the loader presents the word,
// the index of the PE that receives its first symbol (base) and the number of
// valid symbols in it (count), and the Query Buffer writes symbol k of the word
// into queue base+k for every k < count. The word waits while any of those
// queues is full. PEs at positions qlen and above receive nothing for this
// alignment; they recognise this themselves from the query length carried by
// the target tokens. Symbols beyond the array length are dropped by the
// buffer, so a query longer than the array is scored on its first NUM_PE
// symbols only.
//
// Timing: a header and each word take one cycle each, so a query of the
// evaluated length (131 symbols, one word) is placed in 2 cycles, well within
// the tlen+1 cycles the array spends on the alignment.
//
// Per-PE queues fed by a loader follow the accelerator description; the
// word-wide write is this design's choice.
module sw_query_loader
  import sw_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  ld_pkt_t in_pkt,
  output logic    wr_valid,
  input  logic    wr_ready,
  output qlen_t   wr_base,
  output logic [$clog2(SYM_PER_WORD):0] wr_count,
  output word_t   wr_syms
);
  qlen_t    left;                         // symbols of this query still to place
  qlen_t    base;                         // PE index of the next symbol
  rec_hdr_t hdr;
  logic     data_word;

  assign hdr       = rec_hdr_t'(in_pkt.data);
  assign data_word = !in_pkt.hdr && (left != '0);
  assign wr_valid  = in_valid && data_word;
  assign wr_base   = base;
  assign wr_count  = (int'(left) >= SYM_PER_WORD) ? ($clog2(SYM_PER_WORD)+1)'(SYM_PER_WORD)
                                                 : ($clog2(SYM_PER_WORD)+1)'(left);
  assign wr_syms   = in_pkt.data;
  // Headers and stray words are always taken; a query word when it is placed.
  assign in_ready  = !data_word || wr_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      left <= '0;
      base <= '0;
    end else if (in_valid && in_ready) begin
      if (in_pkt.hdr) begin
        left <= hdr.qlen;
        base <= '0;
      end else if (left != '0) begin
        left <= left - qlen_t'(wr_count);
        base <= base + qlen_t'(wr_count);
      end
    end
  end
endmodule
