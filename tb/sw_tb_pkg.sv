// Testbench helpers: a software Smith-Waterman reference and record packing.
//
// sw_ref_score fills the full similarity matrix row by row with the linear-gap
// recurrence (match +2, mismatch -1, gap 1 unless overridden) and returns the
// largest cell, which is what the hardware reports per alignment.
// pack_record appends one input record (header word, packed query words,
// packed target words) to a word queue, in the memory layout the Input Parser
// reads.
package sw_tb_pkg;
  import sw_pkg::*;

  typedef sym_t seq_t[$];

  function automatic int sw_ref_score(seq_t q, seq_t t,
                                      int match = 2, int mismatch = -1, int gap = 1);
    int prev[], cur[];
    int best = 0;
    prev = new[q.size() + 1];
    cur  = new[q.size() + 1];
    foreach (prev[i]) prev[i] = 0;
    for (int j = 0; j < t.size(); j++) begin
      cur[0] = 0;
      for (int i = 1; i <= q.size(); i++) begin
        int v = 0;
        int d = prev[i-1] + ((q[i-1] == t[j]) ? match : mismatch);
        if (d > v) v = d;
        if (prev[i] - gap > v) v = prev[i] - gap;
        if (cur[i-1] - gap > v) v = cur[i-1] - gap;
        cur[i] = v;
        if (v > best) best = v;
      end
      prev = cur;
    end
    return best;
  endfunction

  function automatic seq_t random_seq(int len);
    seq_t s;
    for (int i = 0; i < len; i++) s.push_back(sym_t'($urandom_range(3)));
    return s;
  endfunction

  function automatic void pack_syms(ref word_t words[$], input seq_t s);
    word_t w = '0;
    for (int i = 0; i < s.size(); i++) begin
      w[(i % SYM_PER_WORD)*SYM_W +: SYM_W] = s[i];
      if (i % SYM_PER_WORD == SYM_PER_WORD - 1 || i == s.size() - 1) begin
        words.push_back(w);
        w = '0;
      end
    end
  endfunction

  function automatic void pack_record(ref word_t words[$], input seq_t q, input seq_t t);
    rec_hdr_t h;
    h      = '0;
    h.qlen = qlen_t'(q.size());
    h.tlen = tlen_t'(t.size());
    words.push_back(word_t'(h));
    pack_syms(words, q);
    pack_syms(words, t);
  endfunction

  // The worked example of the accelerator description: query AGTC against
  // target ACGT has best score 5.
  function automatic seq_t fig_query();
    seq_t s = '{SYM_A, SYM_G, SYM_T, SYM_C};
    return s;
  endfunction
  function automatic seq_t fig_target();
    seq_t s = '{SYM_A, SYM_C, SYM_G, SYM_T};
    return s;
  endfunction
endpackage
