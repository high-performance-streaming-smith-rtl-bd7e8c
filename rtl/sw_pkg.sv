// Shared types and constants of the streaming Smith-Waterman accelerator.
//
// The accelerator scores pairwise local alignments of short nucleotide
// sequences: a query of at most NUM_PE symbols is held in a linear systolic
// array, one symbol per Processing Element (PE), while the target sequence
// streams through the array one symbol per clock. Alignments follow one another
// back to back, separated by a New Read (NR) token.
//
// Field widths here are this design's choices: 2-bit nucleotide symbols, 8-bit
// query lengths (enough for the 131-PE array), 16-bit target lengths, scores
// and alignment numbers, and 512-bit memory words holding 256 packed symbols,
// so that a whole query of the evaluated length fits in one word.
package sw_pkg;

  localparam int SYM_W   = 2;             // A, C, G, T
  localparam int QLEN_W  = 8;             // query length, <= NUM_PE
  localparam int TLEN_W  = 16;            // target length
  localparam int SCORE_W = 16;            // similarity score (unsigned, >= 0)
  localparam int ID_W    = 16;            // alignment sequence number
  localparam int WORD_W  = 512;           // memory word
  localparam int SYM_PER_WORD = WORD_W / SYM_W;

  typedef logic [SYM_W-1:0]   sym_t;
  typedef logic [QLEN_W-1:0]  qlen_t;
  typedef logic [TLEN_W-1:0]  tlen_t;
  typedef logic [SCORE_W-1:0] score_t;
  typedef logic [ID_W-1:0]    id_t;
  typedef logic [WORD_W-1:0]  word_t;

  // Symbol encoding used by testbenches and input data.
  localparam sym_t SYM_A = 2'd0;
  localparam sym_t SYM_C = 2'd1;
  localparam sym_t SYM_G = 2'd2;
  localparam sym_t SYM_T = 2'd3;

  // Header word that opens every alignment record in memory.
  typedef struct packed {
    logic [WORD_W-QLEN_W-TLEN_W-1:0] rsvd;
    qlen_t qlen;                          // bits [23:16]
    tlen_t tlen;                          // bits [15:0]
  } rec_hdr_t;

  // Token travelling through the target channel and the PE array.
  // For a target symbol, h is H of the left neighbour's column in this row
  // (0 when it enters PE 0). For a New Read token, h is the running maximum
  // of the finished alignment, folded in by each active PE.
  typedef struct packed {
    logic   nr;                           // 1: New Read token
    sym_t   sym;                          // target symbol (symbol tokens)
    qlen_t  qlen;                         // query length of this alignment
    score_t h;
  } sw_tok_t;

  // Packet on the T_load and Q_load channels: a header word, then the packed
  // symbol words of the sequence.
  typedef struct packed {
    logic  hdr;                           // 1: data holds a rec_hdr_t
    word_t data;
  } ld_pkt_t;

  // Packet on the Output channel, one per alignment.
  typedef struct packed {
    id_t   id;
    qlen_t qlen;
    tlen_t tlen;
  } out_info_t;

  // Result word written to memory: {alignment number, best score}.
  typedef struct packed {
    id_t    id;
    score_t score;
  } result_t;

  // Number of memory words that hold len packed symbols.
  function automatic int unsigned words_for(int unsigned len);
    return (len + SYM_PER_WORD - 1) / SYM_PER_WORD;
  endfunction

endpackage
