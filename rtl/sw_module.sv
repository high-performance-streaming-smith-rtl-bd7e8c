// One streaming Smith-Waterman module: the complete dataflow of kernels and
// channels.
//
//   memory -> Input Parser -+-> T_load ch -> Target Loader -> Target ch -+
//                           |                                             v
//                           +-> Q_load ch -> Query Loader -> Query Buffer -> PE array
//                           |                                             |
//                           +-> Output ch ----------------> Output Parser <- PE_Exit ch
//                                                               |
//                                                            memory
//
// All control and data move left to right through channels, with no feedback
// path and no central controller: each kernel learns from the packets it
// receives how much work an alignment holds. Any number of alignments can be
// in flight, limited only by channel and queue space. After the first
// alignment, which needs tlen + NUM_PE - 1 cycles to cross the array, each
// further alignment adds tlen + 1 cycles, independent of its query length.
//
// Interface: the memory read stream of input records (layout in
// sw_input_parser) and the memory write stream of results {alignment number,
// score}, both valid/ready; records arrive in 512-bit words.
//
// The structure follows the accelerator description. Channel depths and the
// filter that keeps only NR tokens out of the array are this design's choices.
// The query queues (64) and the Output channel (128) are deep because about
// NUM_PE/(tlen+1) alignments are inside the array at once when targets are
// short, and each of them holds a queue entry and an Output channel packet.
module sw_module
  import sw_pkg::*;
#(
  parameter int unsigned NUM_PE    = 131,
  parameter int unsigned QB_DEPTH  = 64,  // per-PE query queue
  parameter int          MATCH     = 2,
  parameter int          MISMATCH  = -1,
  parameter int          GAP       = 1,
  parameter int unsigned TLD_DEPTH = 4,   // T_load channel
  parameter int unsigned QLD_DEPTH = 4,   // Q_load channel
  parameter int unsigned TGT_DEPTH = 4,   // Target channel
  parameter int unsigned EXIT_DEPTH = 4,  // PE_Exit channel
  parameter int unsigned OUT_DEPTH = 128  // Output channel
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    rd_valid,
  output logic    rd_ready,
  input  word_t   rd_data,
  output logic    wr_valid,
  input  logic    wr_ready,
  output result_t wr_data
);
  // Input Parser -> channels
  logic      tld_w_valid, tld_w_ready, qld_w_valid, qld_w_ready, oinf_w_valid, oinf_w_ready;
  ld_pkt_t   tld_w, qld_w;
  out_info_t oinf_w;

  sw_input_parser u_input_parser (
    .clk, .rst_n,
    .rd_valid, .rd_ready, .rd_data,
    .tld_valid (tld_w_valid),  .tld_ready (tld_w_ready),  .tld_pkt(tld_w),
    .qld_valid (qld_w_valid),  .qld_ready (qld_w_ready),  .qld_pkt(qld_w),
    .oinf_valid(oinf_w_valid), .oinf_ready(oinf_w_ready), .oinf   (oinf_w)
  );

  // T_load channel and Target Loader
  logic    tld_valid, tld_ready;
  ld_pkt_t tld;
  sw_fifo #(.T(ld_pkt_t), .DEPTH(TLD_DEPTH)) u_tload_ch (
    .clk, .rst_n,
    .in_valid (tld_w_valid), .in_ready (tld_w_ready), .in_data (tld_w),
    .out_valid(tld_valid),   .out_ready(tld_ready),   .out_data(tld)
  );

  logic    tl_valid, tl_ready;
  sw_tok_t tl_tok;
  sw_target_loader u_target_loader (
    .clk, .rst_n,
    .in_valid (tld_valid), .in_ready (tld_ready), .in_pkt (tld),
    .out_valid(tl_valid),  .out_ready(tl_ready),  .out_tok(tl_tok)
  );

  // Target channel
  logic    tgt_valid, tgt_ready;
  sw_tok_t tgt_tok;
  sw_fifo #(.T(sw_tok_t), .DEPTH(TGT_DEPTH)) u_target_ch (
    .clk, .rst_n,
    .in_valid (tl_valid),  .in_ready (tl_ready),  .in_data (tl_tok),
    .out_valid(tgt_valid), .out_ready(tgt_ready), .out_data(tgt_tok)
  );

  // Q_load channel, Query Loader and Query Buffer
  logic    qld_valid, qld_ready;
  ld_pkt_t qld;
  sw_fifo #(.T(ld_pkt_t), .DEPTH(QLD_DEPTH)) u_qload_ch (
    .clk, .rst_n,
    .in_valid (qld_w_valid), .in_ready (qld_w_ready), .in_data (qld_w),
    .out_valid(qld_valid),   .out_ready(qld_ready),   .out_data(qld)
  );

  logic  qb_wr_valid, qb_wr_ready;
  qlen_t qb_wr_base;
  logic [$clog2(SYM_PER_WORD):0] qb_wr_count;
  word_t qb_wr_syms;
  sw_query_loader u_query_loader (
    .clk, .rst_n,
    .in_valid(qld_valid), .in_ready(qld_ready), .in_pkt(qld),
    .wr_valid(qb_wr_valid), .wr_ready(qb_wr_ready),
    .wr_base (qb_wr_base),  .wr_count(qb_wr_count), .wr_syms(qb_wr_syms)
  );

  logic [NUM_PE-1:0] q_valid, q_pop;
  sym_t              q_sym [NUM_PE];
  sw_query_buffer #(.NUM_PE(NUM_PE), .DEPTH(QB_DEPTH)) u_query_buffer (
    .clk, .rst_n,
    .wr_valid(qb_wr_valid), .wr_ready(qb_wr_ready),
    .wr_base (qb_wr_base),  .wr_count(qb_wr_count), .wr_syms(qb_wr_syms),
    .q_valid, .q_sym, .q_pop
  );

  // Processing Element array
  logic    pa_valid, pa_ready;
  sw_tok_t pa_tok;
  sw_pe_array #(.NUM_PE(NUM_PE), .MATCH(MATCH), .MISMATCH(MISMATCH), .GAP(GAP)) u_pe_array (
    .clk, .rst_n,
    .in_valid (tgt_valid), .in_ready (tgt_ready), .in_tok (tgt_tok),
    .out_valid(pa_valid),  .out_ready(pa_ready),  .out_tok(pa_tok),
    .q_valid, .q_sym, .q_pop
  );

  // PE_Exit channel: only NR tokens, which carry the scores, are kept.
  logic    ex_in_ready, ex_valid, ex_ready;
  sw_tok_t ex_tok;
  assign pa_ready = pa_tok.nr ? ex_in_ready : 1'b1;
  sw_fifo #(.T(sw_tok_t), .DEPTH(EXIT_DEPTH)) u_pe_exit_ch (
    .clk, .rst_n,
    .in_valid (pa_valid && pa_tok.nr), .in_ready(ex_in_ready), .in_data(pa_tok),
    .out_valid(ex_valid), .out_ready(ex_ready), .out_data(ex_tok)
  );

  // Output channel and Output Parser
  logic      oinf_valid, oinf_ready;
  out_info_t oinf;
  sw_fifo #(.T(out_info_t), .DEPTH(OUT_DEPTH)) u_output_ch (
    .clk, .rst_n,
    .in_valid (oinf_w_valid), .in_ready (oinf_w_ready), .in_data (oinf_w),
    .out_valid(oinf_valid),   .out_ready(oinf_ready),   .out_data(oinf)
  );

  sw_output_parser u_output_parser (
    .clk, .rst_n,
    .exit_valid(ex_valid),   .exit_ready(ex_ready),   .exit_tok(ex_tok),
    .oinf_valid(oinf_valid), .oinf_ready(oinf_ready), .oinf    (oinf),
    .wr_valid, .wr_ready, .wr_data
  );
endmodule
