// Target Loader: turns target records into the token stream of the array.
//
// From the T_load channel it takes a header (query and target length) and the
// packed target words, and emits one token per target symbol, then one New
// Read (NR) token that closes the alignment. Every token carries the query
// length so that each PE can decide whether it takes part in the alignment;
// symbol tokens enter with h = 0 (the column left of PE 0) and the NR token
// with a running maximum of 0. An alignment occupies exactly tlen+1 token
// slots, one per cycle while the Target channel has room.
//
// Two halves keep the output gapless. The intake half reads one packet per
// cycle and turns each target word into a job {word, symbol count, query
// length, NR-after flag} in a two-entry job queue; a header only sets up the
// counters (a target of length 0 gives a job with no symbols and the NR flag).
// The emit half takes jobs and sends one token per cycle. Intake needs
// 1 + ceil(tlen/256) cycles per alignment and emission tlen+1, so intake keeps
// ahead and the header never costs an output cycle.
//
// Interface: valid/ready packet stream in, valid/ready token stream out
// (registered). Emitting one NR token after each target follows the
// accelerator description; the token format and the job queue are this
// design's choices.
module sw_target_loader
  import sw_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  ld_pkt_t in_pkt,
  output logic    out_valid,
  input  logic    out_ready,
  output sw_tok_t out_tok
);
  localparam int PW = $clog2(SYM_PER_WORD) + 1;

  typedef struct packed {
    word_t         word;
    logic [PW-1:0] nsyms;                 // 0..SYM_PER_WORD symbols in word
    qlen_t         qlen;
    logic          last;                  // emit NR after the symbols
  } job_t;

  // ---------------- intake ----------------
  qlen_t    in_qlen;
  tlen_t    in_left;                      // target symbols not yet in a job
  rec_hdr_t hdr;
  logic     job_wr_valid, job_wr_ready;
  job_t     job_wr;

  assign hdr = rec_hdr_t'(in_pkt.data);

  always_comb begin
    job_wr_valid = 1'b0;
    job_wr       = '{word: in_pkt.data, nsyms: '0, qlen: in_qlen, last: 1'b0};
    in_ready     = 1'b1;
    if (in_pkt.hdr) begin
      // Header; a target of length 0 still needs its NR token.
      job_wr.qlen  = hdr.qlen;
      job_wr_valid = in_valid && (hdr.tlen == '0);
      job_wr.last  = 1'b1;
      in_ready     = (hdr.tlen != '0) || job_wr_ready;
    end else begin
      job_wr_valid = in_valid && (in_left != '0);
      job_wr.nsyms = (in_left >= tlen_t'(SYM_PER_WORD)) ? PW'(SYM_PER_WORD) : PW'(in_left);
      job_wr.last  = (in_left <= tlen_t'(SYM_PER_WORD));
      in_ready     = (in_left == '0) || job_wr_ready;   // stray words are dropped
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_qlen <= '0;
      in_left <= '0;
    end else if (in_valid && in_ready) begin
      if (in_pkt.hdr) begin
        in_qlen <= hdr.qlen;
        in_left <= hdr.tlen;
      end else if (in_left != '0) begin
        in_left <= in_left - tlen_t'(job_wr.nsyms);
      end
    end
  end

  // ---------------- job queue ----------------
  logic job_valid, job_pop;
  job_t job;

  sw_fifo #(.T(job_t), .DEPTH(2)) u_jobs (
    .clk, .rst_n,
    .in_valid (job_wr_valid), .in_ready(job_wr_ready), .in_data(job_wr),
    .out_valid(job_valid),    .out_ready(job_pop),     .out_data(job)
  );

  // ---------------- emit ----------------
  logic [PW-1:0] pos;
  logic          emit;
  logic          emit_sym;

  assign emit     = job_valid && (!out_valid || out_ready);
  assign emit_sym = (pos < job.nsyms);
  // Pop with the last symbol of a plain word, or with the NR token.
  assign job_pop  = emit && (emit_sym ? (pos + 1'b1 == job.nsyms && !job.last) : 1'b1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos       <= '0;
      out_valid <= 1'b0;
      out_tok   <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (emit) begin
        out_valid <= 1'b1;
        if (emit_sym)
          out_tok <= '{nr: 1'b0, sym: job.word[pos[PW-2:0]*SYM_W +: SYM_W], qlen: job.qlen, h: '0};
        else
          out_tok <= '{nr: 1'b1, sym: '0, qlen: job.qlen, h: '0};
        pos <= job_pop ? '0 : pos + 1'b1;
      end
    end
  end
endmodule
