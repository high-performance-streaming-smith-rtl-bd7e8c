// Processing Element array: a linear systolic chain of NUM_PE PEs.
//
// Tokens from the target channel enter PE 0 and move one PE to the right per
// cycle; PE i computes column i of the similarity matrix, so an anti-diagonal
// wavefront of cells is updated each cycle. Alignments stream through back to
// back: the New Read token that closes one alignment is followed directly by
// the first target symbol of the next, so after the first alignment each one
// costs tlen+1 cycles of array time whatever its query length. The token
// leaving the last PE is an NR token holding the alignment's best score, or a
// target symbol that the consumer discards.
//
// Interface: valid/ready token stream in (from the Target channel) and out
// (to the PE_Exit channel); one query-queue head and pop per PE. Latency is
// NUM_PE cycles when nothing stalls. The ready signal ripples combinationally
// from the output back through all PEs.
//
// The array length of 131 PEs is the one used in every configuration the
// accelerator was evaluated in.
module sw_pe_array
  import sw_pkg::*;
#(
  parameter int unsigned NUM_PE   = 131,
  parameter int          MATCH    = 2,
  parameter int          MISMATCH = -1,
  parameter int          GAP      = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  sw_tok_t in_tok,
  output logic    out_valid,
  input  logic    out_ready,
  output sw_tok_t out_tok,
  input  logic [NUM_PE-1:0] q_valid,
  input  sym_t    q_sym [NUM_PE],
  output logic [NUM_PE-1:0] q_pop
);
  logic    v   [NUM_PE+1];
  logic    r   [NUM_PE+1];
  sw_tok_t tok [NUM_PE+1];

  assign v[0]      = in_valid;
  assign tok[0]    = in_tok;
  assign in_ready  = r[0];
  assign out_valid = v[NUM_PE];
  assign out_tok   = tok[NUM_PE];
  assign r[NUM_PE] = out_ready;

  for (genvar i = 0; i < NUM_PE; i++) begin : g_pe
    sw_pe #(
      .PE_IDX(i), .MATCH(MATCH), .MISMATCH(MISMATCH), .GAP(GAP)
    ) u_pe (
      .clk, .rst_n,
      .in_valid (v[i]),   .in_ready (r[i]),   .in_tok (tok[i]),
      .out_valid(v[i+1]), .out_ready(r[i+1]), .out_tok(tok[i+1]),
      .q_valid  (q_valid[i]), .q_sym(q_sym[i]), .q_pop(q_pop[i])
    );
  end
endmodule
