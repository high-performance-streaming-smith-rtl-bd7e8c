// Output Parser: writes one result per alignment to memory.
//
// Alignments leave the PE array in the order they entered it, so the k-th New
// Read token on the PE_Exit channel belongs to the k-th packet on the Output
// channel. The parser waits until both are present, then writes the result
// word {alignment number, best score} to the memory write stream and takes
// both inputs. Target-symbol tokens that leave the array carry no result and
// are discarded before the PE_Exit channel, so only NR tokens arrive here.
//
// Interface: two valid/ready inputs, one valid/ready output; the output is
// combinational from the channel heads, so one result can be written per
// cycle.
//
// The pairing of the PE_Exit and Output channels follows the accelerator
// description; the result word format is this design's choice.
module sw_output_parser
  import sw_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // PE_Exit channel: NR tokens with the best score in h
  input  logic      exit_valid,
  output logic      exit_ready,
  input  sw_tok_t   exit_tok,
  // Output channel
  input  logic      oinf_valid,
  output logic      oinf_ready,
  input  out_info_t oinf,
  // memory write stream
  output logic      wr_valid,
  input  logic      wr_ready,
  output result_t   wr_data
);
  assign wr_valid   = exit_valid && oinf_valid;
  assign wr_data    = '{id: oinf.id, score: exit_tok.h};
  assign exit_ready = oinf_valid && wr_ready;
  assign oinf_ready = exit_valid && wr_ready;

  // Only NR tokens are expected on the PE_Exit channel.
  a_exit_is_nr: assert property (@(posedge clk) disable iff (!rst_n)
                                 exit_valid |-> exit_tok.nr);
endmodule
