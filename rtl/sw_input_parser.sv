// Input Parser: reads alignment records from memory and feeds the kernels.
//
// Memory holds a sequence of records, one per query/target pair:
//     word 0             header: [23:16] query length, [15:0] target length
//     next ceil(qlen/256) words: query symbols, 2 bits each, symbol 0 in [1:0]
//     next ceil(tlen/256) words: target symbols, same packing
// The parser reads these words as a valid/ready stream. For each record it
// sends the header and the query words to the Query Loader (Q_load channel),
// the header and the target words to the Target Loader (T_load channel), and
// one packet {alignment number, qlen, tlen} to the Output Parser (Output
// channel). These packets tell each kernel how much work the alignment holds,
// so no central controller is needed. A header moves only when all three
// channels can take it; a data word moves when its own channel can.
// Throughput: one memory word per cycle.
//
// The roles of the parser and its three output channels follow the
// accelerator description; the record layout, packing and the numbering of
// alignments from 0 after reset are this design's choices.
module sw_input_parser
  import sw_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // memory read stream
  input  logic      rd_valid,
  output logic      rd_ready,
  input  word_t     rd_data,
  // T_load channel
  output logic      tld_valid,
  input  logic      tld_ready,
  output ld_pkt_t   tld_pkt,
  // Q_load channel
  output logic      qld_valid,
  input  logic      qld_ready,
  output ld_pkt_t   qld_pkt,
  // Output channel
  output logic      oinf_valid,
  input  logic      oinf_ready,
  output out_info_t oinf
);
  typedef enum logic [1:0] {S_HDR, S_QRY, S_TGT} state_e;

  state_e   state;
  tlen_t    qwords, twords;               // words still to move
  id_t      next_id;
  rec_hdr_t hdr;
  tlen_t    hdr_qw, hdr_tw;

  assign hdr    = rec_hdr_t'(rd_data);
  assign hdr_qw = tlen_t'(words_for(int'(hdr.qlen)));
  assign hdr_tw = tlen_t'(words_for(int'(hdr.tlen)));

  assign tld_pkt = '{hdr: (state == S_HDR), data: rd_data};
  assign qld_pkt = '{hdr: (state == S_HDR), data: rd_data};
  assign oinf    = '{id: next_id, qlen: hdr.qlen, tlen: hdr.tlen};

  always_comb begin
    rd_ready   = 1'b0;
    tld_valid  = 1'b0;
    qld_valid  = 1'b0;
    oinf_valid = 1'b0;
    unique case (state)
      S_HDR: begin
        rd_ready   = tld_ready && qld_ready && oinf_ready;
        tld_valid  = rd_valid && qld_ready && oinf_ready;
        qld_valid  = rd_valid && tld_ready && oinf_ready;
        oinf_valid = rd_valid && tld_ready && qld_ready;
      end
      S_QRY: begin
        rd_ready  = qld_ready;
        qld_valid = rd_valid;
      end
      S_TGT: begin
        rd_ready  = tld_ready;
        tld_valid = rd_valid;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_HDR;
      qwords  <= '0;
      twords  <= '0;
      next_id <= '0;
    end else if (rd_valid && rd_ready) begin
      unique case (state)
        S_HDR: begin
          qwords  <= hdr_qw;
          twords  <= hdr_tw;
          next_id <= next_id + 1'b1;
          if (hdr_qw != '0)      state <= S_QRY;
          else if (hdr_tw != '0) state <= S_TGT;
        end
        S_QRY: begin
          qwords <= qwords - 1'b1;
          if (qwords == tlen_t'(1)) state <= (twords != '0) ? S_TGT : S_HDR;
        end
        S_TGT: begin
          twords <= twords - 1'b1;
          if (twords == tlen_t'(1)) state <= S_HDR;
        end
        default: state <= S_HDR;
      endcase
    end
  end
endmodule
