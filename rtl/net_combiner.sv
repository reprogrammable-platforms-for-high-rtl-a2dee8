// net_combiner: combiner circuit of the datagram network.
//
// Merges two packet streams into one. Each input has its own FIFO
// (combiner_fifo); input 1 takes pass-through packets, input 2 local
// packets. The arbitration controller (combiner_arbiter) serves the queue
// with more words and keeps serving it until the packet ends, so packets
// leave whole. The output is the head of the selected queue, or IDLE.
//
// Transmitters never wait, so the combiner must be lossy. IDLE words are not
// stored. A packet is admitted only if, when its PACKET_START arrives, its
// FIFO has room for MAX_PKT_WORDS words; otherwise the whole packet is
// discarded and drop1/drop2 pulse for one clock. A packet longer than
// MAX_PKT_WORDS that still meets a full FIFO loses its tail (also flagged).
// Whole-packet admission is a choice of this design; the platform
// description only states that the combiner drops packets when overloaded.
//
// Timing: a word written in cycle c can leave in cycle c+1, the minimum
// combiner delay of one clock. q1_len/q2_len expose the queue lengths,
// which the platform's simulations histogram. DEPTH = 256 words as on the
// platform.
module net_combiner
  import daq_pkg::*;
#(
  parameter int unsigned DEPTH         = 256,
  parameter int unsigned MAX_PKT_WORDS = packet_words(HIT_MSG_W),
  parameter bit          TIE_TOGGLE    = 1'b0
) (
  input  logic                       clk,
  input  logic                       rst,
  input  net_word_t                  in1,      // pass-through packets
  input  net_word_t                  in2,      // local input packets
  output net_word_t                  out_word,
  output logic [$clog2(DEPTH+1)-1:0] q1_len,
  output logic [$clog2(DEPTH+1)-1:0] q2_len,
  output logic                       drop1,
  output logic                       drop2
);

  net_word_t head1, head2;
  logic      sel;
  logic      wr1, wr2;
  logic      adm_drop1, adm_drop2;

  combiner_input_gate #(.DEPTH(DEPTH), .MAX_PKT_WORDS(MAX_PKT_WORDS)) u_gate1 (
    .clk, .rst, .in_word(in1), .q_len(q1_len),
    .wr_en(wr1), .drop(adm_drop1)
  );
  combiner_input_gate #(.DEPTH(DEPTH), .MAX_PKT_WORDS(MAX_PKT_WORDS)) u_gate2 (
    .clk, .rst, .in_word(in2), .q_len(q2_len),
    .wr_en(wr2), .drop(adm_drop2)
  );

  combiner_fifo #(.DEPTH(DEPTH)) u_fifo1 (
    .clk, .rst, .wr_en(wr1), .wr_word(in1), .rd_en(sel),
    .head(head1), .count(q1_len), .overflow()
  );
  combiner_fifo #(.DEPTH(DEPTH)) u_fifo2 (
    .clk, .rst, .wr_en(wr2), .wr_word(in2), .rd_en(!sel),
    .head(head2), .count(q2_len), .overflow()
  );

  combiner_arbiter #(.DEPTH(DEPTH), .TIE_TOGGLE(TIE_TOGGLE)) u_arb (
    .clk, .rst, .q1_size(q1_len), .q2_size(q2_len),
    .next1(head1), .next2(head2), .sel, .busy()
  );

  assign out_word = sel ? head1 : head2;
  assign drop1    = adm_drop1;
  assign drop2    = adm_drop2;

  initial assert (MAX_PKT_WORDS <= DEPTH)
    else $error("net_combiner: a packet must fit in a FIFO");

endmodule
