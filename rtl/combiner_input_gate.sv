// combiner_input_gate: packet admission for one combiner input.
//
// Decides which incoming words are written into the combiner FIFO. IDLE
// words are never written. When PACKET_START arrives and the FIFO has fewer
// than MAX_PKT_WORDS free places, the packet is refused: drop pulses for one
// clock and every word up to and including its PACKET_STOP is discarded.
// If an admitted packet still meets a full FIFO (it was longer than
// MAX_PKT_WORDS), drop pulses and the rest of that packet is discarded.
// Combinational write decision, one state bit. This whole-packet policy is
// a choice of this design.
module combiner_input_gate
  import daq_pkg::*;
#(
  parameter int unsigned DEPTH         = 256,
  parameter int unsigned MAX_PKT_WORDS = packet_words(HIT_MSG_W)
) (
  input  logic                       clk,
  input  logic                       rst,
  input  net_word_t                  in_word,
  input  logic [$clog2(DEPTH+1)-1:0] q_len,
  output logic                       wr_en,
  output logic                       drop
);

  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic discarding, room, full;

  assign full = (q_len == CW'(DEPTH));
  assign room = (CW'(DEPTH) - q_len) >= CW'(MAX_PKT_WORDS);

  always_comb begin
    wr_en = 1'b0;
    drop  = 1'b0;
    if (is_start(in_word)) begin
      wr_en = room;
      drop  = !room;
    end else if (!is_idle(in_word)) begin
      wr_en = !discarding && !full;
      drop  = !discarding && full;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      discarding <= 1'b0;
    end else if (is_start(in_word)) begin
      discarding <= !room;
    end else if (is_stop(in_word)) begin
      discarding <= 1'b0;
    end else if (drop) begin
      discarding <= 1'b1;
    end
  end

endmodule
