// combiner_fifo: input buffer of a combiner circuit.
//
// A first-in first-out queue of DEPTH network words held in a memory array
// with a write pointer, a read pointer and a word count. The head word is
// shown combinationally on head (show-ahead), so the combiner can look at
// the next word before it takes it, and count gives the queue length its
// arbiter compares. A write and a read in the same clock are both done.
// A write into a full queue is refused and flagged on overflow; a read from
// an empty queue does nothing.
//
// Timing: a word written in cycle c is at the head in cycle c+1 if the
// queue was empty. DEPTH = 256 is the combiner FIFO depth of the platform;
// the show-ahead read and the overflow flag are choices of this design.
module combiner_fifo
  import daq_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     wr_en,
  input  net_word_t                wr_word,
  input  logic                     rd_en,
  output net_word_t                head,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                     overflow
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  net_word_t     mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_wr, do_rd;

  assign do_wr    = wr_en && (count != CW'(DEPTH));
  assign do_rd    = rd_en && (count != '0);
  assign overflow = wr_en && (count == CW'(DEPTH));
  assign head     = (count != '0) ? mem[rptr] : W_IDLE;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_word;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

endmodule
