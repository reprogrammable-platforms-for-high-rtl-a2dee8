// combiner_arbiter: arbitration controller of a combiner circuit.
//
// A three-state machine (PKT_START, QUEUE1, QUEUE2) that decides, every
// clock, which of the two input queues gives the next output word. sel = 1
// takes queue 1 (pass-through), sel = 0 queue 2 (local). In PKT_START it
// picks the queue holding more words; with equal, non-empty queues it
// repeats the queue it served last (TIE_TOGGLE = 0) or alternates
// (TIE_TOGGLE = 1). With both queues empty it stays and keeps its last
// selection. In QUEUE1/QUEUE2 it keeps serving that queue until the head
// word is PACKET_STOP or IDLE (an empty queue reads as IDLE), then returns
// to PKT_START and remembers which queue it served. A packet thus leaves
// the combiner whole and contiguous.
//
// Timing: combinational; the chosen queue's head is output and popped in
// the same clock. The states, guards and outputs follow the combiner
// controller state diagram. The platform text gives two readings of a tie:
// the controller description says a tie goes to the queue served last, the
// hardware overview says ties toggle in a ping-pong scheme. The default
// follows the state diagram; TIE_TOGGLE selects the other reading.
module combiner_arbiter
  import daq_pkg::*;
#(
  parameter int unsigned DEPTH      = 256,
  parameter bit          TIE_TOGGLE = 1'b0
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [$clog2(DEPTH+1)-1:0] q1_size,
  input  logic [$clog2(DEPTH+1)-1:0] q2_size,
  input  net_word_t                  next1,   // head of queue 1
  input  net_word_t                  next2,   // head of queue 2
  output logic                       sel,     // 1: queue 1, 0: queue 2
  output logic                       busy     // in QUEUE1 or QUEUE2
);

  typedef enum logic [1:0] {PKT_START, QUEUE1, QUEUE2} state_t;

  state_t state, state_nx;
  logic   last_sel, last_sel_nx;   // "outputValue" of the state diagram

  always_comb begin
    state_nx    = state;
    last_sel_nx = last_sel;
    sel         = last_sel;
    unique case (state)
      PKT_START: begin
        if (q1_size > q2_size) begin
          sel = 1'b1; state_nx = QUEUE1;
        end else if (q2_size > q1_size) begin
          sel = 1'b0; state_nx = QUEUE2;
        end else if (q1_size != '0) begin
          sel      = TIE_TOGGLE ? !last_sel : last_sel;
          state_nx = sel ? QUEUE1 : QUEUE2;
        end
      end
      QUEUE1: begin
        sel = 1'b1;
        if (is_stop(next1) || is_idle(next1)) begin
          state_nx = PKT_START; last_sel_nx = 1'b1;
        end
      end
      QUEUE2: begin
        sel = 1'b0;
        if (is_stop(next2) || is_idle(next2)) begin
          state_nx = PKT_START; last_sel_nx = 1'b0;
        end
      end
      default: state_nx = PKT_START;
    endcase
  end

  assign busy = (state != PKT_START);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= PKT_START;
      last_sel <= 1'b1;
    end else begin
      state    <= state_nx;
      last_sel <= last_sel_nx;
    end
  end

endmodule
