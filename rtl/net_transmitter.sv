// net_transmitter: network transmitter node of the datagram network.
//
// When tx_en is asserted while tx_rdy is high, the node latches the message
// in_msg together with the source and destination addresses into its input
// register, and from the next clock on it sends the packet
//   PACKET_START, dest, src, in_msg[6:0], in_msg[13:7], ..., PACKET_STOP
// one 8-bit word per clock, the message being shifted out seven bits at a
// time from a data shift register. Between packets it sends IDLE.
//
// Timing: tx_en in cycle c puts PACKET_START on the output in cycle c+1, the
// fixed one-clock delay of the platform description. A packet of an N_BITS
// message occupies ceil(N_BITS/7) + 4 consecutive cycles. tx_rdy is high
// whenever no packet is being sent, including the cycle in which
// PACKET_STOP is on the output, so packets can follow each other with no
// IDLE word between them. tx_en while tx_rdy is low is ignored.
//
// Ports, word format and the one-cycle start delay follow the platform
// description. The back-to-back behaviour and the zero padding of the last
// 7-bit slice are choices of this design.
module net_transmitter
  import daq_pkg::*;
#(
  parameter int unsigned N_BITS = HIT_MSG_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [ADDR_W-1:0] dest_addr,
  input  logic [ADDR_W-1:0] src_addr,
  input  logic [N_BITS-1:0] in_msg,
  input  logic              tx_en,
  output net_word_t         tx_word,   // {FCF, DATA[6:0]}
  output logic              tx_rdy
);

  localparam int unsigned NW  = msg_words(N_BITS);
  localparam int unsigned SRW = NW * 7;
  localparam int unsigned CW  = $clog2(NW + 1);

  typedef enum logic [2:0] {S_IDLE, S_DEST, S_SRC, S_DATA, S_STOP} state_t;

  state_t            state;
  logic [SRW-1:0]    shreg;
  logic [ADDR_W-1:0] dest_q, src_q;
  logic [CW-1:0]     cnt;

  assign tx_rdy = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      tx_word <= W_IDLE;
      shreg   <= '0;
      dest_q  <= '0;
      src_q   <= '0;
      cnt     <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (tx_en) begin
            shreg   <= SRW'(in_msg);
            dest_q  <= dest_addr;
            src_q   <= src_addr;
            tx_word <= W_START;
            state   <= S_DEST;
          end else begin
            tx_word <= W_IDLE;
          end
        end
        S_DEST: begin
          tx_word <= '{fcf: 1'b1, data: 7'(dest_q)};
          state   <= S_SRC;
        end
        S_SRC: begin
          tx_word <= '{fcf: 1'b1, data: 7'(src_q)};
          cnt     <= '0;
          state   <= S_DATA;
        end
        S_DATA: begin
          tx_word <= '{fcf: 1'b1, data: shreg[6:0]};
          shreg   <= shreg >> 7;
          cnt     <= cnt + 1'b1;
          if (cnt == CW'(NW - 1)) state <= S_STOP;
        end
        S_STOP: begin
          tx_word <= W_STOP;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
