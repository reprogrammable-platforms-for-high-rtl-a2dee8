// net_receiver: network receiver node of the datagram network.
//
// The node listens to the words of its sub-net. On PACKET_START it compares
// the next word, the destination address, with its own address rec_addr.
// If they match it keeps the source address and shifts the following 7-bit
// payload words into its shift register; on PACKET_STOP it copies the
// message into the parallel output register out_msg, shows the sender on
// src_addr and raises rx_rdy for one clock. Packets for other addresses are
// ignored.
//
// Timing: rx_rdy is high in the cycle after the cycle in which PACKET_STOP
// is on the input, as in the platform description; out_msg and src_addr
// hold their values until the next accepted packet.
//
// Choices of this design: a packet is accepted only if it carried exactly
// ceil(N_BITS/7) payload words (a truncated or overlong packet raises no
// rx_rdy); a PACKET_START inside a packet restarts reception; payload bits
// above N_BITS in the last word are discarded.
module net_receiver
  import daq_pkg::*;
#(
  parameter int unsigned N_BITS = HIT_MSG_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [ADDR_W-1:0] rec_addr,
  input  net_word_t         rx_word,   // {FCF, DATA[6:0]}
  output logic [ADDR_W-1:0] src_addr,
  output logic [N_BITS-1:0] out_msg,
  output logic              rx_rdy
);

  localparam int unsigned NW  = msg_words(N_BITS);
  localparam int unsigned SRW = NW * 7;
  localparam int unsigned CW  = $clog2(NW + 2);

  typedef enum logic [1:0] {R_HUNT, R_DEST, R_SRC, R_DATA} state_t;

  state_t            state;
  logic [SRW-1:0]    shreg;
  logic [ADDR_W-1:0] src_q;
  logic [CW-1:0]     cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= R_HUNT;
      shreg    <= '0;
      src_q    <= '0;
      cnt      <= '0;
      src_addr <= '0;
      out_msg  <= '0;
      rx_rdy   <= 1'b0;
    end else begin
      rx_rdy <= 1'b0;
      if (is_start(rx_word)) begin
        state <= R_DEST;
      end else begin
        unique case (state)
          R_HUNT: ;
          R_DEST: state <= (rx_word.fcf && rx_word.data == 7'(rec_addr)) ? R_SRC : R_HUNT;
          R_SRC: begin
            if (rx_word.fcf) begin
              src_q <= ADDR_W'(rx_word.data);
              cnt   <= '0;
              state <= R_DATA;
            end else begin
              state <= R_HUNT;
            end
          end
          R_DATA: begin
            if (rx_word.fcf) begin
              // Payload arrives least significant slice first.
              shreg <= {rx_word.data, shreg[SRW-1:7]};
              if (cnt <= CW'(NW)) cnt <= cnt + 1'b1;
            end else begin
              if (is_stop(rx_word) && cnt == CW'(NW)) begin
                out_msg  <= shreg[N_BITS-1:0];
                src_addr <= src_q;
                rx_rdy   <= 1'b1;
              end
              state <= R_HUNT;
            end
          end
          default: state <= R_HUNT;
        endcase
      end
    end
  end

endmodule
