// daq_pkg: types and constants shared by the datagram network and the
// front-end blocks of the data acquisition platform.
//
// Every link of the network carries one 8-bit word per clock. Bit 7 is the
// flow control flag (FCF). With FCF = 1 the low seven bits are payload (an
// address or a 7-bit slice of the message); with FCF = 0 they are a flow
// control code: IDLE = 0, PACKET_START = 1, PACKET_STOP = 64. A packet is
//   PACKET_START, DestAddr, SrcAddr, IN[6:0], IN[13:7], ..., PACKET_STOP
// so a message of n bits takes ceil(n/7) + 4 words on the wire.
// The word format and codes follow the platform description; that the
// address words carry FCF = 1 and that an address fits in one word
// (ADDR_W <= 7) are choices of this design.
package daq_pkg;

  typedef struct packed {
    logic       fcf;   // 1: payload word, 0: flow control code
    logic [6:0] data;
  } net_word_t;

  localparam logic [6:0] CODE_IDLE  = 7'd0;
  localparam logic [6:0] CODE_START = 7'd1;
  localparam logic [6:0] CODE_STOP  = 7'd64;

  localparam net_word_t W_IDLE  = '{fcf: 1'b0, data: CODE_IDLE};
  localparam net_word_t W_START = '{fcf: 1'b0, data: CODE_START};
  localparam net_word_t W_STOP  = '{fcf: 1'b0, data: CODE_STOP};

  // Width of a network address. One address occupies one 7-bit word.
  localparam int unsigned ADDR_W = 7;

  // Front end: 12-bit ADC samples, 8 channels per FPGA, a 64-bit time stamp
  // (32-bit seconds, 32-bit binary fraction of a second) and a capture
  // window of eight samples per hit.
  localparam int unsigned SAMPLE_W    = 12;
  localparam int unsigned CH_PER_FPGA = 8;
  localparam int unsigned TS_W        = 64;
  localparam int unsigned WINDOW      = 8;

  // Message carried by a channel transmitter: time stamp in the low bits,
  // then the WINDOW samples, earliest first.
  localparam int unsigned HIT_MSG_W   = TS_W + WINDOW * SAMPLE_W;  // 160

  // Configuration message received by each FPGA: [11:0] trigger threshold,
  // [19:12] channel enable, [20] reserved (three 7-bit words).
  localparam int unsigned CFG_MSG_W = 21;

  // Monitoring signals of one FPGA node.
  typedef struct packed {
    logic [CH_PER_FPGA-1:0] hits;         // a channel delivered a hit message
    logic [CH_PER_FPGA-1:0] tx_start;     // a transmitter started a packet
    logic [CH_PER_FPGA-1:0] overwrite;    // a held hit message was overwritten
    logic [3:0]             chain_drops;  // packets dropped by the local combiners
    logic [1:0]             ring_drops;   // packets dropped by the ring combiner
    logic                   router_drop;  // the router dropped a packet
    logic [8:0]             ring_q1;      // ring combiner queue lengths
    logic [8:0]             ring_q2;
    logic [SAMPLE_W-1:0]    threshold;
    logic [CH_PER_FPGA-1:0] ch_enable;
  } node_status_t;

  // Words on the wire for a message of n bits.
  function automatic int unsigned msg_words(int unsigned n);
    return (n + 6) / 7;
  endfunction

  function automatic int unsigned packet_words(int unsigned n);
    return msg_words(n) + 4;
  endfunction

  function automatic logic is_start(net_word_t w);
    return (w == W_START);
  endfunction

  function automatic logic is_stop(net_word_t w);
    return (w == W_STOP);
  endfunction

  function automatic logic is_idle(net_word_t w);
    return (w == W_IDLE);
  endfunction

endpackage
