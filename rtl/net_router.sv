// net_router: router circuit of the datagram network.
//
// A router has one input and two outputs. It reads the destination address
// of every packet and sends the packet to the local sub-net output when
// (dest & NET_MASK) == NET_ADDR, and to the next node of the ring otherwise.
// Words pass through a LATENCY-stage pipeline; the routing decision is made
// when the destination word enters, one clock after PACKET_START, and is
// carried along with every word of the packet. The output not chosen shows
// IDLE. The router never stalls and never loses a correctly formed packet.
//
// Timing: a word on the input in cycle c appears on one output in cycle
// c + LATENCY; LATENCY = 7 is the router delay given for the platform.
//
// A packet whose word after PACKET_START is not an address word (FCF = 0)
// counts as wrongly addressed and is dropped; reading "wrongly addressed"
// this way is a choice of this design, as is sending IDLE words to neither
// output (both outputs show IDLE when no packet is routed to them).
module net_router
  import daq_pkg::*;
#(
  parameter logic [ADDR_W-1:0] NET_ADDR = '0,
  parameter logic [ADDR_W-1:0] NET_MASK = 7'b111_1000,
  parameter int unsigned       LATENCY  = 7
) (
  input  logic      clk,
  input  logic      rst,
  input  net_word_t in_word,
  output net_word_t out_local,   // to the local sub-net (receiver nodes)
  output net_word_t out_next,    // to the combiner and the next FPGA
  output logic      drop_pulse   // one clock per dropped packet
);

  typedef enum logic [1:0] {RT_NEXT, RT_LOCAL, RT_DROP} route_t;

  // Stage 1 holds a word before its route is known; stages 2..LATENCY carry
  // the word with its route.
  net_word_t s1;
  net_word_t sw [2:LATENCY];
  route_t    sr [2:LATENCY];
  route_t    cur_route, s1_route;

  function automatic route_t decide(net_word_t dest);
    if (!dest.fcf)                                       return RT_DROP;
    if ((ADDR_W'(dest.data) & NET_MASK) == NET_ADDR)     return RT_LOCAL;
    return RT_NEXT;
  endfunction

  always_comb s1_route = is_start(s1) ? decide(in_word) : cur_route;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1        <= W_IDLE;
      cur_route <= RT_DROP;
      for (int i = 2; i <= LATENCY; i++) begin
        sw[i] <= W_IDLE;
        sr[i] <= RT_DROP;
      end
    end else begin
      s1        <= in_word;
      cur_route <= s1_route;
      sw[2]     <= s1;
      sr[2]     <= s1_route;
      for (int i = 3; i <= LATENCY; i++) begin
        sw[i] <= sw[i-1];
        sr[i] <= sr[i-1];
      end
    end
  end

  always_comb begin
    out_local  = W_IDLE;
    out_next   = W_IDLE;
    if (!is_idle(sw[LATENCY])) begin
      if (sr[LATENCY] == RT_LOCAL) out_local = sw[LATENCY];
      if (sr[LATENCY] == RT_NEXT)  out_next  = sw[LATENCY];
    end
    drop_pulse = is_start(sw[LATENCY]) && sr[LATENCY] == RT_DROP;
  end

  initial assert (LATENCY >= 2) else $error("net_router: LATENCY must be at least 2");

endmodule
