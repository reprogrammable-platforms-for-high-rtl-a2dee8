// fpga_node: one data acquisition FPGA of the ring.
//
// Eight ADC channels enter the FPGA. Each channel has a trigger and sampler
// (fe_trigger) that turns a hit into a message of a 64-bit time stamp and
// eight samples, a transmit controller (tx_controller) and a transmitter
// node (net_transmitter) that sends the message as a packet from source
// address {NODE_ID, channel} to the controller address CTRL_ADDR. The eight
// local streams are merged by a chain of seven combiners (the first merges
// channels 0 and 1, each further one the previous result and the next
// channel). Packets from the ring enter the router (net_router): those
// whose destination lies in this FPGA's sub-net (dest & 7'b1111000 ==
// NODE_ID << 3) go to the receiver node, all others are passed on. A last
// combiner merges the passed-on packets (its pass-through input) with the
// local stream and drives the ring output.
//
// The receiver node listens at address NODE_ID << 3 for a 21-bit
// configuration message: bits [11:0] set the trigger threshold of all
// channels, bits [19:12] enable channels 0..7. Every received message is
// also shown on the rx_* ports (the local sub-network). A time stamp
// counter is shared by the channels.
//
// Timing: one network word per clock on ring_in and ring_out. Router delay
// 7 clocks, combiner delay at least 1 clock per stage, transmitter start
// delay 1 clock.
//
// The router/receiver/transmitter/combiner structure follows the FPGA
// network diagram and the FPGA data-flow model of the platform; the
// address plan, the combiner chain order, the configuration message layout
// and its reset values are choices of this design.
module fpga_node
  import daq_pkg::*;
#(
  parameter logic [3:0]          NODE_ID     = 4'd0,
  parameter logic [ADDR_W-1:0]   CTRL_ADDR   = 7'h7F,
  parameter int unsigned         FIFO_DEPTH  = 256,
  parameter logic [SAMPLE_W-1:0] THRESH_INIT = 12'd2048,
  parameter int unsigned         CLK_HZ      = 100_000_000
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [SAMPLE_W-1:0]        adc   [CH_PER_FPGA],
  input  logic                       load_sec,
  input  logic [31:0]                sec_in,
  input  net_word_t                  ring_in,
  output net_word_t                  ring_out,
  output logic [ADDR_W-1:0]          rx_src,
  output logic [CFG_MSG_W-1:0]       rx_msg,
  output logic                       rx_rdy,
  output node_status_t               status
);

  localparam logic [ADDR_W-1:0] NET_ADDR = ADDR_W'({NODE_ID[3:0], 3'b000});
  localparam logic [ADDR_W-1:0] NET_MASK = 7'b111_1000;
  localparam int unsigned       CW       = $clog2(FIFO_DEPTH + 1);

  // ---- configuration received over the network ----
  logic [SAMPLE_W-1:0]    threshold;
  logic [CH_PER_FPGA-1:0] ch_enable;

  always_ff @(posedge clk) begin
    if (rst) begin
      threshold <= THRESH_INIT;
      ch_enable <= '1;
    end else if (rx_rdy) begin
      threshold <= rx_msg[SAMPLE_W-1:0];
      ch_enable <= rx_msg[SAMPLE_W +: CH_PER_FPGA];
    end
  end

  // ---- time stamp ----
  logic [TS_W-1:0] ts;
  timestamp_counter #(.CLK_HZ(CLK_HZ)) u_ts (
    .clk, .rst, .load_sec, .sec_in, .ts
  );

  // ---- channels: trigger, transmit controller, transmitter ----
  net_word_t              tx_word [CH_PER_FPGA];
  logic [CH_PER_FPGA-1:0] hit_v, tx_rdy, tx_en, ovw;

  for (genvar k = 0; k < CH_PER_FPGA; k++) begin : g_ch
    logic [HIT_MSG_W-1:0] hit_msg, tx_msg;

    fe_trigger u_trig (
      .clk, .rst, .enable(ch_enable[k]), .threshold, .sample(adc[k]), .ts,
      .msg(hit_msg), .msg_valid(hit_v[k]), .busy()
    );
    tx_controller #(.N_BITS(HIT_MSG_W)) u_txc (
      .clk, .rst, .in_msg(hit_msg), .in_valid(hit_v[k]), .trigger(tx_rdy[k]),
      .out_msg(tx_msg), .out_valid(tx_en[k]), .overwrite(ovw[k])
    );
    net_transmitter #(.N_BITS(HIT_MSG_W)) u_tx (
      .clk, .rst, .dest_addr(CTRL_ADDR), .src_addr(NET_ADDR | ADDR_W'(k)),
      .in_msg(tx_msg), .tx_en(tx_en[k]), .tx_word(tx_word[k]), .tx_rdy(tx_rdy[k])
    );
  end

  // ---- local combiner chain ----
  net_word_t              chain [CH_PER_FPGA-1];
  net_word_t              c_in1 [CH_PER_FPGA-1];
  logic [CH_PER_FPGA-2:0] cd1, cd2;

  assign c_in1[0] = tx_word[0];
  for (genvar j = 1; j < CH_PER_FPGA - 1; j++) begin : g_link
    assign c_in1[j] = chain[j-1];
  end

  for (genvar j = 0; j < CH_PER_FPGA - 1; j++) begin : g_comb
    net_combiner #(.DEPTH(FIFO_DEPTH), .MAX_PKT_WORDS(packet_words(HIT_MSG_W))) u_comb (
      .clk, .rst,
      .in1(c_in1[j]),
      .in2(tx_word[j+1]),
      .out_word(chain[j]), .q1_len(), .q2_len(), .drop1(cd1[j]), .drop2(cd2[j])
    );
  end

  // ---- router and receiver ----
  net_word_t to_local, to_next;
  logic      rt_drop;

  net_router #(.NET_ADDR(NET_ADDR), .NET_MASK(NET_MASK), .LATENCY(7)) u_router (
    .clk, .rst, .in_word(ring_in), .out_local(to_local), .out_next(to_next),
    .drop_pulse(rt_drop)
  );

  net_receiver #(.N_BITS(CFG_MSG_W)) u_rx (
    .clk, .rst, .rec_addr(NET_ADDR), .rx_word(to_local),
    .src_addr(rx_src), .out_msg(rx_msg), .rx_rdy
  );

  // ---- ring combiner ----
  logic [CW-1:0] rq1, rq2;
  logic          rd1, rd2;

  net_combiner #(.DEPTH(FIFO_DEPTH), .MAX_PKT_WORDS(packet_words(HIT_MSG_W))) u_ring_comb (
    .clk, .rst, .in1(to_next), .in2(chain[CH_PER_FPGA-2]), .out_word(ring_out),
    .q1_len(rq1), .q2_len(rq2), .drop1(rd1), .drop2(rd2)
  );

  // ---- status for monitoring ----
  always_comb begin
    status.hits        = hit_v;
    status.tx_start    = tx_en;
    status.overwrite   = ovw;
    status.chain_drops = 4'($countones({cd1, cd2}));
    status.ring_drops  = 2'(rd1) + 2'(rd2);
    status.router_drop = rt_drop;
    status.ring_q1     = 9'(rq1);
    status.ring_q2     = 9'(rq2);
    status.threshold   = threshold;
    status.ch_enable   = ch_enable;
  end

endmodule
