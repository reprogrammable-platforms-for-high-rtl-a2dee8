// daq_ring: the data acquisition back end, a ring of FPGA nodes.
//
// N_FPGA nodes (fpga_node), each with eight ADC channels, are chained into a
// ring: the output of node i feeds the input of node i+1. The controller
// FPGA, which links the ring to the CPU and the optical fibre, closes the
// ring; it is outside this module, so the ring's two open ends are ports:
// ctrl_to_ring enters node 0, ring_to_ctrl leaves node N_FPGA-1. Hit packets
// from every channel travel downstream to the controller address; control
// packets from the controller travel until the router of the addressed
// node takes them off the ring.
//
// With N_FPGA = 8 the ring serves 64 channels of 12-bit samples at one
// sample per 100 MHz clock. Every link carries one 8-bit network word per
// clock. Node i owns the addresses 8i .. 8i+7; the controller is 7'h7F.
// The ring topology, eight FPGAs with eight channels each, and the position
// of the controller in the ring follow the platform description.
module daq_ring
  import daq_pkg::*;
#(
  parameter int unsigned         N_FPGA      = 8,
  parameter int unsigned         FIFO_DEPTH  = 256,
  parameter logic [SAMPLE_W-1:0] THRESH_INIT = 12'd2048,
  parameter int unsigned         CLK_HZ      = 100_000_000
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [SAMPLE_W-1:0]  adc [N_FPGA*CH_PER_FPGA],
  input  logic                 load_sec,
  input  logic [31:0]          sec_in,
  input  net_word_t            ctrl_to_ring,
  output net_word_t            ring_to_ctrl,
  output logic [ADDR_W-1:0]    rx_src [N_FPGA],
  output logic [CFG_MSG_W-1:0] rx_msg [N_FPGA],
  output logic [N_FPGA-1:0]    rx_rdy,
  output node_status_t         status [N_FPGA]
);

  net_word_t link [N_FPGA+1];

  assign link[0]      = ctrl_to_ring;
  assign ring_to_ctrl = link[N_FPGA];

  for (genvar i = 0; i < N_FPGA; i++) begin : g_node
    logic [SAMPLE_W-1:0] node_adc [CH_PER_FPGA];
    for (genvar k = 0; k < CH_PER_FPGA; k++) begin : g_adc
      assign node_adc[k] = adc[i*CH_PER_FPGA + k];
    end

    fpga_node #(
      .NODE_ID(4'(i)), .CTRL_ADDR(7'h7F), .FIFO_DEPTH(FIFO_DEPTH),
      .THRESH_INIT(THRESH_INIT), .CLK_HZ(CLK_HZ)
    ) u_node (
      .clk, .rst, .adc(node_adc), .load_sec, .sec_in,
      .ring_in(link[i]), .ring_out(link[i+1]),
      .rx_src(rx_src[i]), .rx_msg(rx_msg[i]), .rx_rdy(rx_rdy[i]),
      .status(status[i])
    );
  end

  initial assert (N_FPGA <= 15)
    else $error("daq_ring: the address plan holds at most 15 nodes");

endmodule
