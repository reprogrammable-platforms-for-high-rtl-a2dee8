// tx_controller: transmit controller between a data source and a
// net_transmitter.
//
// Hands a message to the transmitter only when the transmitter can take it.
// Each clock: if a new message is offered (in_valid) and the transmitter is
// ready (trigger), the new message is sent at once and any held message is
// discarded; if a message is offered while the transmitter is busy, it is
// kept in a one-entry holding register, replacing any held one; if nothing
// new is offered but a message is held and the transmitter is ready, the
// held message is sent. overwrite pulses whenever a held message is lost,
// so messages always leave in the order they arrived. The outputs drive the
// transmitter's tx_en and in_msg.
//
// Timing: combinational from in_valid/trigger to tx_en; the holding register
// is written on the clock edge. The four cases and their actions are those
// of the transmit controller state diagram (one state, a stored-data flag);
// the overwrite flag is an addition of this design.
module tx_controller #(
  parameter int unsigned N_BITS = daq_pkg::HIT_MSG_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [N_BITS-1:0] in_msg,
  input  logic              in_valid,
  input  logic              trigger,    // transmitter ready
  output logic [N_BITS-1:0] out_msg,
  output logic              out_valid,  // transmit enable
  output logic              overwrite   // held message lost
);

  logic [N_BITS-1:0] stored;
  logic              has_stored;

  always_comb begin
    out_valid = 1'b0;
    out_msg   = stored;
    if (in_valid && trigger) begin
      out_valid = 1'b1;
      out_msg   = in_msg;
    end else if (!in_valid && has_stored && trigger) begin
      out_valid = 1'b1;
    end
    overwrite = in_valid && has_stored;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      has_stored <= 1'b0;
      stored     <= '0;
    end else if (in_valid && !trigger) begin
      stored     <= in_msg;
      has_stored <= 1'b1;
    end else if (out_valid) begin
      has_stored <= 1'b0;
    end
  end

endmodule
