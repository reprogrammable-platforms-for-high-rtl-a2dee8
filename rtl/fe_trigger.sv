// fe_trigger: digital front end of one ADC channel (trigger, delay line and
// sampler).
//
// One 12-bit ADC sample arrives every clock. The last WINDOW-1 samples are
// kept in a delay line. A hit is detected when a sample reaches the
// threshold while the sample before it was below it (a rising crossing);
// the time stamp of that sample is kept. The block then waits for the
// remaining WINDOW-PRE-1 samples and delivers one message holding the time
// stamp and WINDOW consecutive samples: PRE samples before the crossing, the
// crossing sample and the samples after it. Crossings during a capture are
// ignored. With enable low no hit is detected.
//
// Message layout (HIT_MSG_W = 160 bits): msg[63:0] = time stamp of the
// crossing sample; msg[64+12k +: 12] = sample k of the window, k = 0 the
// earliest.
//
// Timing: for a crossing in cycle c, msg_valid pulses for one clock in
// cycle c + WINDOW - PRE. Dead time is WINDOW - PRE cycles per hit.
//
// The trigger, delay line, sampler and the minimum of eight samples per hit
// follow the front-end model of the platform; the threshold discriminator,
// the rising-edge condition and PRE = 2 are choices of this design.
module fe_trigger
  import daq_pkg::*;
#(
  parameter int unsigned PRE = 2
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 enable,
  input  logic [SAMPLE_W-1:0]  threshold,
  input  logic [SAMPLE_W-1:0]  sample,
  input  logic [TS_W-1:0]      ts,
  output logic [HIT_MSG_W-1:0] msg,
  output logic                 msg_valid,
  output logic                 busy
);

  localparam int unsigned POST = WINDOW - PRE - 1;   // samples after the crossing
  localparam int unsigned CW   = $clog2(POST + 1);

  logic [SAMPLE_W-1:0] hist [WINDOW-1];   // hist[0] = previous sample
  logic [TS_W-1:0]     ts_q;
  logic [CW-1:0]       cnt;
  logic                hit;

  assign hit = enable && !busy && sample >= threshold && hist[0] < threshold;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < WINDOW - 1; i++) hist[i] <= '0;
    end else begin
      hist[0] <= sample;
      for (int i = 1; i < WINDOW - 1; i++) hist[i] <= hist[i-1];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      cnt       <= '0;
      ts_q      <= '0;
      msg       <= '0;
      msg_valid <= 1'b0;
    end else begin
      msg_valid <= 1'b0;
      if (hit) begin
        busy <= 1'b1;
        cnt  <= CW'(POST);
        ts_q <= ts;
      end else if (busy) begin
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy      <= 1'b0;
          msg_valid <= 1'b1;
          msg[TS_W-1:0] <= ts_q;
          for (int k = 0; k < WINDOW - 1; k++)
            msg[TS_W + SAMPLE_W*k +: SAMPLE_W] <= hist[WINDOW-2-k];
          msg[TS_W + SAMPLE_W*(WINDOW-1) +: SAMPLE_W] <= sample;
        end
      end
    end
  end

  initial assert (PRE + 2 <= WINDOW)
    else $error("fe_trigger: PRE leaves no sample after the crossing");

endmodule
