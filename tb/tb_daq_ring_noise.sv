// tb_daq_ring_noise: the full default ring under the expected photomultiplier
// noise load.
//
// Every one of the 64 channels fires randomly (exponential gaps) at an
// average of 1 kHz, the typical PMT hit rate, for 2 ms of detector time
// (200 000 clocks at 100 MHz). Pulses rise well above the reset threshold
// of 2048. The testbench builds the expected hit message of every pulse
// from the samples it applied (time stamp of the crossing sample, window
// from two samples before it) and checks that each one reaches the
// controller bit-exact, that nothing is overwritten or dropped, and
// that the ring combiner queues stay far below their 256-word depth. It
// prints the largest queue length seen in each node.
module tb_daq_ring_noise;
  import daq_pkg::*;
  import tb_net_pkg::*;

  localparam int NF = 8, NC = 64;
  localparam int NCYC = 200_000;
  localparam real MEAN_GAP = 100_000.0;   // clocks between hits: 1 kHz at 100 MHz

  logic clk = 0, rst = 1;
  logic [11:0] adc [NC];
  logic load_sec = 0;
  logic [31:0] sec_in = '0;
  net_word_t ctrl_to_ring, ring_to_ctrl;
  logic [6:0] rx_src [NF];
  logic [CFG_MSG_W-1:0] rx_msg [NF];
  logic [NF-1:0] rx_rdy;
  node_status_t status [NF];
  int checks = 0, failures = 0;

  daq_ring dut (.clk, .rst, .adc, .load_sec, .sec_in, .ctrl_to_ring, .ring_to_ctrl,
    .rx_src, .rx_msg, .rx_rdy, .status);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #(10 * NCYC + 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- per-channel pulse generator state ----
  longint next_at [NC];
  int     phase_of [NC];      // -1 baseline, 0..5 inside a pulse
  int     height [NC];
  longint cross_at [NC];
  logic [11:0] last8 [NC][8]; // last8[c][7] = newest applied sample
  logic [159:0] exp_hits [NC][$];
  int n_pulses = 0, delivered = 0, n_ovw = 0, n_drop = 0;
  int max_q [NF];

  function automatic longint exp_gap();
    real u;
    longint g;
    u = (real'($urandom_range(1, 1_000_000))) / 1_000_000.0;
    g = longint'(-$ln(u) * MEAN_GAP);
    return (g < 20) ? 20 : g;
  endfunction

  function automatic logic [11:0] pulse_sample(int h, int i);
    int v;
    v = (i == 0) ? h / 3 : (i == 1) ? h : (i == 2) ? (h * 3) / 4 : h / (i * 2);
    return 12'(v > 4095 ? 4095 : v);
  endfunction

  always @(posedge clk) if (!rst) begin
    for (int n = 0; n < NF; n++) begin
      n_ovw  += $countones(status[n].overwrite);
      n_drop += status[n].chain_drops + status[n].ring_drops + 32'(status[n].router_drop);
      if (int'(status[n].ring_q1) > max_q[n]) max_q[n] = int'(status[n].ring_q1);
      if (int'(status[n].ring_q2) > max_q[n]) max_q[n] = int'(status[n].ring_q2);
    end
  end

  // ---- controller side ----
  w8_t cur[$];
  bit  in_pkt = 0;
  always @(posedge clk) if (!rst) begin
    if (ring_to_ctrl == T_START) begin cur.delete(); in_pkt = 1; end
    if (in_pkt) begin
      cur.push_back(ring_to_ctrl);
      if (ring_to_ctrl == T_STOP || ring_to_ctrl == T_IDLE) begin
        logic [6:0] d, s;
        logic [MAXB-1:0] m;
        int ch;
        in_pkt = 0;
        chk(decode(cur, 160, d, s, m), "hit packet well formed");
        ch = int'(s[5:0]);
        chk(exp_hits[ch].size() > 0, $sformatf("hit of channel %0d expected", ch));
        if (exp_hits[ch].size() > 0) begin
          chk(exp_hits[ch][0] == m[159:0], $sformatf("hit of channel %0d bit-exact", ch));
          void'(exp_hits[ch].pop_front());
        end
        delivered++;
      end
    end
  end

  initial begin
    ctrl_to_ring = T_IDLE;
    foreach (max_q[n]) max_q[n] = 0;
    for (int c = 0; c < NC; c++) begin
      next_at[c] = 100 + exp_gap();
      phase_of[c] = -1;
      cross_at[c] = -1;
      adc[c] = 12'd100;
      for (int i = 0; i < 8; i++) last8[c][i] = 12'd100;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    for (longint k = 0; k < NCYC; k++) begin
      for (int c = 0; c < NC; c++) begin
        logic [11:0] v;
        if (phase_of[c] < 0 && k == next_at[c]) begin
          phase_of[c] = 0;
          height[c] = $urandom_range(2500, 4000);
          n_pulses++;
        end
        if (phase_of[c] >= 0) begin
          v = pulse_sample(height[c], phase_of[c]);
          if (phase_of[c] == 1) cross_at[c] = k;
          phase_of[c]++;
          if (phase_of[c] == 6) begin phase_of[c] = -1; next_at[c] = k + exp_gap(); end
        end else begin
          v = 12'(95 + $urandom_range(0, 10));
        end
        adc[c] = v;
        for (int i = 0; i < 7; i++) last8[c][i] = last8[c][i+1];
        last8[c][7] = v;
        if (cross_at[c] >= 0 && k == cross_at[c] + 5) begin
          logic [159:0] m;
          m[63:0] = ts_at(cross_at[c]);
          for (int i = 0; i < 8; i++) m[64 + 12*i +: 12] = last8[c][i];
          exp_hits[c].push_back(m);
          cross_at[c] = -1;
        end
      end
      @(negedge clk);
    end
    repeat (2000) @(negedge clk);
    begin
      int left;
      left = 0;
      for (int c = 0; c < NC; c++) left += exp_hits[c].size();
      $display("pulses %0d delivered %0d undelivered %0d overwritten %0d dropped %0d",
               n_pulses, delivered, left, n_ovw, n_drop);
      for (int n = 0; n < NF; n++) $display("node %0d: largest ring combiner queue %0d words", n, max_q[n]);
      chk(left == 0, "every hit delivered");
      chk(n_pulses > 64, "enough hits for the test");
      chk(n_ovw == 0 && n_drop == 0, "no loss at the nominal noise rate");
      for (int n = 0; n < NF; n++) chk(max_q[n] < 128, "queues far below the FIFO depth");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
