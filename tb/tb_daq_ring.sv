// tb_daq_ring: end-to-end test of the whole ring at its default size
// (8 FPGA nodes, 64 channels, 256-word combiner FIFOs).
//
// The testbench plays the controller FPGA. It loads the seconds of the
// time stamps, then sends one configuration packet to every node (each
// node gets its own threshold and loses one channel) and measures how long
// the packet to the last node takes on an idle ring. Then all 64 channels
// see pulse trains, first light, then in bursts that overload the nodes. A
// malformed packet is injected to be dropped by the first router. Every
// packet arriving back at the controller is decoded and matched against the
// hits the testbench finds in the traces itself. The test counts how often
// each mechanism occurred (configuration delivered, packets passed through
// downstream nodes, router drop, combiner drop, overwritten message, time
// stamp load) and fails if one never did.
module tb_daq_ring;
  import daq_pkg::*;
  import tb_net_pkg::*;

  localparam int NF = 8, NC = 64;
  localparam int NLIGHT = 9000, NBURST = 2000, NTAIL = 4000;
  localparam int NTOT = NLIGHT + NBURST + NTAIL;
  localparam int LOAD_AT = 5;
  localparam int LIGHT_END = NLIGHT - 500;   // hits before this are in the light phase
  localparam logic [31:0] SEC = 32'h6502_A1C0;

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
    #(10 * NTOT + 300000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [11:0] thr_of(int n);  return 12'(1200 + 100 * n); endfunction
  function automatic logic [7:0]  ena_of(int n);  return ~(8'd1 << n);        endfunction

  logic [11:0]  tr  [NC][$];
  logic [159:0] exp_hits [NC][$];
  int n_exp_light = 0;

  // ---- counters ----
  int cyc = 0, phase = 0;
  int n_hit = 0, n_ovw = 0, n_cdrop = 0, n_rdrop = 0, n_rtdrop = 0, n_cfg = 0;
  int delivered = 0, delivered_light = 0, passed_on = 0;
  int per_node [NF];
  int cfg_sent_at = -1, cfg_last_at = -1;

  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    for (int n = 0; n < NF; n++) begin
      n_hit   += $countones(status[n].hits);
      n_ovw   += $countones(status[n].overwrite);
      n_cdrop += status[n].chain_drops;
      n_rdrop += status[n].ring_drops;
      n_rtdrop += status[n].router_drop;
      if (rx_rdy[n]) begin
        n_cfg++;
        chk(rx_src[n] == 7'h7F, "configuration sender");
        chk(rx_msg[n] == {1'b0, ena_of(n), thr_of(n)}, $sformatf("configuration of node %0d", n));
        if (n == NF - 1) cfg_last_at = cyc;
      end
    end
  end

  // ---- controller side: decode what comes back ----
  w8_t cur[$];
  bit  in_pkt = 0;
  always @(posedge clk) if (!rst) begin
    if (ring_to_ctrl == T_START) begin cur.delete(); in_pkt = 1; end
    if (in_pkt) begin
      cur.push_back(ring_to_ctrl);
      if (ring_to_ctrl == T_STOP || ring_to_ctrl == T_IDLE) begin
        in_pkt = 0;
        check_packet();
      end
    end
  end

  task automatic check_packet();
    logic [6:0] d, s;
    logic [MAXB-1:0] m;
    bit found;
    int ch;
    chk(decode(cur, 160, d, s, m), "hit packet well formed");
    chk(d == 7'h7F, "addressed to the controller");
    ch = int'(s[5:0]);
    chk(s[6] == 1'b0, "source is a channel");
    found = 0;
    while (exp_hits[ch].size() > 0 && !found) begin
      if (exp_hits[ch][0][63:0] == m[63:0]) begin
        chk(exp_hits[ch][0] == m[159:0], "hit samples");
        found = 1;
      end
      void'(exp_hits[ch].pop_front());
    end
    chk(found, $sformatf("hit of channel %0d expected", ch));
    delivered++;
    per_node[ch / 8]++;
    if (ch / 8 < NF - 1) passed_on++;
    if (m[31:0] < ts_at(LIGHT_END)[31:0]) delivered_light++;
  endtask

  task automatic send(w8_t pk[$]);
    foreach (pk[i]) begin ctrl_to_ring = pk[i]; @(negedge clk); end
    ctrl_to_ring = T_IDLE;
  endtask

  initial begin
    w8_t pk[$];
    logic [MAXB-1:0] m;
    foreach (per_node[n]) per_node[n] = 0;
    for (int c = 0; c < NC; c++) begin
      int n;
      n = c / 8;
      baseline(tr[c], 1200);
      while (tr[c].size() < NLIGHT) begin pulse(tr[c], $urandom_range(800, 4000)); baseline(tr[c], $urandom_range(1500, 4500)); end
      while (tr[c].size() < NLIGHT + NBURST) begin pulse(tr[c], $urandom_range(2500, 4000)); baseline(tr[c], $urandom_range(4, 40)); end
      baseline(tr[c], NTOT + 20 - tr[c].size());
      if (ena_of(n)[c % 8]) find_hits(tr[c], thr_of(n), -(LOAD_AT + 1), exp_hits[c]);
      foreach (exp_hits[c][i]) begin
        exp_hits[c][i][63:32] = exp_hits[c][i][63:32] + SEC;
        if (exp_hits[c][i][31:0] < ts_at(LIGHT_END)[31:0]) n_exp_light++;
      end
    end
    ctrl_to_ring = T_IDLE;
    for (int c = 0; c < NC; c++) adc[c] = tr[c][0];
    repeat (3) @(negedge clk);
    rst = 0;
    fork
      begin
        for (int k = 0; k < NTOT; k++) begin
          for (int c = 0; c < NC; c++) adc[c] = tr[c][k];
          load_sec = (k == LOAD_AT);
          sec_in = (k == LOAD_AT) ? SEC : 32'd0;
          @(negedge clk);
          if (k == NLIGHT) phase = 1;
        end
      end
      begin
        repeat (20) @(negedge clk);
        // last node first, alone on the idle ring: measure its delay
        for (int n = NF - 1; n >= 0; n--) begin
          m = '0; m[20:0] = {1'b0, ena_of(n), thr_of(n)};
          encode(7'(8 * n), 7'h7F, m, 21, pk);
          if (n == NF - 1) cfg_sent_at = cyc;
          send(pk);
          if (n == NF - 1) repeat (100) @(negedge clk);
        end
        repeat (50) @(negedge clk);
        encode(7'h20, 7'h7F, m, 21, pk); pk[1] = 8'h03; send(pk);   // malformed
      end
    join
    // drain: wait until the controller has seen 1000 idle clocks in a row
    begin
      int quiet;
      quiet = 0;
      while (quiet < 1000) begin
        @(negedge clk);
        quiet = (ring_to_ctrl == T_IDLE) ? quiet + 1 : 0;
      end
    end
    $display("hits %0d (light %0d) delivered %0d (light %0d) passed on %0d overwritten %0d",
             n_hit, n_exp_light, delivered, delivered_light, passed_on, n_ovw);
    $display("chain drops %0d ring drops %0d router drops %0d configurations %0d, last node configured after %0d clocks",
             n_cdrop, n_rdrop, n_rtdrop, n_cfg, cfg_last_at - cfg_sent_at);
    for (int n = 0; n < NF; n++) chk(per_node[n] > 0, $sformatf("node %0d delivered hits", n));
    // 7 idle nodes (router 7 + combiner 1 clocks each), the last router (7),
    // 6 more words of the 7-word packet, rx_rdy one clock after STOP
    chk(cfg_last_at - cfg_sent_at == 7 * 8 + 7 + 6 + 1, "delay to the last node on an idle ring");
    chk(n_cfg == NF, "mechanism: every node configured through its receiver");
    chk(delivered_light == n_exp_light, "every hit of the light phase delivered");
    chk(n_hit == delivered + n_ovw + n_cdrop + n_rdrop, "every hit delivered, overwritten or dropped");
    chk(passed_on > 0, "mechanism: packets passed through downstream nodes");
    chk(n_ovw > 0, "mechanism: transmit controller overwrite");
    chk(n_cdrop + n_rdrop > 0, "mechanism: combiner drop");
    chk(n_rdrop > 0, "mechanism: ring combiner drop");
    chk(n_rtdrop == 1, "mechanism: router drop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
