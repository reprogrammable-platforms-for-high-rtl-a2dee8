// tb_fpga_node: end-to-end test of one FPGA node.
//
// The node (NODE_ID = 2, sub-net addresses 0x10..0x17) first receives a
// configuration packet over the ring that sets the threshold to 1500 and
// disables channel 3. Then its eight channels see pulse trains: a light
// phase in which nothing may be lost, and a burst phase that overloads the
// transmitters and combiners. Meanwhile packets of other nodes arrive on
// the ring input and must be passed on, and one malformed packet must be
// dropped by the router. Every hit packet on the ring output is decoded and
// compared with the hits the testbench finds in the traces itself (time
// stamp and samples); in the burst phase every hit must be either delivered
// or accounted for by an overwrite or a combiner drop.
module tb_fpga_node;
  import daq_pkg::*;
  import tb_net_pkg::*;

  localparam int NLIGHT = 12000, NBURST = 3000, NTAIL = 3000;
  localparam int NTOT = NLIGHT + NBURST + NTAIL;
  localparam logic [11:0] THR = 12'd1500;
  localparam logic [7:0]  ENA = 8'hF7;

  logic clk = 0, rst = 1;
  logic [11:0] adc [8];
  logic load_sec = 0;
  logic [31:0] sec_in = '0;
  net_word_t ring_in, ring_out;
  logic [6:0] rx_src;
  logic [CFG_MSG_W-1:0] rx_msg;
  logic rx_rdy;
  node_status_t status;
  int checks = 0, failures = 0;

  fpga_node #(.NODE_ID(4'd2)) dut (.clk, .rst, .adc, .load_sec, .sec_in, .ring_in, .ring_out,
    .rx_src, .rx_msg, .rx_rdy, .status);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #(10 * NTOT + 50000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [11:0]  tr  [8][$];
  logic [159:0] exp_hits [8][$];
  int n_exp_light = 0;

  // ---- counters ----
  int cyc = 0;
  int n_hit_pulses = 0, n_ovw = 0, n_chain_drop = 0, n_ring_drop = 0, n_rt_drop = 0;
  int delivered = 0, delivered_light = 0, pass_sent = 0, pass_got = 0, n_rx = 0;
  int phase = 0;   // 0 config/light, 1 burst

  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    n_hit_pulses += $countones(status.hits);
    n_ovw        += $countones(status.overwrite);
    n_chain_drop += status.chain_drops;
    n_ring_drop  += status.ring_drops;
    n_rt_drop    += status.router_drop;
    if (rx_rdy) begin
      n_rx++;
      chk(rx_src == 7'h7F, "configuration sender");
      chk(rx_msg == {1'b0, ENA, THR}, "configuration message");
    end
  end

  // ---- ring output monitor ----
  w8_t cur[$];
  bit  in_pkt = 0;
  always @(posedge clk) if (!rst) begin
    if (out_is(T_START)) begin cur.delete(); in_pkt = 1; end
    if (in_pkt) begin
      cur.push_back(ring_out);
      if (out_is(T_STOP) || out_is(T_IDLE)) begin
        in_pkt = 0;
        check_packet();
      end
    end
  end

  function automatic bit out_is(w8_t w);
    return ring_out == w;
  endfunction

  task automatic check_packet();
    logic [6:0] d, s;
    logic [MAXB-1:0] m;
    bit found;
    if (cur.size() > 3 && cur[2][6:0] == 7'h33) begin
      chk(decode(cur, 21, d, s, m), "pass-through packet intact");
      chk(m[20:0] == 21'(pass_got), "pass-through packet order");
      pass_got++;
      return;
    end
    chk(decode(cur, 160, d, s, m), "hit packet well formed");
    chk(d == 7'h7F, "hit packet goes to the controller");
    chk(s[6:3] == 4'd2, "hit packet from this node");
    found = 0;
    // drop the expected hits that were lost, then match this one
    while (exp_hits[s[2:0]].size() > 0 && !found) begin
      if (exp_hits[s[2:0]][0][63:0] == m[63:0]) begin
        chk(exp_hits[s[2:0]][0] == m[159:0], "hit samples");
        found = 1;
      end
      void'(exp_hits[s[2:0]].pop_front());
    end
    chk(found, $sformatf("hit of channel %0d expected", s[2:0]));
    delivered++;
    if (phase == 0) delivered_light++;
  endtask

  // ---- ring input driver ----
  task automatic send(w8_t pk[$]);
    foreach (pk[i]) begin ring_in = pk[i]; @(negedge clk); end
    ring_in = T_IDLE;
  endtask

  initial begin
    w8_t pk[$];
    logic [MAXB-1:0] m;
    // traces: quiet start, light pulse trains, bursts, quiet tail
    for (int ch = 0; ch < 8; ch++) begin
      baseline(tr[ch], 400);
      while (tr[ch].size() < NLIGHT) begin pulse(tr[ch], $urandom_range(800, 4000)); baseline(tr[ch], $urandom_range(250, 900)); end
      while (tr[ch].size() < NLIGHT + NBURST) begin pulse(tr[ch], $urandom_range(2000, 4000)); baseline(tr[ch], $urandom_range(4, 30)); end
      baseline(tr[ch], NTOT + 20 - tr[ch].size());
      if (ENA[ch]) find_hits(tr[ch], THR, 0, exp_hits[ch]);
      foreach (exp_hits[ch][i]) if (exp_hits[ch][i][63:0] < ts_at(NLIGHT)) n_exp_light++;
    end
    chk(exp_hits[3].size() == 0, "channel 3 disabled in the reference");
    ring_in = T_IDLE;
    for (int ch = 0; ch < 8; ch++) adc[ch] = tr[ch][0];
    repeat (3) @(negedge clk);
    rst = 0;
    fork
      // ADC samples: one per clock, cycle k after reset gets tr[k]
      begin
        for (int k = 0; k < NTOT; k++) begin
          for (int ch = 0; ch < 8; ch++) adc[ch] = tr[ch][k];
          @(negedge clk);
          if (k == NLIGHT) phase = 1;
        end
      end
      // ring input traffic
      begin
        repeat (20) @(negedge clk);
        m = '0; m[20:0] = {1'b0, ENA, THR};
        encode(7'h10, 7'h7F, m, 21, pk); send(pk);
        while (cyc < NLIGHT + NBURST) begin
          repeat ($urandom_range(100, 400)) @(negedge clk);
          m = '0; m[20:0] = 21'(pass_sent);
          encode(7'h7F, 7'h33, m, 21, pk); send(pk);        // another node's hit data
          pass_sent++;
          if (pass_sent == 5) begin
            encode(7'h12, 7'h7F, m, 21, pk); pk[1] = 8'h07; send(pk);   // malformed
          end
        end
      end
    join
    repeat (200) @(negedge clk);
    $display("hits %0d (light %0d) delivered %0d (light %0d) overwritten %0d chain drops %0d ring drops %0d",
             n_hit_pulses, n_exp_light, delivered, delivered_light, n_ovw, n_chain_drop, n_ring_drop);
    $display("pass-through sent %0d received %0d, router drops %0d, config messages %0d",
             pass_sent, pass_got, n_rt_drop, n_rx);
    chk(n_rx == 1, "one configuration message received");
    chk(status.threshold == THR && status.ch_enable == ENA, "configuration applied");
    chk(delivered_light == n_exp_light, "every hit of the light phase delivered");
    chk(n_hit_pulses == delivered + n_ovw + n_chain_drop + n_ring_drop - (pass_sent - pass_got),
        "every hit delivered, overwritten or dropped");
    chk(n_ovw > 0 && n_chain_drop > 0, "burst phase overloads the node");
    chk(n_rt_drop == 1, "malformed packet dropped by the router");
    chk(pass_got == pass_sent, "pass-through packets delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
