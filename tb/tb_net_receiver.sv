// tb_net_receiver: self-checking test of net_receiver.
//
// Feeds a stream of reference-encoded packets: packets for the receiver's
// own address, packets for other addresses, truncated packets and packets
// cut by a new START. Only complete packets for its address may raise
// rx_rdy, exactly one clock after their STOP, with the message and source
// address of that packet on the outputs.
module tb_net_receiver;
  import daq_pkg::*;
  import tb_net_pkg::*;

  localparam int NB = 40;
  localparam logic [6:0] MY = 7'h2A;

  logic clk = 0, rst = 1;
  net_word_t rx_word;
  logic [6:0] src_addr;
  logic [NB-1:0] out_msg;
  logic rx_rdy;
  int checks = 0, failures = 0;
  int accepted = 0;

  net_receiver #(.N_BITS(NB)) dut (.clk, .rst, .rec_addr(MY), .rx_word,
    .src_addr, .out_msg, .rx_rdy);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sends words; after the last one checks rx_rdy in the next cycle.
  task automatic send(w8_t words[$], bit expect_rdy, logic [6:0] src, logic [NB-1:0] m);
    for (int i = 0; i < words.size(); i++) begin
      rx_word = words[i];
      @(negedge clk);
      if (i < words.size() - 1) chk(rx_rdy == 0, "no rx_rdy inside packet");
    end
    rx_word = T_IDLE;
    // STOP was on the input in the previous cycle: rx_rdy now
    chk(rx_rdy == expect_rdy, $sformatf("rx_rdy expected %0d", expect_rdy));
    if (expect_rdy) begin
      accepted++;
      chk(out_msg == m, "message");
      chk(src_addr == src, "source address");
    end
    @(negedge clk);
    chk(rx_rdy == 0, "rx_rdy one clock only");
  endtask

  initial begin
    w8_t pk[$];
    rx_word = T_IDLE;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int p = 0; p < 200; p++) begin
      logic [MAXB-1:0] m;
      logic [6:0] s, d;
      int kind;
      m = rand_msg(NB);
      s = 7'($urandom);
      kind = $urandom_range(0, 4);
      d = (kind == 1) ? 7'(MY ^ (7'd1 << $urandom_range(0, 6))) : MY;
      encode(d, s, m, NB, pk);
      if (kind == 2) pk.delete(pk.size() - 2);          // one payload word lost
      if (kind == 3) begin                                // cut by a new START
        w8_t pk2[$];
        pk = pk[0:3];
        m = rand_msg(NB); s = 7'($urandom);
        encode(MY, s, m, NB, pk2);
        pk = {pk, pk2};
        kind = 0;
      end
      send(pk, (kind == 0 || kind == 4), s, m[NB-1:0]);
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    chk(accepted > 50, "enough packets accepted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
