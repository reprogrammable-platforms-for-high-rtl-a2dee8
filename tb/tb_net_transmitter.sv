// tb_net_transmitter: self-checking test of net_transmitter.
//
// Sends random messages with random gaps, including back-to-back requests
// and requests while busy (which must be ignored). Every output word is
// compared with the packet built by the reference encoder, START must
// appear exactly one clock after the accepted tx_en, tx_rdy must be low for
// the whole packet, and IDLE must be sent between packets.
module tb_net_transmitter;
  import daq_pkg::*;
  import tb_net_pkg::*;

  localparam int NB = 160;

  logic clk = 0, rst = 1;
  logic [6:0] dest, src;
  logic [NB-1:0] msg;
  logic tx_en;
  net_word_t tx_word;
  logic tx_rdy;
  int checks = 0, failures = 0;

  net_transmitter #(.N_BITS(NB)) dut (.clk, .rst, .dest_addr(dest), .src_addr(src),
    .in_msg(msg), .tx_en, .tx_word, .tx_rdy);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w8_t exp[$];
    tx_en = 0; dest = 0; src = 0; msg = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    chk(tx_rdy == 1 && tx_word == 8'h00, "idle after reset");
    for (int p = 0; p < 40; p++) begin
      logic [MAXB-1:0] m;
      int gap;
      m = rand_msg(NB);
      gap = (p % 3 == 0) ? 0 : $urandom_range(0, 4);
      // gap cycles of IDLE
      for (int g = 0; g < gap; g++) begin
        @(negedge clk);
        chk(tx_word == T_IDLE, "idle between packets");
      end
      dest = 7'($urandom); src = 7'($urandom); msg = m[NB-1:0];
      chk(tx_rdy == 1, "ready before request");
      tx_en = 1;
      encode(dest, src, m, NB, exp);
      @(negedge clk);
      tx_en = 0;
      // the first word is on the output one clock after tx_en
      for (int i = 0; i < exp.size(); i++) begin
        chk(tx_word == exp[i], $sformatf("packet %0d word %0d: got %h exp %h", p, i, tx_word, exp[i]));
        if (i < exp.size() - 1) begin
          chk(tx_rdy == 0, "busy during packet");
          // a request while busy must be ignored
          if (i == 3) begin
            msg = '1; dest = 7'h55;
            tx_en = 1;
          end
        end else begin
          chk(tx_rdy == 1, "ready while STOP is sent");
        end
        if (i < exp.size() - 1) begin
          @(negedge clk);
          tx_en = 0;
        end
      end
      // (the loop ends on the STOP cycle; the next packet may start now)
    end
    @(negedge clk);
    chk(tx_word == T_IDLE, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
