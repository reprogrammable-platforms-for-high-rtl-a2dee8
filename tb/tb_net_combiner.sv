// tb_net_combiner: self-checking test of net_combiner.
//
// Two packet sources feed the combiner: source 1 (source address 1) on the
// pass-through input, source 2 (address 2) on the local input. Each message
// carries a sequence number. The testbench decodes the output stream and
// checks that every output packet is well formed and unbroken, that each
// source's packets come out in order with no duplicates, that every packet
// not delivered was reported dropped (and the other way round), that no
// packet is lost under light load, that packets are lost under overload,
// and that a word entering an empty combiner leaves one clock later.
module tb_net_combiner;
  import daq_pkg::*;
  import tb_net_pkg::*;

  localparam int D  = 64;
  localparam int NB = 21;
  localparam int PW = 7;     // words per packet

  logic clk = 0, rst = 1;
  net_word_t in1, in2, out_word;
  logic [$clog2(D+1)-1:0] q1_len, q2_len;
  logic drop1, drop2;
  int checks = 0, failures = 0;

  net_combiner #(.DEPTH(D), .MAX_PKT_WORDS(PW)) dut (.clk, .rst, .in1, .in2, .out_word,
    .q1_len, .q2_len, .drop1, .drop2);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- sources ----
  int load = 20;          // percent chance per idle cycle to start a packet
  bit running = 0;
  int sent [1:2] = '{0, 0};
  int dropped [1:2] = '{0, 0};
  int delivered [1:2] = '{0, 0};
  int next_seq [1:2] = '{0, 0};
  int max_q = 0;

  task automatic source(int id);
    w8_t pk[$];
    logic [MAXB-1:0] m;
    forever begin
      @(negedge clk);
      if (running && $urandom_range(0, 99) < load) begin
        m = '0;
        m[15:0] = 16'(sent[id]);
        m[20:16] = 5'($urandom);
        encode(7'h7F, 7'(id), m, NB, pk);
        sent[id]++;
        foreach (pk[i]) begin
          if (id == 1) in1 = pk[i]; else in2 = pk[i];
          if (i < pk.size() - 1) @(negedge clk);
        end
      end else begin
        if (id == 1) in1 = T_IDLE; else in2 = T_IDLE;
      end
    end
  endtask

  initial begin in1 = T_IDLE; in2 = T_IDLE; end

  always @(posedge clk) if (!rst) begin
    if (drop1) dropped[1]++;
    if (drop2) dropped[2]++;
    if (q1_len > max_q) max_q = q1_len;
    if (q2_len > max_q) max_q = q2_len;
  end

  // ---- output monitor ----
  w8_t cur[$];
  bit  in_pkt = 0;
  always @(posedge clk) if (!rst) begin
    if (out_word == T_START) begin
      chk(!in_pkt, "START inside a packet");
      cur.delete();
      in_pkt = 1;
    end
    if (in_pkt) begin
      cur.push_back(out_word);
      if (out_word == T_IDLE) begin
        chk(0, "IDLE inside an output packet");
        in_pkt = 0;
      end else if (out_word == T_STOP) begin
        logic [6:0] d, s;
        logic [MAXB-1:0] m;
        bit ok;
        in_pkt = 0;
        ok = decode(cur, NB, d, s, m);
        chk(ok, "well formed output packet");
        if (ok && (s == 1 || s == 2)) begin
          // sequence numbers of a source only grow; the gap was dropped
          chk(int'(m[15:0]) >= next_seq[s], "packet order per source");
          next_seq[s] = int'(m[15:0]) + 1;
          delivered[s]++;
        end else chk(0, "unknown source");
      end
    end else begin
      chk(out_word == T_IDLE, "only IDLE between packets");
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // minimum delay: one word into the empty combiner leaves a clock later
    @(negedge clk);
    in2 = T_START;
    @(negedge clk);
    in2 = {1'b1, 7'h7F};
    chk(out_word == T_START, "one clock through an empty combiner");
    @(negedge clk); in2 = {1'b1, 7'd2};
    for (int i = 0; i < 3; i++) begin @(negedge clk); in2 = {1'b1, 7'h00}; end
    @(negedge clk); in2 = T_STOP;
    @(negedge clk); in2 = T_IDLE;
    sent[2] = 1;
    repeat (5) @(negedge clk);
    // light load: 8% start chance per idle clock on each input
    fork source(1); source(2); join_none
    load = 8; running = 1;
    repeat (4000) @(negedge clk);
    running = 0;
    repeat (300) @(negedge clk);
    chk(dropped[1] + dropped[2] == 0, "no loss at light load");
    chk(delivered[1] == sent[1] && delivered[2] == sent[2], "all delivered at light load");
    $display("light: sent %0d/%0d delivered %0d/%0d max queue %0d", sent[1], sent[2],
             delivered[1], delivered[2], max_q);
    // overload: both inputs nearly always busy
    load = 90; running = 1;
    repeat (4000) @(negedge clk);
    running = 0;
    repeat (2 * D + 100) @(negedge clk);
    $display("heavy: sent %0d/%0d delivered %0d/%0d dropped %0d/%0d max queue %0d",
             sent[1], sent[2], delivered[1], delivered[2], dropped[1], dropped[2], max_q);
    chk(dropped[1] + dropped[2] > 0, "overload drops packets");
    chk(delivered[1] + dropped[1] == sent[1], "source 1: delivered + dropped = sent");
    chk(delivered[2] + dropped[2] == sent[2], "source 2: delivered + dropped = sent");
    chk(q1_len == 0 && q2_len == 0, "queues drain");
    chk(max_q <= D && max_q > D - PW - 1, "queue filled up to the admission limit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
