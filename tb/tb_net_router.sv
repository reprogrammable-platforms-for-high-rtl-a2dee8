// tb_net_router: self-checking test of net_router.
//
// A random stream of packets with random destinations and gaps (sometimes
// none) enters the router, plus some malformed packets whose word after
// START is a flow control code. The testbench knows the route of every
// word from the address rule (dest & mask) == net address and checks,
// cycle by cycle, that each output shows exactly the words routed to it,
// seven clocks after they entered, and that each malformed packet is
// dropped once.
module tb_net_router;
  import daq_pkg::*;
  import tb_net_pkg::*;

  localparam logic [6:0] NA = 7'h18, NM = 7'h78;
  localparam int LAT = 7;
  localparam int NCYC = 6000;

  logic clk = 0, rst = 1;
  net_word_t in_word, out_local, out_next;
  logic drop_pulse;
  int checks = 0, failures = 0;
  int n_local = 0, n_next = 0, n_bad = 0, n_drop = 0;

  // 0: idle, 1: local, 2: next, 3: dropped
  w8_t  in_hist [NCYC];
  int   rt_hist [NCYC];

  net_router #(.NET_ADDR(NA), .NET_MASK(NM), .LATENCY(LAT)) dut (.clk, .rst,
    .in_word, .out_local, .out_next, .drop_pulse);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #(10 * NCYC + 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w8_t q[$];
    int  rq[$];
    int  t;
    // build the whole input stream first
    while (q.size() < NCYC - 100) begin
      w8_t pk[$];
      logic [6:0] d;
      int r, kind;
      kind = $urandom_range(0, 9);
      d = (kind < 4) ? (NA | 7'($urandom_range(0, 7))) : 7'($urandom);
      r = (((d & NM) == NA) ? 1 : 2);
      encode(d, 7'($urandom), rand_msg(21), 21, pk);
      if (kind == 9) begin
        pk[1] = 8'h05;   // flow control code where the address belongs
        r = 3;
      end
      if (r == 1) n_local++;
      if (r == 2) n_next++;
      if (r == 3) n_bad++;
      foreach (pk[i]) begin q.push_back(pk[i]); rq.push_back(r); end
      repeat ($urandom_range(0, 3) * ($urandom_range(0, 1))) begin
        q.push_back(T_IDLE); rq.push_back(0);
      end
    end
    while (q.size() < NCYC) begin q.push_back(T_IDLE); rq.push_back(0); end

    in_word = T_IDLE;
    repeat (3) @(negedge clk);
    rst = 0;
    for (t = 0; t < NCYC; t++) begin
      in_hist[t] = q[t];
      rt_hist[t] = rq[t];
      in_word = q[t];
      @(posedge clk);
      #1;
      // the output now shows what entered LAT-1 edges ago
      if (t >= LAT - 1) begin
        int s;
        w8_t el, en;
        s  = t - (LAT - 1);
        el = (rt_hist[s] == 1) ? in_hist[s] : T_IDLE;
        en = (rt_hist[s] == 2) ? in_hist[s] : T_IDLE;
        chk(out_local == el, $sformatf("local out cycle %0d: %h vs %h", t, out_local, el));
        chk(out_next == en, $sformatf("next out cycle %0d: %h vs %h", t, out_next, en));
        if (drop_pulse) n_drop++;
      end
      @(negedge clk);
    end
    chk(n_drop == n_bad, $sformatf("dropped %0d of %0d malformed", n_drop, n_bad));
    chk(n_local > 10 && n_next > 10 && n_bad > 2, "all routes exercised");
    $display("local=%0d next=%0d malformed=%0d", n_local, n_next, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
