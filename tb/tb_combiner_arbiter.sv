// tb_combiner_arbiter: self-checking test of combiner_arbiter.
//
// Directed steps through every transition of the combiner controller: the
// fuller queue wins, a packet is served to its end regardless of the queue
// lengths, PACKET_STOP and an empty queue (IDLE) both end a packet, a tie
// goes to the queue served last, and with both queues empty the last
// selection is kept. A second instance with TIE_TOGGLE = 1 must alternate
// on ties instead.
module tb_combiner_arbiter;
  import daq_pkg::*;

  localparam logic [7:0] DAT = 8'h85, STP = 8'h40, IDL = 8'h00, STA = 8'h01;

  logic clk = 0, rst = 1;
  logic [8:0] q1, q2;
  net_word_t n1, n2;
  logic sel, busy, sel_t, busy_t;
  int checks = 0, failures = 0;

  combiner_arbiter #(.DEPTH(256)) dut (.clk, .rst, .q1_size(q1), .q2_size(q2),
    .next1(n1), .next2(n2), .sel, .busy);
  combiner_arbiter #(.DEPTH(256), .TIE_TOGGLE(1'b1)) dut_t (.clk, .rst, .q1_size(q1),
    .q2_size(q2), .next1(n1), .next2(n2), .sel(sel_t), .busy(busy_t));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // apply inputs, check the selection and the state in this cycle
  task automatic step(int a, int b, logic [7:0] h1, logic [7:0] h2, bit exp_sel, bit exp_busy, string what, int exp_t = -1);
    q1 = 9'(a); q2 = 9'(b); n1 = h1; n2 = h2;
    #1;
    chk(sel == exp_sel, {what, ": sel"});
    chk(busy == exp_busy, {what, ": busy"});
    if (exp_t >= 0) chk(sel_t == exp_t[0], {what, ": toggling variant"});
    @(negedge clk);
  endtask

  initial begin
    q1 = 0; q2 = 0; n1 = IDL; n2 = IDL;
    repeat (2) @(negedge clk);
    rst = 0;
    step(0, 0, IDL, IDL, 1, 0, "both empty after reset keeps queue 1");
    step(3, 1, STA, STA, 1, 0, "queue 1 fuller");
    step(2, 9, DAT, DAT, 1, 1, "packet of queue 1 continues although queue 2 is fuller");
    step(1, 9, DAT, DAT, 1, 1, "still queue 1");
    step(0, 9, STP, DAT, 1, 1, "STOP of queue 1 is still taken from queue 1");
    step(0, 9, IDL, STA, 0, 0, "back to start, queue 2 fuller");
    step(5, 8, DAT, DAT, 0, 1, "packet of queue 2 continues");
    step(5, 7, DAT, STP, 0, 1, "STOP of queue 2");
    step(4, 4, STA, STA, 0, 0, "tie goes to queue 2, served last", 1);
    step(9, 3, DAT, DAT, 0, 1, "queue 2 packet continues");
    step(9, 0, DAT, IDL, 0, 1, "queue 2 empty: IDLE ends the packet");
    step(0, 0, IDL, IDL, 0, 0, "both empty keeps last selection (queue 2)");
    step(0, 0, IDL, IDL, 0, 0, "both empty, stays");
    step(6, 2, STA, STA, 1, 0, "queue 1 fuller again");
    step(5, 2, STP, STA, 1, 1, "queue 1 packet ends");
    step(3, 3, STA, STA, 1, 0, "tie goes to queue 1, served last", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
