// tb_tx_controller: self-checking test of tx_controller.
//
// Directed cases for each transition of the transmit controller: a message
// offered while the transmitter is ready passes at once; one offered while
// it is busy is held and sent when it becomes ready; a second one offered
// while busy replaces the held one (overwrite); a new message offered at
// the moment a held one could leave is sent and the held one is lost
// (overwrite), so messages never leave out of order.
module tb_tx_controller;
  localparam int NB = 16;

  logic clk = 0, rst = 1;
  logic [NB-1:0] in_msg, out_msg;
  logic in_valid, trigger, out_valid, overwrite;
  int checks = 0, failures = 0;

  tx_controller #(.N_BITS(NB)) dut (.clk, .rst, .in_msg, .in_valid, .trigger,
    .out_msg, .out_valid, .overwrite);

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

  // drive one cycle and check the outputs of that cycle
  task automatic cyc(bit v, logic [NB-1:0] m, bit rdy, bit exp_v, logic [NB-1:0] exp_m,
                     bit exp_ovw, string what);
    in_valid = v; in_msg = m; trigger = rdy;
    #1;
    chk(out_valid == exp_v, {what, ": out_valid"});
    if (exp_v) chk(out_msg == exp_m, {what, ": out_msg"});
    chk(overwrite == exp_ovw, {what, ": overwrite"});
    @(negedge clk);
  endtask

  initial begin
    in_valid = 0; in_msg = '0; trigger = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    cyc(0, 16'h0000, 1, 0, 16'h0, 0, "nothing offered, nothing sent");
    cyc(1, 16'h1111, 1, 1, 16'h1111, 0, "offered and ready: sent at once");
    cyc(0, 16'h0000, 1, 0, 16'h0, 0, "nothing held afterwards");
    cyc(1, 16'h2222, 0, 0, 16'h0, 0, "offered while busy: held");
    cyc(0, 16'h0000, 0, 0, 16'h0, 0, "still busy: still held");
    cyc(0, 16'hDEAD, 1, 1, 16'h2222, 0, "ready again: held message sent");
    cyc(0, 16'h0000, 1, 0, 16'h0, 0, "holding register empty");
    cyc(1, 16'h3333, 0, 0, 16'h0, 0, "held 3333");
    cyc(1, 16'h4444, 0, 0, 16'h0, 1, "4444 replaces 3333");
    cyc(0, 16'h0000, 1, 1, 16'h4444, 0, "4444 sent");
    cyc(1, 16'h5555, 0, 0, 16'h0, 0, "held 5555");
    cyc(1, 16'h6666, 1, 1, 16'h6666, 1, "new message while ready is sent, held 5555 lost");
    cyc(0, 16'h0000, 1, 0, 16'h0, 0, "nothing held afterwards");
    cyc(0, 16'h0000, 1, 0, 16'h0, 0, "empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
