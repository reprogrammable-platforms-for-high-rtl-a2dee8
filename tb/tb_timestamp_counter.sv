// tb_timestamp_counter: self-checking test of timestamp_counter.
//
// Two instances: one at the real 100 MHz clock rate, checked over the first
// 20000 clocks, and one at a made-up 1000 Hz rate so that several seconds
// pass in simulation. After k clocks in a second the fraction must be
// floor(k * 2^32 / CLK_HZ), computed here with 64-bit arithmetic; the
// seconds must step exactly every CLK_HZ clocks and a load must set the
// seconds and clear the fraction.
module tb_timestamp_counter;
  localparam longint HZ_SLOW = 1000;

  logic clk = 0, rst = 1;
  logic load_sec;
  logic [31:0] sec_in;
  logic [63:0] ts_fast, ts_slow;
  int checks = 0, failures = 0;

  timestamp_counter dut_fast (.clk, .rst, .load_sec, .sec_in, .ts(ts_fast));
  timestamp_counter #(.CLK_HZ(HZ_SLOW)) dut_slow (.clk, .rst, .load_sec, .sec_in, .ts(ts_slow));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [31:0] frac_of(longint k, longint hz);
    return 32'((k << 32) / hz);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint k, ks;
    load_sec = 0; sec_in = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    // k clocks after reset
    for (k = 0; k < 20000; k++) begin
      #1;
      chk(ts_fast == {32'd0, frac_of(k, 100_000_000)}, $sformatf("100 MHz fraction after %0d clocks", k));
      ks = k % HZ_SLOW;
      chk(ts_slow == {32'(k / HZ_SLOW), frac_of(ks, HZ_SLOW)},
          $sformatf("1 kHz time stamp after %0d clocks: %h", k, ts_slow));
      @(negedge clk);
    end
    // load the seconds of universal time
    load_sec = 1; sec_in = 32'h6000_0000;
    @(negedge clk);
    load_sec = 0;
    for (k = 0; k < 3000; k++) begin
      #1;
      chk(ts_slow == {32'h6000_0000 + 32'(k / HZ_SLOW), frac_of(k % HZ_SLOW, HZ_SLOW)}, "after load");
      chk(ts_fast == {32'h6000_0000, frac_of(k, 100_000_000)}, "fast after load");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
