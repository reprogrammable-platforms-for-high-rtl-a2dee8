// tb_fe_trigger: self-checking test of fe_trigger.
//
// Drives a synthetic ADC trace: a noisy baseline with pulses of random
// height and spacing, some closer than the capture time. The time stamp
// input is the cycle number. The testbench finds the expected hits itself
// (rising crossings of the threshold outside the dead time) and checks that
// each message arrives WINDOW-PRE clocks after its crossing, with the
// crossing's time stamp and the eight samples from PRE before it, and that
// no message arrives otherwise or while the channel is disabled.
module tb_fe_trigger;
  import daq_pkg::*;

  localparam int PRE = 2, POST = 8 - PRE - 1, N = 6000;
  localparam logic [11:0] THR = 12'd1000;

  logic clk = 0, rst = 1;
  logic enable;
  logic [11:0] sample;
  logic [63:0] ts;
  logic [159:0] msg;
  logic msg_valid, busy;
  int checks = 0, failures = 0, n_hits = 0, n_ignored = 0;

  logic [11:0] tr [N];
  bit          en_tr [N];
  bit          exp_v [N + 16];
  int          exp_c [N + 16];

  fe_trigger #(.PRE(PRE)) dut (.clk, .rst, .enable, .threshold(THR), .sample, .ts,
    .msg, .msg_valid, .busy);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #(10 * N + 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, free_at;
    // trace
    t = 0;
    while (t < N) begin
      int gap, h;
      gap = (t == 0) ? 10 : $urandom_range(1, 40);   // quiet lead-in
      for (int i = 0; i < gap && t < N; i++) begin tr[t] = 12'(90 + $urandom_range(0, 20)); t++; end
      h = $urandom_range(600, 4000);
      // pulse: rise, peak, decay
      for (int i = 0; i < 6 && t < N; i++) begin
        int v;
        v = (i == 0) ? h / 3 : (i == 1) ? h : (i == 2) ? (h * 3) / 4 : h / (i * 2);
        tr[t] = 12'(v > 4095 ? 4095 : v);
        t++;
      end
    end
    for (int i = 0; i < N; i++) en_tr[i] = !(i >= 4000 && i < 4500);
    // expected hits
    for (int i = 0; i < N + 16; i++) exp_v[i] = 0;
    free_at = 0;
    for (int c = 1; c < N; c++) begin
      if (en_tr[c] && c >= free_at && tr[c] >= THR && tr[c-1] < THR) begin
        exp_v[c + POST + 1] = 1;
        exp_c[c + POST + 1] = c;
        free_at = c + POST + 1;
        n_hits++;
      end else if (tr[c] >= THR && tr[c-1] < THR) n_ignored++;
    end

    enable = 1; sample = '0; ts = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int c = 0; c < N + 16; c++) begin
      sample = (c < N) ? tr[c] : 12'd0;
      enable = (c < N) ? en_tr[c] : 1'b1;
      ts = 64'(c);
      #1;
      chk(msg_valid == exp_v[c], $sformatf("msg_valid at sample %0d", c));
      if (msg_valid && exp_v[c]) begin
        int cc;
        cc = exp_c[c];
        chk(msg[63:0] == 64'(cc), "time stamp of the crossing");
        for (int k = 0; k < 8; k++)
          chk(msg[64 + 12*k +: 12] == tr[cc - PRE + k], $sformatf("window sample %0d", k));
      end
      @(negedge clk);
    end
    chk(n_hits > 50 && n_ignored > 5, "hits and dead-time crossings exercised");
    $display("hits=%0d crossings ignored=%0d", n_hits, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
