// tb_combiner_fifo: self-checking test of combiner_fifo.
//
// Random writes and reads (often simultaneous) are compared with a queue
// kept by the testbench: head word, count and the overflow flag, including
// long stretches with the FIFO full and empty.
module tb_combiner_fifo;
  import daq_pkg::*;

  localparam int D = 16;

  logic clk = 0, rst = 1;
  logic wr_en, rd_en, overflow;
  net_word_t wr_word, head;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0, n_full = 0, n_ovf = 0;
  logic [7:0] model[$];

  combiner_fifo #(.DEPTH(D)) dut (.clk, .rst, .wr_en, .wr_word, .rd_en, .head, .count, .overflow);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pw, pr;
    wr_en = 0; rd_en = 0; wr_word = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 20000; t++) begin
      // phases: fill-heavy, drain-heavy, balanced
      pw = ((t / 500) % 3 == 0) ? 80 : ((t / 500) % 3 == 1) ? 20 : 50;
      pr = 100 - pw;
      wr_en = ($urandom_range(0, 99) < pw);
      rd_en = ($urandom_range(0, 99) < pr);
      wr_word = 8'($urandom);
      #1;
      chk(count == $bits(count)'(model.size()), "count");
      chk(head == ((model.size() != 0) ? model[0] : 8'h00), "head");
      chk(overflow == (wr_en && model.size() == D), "overflow flag");
      if (model.size() == D) n_full++;
      if (overflow) n_ovf++;
      @(posedge clk);
      if (rd_en && model.size() != 0) void'(model.pop_front());
      if (wr_en && model.size() < D + (rd_en ? 0 : 0) && !(overflow)) model.push_back(wr_word);
      @(negedge clk);
    end
    chk(n_full > 50 && n_ovf > 10, "full and overflow reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
