// timestamp_counter: 64-bit time stamp of the platform.
//
// ts[63:32] counts seconds, ts[31:0] the binary fraction of a second
// (1 LSB = 2^-32 s, about 0.23 ns). The clock period 1/CLK_HZ is not a whole
// number of fraction LSBs, so each clock adds floor(2^32/CLK_HZ) to the
// fraction and accumulates the remainder (2^32 mod CLK_HZ) in a second
// counter; when that reaches CLK_HZ the fraction gets one extra LSB. After
// k clocks the fraction is exactly floor(k * 2^32 / CLK_HZ), and after
// CLK_HZ clocks it wraps to zero as the seconds count steps.
//
// Ports: load_sec writes sec_in into the seconds and clears the fraction
// (for alignment with universal time, e.g. at a pulse-per-second mark).
// Timing: ts changes on every clock edge.
//
// The 64-bit format, 32/32 split and 100 MHz clock are the platform's; the
// remainder accumulator and the load port are choices of this design.
module timestamp_counter #(
  parameter int unsigned CLK_HZ = 100_000_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load_sec,
  input  logic [31:0] sec_in,
  output logic [63:0] ts
);

  localparam longint unsigned TWO32 = 64'd1 << 32;
  localparam logic [31:0] STEP = 32'(TWO32 / CLK_HZ);
  localparam logic [31:0] REM  = 32'(TWO32 % CLK_HZ);
  localparam logic [31:0] HZ   = 32'(CLK_HZ);

  logic [31:0] sec, frac, acc, tick;
  logic [32:0] acc_sum;
  logic        carry;

  assign acc_sum = {1'b0, acc} + {1'b0, REM};
  assign carry   = acc_sum >= {1'b0, HZ};
  assign ts      = {sec, frac};

  always_ff @(posedge clk) begin
    if (rst || load_sec) begin
      sec  <= rst ? '0 : sec_in;
      frac <= '0;
      acc  <= '0;
      tick <= '0;
    end else if (tick == HZ - 1) begin
      sec  <= sec + 1'b1;
      frac <= '0;
      acc  <= '0;
      tick <= '0;
    end else begin
      tick <= tick + 1'b1;
      frac <= frac + STEP + 32'(carry);
      acc  <= carry ? 32'(acc_sum - {1'b0, HZ}) : acc_sum[31:0];
    end
  end

endmodule
