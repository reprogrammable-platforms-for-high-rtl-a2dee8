// tb_net_pkg: reference encoding of network packets for the testbenches.
//
// Builds the expected word sequence of a packet straight from the packet
// format (START, destination, source, 7-bit slices of the message least
// significant first, STOP) and decodes a captured word sequence back into
// its fields. Words are plain 8-bit values {FCF, DATA}; the codes are
// written out here as numbers so the checks do not reuse the design's
// package.
package tb_net_pkg;

  localparam int MAXB = 256;
  typedef logic [7:0] w8_t;

  localparam w8_t T_IDLE  = 8'h00;
  localparam w8_t T_START = 8'h01;
  localparam w8_t T_STOP  = 8'h40;

  function automatic int n_words(int nbits);
    return (nbits + 6) / 7;
  endfunction

  // Expected wire words of a packet.
  function automatic void encode(input logic [6:0] dest, input logic [6:0] src,
                                 input logic [MAXB-1:0] msg, input int nbits,
                                 ref w8_t words[$]);
    words.delete();
    words.push_back(T_START);
    words.push_back({1'b1, dest});
    words.push_back({1'b1, src});
    for (int i = 0; i < n_words(nbits); i++) begin
      logic [6:0] sl;
      for (int b = 0; b < 7; b++)
        sl[b] = (7*i + b < nbits) ? msg[7*i + b] : 1'b0;
      words.push_back({1'b1, sl});
    end
    words.push_back(T_STOP);
  endfunction

  // Decode a packet (START .. STOP). Returns 1 if well formed.
  function automatic bit decode(input w8_t words[$], input int nbits,
                                output logic [6:0] dest, output logic [6:0] src,
                                output logic [MAXB-1:0] msg);
    msg  = '0;
    dest = '0;
    src  = '0;
    if (words.size() != n_words(nbits) + 4) return 0;
    if (words[0] != T_START || words[words.size()-1] != T_STOP) return 0;
    for (int i = 1; i < words.size() - 1; i++) if (!words[i][7]) return 0;
    dest = words[1][6:0];
    src  = words[2][6:0];
    for (int i = 0; i < n_words(nbits); i++)
      for (int b = 0; b < 7; b++)
        if (7*i + b < nbits) msg[7*i + b] = words[3+i][b];
    return 1;
  endfunction

  // ---- front-end reference ----

  // Time stamp fraction k clocks after reset at 100 MHz: floor(k*2^32/1e8).
  function automatic logic [63:0] ts_at(longint k);
    return {32'(k / 100_000_000), 32'(((k % 100_000_000) << 32) / 100_000_000)};
  endfunction

  // Appends a quiet baseline of len samples to a trace.
  function automatic void baseline(ref logic [11:0] tr[$], input int len);
    for (int i = 0; i < len; i++) tr.push_back(12'(95 + $urandom_range(0, 10)));
  endfunction

  // Appends one pulse (rise, peak, decay; 6 samples) of height h.
  function automatic void pulse(ref logic [11:0] tr[$], input int h);
    int v;
    for (int i = 0; i < 6; i++) begin
      v = (i == 0) ? h / 3 : (i == 1) ? h : (i == 2) ? (h * 3) / 4 : h / (i * 2);
      tr.push_back(12'(v > 4095 ? 4095 : v));
    end
  endfunction

  // Expected hit messages of one channel: rising threshold crossings with
  // an 8-sample window from 2 samples before the crossing, and a dead time
  // of 6 clocks after each hit. t0 = cycle of tr[0] after reset.
  function automatic void find_hits(input logic [11:0] tr[$], input logic [11:0] thr,
                                    input longint t0, ref logic [159:0] hits[$]);
    int free_at;
    logic [159:0] m;
    free_at = 0;
    for (int c = 2; c + 5 < tr.size(); c++) begin
      if (c >= free_at && tr[c] >= thr && tr[c-1] < thr) begin
        m[63:0] = ts_at(t0 + longint'(c));
        for (int k = 0; k < 8; k++) m[64 + 12*k +: 12] = tr[c - 2 + k];
        hits.push_back(m);
        free_at = c + 6;
      end
    end
  endfunction

  function automatic logic [MAXB-1:0] rand_msg(int nbits);
    logic [MAXB-1:0] m;
    for (int i = 0; i < MAXB / 32; i++) m[32*i +: 32] = $urandom;
    for (int i = nbits; i < MAXB; i++) m[i] = 1'b0;
    return m;
  endfunction

endpackage
