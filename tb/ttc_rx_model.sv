// ttc_rx_model: testbench receiver for the BST message line. It watches the
// serial line one bit per clock, finds each 42-bit long-format TTC frame by
// its start bit, checks the format bit, the fixed 1 bit, the stop bit and the
// Hamming check field, and reports every frame with a one-clock `got` pulse
// and its fields. The check field is verified the way a receiver does it:
// the 38-bit codeword (check bit j at position 2^j, data bits in the other
// positions, lowest data bit first) must give a zero syndrome, and bit 6 must
// make the parity of all 38 bits even.
module ttc_rx_model (
  input  logic        clk,
  input  logic        line,
  output logic        got,
  output logic [13:0] addr,
  output logic        e_bit,
  output logic [7:0]  sub,
  output logic [7:0]  data,
  output logic        ok,
  output int          frames,
  output int          bad
);
  logic [41:0] sh;
  int          cnt;
  logic        busy;

  initial begin
    busy = 0; cnt = 0; frames = 0; bad = 0; got = 0; sh = '0;
    addr = '0; e_bit = 0; sub = '0; data = '0; ok = 0;
  end

  function automatic logic frame_ok(logic [41:0] f);
    logic [31:0] d;
    logic [6:0]  c;
    logic [38:1] cw;
    logic [5:0]  syn;
    int k;
    d  = f[39:8];
    c  = f[7:1];
    k  = 0;
    cw = '0;
    for (int p = 1; p <= 38; p++) begin
      if (p == 1 || p == 2 || p == 4 || p == 8 || p == 16 || p == 32) begin
        cw[p] = c[$clog2(p)];
      end else begin
        cw[p] = d[k];
        k++;
      end
    end
    syn = '0;
    for (int p = 1; p <= 38; p++) if (cw[p]) syn ^= 6'(p);
    return f[41] == 1'b0 && f[40] == 1'b1 && f[24] == 1'b1 && f[0] == 1'b1 &&
           syn == '0 && ((^cw) ^ c[6]) == 1'b0;
  endfunction

  always @(posedge clk) begin
    got <= 1'b0;
    if (!busy) begin
      if (line == 1'b0) begin
        busy <= 1'b1;
        cnt  <= 1;
        sh   <= 42'b0;
      end
    end else begin
      sh  <= {sh[40:0], line};
      cnt <= cnt + 1;
      if (cnt == 41) begin
        logic [41:0] f;
        f      = {sh[40:0], line};
        busy  <= 1'b0;
        got   <= 1'b1;
        addr  <= f[39:26];
        e_bit <= f[25];
        sub   <= f[23:16];
        data  <= f[15:8];
        ok    <= frame_ok(f);
        frames <= frames + 1;
        if (!frame_ok(f)) bad <= bad + 1;
      end
    end
  end
endmodule
