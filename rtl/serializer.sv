// serializer: sends the present message out as TTC frames, one message byte
// per frame, one bit per bunch clock.
//
// At `start` (the beginning of a revolution period) the serializer latches the
// UTC seconds and walks the message from byte 0 to byte `msg_len`-1. Each
// byte whose present-turn enable bit is set is sent as one individually
// addressed long TTC frame of 42 bits, most significant first:
//   0, 1, TTCrx address (14), E, 1, sub-address (8), data (8), check (7), 1
// The sub-address is the byte's index in the message, so the receiver knows
// which byte it got and bytes whose enable bit is clear are simply not sent.
// When `utc_en` is set the four bytes from `utc_pos` on carry the UTC seconds,
// most significant byte first, instead of the buffer contents. Between frames
// and when `oe_ctrl` is low the line idles at 1. A byte whose enable bit is
// clear costs one clock, a sent byte 42 clocks plus two for reading it. If a
// new revolution period starts while a frame is on the line, that frame is
// finished and the new message starts right after it; `overrun` pulses.
// `bst_oe` is the output enable of the line driver. `oe_ctrl` is looked at
// when a frame is loaded, so switching the output off or on never cuts a
// frame: a frame already started is finished.
// From the design description: one data byte per TTC frame with its
// destination address, the enable bits, the programmable message length and
// UTC position, one bit per bunch clock. This design's own: the frame layout
// and check bits (taken from the TTC long-format frame, TTCrx address and E bit
// as parameters), the byte order of the UTC and the overrun behaviour. The
// check bits are a Hamming code over the 32 bits between the format bit and
// the check field: bit j (j = 0..5) is the parity of the data bits whose
// position in a Hamming codeword with check bits at positions 1,2,4,...,32
// has bit j set, and bit 6 the parity of those 32 bits and the six others.
module serializer
  import bst_pkg::*;
#(
  parameter logic [13:0] TTCRX_ADDR = 14'h0000,
  parameter logic        E_BIT      = 1'b1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [MSG_BYTES-1:0] present_en,
  input  logic [MSG_IDX_W:0]   msg_len,
  input  logic                 utc_en,
  input  logic [MSG_IDX_W-1:0] utc_pos,
  input  logic [31:0]          utc_sec,
  input  logic                 oe_ctrl,
  output logic [MSG_IDX_W-1:0] rd_idx,
  input  logic [7:0]           rd_data,
  output logic                 bst_msg,
  output logic                 bst_oe,
  output logic                 frame_start,   // pulses with the first bit of a frame
  output logic                 overrun
);
  localparam int FRAME_BITS = 42;

  typedef enum logic [1:0] {Z_IDLE, Z_SCAN, Z_LOAD, Z_SEND} zstate_e;
  zstate_e        st;
  logic [MSG_IDX_W:0] idx;
  logic [FRAME_BITS-1:0] sh;
  logic [5:0]     bitcnt;
  logic           pending;
  logic [31:0]    utc_q;
  logic           drive_q;   // output enabled when the current frame started

  function automatic logic [6:0] ttc_check(logic [31:0] d);
    logic [6:0] c;
    int         p, k;
    c = '0;
    k = 0;
    for (p = 1; p <= 38; p++) begin
      if ((p & (p - 1)) != 0) begin          // not a power of two: a data bit
        for (int j = 0; j < 6; j++) if (p[j]) c[j] ^= d[k];
        k++;
      end
    end
    c[6] = ^{d, c[5:0]};
    return c;
  endfunction

  function automatic logic [FRAME_BITS-1:0] mk_frame(logic [7:0] sub, logic [7:0] data);
    logic [31:0] d;
    d = {TTCRX_ADDR, E_BIT, 1'b1, sub, data};
    return {2'b01, d, ttc_check(d), 1'b1};
  endfunction

  logic [7:0] byte_val;
  logic [MSG_IDX_W:0] rel;
  always_comb begin
    rel      = idx - {1'b0, utc_pos};
    byte_val = rd_data;
    if (utc_en && rel < (MSG_IDX_W+1)'(UTC_BYTES))
      byte_val = utc_q[8*(UTC_BYTES-1-int'(rel)) +: 8];
  end

  assign rd_idx = idx[MSG_IDX_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= Z_IDLE;
      idx     <= '0;
      sh      <= '1;
      bitcnt  <= '0;
      pending <= 1'b0;
      utc_q   <= '0;
      overrun <= 1'b0;
      drive_q <= 1'b0;
    end else begin
      overrun <= 1'b0;
      if (start) begin
        utc_q <= utc_sec;
        if (st == Z_SEND) begin
          pending <= 1'b1;
          overrun <= 1'b1;
        end else begin
          idx <= '0;
          st  <= Z_SCAN;
        end
      end
      unique case (st)
        Z_IDLE: ;
        Z_SCAN: if (!start) begin
          if (idx >= msg_len || idx >= (MSG_IDX_W+1)'(MSG_BYTES)) st <= Z_IDLE;
          else if (present_en[idx[MSG_IDX_W-1:0]])               st <= Z_LOAD;
          else                                                  idx <= idx + 1'b1;
        end
        Z_LOAD: if (!start) begin
          sh      <= mk_frame(8'(idx), byte_val);
          drive_q <= oe_ctrl;
          bitcnt <= 6'(FRAME_BITS - 1);
          st     <= Z_SEND;
        end
        Z_SEND: begin
          sh <= {sh[FRAME_BITS-2:0], 1'b1};
          if (bitcnt == '0) begin
            if (pending || start) begin
              pending <= 1'b0;
              idx     <= '0;
            end else begin
              idx <= idx + 1'b1;
            end
            st <= Z_SCAN;
          end else begin
            bitcnt <= bitcnt - 1'b1;
          end
        end
      endcase
    end
  end

  assign bst_msg     = (st == Z_SEND && drive_q) ? sh[FRAME_BITS-1] : 1'b1;
  assign bst_oe      = oe_ctrl || (st == Z_SEND && drive_q);
  assign frame_start = (st == Z_SEND) && bitcnt == 6'(FRAME_BITS - 1);

endmodule
