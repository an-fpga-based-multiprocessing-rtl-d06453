// msg_enable_regs: the 32 enable bits and 32 auto-clear bits of the message,
// one of each per message byte.
//
// An enable bit decides whether its byte is sent in a revolution period. The
// next-turn enable bits are set one at a time by the processor when a task
// writes that byte (`set_en`/`set_idx`), several at a time by `set_mask` (used
// for the UTC bytes when a new second starts), and read or written whole by
// the VME side. At `swap` they are copied to the present-turn enables the
// serializer uses, and every next-turn bit whose auto-clear bit is set is
// cleared: such a byte is sent only in the one turn after it was written,
// while a byte with auto-clear 0 is sent every turn. Sets in the swap clock
// count for the next turn. VME registers: enables low/high at RA_EN_LO/HI,
// auto-clear low/high at RA_ACLR_LO/HI; a VME write to an enable half
// overrides a set in the same clock. The bit counts and meanings follow the
// design description; the timing of the copy and the set/clear precedence
// are this design's own.
module msg_enable_regs
  import bst_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 swap,
  input  logic                 set_en,
  input  logic [MSG_IDX_W-1:0] set_idx,
  input  logic [MSG_BYTES-1:0] set_mask,
  input  reg_req_t             rreq,
  output logic [15:0]          rdata,
  output logic [MSG_BYTES-1:0] present_en,
  output logic [MSG_BYTES-1:0] next_en,
  output logic [MSG_BYTES-1:0] autoclr
);
  logic [MSG_BYTES-1:0] sets, next_d;

  always_comb begin
    sets = set_mask;
    if (set_en) sets[set_idx] = 1'b1;
    next_d = (swap ? (next_en & ~autoclr) : next_en) | sets;
    if (rreq.wr && rreq.addr == RA_EN_LO) next_d[15:0]  = rreq.wdata;
    if (rreq.wr && rreq.addr == RA_EN_HI) next_d[31:16] = rreq.wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      present_en <= '0;
      next_en    <= '0;
      autoclr    <= '0;
    end else begin
      if (swap) present_en <= next_en;
      next_en <= next_d;
      if (rreq.wr && rreq.addr == RA_ACLR_LO) autoclr[15:0]  <= rreq.wdata;
      if (rreq.wr && rreq.addr == RA_ACLR_HI) autoclr[31:16] <= rreq.wdata;
    end
  end

  always_comb begin
    unique case (rreq.addr)
      RA_EN_LO:   rdata = next_en[15:0];
      RA_EN_HI:   rdata = next_en[31:16];
      RA_ACLR_LO: rdata = autoclr[15:0];
      RA_ACLR_HI: rdata = autoclr[31:16];
      default:    rdata = '0;
    endcase
  end

endmodule
