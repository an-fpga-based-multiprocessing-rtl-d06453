// ctrl_reg: the control register, written and read by the CBCM at RA_CTRL.
//
// Bit 0 enables the serializer's output (the line idles at 1 when it is
// clear), bit 1 puts the UTC into the message at the programmed position, bit
// 2 lets the processor run. Writing 1 to bit 3 clears the turn number; this
// bit reads as 0 and gives a one-clock `turn_clear` pulse. All bits reset to
// 0. That a control register drives the serializer and the processor, and
// that the use of the UTC is selected by a register, follows the design
// description; the bit assignment is this design's own.
module ctrl_reg
  import bst_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  reg_req_t    rreq,
  output logic [15:0] rdata,
  output logic        ser_oe,
  output logic        utc_en,
  output logic        cpu_run,
  output logic        turn_clear
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ser_oe     <= 1'b0;
      utc_en     <= 1'b0;
      cpu_run    <= 1'b0;
      turn_clear <= 1'b0;
    end else begin
      turn_clear <= 1'b0;
      if (rreq.wr && rreq.addr == RA_CTRL) begin
        ser_oe     <= rreq.wdata[0];
        utc_en     <= rreq.wdata[1];
        cpu_run    <= rreq.wdata[2];
        turn_clear <= rreq.wdata[3];
      end
    end
  end

  assign rdata = (rreq.addr == RA_CTRL) ? {13'd0, cpu_run, utc_en, ser_oe} : '0;

endmodule
