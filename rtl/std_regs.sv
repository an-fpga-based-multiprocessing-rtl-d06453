// std_regs: the standard registers of the board - message length, UTC
// position, UTC load value - and the read-only views of the task status,
// turn number, triggers and UTC.
//
// RA_MSG_LEN holds the number of message bytes the serializer walks (0..32,
// reset 32), RA_UTC_POS the index of the first of the four UTC bytes (reset
// 0). RA_UTC_LD_LO/HI hold the UTC value to load; a write to RA_UTC_ARM
// toggles `utc_arm_tgl`, which makes the UTC block take that value at the next
// PPS. RA_STATUS_LO/HI, RA_TURN, RA_EXT, RA_INT and RA_UTC_LO/HI read the
// corresponding inputs. Reads are combinational on the register address.
// Programmable message length and UTC position come from the design
// description; the addresses, resets and the arm mechanism are this design's
// own.
module std_regs
  import bst_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  reg_req_t              rreq,
  output logic [15:0]           rdata,
  output logic [MSG_IDX_W:0]    msg_len,
  output logic [MSG_IDX_W-1:0]  utc_pos,
  output logic [31:0]           utc_load,
  output logic                  utc_arm_tgl,
  input  logic [4*NTASKS-1:0]   status,
  input  logic [DATA_W-1:0]     turn,
  input  logic [EXT_TRIG_W-1:0] ext_trig,
  input  logic [DATA_W-1:0]     int_trig,
  input  logic [31:0]           utc_sec
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      msg_len     <= (MSG_IDX_W+1)'(MSG_BYTES);
      utc_pos     <= '0;
      utc_load    <= '0;
      utc_arm_tgl <= 1'b0;
    end else if (rreq.wr) begin
      unique case (rreq.addr)
        RA_MSG_LEN:   msg_len        <= (rreq.wdata[MSG_IDX_W:0] > (MSG_IDX_W+1)'(MSG_BYTES))
                                        ? (MSG_IDX_W+1)'(MSG_BYTES) : rreq.wdata[MSG_IDX_W:0];
        RA_UTC_POS:   utc_pos        <= rreq.wdata[MSG_IDX_W-1:0];
        RA_UTC_LD_LO: utc_load[15:0] <= rreq.wdata;
        RA_UTC_LD_HI: utc_load[31:16] <= rreq.wdata;
        RA_UTC_ARM:   utc_arm_tgl    <= !utc_arm_tgl;
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (rreq.addr)
      RA_MSG_LEN:   rdata = 16'(msg_len);
      RA_UTC_POS:   rdata = 16'(utc_pos);
      RA_UTC_LD_LO: rdata = utc_load[15:0];
      RA_UTC_LD_HI: rdata = utc_load[31:16];
      RA_STATUS_LO: rdata = status[15:0];
      RA_STATUS_HI: rdata = status[31:16];
      RA_TURN:      rdata = turn;
      RA_EXT:       rdata = 16'(ext_trig);
      RA_INT:       rdata = int_trig;
      RA_UTC_LO:    rdata = utc_sec[15:0];
      RA_UTC_HI:    rdata = utc_sec[31:16];
      default:      rdata = '0;
    endcase
  end

endmodule
