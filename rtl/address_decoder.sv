// address_decoder: routes the VME side's internal bus requests to the SRAM
// manager, the register blocks, the message buffers and the task registers,
// and returns the acknowledge and read data.
//
// Word address map (20 bits, A20..A1 of the board's VME window):
//   0x00000-0x3FFFF  task code SRAM (256 k x 16)
//   0x40000-0x4001F  registers (bits 4:0, see bst_pkg RA_*)
//   0x40100-0x4013F  message bytes: bit 5 = 1 present, 0 next; data in bits 7:0
//   0x40200-0x4023F  task registers, {task, register}
// Anything else reads 0 and ignores writes. A `req` for the SRAM is held
// towards the SRAM manager until it acknowledges; every other request is
// acknowledged one clock later with the data read in the request clock. The
// requester keeps `addr` stable until the acknowledge. The blocks reached over
// VME follow the design description (its block diagram joins the VME interface
// to all of them through an address decoder); the map is this design's own.
module address_decoder
  import bst_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  req,
  input  logic                  we,
  input  logic [BUS_AW-1:0]     addr,
  input  logic [15:0]           wdata,
  output logic                  ack,
  output logic [15:0]           rdata,
  // registers
  output reg_req_t              rreq,
  input  logic [15:0]           reg_rdata,   // OR of all register blocks
  // message DPRAM, VME port
  output logic [MSG_IDX_W:0]    msg_addr,
  output logic                  msg_we,
  output logic [7:0]            msg_wdata,
  input  logic [7:0]            msg_rdata,
  // task register DPRAM, port B
  output logic [TASK_W+2:0]     treg_addr,
  output logic                  treg_we,
  output logic [15:0]           treg_wdata,
  input  logic [15:0]           treg_rdata,
  // SRAM manager, VME port
  output logic                  s_req,
  output logic                  s_we,
  output logic [SRAM_AW-1:0]    s_addr,
  output logic [15:0]           s_wdata,
  input  logic                  s_ack,
  input  logic [15:0]           s_rdata
);
  typedef enum logic [2:0] {T_NONE, T_REG, T_MSG, T_TREG, T_SRAM} target_e;
  target_e tgt, tgt_q;
  logic    s_busy, ack_q;
  logic [15:0] reg_q;

  always_comb begin
    tgt = T_NONE;
    if (addr[19:18] == 2'b00)                            tgt = T_SRAM;
    else if (addr[19:18] == 2'b01 && addr[17:10] == '0) begin
      unique case (addr[9:8])
        2'd0: if (addr[7:5] == '0) tgt = T_REG;
        2'd1: if (addr[7:6] == '0) tgt = T_MSG;
        2'd2: if (addr[7:6] == '0) tgt = T_TREG;
        default: ;
      endcase
    end
  end

  assign rreq.wr    = req && we && tgt == T_REG;
  assign rreq.addr  = addr[4:0];
  assign rreq.wdata = wdata;
  assign msg_addr   = addr[MSG_IDX_W:0];
  assign msg_we     = req && we && tgt == T_MSG;
  assign msg_wdata  = wdata[7:0];
  assign treg_addr  = addr[TASK_W+2:0];
  assign treg_we    = req && we && tgt == T_TREG;
  assign treg_wdata = wdata;
  assign s_req      = (req && tgt == T_SRAM) || s_busy;
  assign s_we       = we;
  assign s_addr     = addr[SRAM_AW-1:0];
  assign s_wdata    = wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_busy <= 1'b0;
      ack_q  <= 1'b0;
      tgt_q  <= T_NONE;
      reg_q  <= '0;
    end else begin
      ack_q <= req && tgt != T_SRAM;
      if (req) tgt_q <= tgt;
      if (req) reg_q <= (tgt == T_REG) ? reg_rdata : '0;
      if (req && tgt == T_SRAM) s_busy <= 1'b1;
      else if (s_ack)           s_busy <= 1'b0;
    end
  end

  assign ack = ack_q || s_ack;

  always_comb begin
    unique case (tgt_q)
      T_REG:   rdata = reg_q;
      T_MSG:   rdata = {8'h00, msg_rdata};
      T_TREG:  rdata = treg_rdata;
      T_SRAM:  rdata = s_rdata;
      default: rdata = '0;
    endcase
  end

endmodule
