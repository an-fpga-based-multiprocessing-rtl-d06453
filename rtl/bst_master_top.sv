// bst_master_top: main FPGA logic of the BST master (CTG-BST) card.
//
// Every revolution period the board sends the Beam Synchronous Timing message
// to the TTC transmitter: up to 32 bytes, each in its own TTC frame, one bit
// per bunch clock. The message for the next turn is assembled while the
// present one is sent: up to eight tasks on the embedded processor write
// bytes into the next-turn buffer, the CBCM crate's CPU may write bytes over
// VME, and the UTC block supplies the time. At each revolution (rising edge
// of `frev`) the buffers change roles, the serializer starts the new message
// and the turn number advances.
//
// Blocks: bst_cpu (scheduler, control, fetch, decode, execute, task status),
// task_regs_dpram, global_regs, msg_dpram, msg_enable_regs, serializer,
// utc_block, sram_manager (task code in an external 512 kByte SRAM),
// vme_interface, address_decoder, enabled_tasks, std_regs and ctrl_reg.
// All run on the bunch clock `clk` except the 40 MHz half of the UTC block
// (`clk40`, the GMT 40.000 MHz clock). `frev`, `sync_in`, `ext_in`, `pps`
// and the VME bus are asynchronous and synchronised inside. Reset is
// asynchronous and active low, one reset per clock domain. The external SRAM
// chip, the VME bus and the TTC transmitter connect through the ports. When
// the UTC enable is set the UTC bytes of the message are marked for sending
// at each new second.
module bst_master_top
  import bst_pkg::*;
#(
  parameter int          SRAM_WAIT  = 2,
  parameter logic [2:0]  VME_BASE   = 3'd1,
  parameter logic [13:0] TTCRX_ADDR = 14'h0000
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clk40,
  input  logic                  rst40_n,
  // timing inputs
  input  logic                  frev,
  input  logic                  pps,
  input  logic                  sync_in,
  input  logic [EXT_TRIG_W-1:0] ext_in,
  // VME bus
  input  logic                  vme_as_n,
  input  logic                  vme_ds_n,
  input  logic                  vme_write_n,
  input  logic                  vme_iack_n,
  input  logic [23:1]           vme_addr,
  input  logic [15:0]           vme_data_i,
  output logic [15:0]           vme_data_o,
  output logic                  vme_data_oe,
  output logic                  vme_dtack_n,
  output logic                  vme_irq_n,
  // external task code SRAM
  output logic [SRAM_AW-1:0]    sram_addr,
  output logic [SRAM_DW-1:0]    sram_dq_o,
  output logic                  sram_dq_oe,
  input  logic [SRAM_DW-1:0]    sram_dq_i,
  output logic                  sram_ce_n,
  output logic                  sram_oe_n,
  output logic                  sram_we_n,
  // BST message to the TTC transmitter
  output logic                  bst_msg,
  output logic                  bst_oe
);
  // internal VME bus
  logic              b_req, b_we, b_ack;
  logic [BUS_AW-1:0] b_addr;
  logic [15:0]       b_wdata, b_rdata;
  reg_req_t          rreq;
  logic [15:0]       rd_ctrl, rd_tasks, rd_std, rd_en;
  // message buffer
  logic [MSG_IDX_W:0]   vm_addr;
  logic                 vm_we;
  logic [7:0]           vm_wdata, vm_rdata;
  logic                 cm_we;
  logic [MSG_IDX_W-1:0] cm_widx, cm_ridx, s_ridx;
  logic [7:0]           cm_wdata, cm_rdata, s_rdata;
  // task registers
  logic [TASK_W+2:0] ta_addr, tb_addr;
  logic              ta_we, tb_we;
  logic [15:0]       ta_wdata, ta_rdata, tb_wdata, tb_rdata;
  // SRAM
  logic               c_req, c_ack, v_req, v_we, v_ack;
  logic [SRAM_AW-1:0] c_addr, v_addr;
  logic [15:0]        c_rdata, v_rdata, v_wdata;
  // control and status
  logic                   ser_oe, utc_en, cpu_run, turn_clear;
  logic [NTASKS-1:0]      task_en, restart;
  logic [NTASKS*PC_W-1:0] start_addr;
  logic [MSG_IDX_W:0]     msg_len;
  logic [MSG_IDX_W-1:0]   utc_pos;
  logic [31:0]            utc_load, utc_sec;
  logic                   utc_arm_tgl, new_sec;
  logic [4*NTASKS-1:0]    status;
  logic [MSG_BYTES-1:0]   present_en, next_en, autoclr, utc_mask;
  // global registers
  logic                  turn_pulse, sync_pulse;
  logic [DATA_W-1:0]     turn, int_trig, int_wdata, int_set, int_clr;
  logic [EXT_TRIG_W-1:0] ext_trig;
  logic                  int_we;
  // interrupts
  logic       irq_req, irq_busy;
  logic [7:0] irq_vec;

  vme_interface #(.BASE(VME_BASE)) u_vme (
    .clk, .rst_n, .vme_as_n, .vme_ds_n, .vme_write_n, .vme_iack_n, .vme_addr,
    .vme_data_i, .vme_data_o, .vme_data_oe, .vme_dtack_n, .vme_irq_n,
    .req(b_req), .we(b_we), .addr(b_addr), .wdata(b_wdata), .ack(b_ack), .rdata(b_rdata),
    .irq_set(irq_req), .irq_vec, .irq_busy
  );

  address_decoder u_dec (
    .clk, .rst_n, .req(b_req), .we(b_we), .addr(b_addr), .wdata(b_wdata),
    .ack(b_ack), .rdata(b_rdata), .rreq, .reg_rdata(rd_ctrl | rd_tasks | rd_std | rd_en),
    .msg_addr(vm_addr), .msg_we(vm_we), .msg_wdata(vm_wdata), .msg_rdata(vm_rdata),
    .treg_addr(tb_addr), .treg_we(tb_we), .treg_wdata(tb_wdata), .treg_rdata(tb_rdata),
    .s_req(v_req), .s_we(v_we), .s_addr(v_addr), .s_wdata(v_wdata), .s_ack(v_ack),
    .s_rdata(v_rdata)
  );

  ctrl_reg u_ctrl (
    .clk, .rst_n, .rreq, .rdata(rd_ctrl), .ser_oe, .utc_en, .cpu_run, .turn_clear
  );

  enabled_tasks u_tasks (
    .clk, .rst_n, .rreq, .rdata(rd_tasks), .enable(task_en), .restart, .start_addr
  );

  std_regs u_std (
    .clk, .rst_n, .rreq, .rdata(rd_std), .msg_len, .utc_pos, .utc_load, .utc_arm_tgl,
    .status, .turn, .ext_trig, .int_trig, .utc_sec
  );

  sram_manager #(.WAIT(SRAM_WAIT)) u_sram (
    .clk, .rst_n, .c_req, .c_addr, .c_ack, .c_rdata,
    .v_req, .v_we, .v_addr, .v_wdata, .v_ack, .v_rdata,
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i, .sram_ce_n, .sram_oe_n, .sram_we_n
  );

  task_regs_dpram u_tregs (
    .clk, .a_addr(ta_addr), .a_we(ta_we), .a_wdata(ta_wdata), .a_rdata(ta_rdata),
    .b_addr(tb_addr), .b_we(tb_we), .b_wdata(tb_wdata), .b_rdata(tb_rdata)
  );

  global_regs u_glob (
    .clk, .rst_n, .frev, .sync_in, .ext_in, .turn_clear, .int_we, .int_wdata,
    .int_set, .int_clr, .turn_pulse, .sync_pulse, .turn, .ext_trig, .int_trig
  );

  bst_cpu u_cpu (
    .clk, .rst_n, .run(cpu_run), .enable(task_en), .restart, .start_addr,
    .mem_req(c_req), .mem_addr(c_addr), .mem_ack(c_ack), .mem_rdata(c_rdata),
    .treg_addr(ta_addr), .treg_we(ta_we), .treg_wdata(ta_wdata), .treg_rdata(ta_rdata),
    .turn, .ext_trig, .int_trig, .int_we, .int_wdata, .int_set, .int_clr,
    .pps_pulse(new_sec), .sync_pulse,
    .msg_we(cm_we), .msg_widx(cm_widx), .msg_wdata(cm_wdata),
    .msg_ridx(cm_ridx), .msg_rdata(cm_rdata),
    .irq_req, .irq_vec, .irq_busy, .status, .instr_done()
  );

  msg_dpram u_msg (
    .clk, .rst_n, .swap(turn_pulse),
    .c_we(cm_we), .c_widx(cm_widx), .c_wdata(cm_wdata), .c_ridx(cm_ridx), .c_rdata(cm_rdata),
    .s_ridx, .s_rdata,
    .v_addr(vm_addr), .v_we(vm_we), .v_wdata(vm_wdata), .v_rdata(vm_rdata)
  );

  // UTC bytes are marked for sending when a new second starts
  always_comb begin
    utc_mask = '0;
    for (int i = 0; i < UTC_BYTES; i++)
      if (utc_en && new_sec && int'(utc_pos) + i < MSG_BYTES)
        utc_mask[int'(utc_pos) + i] = 1'b1;
  end

  msg_enable_regs u_en (
    .clk, .rst_n, .swap(turn_pulse), .set_en(cm_we), .set_idx(cm_widx),
    .set_mask(utc_mask), .rreq, .rdata(rd_en), .present_en, .next_en, .autoclr
  );

  serializer #(.TTCRX_ADDR(TTCRX_ADDR)) u_ser (
    .clk, .rst_n, .start(turn_pulse), .present_en, .msg_len, .utc_en, .utc_pos, .utc_sec,
    .oe_ctrl(ser_oe), .rd_idx(s_ridx), .rd_data(s_rdata), .bst_msg, .bst_oe,
    .frame_start(), .overrun()
  );

  utc_block u_utc (
    .clk40, .rst40_n, .pps, .clk, .rst_n, .load_val(utc_load), .arm_tgl(utc_arm_tgl),
    .utc_sec, .new_sec, .subsec()
  );

endmodule
