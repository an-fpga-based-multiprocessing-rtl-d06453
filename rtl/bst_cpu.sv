// bst_cpu: the BST processor - control unit with its scheduler, fetch unit,
// decoder and execution block, running up to eight tasks with hardware task
// switching on every instruction.
//
// Each task has its own program counter here and its own eight registers in
// the task register DPRAM (register r of task t at address {t, r}); its
// situation is kept in task_status_reg. The control unit runs one instruction
// at a time through five steps:
//   SCHED  the round robin scheduler picks a ready task (none: stay)
//   FETCH  the fetch unit reads the task's instruction from the SRAM
//   RDA    register rd of the task is addressed in the DPRAM
//   RDB    rd's value is latched, register rs and the message byte addressed
//   EXEC   the execution block's result is written back: register, program
//          counter, task situation, message byte, internal triggers, IRQ
// after which the next instruction may belong to any task, so switching costs
// no clock. With an idle SRAM of WAIT wait states an instruction takes
// 2*(WAIT+3)+5 bunch clocks (15 at WAIT=2, 374 ns at 40.079 MHz; the design
// description quotes 500 ns for its processor). `run` low lets the current
// instruction finish and then holds the processor. A rising edge of a task's
// enable bit (`restart`) loads its program counter from `start_addr`.
// The split into scheduler, control unit, fetch unit, decoder and execution
// block, the register counts and the instruction categories follow the design
// description; the step sequence and timing are this design's own.
module bst_cpu
  import bst_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      run,
  input  logic [NTASKS-1:0]         enable,
  input  logic [NTASKS-1:0]         restart,
  input  logic [NTASKS*PC_W-1:0]    start_addr,
  // SRAM manager, fetch port
  output logic                      mem_req,
  output logic [SRAM_AW-1:0]        mem_addr,
  input  logic                      mem_ack,
  input  logic [SRAM_DW-1:0]        mem_rdata,
  // task register DPRAM, port A
  output logic [TASK_W+2:0]         treg_addr,
  output logic                      treg_we,
  output logic [DATA_W-1:0]         treg_wdata,
  input  logic [DATA_W-1:0]         treg_rdata,
  // global registers
  input  logic [DATA_W-1:0]         turn,
  input  logic [EXT_TRIG_W-1:0]     ext_trig,
  input  logic [DATA_W-1:0]         int_trig,
  output logic                      int_we,
  output logic [DATA_W-1:0]         int_wdata,
  output logic [DATA_W-1:0]         int_set,
  output logic [DATA_W-1:0]         int_clr,
  // wake-up events
  input  logic                      pps_pulse,
  input  logic                      sync_pulse,
  // message DPRAM: write the next message, read the present one
  output logic                      msg_we,
  output logic [MSG_IDX_W-1:0]      msg_widx,
  output logic [7:0]                msg_wdata,
  output logic [MSG_IDX_W-1:0]      msg_ridx,
  input  logic [7:0]                msg_rdata,
  // VME interrupt
  output logic                      irq_req,
  output logic [7:0]                irq_vec,
  input  logic                      irq_busy,
  // status
  output logic [4*NTASKS-1:0]       status,
  output logic                      instr_done   // one clock per executed instruction
);
  typedef enum logic [2:0] {S_SCHED, S_FETCH, S_RDA, S_RDB, S_EXEC} cstate_e;
  cstate_e st;

  logic [NTASKS-1:0] ready;
  logic              grant_valid;
  logic [TASK_W-1:0] grant_id, cur;
  logic [PC_W-1:0]   pc_q [NTASKS];
  logic              f_start, f_done, f_busy;
  logic [31:0]       instr, instr_q;
  decoded_t          dec;
  logic [DATA_W-1:0] a_q, a_val, b_val;
  status_upd_t       upd;

  // exec_unit outputs
  logic              x_rd_we, x_msg_we, x_irq;
  logic [DATA_W-1:0] x_result, x_int_set, x_int_clr;
  logic [PC_W-1:0]   x_pc;
  task_state_e       x_state;
  wait_kind_e        x_wkind;
  logic [15:0]       x_warg;
  logic [MSG_IDX_W-1:0] x_msg_idx;
  logic [7:0]        x_msg_wdata, x_irq_vec;

  task_scheduler u_sched (
    .clk, .rst_n, .ready,
    .advance     (st == S_SCHED && run),
    .grant_valid, .grant_id
  );

  fetch_unit u_fetch (
    .clk, .rst_n, .start(f_start), .pc(pc_q[grant_id]), .busy(f_busy), .done(f_done),
    .instr, .mem_req, .mem_addr, .mem_ack, .mem_rdata
  );

  decode_unit u_dec (.instr(instr_q), .dec);

  function automatic logic [DATA_W-1:0] reg_value(logic [3:0] r, logic [DATA_W-1:0] local_v,
                                                  logic [DATA_W-1:0] tn,
                                                  logic [EXT_TRIG_W-1:0] ex,
                                                  logic [DATA_W-1:0] it);
    unique case (r)
      REG_TURN: return tn;
      REG_EXT:  return DATA_W'(ex);
      REG_INT:  return it;
      default:  return local_v;
    endcase
  endfunction

  assign a_val = a_q;
  assign b_val = reg_value(dec.rs, treg_rdata, turn, ext_trig, int_trig);

  exec_unit u_exec (
    .dec, .a(a_val), .b(b_val), .pc(pc_q[cur]), .turn, .msg_byte(msg_rdata), .irq_busy,
    .rd_we(x_rd_we), .result(x_result), .pc_next(x_pc), .new_state(x_state),
    .wkind(x_wkind), .warg(x_warg), .msg_we(x_msg_we), .msg_idx(x_msg_idx),
    .msg_wdata(x_msg_wdata), .int_set(x_int_set), .int_clr(x_int_clr),
    .irq_req(x_irq), .irq_vec(x_irq_vec)
  );

  assign f_start = (st == S_SCHED) && run && grant_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_SCHED;
      cur     <= '0;
      instr_q <= '0;
      a_q     <= '0;
    end else begin
      unique case (st)
        S_SCHED: if (f_start) begin
          cur <= grant_id;
          st  <= S_FETCH;
        end
        S_FETCH: if (f_done) begin
          instr_q <= instr;
          st      <= S_RDA;
        end
        S_RDA: st <= S_RDB;
        S_RDB: begin
          a_q <= reg_value(dec.rd, treg_rdata, turn, ext_trig, int_trig);
          st  <= S_EXEC;
        end
        S_EXEC: st <= S_SCHED;
        default: st <= S_SCHED;
      endcase
    end
  end

  // program counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NTASKS; t++) pc_q[t] <= '0;
    end else begin
      for (int t = 0; t < NTASKS; t++) begin
        if (restart[t])                                   pc_q[t] <= start_addr[t*PC_W +: PC_W];
        else if (st == S_EXEC && cur == t[TASK_W-1:0])    pc_q[t] <= x_pc;
      end
    end
  end

  // task register DPRAM port A
  always_comb begin
    treg_we    = 1'b0;
    treg_wdata = x_result;
    treg_addr  = {cur, dec.rd[2:0]};
    unique case (st)
      S_RDA:  treg_addr = {cur, dec.rd[2:0]};
      S_RDB:  treg_addr = {cur, dec.rs[2:0]};
      S_EXEC: begin
        treg_addr = {cur, dec.rd[2:0]};
        treg_we   = x_rd_we && !dec.rd[3];
      end
      default: ;
    endcase
  end

  always_comb begin
    upd         = '0;
    upd.valid   = (st == S_EXEC);
    upd.task_id = cur;
    upd.state   = x_state;
    upd.wkind   = x_wkind;
    upd.warg    = x_warg;
  end

  task_status_reg u_status (
    .clk, .rst_n, .enable, .restart, .upd, .ext_trig, .int_trig, .turn,
    .pps_pulse, .sync_pulse, .ready, .status
  );

  assign int_we     = (st == S_EXEC) && x_rd_we && dec.rd == REG_INT;
  assign int_wdata  = x_result;
  assign int_set    = (st == S_EXEC) ? x_int_set : '0;
  assign int_clr    = (st == S_EXEC) ? x_int_clr : '0;
  assign msg_we     = (st == S_EXEC) && x_msg_we;
  assign msg_widx   = x_msg_idx;
  assign msg_wdata  = x_msg_wdata;
  assign msg_ridx   = dec.imm[MSG_IDX_W-1:0];
  assign irq_req    = (st == S_EXEC) && x_irq;
  assign irq_vec    = x_irq_vec;
  assign instr_done = (st == S_EXEC);

  // the fetch unit is only started when it is idle
  a_fetch_idle: assert property (@(posedge clk) disable iff (!rst_n) f_start |-> !f_busy);

endmodule
