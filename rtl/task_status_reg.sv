// task_status_reg: the situation of every task, its wait condition, and the
// status word read by the CBCM.
//
// For each task it holds a state (stopped, running, waiting, illegal command,
// illegal value, illegal register), the kind of condition a waiting task waits
// for and a 16-bit argument (a trigger mask or a turn number). Every clock it
// checks the waiting tasks: a task waiting for the external or internal
// triggers wakes when a bit of its mask is set in that register, one waiting
// for a turn wakes when the turn number equals its target, and one waiting for
// the PPS or the Sync pulse wakes on the next such pulse. A woken task is
// running again one clock later. The control unit's update for the task it
// just executed (`upd`) takes precedence over a wake-up; a restart (the task's
// enable bit going from 0 to 1) takes precedence over both and makes the task
// running. `ready` marks the enabled, running tasks for the scheduler.
// `status` gives four bits per task, task 0 in bits 3:0: bit 3 is the enable
// bit and bits 2:0 the state code of bst_pkg::task_state_e. The set of
// situations comes from the design description; the encoding, the wake-up
// rules and the latency are this design's own.
module task_status_reg
  import bst_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NTASKS-1:0]       enable,
  input  logic [NTASKS-1:0]       restart,
  input  status_upd_t             upd,
  input  logic [EXT_TRIG_W-1:0]   ext_trig,
  input  logic [DATA_W-1:0]       int_trig,
  input  logic [DATA_W-1:0]       turn,
  input  logic                    pps_pulse,
  input  logic                    sync_pulse,
  output logic [NTASKS-1:0]       ready,
  output logic [4*NTASKS-1:0]     status
);
  task_state_e state_q [NTASKS];
  wait_kind_e  wkind_q [NTASKS];
  logic [15:0] warg_q  [NTASKS];

  function automatic logic cond_met(wait_kind_e k, logic [15:0] arg,
                                    logic [EXT_TRIG_W-1:0] ext, logic [DATA_W-1:0] it,
                                    logic [DATA_W-1:0] tn, logic pps_p, logic syn);
    unique case (k)
      W_EXT:   return (ext & arg) != '0;
      W_INT:   return (it & arg) != '0;
      W_TURN:  return tn == arg;
      W_PPS:   return pps_p;
      W_SYNC:  return syn;
      default: return 1'b0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NTASKS; t++) begin
        state_q[t] <= TS_STOPPED;
        wkind_q[t] <= W_NONE;
        warg_q[t]  <= '0;
      end
    end else begin
      for (int t = 0; t < NTASKS; t++) begin
        if (restart[t]) begin
          state_q[t] <= TS_RUNNING;
          wkind_q[t] <= W_NONE;
        end else if (upd.valid && upd.task_id == t[TASK_W-1:0]) begin
          state_q[t] <= upd.state;
          wkind_q[t] <= upd.wkind;
          warg_q[t]  <= upd.warg;
        end else if (state_q[t] == TS_WAITING &&
                     cond_met(wkind_q[t], warg_q[t], ext_trig, int_trig, turn,
                              pps_pulse, sync_pulse)) begin
          state_q[t] <= TS_RUNNING;
          wkind_q[t] <= W_NONE;
        end
      end
    end
  end

  always_comb begin
    for (int t = 0; t < NTASKS; t++) begin
      ready[t]          = enable[t] && state_q[t] == TS_RUNNING;
      status[4*t +: 4]  = {enable[t], state_q[t]};
    end
  end

endmodule
