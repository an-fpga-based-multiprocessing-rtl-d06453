// task_scheduler: round robin choice of the task that runs the next
// instruction.
//
// Every task whose bit is set in `ready` (enabled, running, or waiting with its
// condition now met) is a candidate. The scheduler looks at the tasks in
// circular order starting one after the task that was granted last, so every
// ready task gets one instruction before any task gets a second one: this is
// the round robin, single instruction task switching of the design
// description. The choice is combinational (`grant_valid`, `grant_id`);
// `advance` is pulsed by the control unit when it takes the grant, which
// moves the round robin pointer to the granted task. The pointer resets to the
// last task so that task 0 has the first turn.
module task_scheduler
  import bst_pkg::*;
#(
  parameter int N = NTASKS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         ready,
  input  logic                 advance,
  output logic                 grant_valid,
  output logic [$clog2(N)-1:0] grant_id
);
  localparam int IW = $clog2(N);

  logic [IW-1:0] last_q;

  always_comb begin
    grant_valid = 1'b0;
    grant_id    = '0;
    for (int k = 1; k <= N; k++) begin
      if (!grant_valid && ready[(int'(last_q) + k) % N]) begin
        grant_valid = 1'b1;
        grant_id    = IW'((int'(last_q) + k) % N);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      last_q <= IW'(N - 1);
    else if (advance && grant_valid) last_q <= grant_id;
  end

endmodule
