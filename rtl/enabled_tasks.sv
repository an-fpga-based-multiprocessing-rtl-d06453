// enabled_tasks: the task enable register and the start address of each task.
//
// The CBCM enables and disables each of the eight tasks through the bits of
// RA_TASK_EN, and sets where each task's code begins in the SRAM through
// RA_TASK_START+t (instruction address). A bit going from 0 to 1 gives a
// one-clock `restart` pulse for that task, which makes the processor start it
// at its start address; a cleared bit removes the task from scheduling and
// freezes it where it is. Everything resets to 0. Per-task enabling by the
// CBCM follows the design description; the start address registers and the
// restart-on-enable rule are this design's own.
module enabled_tasks
  import bst_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  reg_req_t               rreq,
  output logic [15:0]            rdata,
  output logic [NTASKS-1:0]      enable,
  output logic [NTASKS-1:0]      restart,
  output logic [NTASKS*PC_W-1:0] start_addr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable     <= '0;
      restart    <= '0;
      start_addr <= '0;
    end else begin
      restart <= '0;
      if (rreq.wr && rreq.addr == RA_TASK_EN) begin
        enable  <= rreq.wdata[NTASKS-1:0];
        restart <= rreq.wdata[NTASKS-1:0] & ~enable;
      end
      for (int t = 0; t < NTASKS; t++)
        if (rreq.wr && rreq.addr == RA_TASK_START + 5'(t))
          start_addr[t*PC_W +: PC_W] <= rreq.wdata;
    end
  end

  always_comb begin
    rdata = '0;
    if (rreq.addr == RA_TASK_EN) rdata = 16'(enable);
    for (int t = 0; t < NTASKS; t++)
      if (rreq.addr == RA_TASK_START + 5'(t)) rdata = start_addr[t*PC_W +: PC_W];
  end

endmodule
