// task_regs_dpram: the 64 task registers, eight 16-bit local registers for
// each of the eight tasks, in a dual port RAM.
//
// Port A belongs to the processor, port B to the VME side. Register r of task
// t lives at address {t, r}, so each task sees its own eight registers at a
// different offset. Both ports read synchronously (data one clock after the
// address) and write on the clock edge when `we` is high; a read returns the
// old contents when the same port writes the same address. When both ports
// write the same word in one clock the processor's write is kept. The
// register file being a DPRAM shared with VME follows the design
// description; the port timing and the write priority are this design's own.
module task_regs_dpram
  import bst_pkg::*;
#(
  parameter int DEPTH = NTASKS * REGS_PER_TASK,
  parameter int DW    = DATA_W
) (
  input  logic                     clk,
  // port A: processor
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic                     a_we,
  input  logic [DW-1:0]            a_wdata,
  output logic [DW-1:0]            a_rdata,
  // port B: VME
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  logic                     b_we,
  input  logic [DW-1:0]            b_wdata,
  output logic [DW-1:0]            b_rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (b_we && !(a_we && a_addr == b_addr)) mem[b_addr] <= b_wdata;
    if (a_we)                                mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end

endmodule
