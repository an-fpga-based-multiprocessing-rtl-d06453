// fetch_unit: reads one 32-bit instruction from the task code SRAM.
//
// The SRAM is 16 bits wide, so instruction number `pc` occupies words 2*pc
// (bits 31:16) and 2*pc+1 (bits 15:0). A `start` pulse latches the program
// counter; the unit then asks the SRAM manager for the two words one after
// the other, holding `mem_req` until `mem_ack`, and pulses `done` with the
// whole instruction in `instr` in the clock after the second acknowledge.
// `busy` is high from `start` until `done`. The fetch unit as the part that
// gets the instruction from the SRAM follows the design description; the
// 16-bit word order and the handshake are this design's own.
module fetch_unit
  import bst_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [PC_W-1:0]    pc,
  output logic               busy,
  output logic               done,
  output logic [31:0]        instr,
  // to the SRAM manager
  output logic               mem_req,
  output logic [SRAM_AW-1:0] mem_addr,
  input  logic               mem_ack,
  input  logic [SRAM_DW-1:0] mem_rdata
);
  typedef enum logic [1:0] {F_IDLE, F_HI, F_LO, F_DONE} fstate_e;
  fstate_e        st;
  logic [PC_W-1:0] pc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= F_IDLE;
      pc_q  <= '0;
      instr <= '0;
    end else begin
      unique case (st)
        F_IDLE: if (start) begin
          pc_q <= pc;
          st   <= F_HI;
        end
        F_HI: if (mem_ack) begin
          instr[31:16] <= mem_rdata;
          st           <= F_LO;
        end
        F_LO: if (mem_ack) begin
          instr[15:0] <= mem_rdata;
          st          <= F_DONE;
        end
        F_DONE: st <= F_IDLE;
      endcase
    end
  end

  assign mem_req  = (st == F_HI) || (st == F_LO);
  assign mem_addr = SRAM_AW'({pc_q, st == F_LO});
  assign done     = (st == F_DONE);
  assign busy     = (st != F_IDLE);

endmodule
