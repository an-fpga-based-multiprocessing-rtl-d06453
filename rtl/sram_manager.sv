// sram_manager: shares the external 512 kByte task code SRAM between the
// processor's instruction fetch and the VME bus.
//
// Two requesters: the fetch unit (read only) and the VME side (read and
// write). A requester holds `req` with its address (and write data) until it
// sees a one-clock `ack`; read data comes with the `ack`. When both ask at
// once, the one that was not served last goes first, so neither can lock the
// other out. An access drives the SRAM chip select and either the output
// enable or the write enable for WAIT+1 clocks with the address and write data
// held stable, samples the read data in the last of them, and is followed by
// one clock with the chip deselected. An access thus takes WAIT+2 clocks from
// request to acknowledge when the SRAM is free. That there is an SRAM manager
// arbitrating between the processor and VME follows the design description;
// the arbitration rule and the access timing are this design's own.
module sram_manager
  import bst_pkg::*;
#(
  parameter int WAIT = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  // processor fetch port
  input  logic               c_req,
  input  logic [SRAM_AW-1:0] c_addr,
  output logic               c_ack,
  output logic [SRAM_DW-1:0] c_rdata,
  // VME port
  input  logic               v_req,
  input  logic               v_we,
  input  logic [SRAM_AW-1:0] v_addr,
  input  logic [SRAM_DW-1:0] v_wdata,
  output logic               v_ack,
  output logic [SRAM_DW-1:0] v_rdata,
  // SRAM chip
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [SRAM_DW-1:0] sram_dq_o,
  output logic               sram_dq_oe,
  input  logic [SRAM_DW-1:0] sram_dq_i,
  output logic               sram_ce_n,
  output logic               sram_oe_n,
  output logic               sram_we_n
);
  localparam int CW = $clog2(WAIT + 2);

  typedef enum logic [1:0] {M_IDLE, M_ACCESS, M_REC} mstate_e;
  mstate_e      st;
  logic         owner_v;    // current access belongs to VME
  logic         last_v;     // last access served VME
  logic         wr_q;
  logic [CW-1:0] cnt;
  logic [SRAM_DW-1:0] rdata_q;
  logic         pick_v;     // VME wins this arbitration

  assign pick_v = v_req && (!c_req || !last_v);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= M_IDLE;
      owner_v   <= 1'b0;
      last_v    <= 1'b1;
      wr_q      <= 1'b0;
      cnt       <= '0;
      sram_addr <= '0;
      sram_dq_o <= '0;
      rdata_q   <= '0;
    end else begin
      unique case (st)
        M_IDLE: if (c_req || v_req) begin
          owner_v   <= pick_v;
          wr_q      <= pick_v && v_we;
          sram_addr <= pick_v ? v_addr : c_addr;
          sram_dq_o <= v_wdata;
          cnt       <= '0;
          st        <= M_ACCESS;
        end
        M_ACCESS: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(WAIT)) begin
            rdata_q <= sram_dq_i;
            last_v  <= owner_v;
            st      <= M_REC;
          end
        end
        M_REC: st <= M_IDLE;
        default: st <= M_IDLE;
      endcase
    end
  end

  assign sram_ce_n  = (st != M_ACCESS);
  assign sram_oe_n  = !(st == M_ACCESS && !wr_q);
  assign sram_we_n  = !(st == M_ACCESS && wr_q);
  assign sram_dq_oe = (st == M_ACCESS) && wr_q;

  assign c_ack   = (st == M_REC) && !owner_v;
  assign v_ack   = (st == M_REC) && owner_v;
  assign c_rdata = rdata_q;
  assign v_rdata = rdata_q;

endmodule
