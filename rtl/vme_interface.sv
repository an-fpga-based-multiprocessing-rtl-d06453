// vme_interface: VME slave of the main FPGA (A24 addresses, D16 data) and its
// interrupter.
//
// The VME strobes are asynchronous to the bunch clock; AS*, DS* and IACK*
// each pass two flip-flops, and address, data and WRITE* are taken when the
// synchronised strobes show them stable. A data cycle whose address bits
// 23:21 equal BASE becomes one request on the internal bus (`req` for one
// clock, with `we`, the 20-bit word address A20..A1 and the write data held
// until the next request); when the internal bus answers with `ack` the
// interface drives the read data (`vme_data_oe`) and pulls DTACK* low until
// DS* goes high again. The processor's IRQ instruction (`irq_set`, with an
// 8-bit status/ID) makes an interrupt pending and pulls IRQ* low; an
// interrupt acknowledge cycle (IACK* low) then reads the status/ID and clears
// the interrupt. `irq_busy` tells the processor an interrupt is still
// pending. The interrupter level and the address modifiers are not decoded.
// That a VME interface connects the board to the CBCM crate and that tasks can
// raise VME interrupts follows the design description; the A24/D16 choice,
// the base address check and the cycle handling are this design's own.
module vme_interface
  import bst_pkg::*;
#(
  parameter logic [2:0] BASE = 3'd1
) (
  input  logic               clk,
  input  logic               rst_n,
  // VME bus (through the board's transceivers)
  input  logic               vme_as_n,
  input  logic               vme_ds_n,
  input  logic               vme_write_n,
  input  logic               vme_iack_n,
  input  logic [23:1]        vme_addr,
  input  logic [15:0]        vme_data_i,
  output logic [15:0]        vme_data_o,
  output logic               vme_data_oe,
  output logic               vme_dtack_n,
  output logic               vme_irq_n,
  // internal bus
  output logic               req,
  output logic               we,
  output logic [BUS_AW-1:0]  addr,
  output logic [15:0]        wdata,
  input  logic               ack,
  input  logic [15:0]        rdata,
  // interrupts from the processor
  input  logic               irq_set,
  input  logic [7:0]         irq_vec,
  output logic               irq_busy
);
  typedef enum logic [1:0] {V_IDLE, V_WAIT, V_DTACK} vstate_e;
  vstate_e    st;
  logic [1:0] as_s, ds_s, iack_s;
  logic       as_a, ds_a, iack_a;
  logic       pending;
  logic [7:0] vec_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_s   <= '1;
      ds_s   <= '1;
      iack_s <= '1;
    end else begin
      as_s   <= {as_s[0], vme_as_n};
      ds_s   <= {ds_s[0], vme_ds_n};
      iack_s <= {iack_s[0], vme_iack_n};
    end
  end
  assign as_a   = !as_s[1];
  assign ds_a   = !ds_s[1];
  assign iack_a = !iack_s[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= V_IDLE;
      req         <= 1'b0;
      we          <= 1'b0;
      addr        <= '0;
      wdata       <= '0;
      vme_data_o  <= '0;
      vme_data_oe <= 1'b0;
      vme_dtack_n <= 1'b1;
      pending     <= 1'b0;
      vec_q       <= '0;
    end else begin
      req <= 1'b0;
      if (irq_set && !pending) begin
        pending <= 1'b1;
        vec_q   <= irq_vec;
      end
      unique case (st)
        V_IDLE: if (as_a && ds_a) begin
          if (iack_a) begin
            if (pending) begin
              vme_data_o  <= {8'h00, vec_q};
              vme_data_oe <= 1'b1;
              vme_dtack_n <= 1'b0;
              pending     <= 1'b0;
              st          <= V_DTACK;
            end
          end else if (vme_addr[23:21] == BASE) begin
            req   <= 1'b1;
            we    <= !vme_write_n;
            addr  <= vme_addr[20:1];
            wdata <= vme_data_i;
            st    <= V_WAIT;
          end
        end
        V_WAIT: if (ack) begin
          vme_data_o  <= rdata;
          vme_data_oe <= !we;
          vme_dtack_n <= 1'b0;
          st          <= V_DTACK;
        end
        V_DTACK: if (!ds_a) begin
          vme_data_oe <= 1'b0;
          vme_dtack_n <= 1'b1;
          st          <= V_IDLE;
        end
        default: st <= V_IDLE;
      endcase
    end
  end

  assign vme_irq_n = !pending;
  assign irq_busy  = pending;

endmodule
