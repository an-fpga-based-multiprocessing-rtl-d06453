// sram_model: behavioural model of the external asynchronous SRAM that holds
// the task code (256 k words of 16 bits, 512 kByte). Not synthesizable logic.
// Reads are combinational while CE* and OE* are low; a write happens while CE*
// and WE* are low. The memory starts cleared. `peek`/`poke` give the
// testbench direct access.
module sram_model #(
  parameter int AW = 18,
  parameter int DW = 16
) (
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] dq_in,
  input  logic          dq_in_en,
  output logic [DW-1:0] dq_out,
  input  logic          ce_n,
  input  logic          oe_n,
  input  logic          we_n
);
  logic [DW-1:0] mem [2**AW];

  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;

  always @* if (!ce_n && !we_n && dq_in_en) mem[addr] = dq_in;

  assign dq_out = (!ce_n && !oe_n) ? mem[addr] : '1;

  function automatic logic [DW-1:0] peek(logic [AW-1:0] a);
    return mem[a];
  endfunction

  task automatic poke(logic [AW-1:0] a, logic [DW-1:0] d);
    mem[a] = d;
  endtask
endmodule
