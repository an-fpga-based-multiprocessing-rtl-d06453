// vme_master: testbench model of a VME bus master (the CBCM crate CPU) for
// A24/D16 single cycles and interrupt acknowledge cycles. Drives AS*, DS*,
// WRITE*, IACK*, address and data with a few nanoseconds of set-up, waits for
// DTACK* (with a time-out that sets `timeouts`), and releases the strobes.
module vme_master (
  input  logic        clk,
  output logic        as_n,
  output logic        ds_n,
  output logic        write_n,
  output logic        iack_n,
  output logic [23:1] addr,
  output logic [15:0] data_o,
  input  logic [15:0] data_i,
  input  logic        dtack_n
);
  int timeouts = 0;
  int cycles = 0;

  initial begin as_n = 1; ds_n = 1; write_n = 1; iack_n = 1; addr = '0; data_o = '0; end

  task automatic cycle(logic iack, logic wr, logic [23:0] byte_addr, logic [15:0] wd,
                       output logic [15:0] rd);
    int n;
    addr = byte_addr[23:1]; write_n = !wr; data_o = wd; iack_n = !iack;
    #7 as_n = 0;
    #7 ds_n = 0;
    n = 0;
    while (dtack_n && n < 500) begin @(posedge clk); n++; end
    if (n >= 500) timeouts++;
    #3 rd = data_i;
    ds_n = 1; as_n = 1;
    while (!dtack_n && n < 1000) begin @(posedge clk); n++; end
    iack_n = 1; write_n = 1;
    cycles++;
    repeat (2) @(posedge clk);
  endtask

  task automatic write16(logic [23:0] a, logic [15:0] d);
    logic [15:0] dummy;
    cycle(1'b0, 1'b1, a, d, dummy);
  endtask

  task automatic read16(logic [23:0] a, output logic [15:0] d);
    cycle(1'b0, 1'b0, a, 16'h0, d);
  endtask

  task automatic iack(output logic [15:0] vec);
    cycle(1'b1, 1'b0, 24'h0, 16'h0, vec);
  endtask
endmodule
