// tb_vme_interface: VME master model against the interface with a small
// register file behind the internal bus (acknowledging after a random delay).
// Checks writes and reads, that other boards' addresses are ignored (no
// DTACK), the interrupt: IRQ* low after the processor request, the status/ID
// returned by the IACK cycle and IRQ* released afterwards.
module tb_vme_interface;
  logic clk = 0, rst_n = 0;
  logic as_n, ds_n, write_n, iack_n, data_oe, dtack_n, irq_n;
  logic [23:1] vaddr;
  logic [15:0] vdo, vdi, bus;
  logic req, we, ack, irq_set, irq_busy;
  logic [19:0] addr;
  logic [15:0] wdata, rdata;
  logic [7:0] irq_vec;
  logic [15:0] regs [16];
  int checks = 0, failures = 0, pend = 0, dly = 0;

  vme_interface #(.BASE(3'd5)) dut (.clk, .rst_n, .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_write_n(write_n),
    .vme_iack_n(iack_n), .vme_addr(vaddr), .vme_data_i(vdo), .vme_data_o(vdi), .vme_data_oe(data_oe),
    .vme_dtack_n(dtack_n), .vme_irq_n(irq_n), .req, .we, .addr, .wdata, .ack, .rdata,
    .irq_set, .irq_vec, .irq_busy);
  vme_master m (.clk, .as_n, .ds_n, .write_n, .iack_n, .addr(vaddr), .data_o(vdo), .data_i(bus), .dtack_n);
  assign bus = data_oe ? vdi : 16'hFFFF;

  always #12 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // internal bus responder
  always @(posedge clk) begin
    ack <= 0;
    if (req) begin pend = 1; dly = $urandom % 5; end
    else if (pend) begin
      if (dly == 0) begin
        pend = 0; ack <= 1;
        if (we) regs[addr[3:0]] = wdata;
        rdata <= regs[addr[3:0]];
      end else dly--;
    end
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [15:0] q;
  initial begin
    irq_set = 0; irq_vec = 0;
    for (int i = 0; i < 16; i++) regs[i] = 0;
    #100 rst_n = 1;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 16; i++) m.write16({3'd5, 20'(i), 1'b0}, 16'(i * 4099));
    for (int i = 0; i < 16; i++) begin
      m.read16({3'd5, 20'(i), 1'b0}, q);
      chk("read back", q == 16'(i * 4099));
    end
    chk("no time-outs", m.timeouts == 0);
    m.write16({3'd4, 20'd3, 1'b0}, 16'h1111);
    chk("other board ignored", m.timeouts == 1 && regs[3] == 16'(3 * 4099));
    chk("irq idle", irq_n && !irq_busy);
    @(negedge clk); irq_set = 1; irq_vec = 8'h5C; @(negedge clk); irq_set = 0;
    chk("irq asserted", !irq_n && irq_busy);
    @(negedge clk); irq_set = 1; irq_vec = 8'h11; @(negedge clk); irq_set = 0;
    m.iack(q);
    chk("iack vector", q[7:0] == 8'h5C);
    chk("irq released", irq_n && !irq_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
