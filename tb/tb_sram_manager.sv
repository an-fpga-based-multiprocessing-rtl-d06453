// tb_sram_manager: processor and VME requesters against the SRAM model:
// VME writes then reads back, processor reads, both at once (alternating
// service, no starvation), and the request-to-acknowledge time of WAIT+2
// clocks for an idle SRAM.
module tb_sram_manager;
  localparam int WAIT = 2;
  logic clk = 0, rst_n = 0;
  logic c_req, c_ack, v_req, v_we, v_ack;
  logic [17:0] c_addr, v_addr, s_addr;
  logic [15:0] c_rdata, v_rdata, v_wdata, dq_o, dq_i;
  logic dq_oe, ce_n, oe_n, we_n;
  int checks = 0, failures = 0;

  sram_manager #(.WAIT(WAIT)) dut (.clk, .rst_n, .c_req, .c_addr, .c_ack, .c_rdata,
    .v_req, .v_we, .v_addr, .v_wdata, .v_ack, .v_rdata,
    .sram_addr(s_addr), .sram_dq_o(dq_o), .sram_dq_oe(dq_oe), .sram_dq_i(dq_i),
    .sram_ce_n(ce_n), .sram_oe_n(oe_n), .sram_we_n(we_n));
  sram_model mem (.addr(s_addr), .dq_in(dq_o), .dq_in_en(dq_oe), .dq_out(dq_i), .ce_n, .oe_n, .we_n);

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic vme(logic w, logic [17:0] a, logic [15:0] d, output logic [15:0] q, output int cyc);
    v_req = 1; v_we = w; v_addr = a; v_wdata = d; cyc = 0;
    do begin @(negedge clk); cyc++; end while (!v_ack);
    q = v_rdata;
    v_req = 0;
  endtask

  task automatic cpu(logic [17:0] a, output logic [15:0] q, output int cyc);
    c_req = 1; c_addr = a; cyc = 0;
    do begin @(negedge clk); cyc++; end while (!c_ack);
    q = c_rdata;
    c_req = 0;
  endtask

  logic [15:0] q;
  int cyc;
  int c_served, v_served, c_first, v_first;

  initial begin
    c_req = 0; v_req = 0; v_we = 0; c_addr = 0; v_addr = 0; v_wdata = 0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      vme(1, 18'(i * 1000), 16'(i * 7 + 3), q, cyc);
      chk("write stored", mem.peek(18'(i * 1000)) == 16'(i * 7 + 3));
      @(negedge clk);
    end
    vme(0, 18'd5000, 0, q, cyc); chk("vme read", q == 16'd38);
    chk("latency", cyc == WAIT + 2);
    @(negedge clk);
    mem.poke(18'h3FFFF, 16'hCAFE);
    cpu(18'h3FFFF, q, cyc); chk("cpu read", q == 16'hCAFE && cyc == WAIT + 2);
    @(negedge clk);
    // both request continuously: service must alternate
    c_served = 0; v_served = 0;
    c_req = 1; v_req = 1; v_we = 0; c_addr = 18'd3000; v_addr = 18'd4000;
    repeat (10 * (WAIT + 2)) begin
      @(posedge clk);
      if (c_ack) begin c_served++; if (c_rdata != 16'd24) failures++; end
      if (v_ack) begin v_served++; if (v_rdata != 16'd31) failures++; end
    end
    @(negedge clk); c_req = 0; v_req = 0;
    chk("both served", c_served >= 4 && v_served >= 4 && (c_served - v_served) <= 1 && (v_served - c_served) <= 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
