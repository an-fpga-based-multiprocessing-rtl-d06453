// tb_enabled_tasks: writes enable patterns and start addresses and checks the
// register contents, the read-back, and that restart pulses exactly for the
// bits that go from 0 to 1, for one clock.
module tb_enabled_tasks;
  import bst_pkg::*;
  logic clk = 0, rst_n = 0;
  reg_req_t rreq;
  logic [15:0] rdata;
  logic [7:0] enable, restart;
  logic [127:0] start_addr;
  int checks = 0, failures = 0;

  enabled_tasks dut (.clk, .rst_n, .rreq, .rdata, .enable, .restart, .start_addr);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [7:0] prev, nw;
  initial begin
    rreq = '0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int t = 0; t < 8; t++) begin
      rreq.wr = 1; rreq.addr = RA_TASK_START + 5'(t); rreq.wdata = 16'(t * 1000 + 7); @(negedge clk);
    end
    rreq = '0;
    for (int t = 0; t < 8; t++) begin
      rreq.addr = RA_TASK_START + 5'(t); #1;
      chk("start addr", rdata == 16'(t * 1000 + 7) && start_addr[t*16 +: 16] == 16'(t * 1000 + 7));
    end
    @(negedge clk);
    prev = 0;
    for (int i = 0; i < 30; i++) begin
      nw = 8'($urandom);
      rreq.wr = 1; rreq.addr = RA_TASK_EN; rreq.wdata = {8'h00, nw}; @(negedge clk);
      rreq = '0; rreq.addr = RA_TASK_EN;
      #1 chk("enable + restart", enable == nw && restart == (nw & ~prev) && rdata == {8'h00, nw});
      @(negedge clk);
      chk("restart one clock", restart == 0);
      prev = nw;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
