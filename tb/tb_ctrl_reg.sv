// tb_ctrl_reg: writes the control register and checks each control output,
// the read-back, and the one-clock turn clear pulse.
module tb_ctrl_reg;
  import bst_pkg::*;
  logic clk = 0, rst_n = 0;
  reg_req_t rreq;
  logic [15:0] rdata;
  logic ser_oe, utc_en, cpu_run, turn_clear;
  int checks = 0, failures = 0;

  ctrl_reg dut (.clk, .rst_n, .rreq, .rdata, .ser_oe, .utc_en, .cpu_run, .turn_clear);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rreq = '0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    chk("reset", {ser_oe, utc_en, cpu_run, turn_clear} == 0);
    for (int v = 0; v < 16; v++) begin
      rreq.wr = 1; rreq.addr = RA_CTRL; rreq.wdata = 16'(v); @(negedge clk);
      rreq = '0; rreq.addr = RA_CTRL; #1;
      chk("bits", ser_oe == v[0] && utc_en == v[1] && cpu_run == v[2] && turn_clear == v[3]);
      chk("read", rdata == 16'(v & 7));
      @(negedge clk);
      chk("clear pulse", !turn_clear);
    end
    rreq.wr = 1; rreq.addr = RA_MSG_LEN; rreq.wdata = 0; @(negedge clk); rreq = '0;
    chk("other address", cpu_run == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
