// tb_address_decoder: issues requests to each region of the address map and
// checks the strobes and addresses each target sees, the read data returned,
// the one-clock acknowledge for on-chip targets and the held SRAM request.
module tb_address_decoder;
  import bst_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req, we, ack;
  logic [19:0] addr;
  logic [15:0] wdata, rdata, reg_rdata, treg_wdata, treg_rdata, s_wdata, s_rdata;
  reg_req_t rreq;
  logic [5:0] msg_addr, treg_addr;
  logic msg_we, treg_we, s_req, s_we, s_ack;
  logic [7:0] msg_wdata, msg_rdata;
  logic [17:0] s_addr;
  int checks = 0, failures = 0;

  address_decoder dut (.clk, .rst_n, .req, .we, .addr, .wdata, .ack, .rdata, .rreq, .reg_rdata,
    .msg_addr, .msg_we, .msg_wdata, .msg_rdata, .treg_addr, .treg_we, .treg_wdata, .treg_rdata,
    .s_req, .s_we, .s_addr, .s_wdata, .s_ack, .s_rdata);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // targets: register reads combinational, RAM reads registered
  assign reg_rdata = {11'h5A0, rreq.addr};
  always @(posedge clk) msg_rdata <= {2'b10, msg_addr};
  always @(posedge clk) treg_rdata <= {10'h3C0, treg_addr};
  int sdly;
  always @(posedge clk) begin
    s_ack <= 0;
    if (s_req && !s_ack) begin
      if (sdly == 0) begin s_ack <= 1; s_rdata <= s_addr[15:0] ^ 16'hFFFF; sdly = 3; end
      else sdly--;
    end
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic access(logic w, logic [19:0] a, logic [15:0] d, output logic [15:0] q, output int cyc,
                        output logic [3:0] strobes);
    req = 1; we = w; addr = a; wdata = d; #1;
    strobes = {rreq.wr, msg_we, treg_we, s_req};
    @(negedge clk); req = 0; cyc = 1;
    while (!ack && cyc < 50) begin @(negedge clk); cyc++; end
    q = rdata;
    @(negedge clk);
  endtask

  logic [15:0] q;
  int cyc;
  logic [3:0] stb;
  initial begin
    req = 0; we = 0; addr = 0; wdata = 0; sdly = 3;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    access(1, 20'h40005, 16'h1234, q, cyc, stb); chk("reg write strobe", stb == 4'b1000 && cyc == 1);
    access(0, 20'h40007, 0, q, cyc, stb);   chk("reg read", stb == 4'b0000 && q == 16'hB407 && cyc == 1);
    access(1, 20'h40125, 16'h00AB, q, cyc, stb); chk("msg write", stb == 4'b0100);
    access(0, 20'h40125, 0, q, cyc, stb);   chk("msg read present", q == 16'h00A5 && cyc == 1);
    access(0, 20'h40105, 0, q, cyc, stb);   chk("msg read next", q == 16'h0085 && cyc == 1);
    access(1, 20'h4023F, 16'h4444, q, cyc, stb); chk("treg write", stb == 4'b0010);
    access(0, 20'h4021B, 0, q, cyc, stb);   chk("treg read", q == 16'hF01B && cyc == 1);
    access(0, 20'h12345, 0, q, cyc, stb);   chk("sram read", stb == 4'b0001 && q == 16'hDCBA && cyc > 1);
    access(1, 20'h3FFFF, 16'h9999, q, cyc, stb); chk("sram write", stb == 4'b0001 && cyc > 1);
    access(1, 20'h80000, 16'h9999, q, cyc, stb); chk("unmapped", stb == 4'b0000 && cyc == 1);
    access(0, 20'h40040, 0, q, cyc, stb);   chk("unmapped read", q == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
