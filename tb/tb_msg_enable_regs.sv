// tb_msg_enable_regs: sets enable bits from the processor, the UTC mask and
// VME, swaps turns, and checks the present-turn enables and the auto-clear
// rule (auto-clear bytes go once, the others every turn) against a model.
module tb_msg_enable_regs;
  import bst_pkg::*;
  logic clk = 0, rst_n = 0;
  logic swap, set_en;
  logic [4:0] set_idx;
  logic [31:0] set_mask, present_en, next_en, autoclr;
  reg_req_t rreq;
  logic [15:0] rdata;
  logic [31:0] m_next, m_pres, m_aclr;
  int checks = 0, failures = 0;

  msg_enable_regs dut (.clk, .rst_n, .swap, .set_en, .set_idx, .set_mask, .rreq, .rdata,
                       .present_en, .next_en, .autoclr);
  always #5 clk = ~clk;
  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: pres %h/%h next %h/%h", what, present_en, m_pres, next_en, m_next); end
  endtask

  task automatic wr(logic [4:0] a, logic [15:0] d);
    rreq.wr = 1; rreq.addr = a; rreq.wdata = d; @(negedge clk); rreq = '0;
  endtask

  initial begin
    swap = 0; set_en = 0; set_idx = 0; set_mask = 0; rreq = '0;
    m_next = 0; m_pres = 0; m_aclr = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    wr(RA_ACLR_LO, 16'h00F0); wr(RA_ACLR_HI, 16'h8000); m_aclr = 32'h8000_00F0;
    rreq.addr = RA_ACLR_HI; #1; chk("read aclr", rdata == 16'h8000 && autoclr == m_aclr);
    for (int turn = 0; turn < 20; turn++) begin
      for (int k = 0; k < 10; k++) begin
        set_en = $urandom % 2; set_idx = 5'($urandom);
        set_mask = ($urandom % 5 == 0) ? 32'(4'hF) << ($urandom % 28) : 0;
        @(negedge clk);
        if (set_en) m_next[set_idx] = 1;
        m_next |= set_mask;
      end
      set_en = 0; set_mask = 0;
      chk("next", next_en == m_next);
      swap = 1; @(negedge clk); swap = 0;
      m_pres = m_next; m_next = m_next & ~m_aclr;
      chk("present after swap", present_en == m_pres && next_en == m_next);
    end
    // continuous byte survives turns, auto-clear byte goes once
    wr(RA_EN_LO, 16'h0011); wr(RA_EN_HI, 16'h8000);
    m_next = 32'h8000_0011;
    rreq.addr = RA_EN_LO; #1; chk("read en", rdata == 16'h0011);
    for (int i = 0; i < 3; i++) begin
      swap = 1; @(negedge clk); swap = 0;
      m_pres = m_next; m_next = m_next & ~m_aclr;
      chk("continuous vs once", present_en == m_pres);
    end
    chk("final", present_en == 32'h0000_0001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
