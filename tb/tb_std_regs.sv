// tb_std_regs: writes and reads the message length (clipped to 32), the UTC
// position and load value, checks the arm toggle, and the read-only views of
// status, turn, triggers and UTC.
module tb_std_regs;
  import bst_pkg::*;
  logic clk = 0, rst_n = 0;
  reg_req_t rreq;
  logic [15:0] rdata;
  logic [5:0] msg_len;
  logic [4:0] utc_pos;
  logic [31:0] utc_load, status, utc_sec;
  logic utc_arm_tgl;
  logic [15:0] turn, ext_trig, int_trig;
  int checks = 0, failures = 0;

  std_regs dut (.clk, .rst_n, .rreq, .rdata, .msg_len, .utc_pos, .utc_load, .utc_arm_tgl,
                .status, .turn, .ext_trig, .int_trig, .utc_sec);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (rdata %h)", what, rdata); end
  endtask
  task automatic wr(logic [4:0] a, logic [15:0] d);
    rreq.wr = 1; rreq.addr = a; rreq.wdata = d; @(negedge clk); rreq = '0;
  endtask
  task automatic rd(logic [4:0] a);
    rreq.wr = 0; rreq.addr = a; #1;
  endtask

  initial begin
    rreq = '0; status = 32'hDEAD_BEEF; turn = 16'd4321; ext_trig = 16'hA0A0; int_trig = 16'h0F0F;
    utc_sec = 32'h1234_5678;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    chk("reset length 32", msg_len == 32);
    wr(RA_MSG_LEN, 16'd18); rd(RA_MSG_LEN); chk("length 18", msg_len == 18 && rdata == 18);
    wr(RA_MSG_LEN, 16'd40); chk("length clipped", msg_len == 32);
    wr(RA_UTC_POS, 16'd9);  rd(RA_UTC_POS); chk("utc pos", utc_pos == 9 && rdata == 9);
    wr(RA_UTC_LD_LO, 16'hBEEF); wr(RA_UTC_LD_HI, 16'hCAFE);
    chk("utc load", utc_load == 32'hCAFE_BEEF);
    rd(RA_UTC_LD_HI); chk("utc load read", rdata == 16'hCAFE);
    chk("arm idle", utc_arm_tgl == 0);
    wr(RA_UTC_ARM, 16'h0001); chk("arm toggles", utc_arm_tgl == 1);
    wr(RA_UTC_ARM, 16'h0001); chk("arm toggles back", utc_arm_tgl == 0);
    rd(RA_STATUS_LO); chk("status lo", rdata == 16'hBEEF);
    rd(RA_STATUS_HI); chk("status hi", rdata == 16'hDEAD);
    rd(RA_TURN); chk("turn", rdata == 16'd4321);
    rd(RA_EXT);  chk("ext", rdata == 16'hA0A0);
    rd(RA_INT);  chk("int", rdata == 16'h0F0F);
    rd(RA_UTC_LO); chk("utc lo", rdata == 16'h5678);
    rd(RA_UTC_HI); chk("utc hi", rdata == 16'h1234);
    rd(RA_CTRL); chk("not mine", rdata == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
