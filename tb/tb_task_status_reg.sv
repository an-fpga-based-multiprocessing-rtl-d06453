// tb_task_status_reg: puts tasks into each wait condition and checks that each
// wakes exactly when its condition occurs, that ready follows enable and
// state, that restart overrides, and the status word layout.
module tb_task_status_reg;
  import bst_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] enable, restart, ready;
  status_upd_t upd;
  logic [15:0] ext, it, turn;
  logic pps, syn;
  logic [31:0] status;
  int checks = 0, failures = 0;

  task_status_reg dut (.clk, .rst_n, .enable, .restart, .upd, .ext_trig(ext), .int_trig(it),
                       .turn, .pps_pulse(pps), .sync_pulse(syn), .ready, .status);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (ready=%b status=%h)", what, ready, status); end
  endtask

  task automatic put(int t, task_state_e s, wait_kind_e k, logic [15:0] arg);
    upd.valid = 1; upd.task_id = 3'(t); upd.state = s; upd.wkind = k; upd.warg = arg;
    @(negedge clk);
    upd = '0;
  endtask

  initial begin
    enable = 0; restart = 0; upd = '0; ext = 0; it = 0; turn = 0; pps = 0; syn = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    chk("reset: nothing ready", ready == 0 && status == 0);
    enable = 8'hFF; restart = 8'hFF; @(negedge clk); restart = 0;
    chk("restart: all ready", ready == 8'hFF);
    chk("status word", status == 32'h9999_9999);
    put(0, TS_WAITING, W_EXT,  16'h0004);
    put(1, TS_WAITING, W_INT,  16'h0100);
    put(2, TS_WAITING, W_TURN, 16'd5);
    put(3, TS_WAITING, W_PPS,  16'd0);
    put(4, TS_WAITING, W_SYNC, 16'd0);
    put(5, TS_STOPPED, W_NONE, 16'd0);
    put(6, TS_ILL_CMD, W_NONE, 16'd0);
    chk("waiting not ready", ready == 8'b1000_0000);
    chk("status codes", status[27:24] == 4'hB && status[23:20] == 4'h8 && status[3:0] == 4'hA);
    ext = 16'h0003; @(negedge clk); chk("ext wrong bits", !ready[0]);
    ext = 16'h0004; @(negedge clk); chk("ext wake", ready[0]);
    it = 16'h0100; @(negedge clk); chk("int wake", ready[1]);
    turn = 16'd4; @(negedge clk); chk("turn early", !ready[2]);
    turn = 16'd5; @(negedge clk); chk("turn wake", ready[2]);
    chk("pps not yet", !ready[3] && !ready[4]);
    pps = 1; @(negedge clk); pps = 0; chk("pps wake", ready[3] && !ready[4]);
    syn = 1; @(negedge clk); syn = 0; chk("sync wake", ready[4]);
    chk("stopped stays", !ready[5] && !ready[6]);
    enable[7] = 0; #1; chk("disabled not ready", !ready[7]);
    // update wins over wake-up in the same clock
    put(0, TS_WAITING, W_EXT, 16'h0004);
    chk("update over wake", !ready[0]);
    @(negedge clk); chk("then wakes", ready[0]);
    restart[5] = 1; upd.valid = 1; upd.task_id = 3'd5; upd.state = TS_STOPPED; @(negedge clk);
    restart = 0; upd = '0; chk("restart wins", ready[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
