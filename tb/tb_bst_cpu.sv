// tb_bst_cpu: the processor with the SRAM manager, an SRAM model holding small
// task programs, and the task register DPRAM. The testbench plays the global
// registers (turn, triggers, PPS, Sync) and records message writes and
// interrupt requests. It checks arithmetic results in the task registers,
// loops and branches, every wait instruction waking on its condition and not
// before, internal trigger synchronisation between tasks, the IRQ retry while
// an interrupt is pending, the illegal command/value/register stops, strict
// round robin alternation between tasks and the clocks per instruction.
module tb_bst_cpu;
  import bst_pkg::*;
  localparam int WAIT = 2;
  logic clk = 0, rst_n = 0;
  logic run;
  logic [7:0] enable, restart;
  logic [127:0] start_addr;
  logic c_req, c_ack;
  logic [17:0] c_addr, s_addr;
  logic [15:0] c_rdata, dq_o, dq_i;
  logic dq_oe, ce_n, oe_n, we_n;
  logic [5:0] ta_addr, tb_addr;
  logic ta_we;
  logic [15:0] ta_wdata, ta_rdata, tb_rdata;
  logic [15:0] turn, ext_trig, int_trig, int_wdata, int_set, int_clr;
  logic int_we, pps, syn;
  logic msg_we;
  logic [4:0] msg_widx, msg_ridx;
  logic [7:0] msg_wdata, msg_rdata;
  logic irq_req, irq_busy;
  logic [7:0] irq_vec;
  logic [31:0] status;
  logic instr_done;
  int checks = 0, failures = 0;
  logic [7:0] msg [32];
  int writes [$];
  int irqs = 0;
  logic [7:0] last_vec;

  bst_cpu dut (.clk, .rst_n, .run, .enable, .restart, .start_addr,
    .mem_req(c_req), .mem_addr(c_addr), .mem_ack(c_ack), .mem_rdata(c_rdata),
    .treg_addr(ta_addr), .treg_we(ta_we), .treg_wdata(ta_wdata), .treg_rdata(ta_rdata),
    .turn, .ext_trig, .int_trig, .int_we, .int_wdata, .int_set, .int_clr,
    .pps_pulse(pps), .sync_pulse(syn), .msg_we, .msg_widx, .msg_wdata, .msg_ridx, .msg_rdata,
    .irq_req, .irq_vec, .irq_busy, .status, .instr_done);
  sram_manager #(.WAIT(WAIT)) u_sm (.clk, .rst_n, .c_req, .c_addr, .c_ack, .c_rdata,
    .v_req(1'b0), .v_we(1'b0), .v_addr(18'd0), .v_wdata(16'd0), .v_ack(), .v_rdata(),
    .sram_addr(s_addr), .sram_dq_o(dq_o), .sram_dq_oe(dq_oe), .sram_dq_i(dq_i),
    .sram_ce_n(ce_n), .sram_oe_n(oe_n), .sram_we_n(we_n));
  sram_model mem (.addr(s_addr), .dq_in(dq_o), .dq_in_en(dq_oe), .dq_out(dq_i), .ce_n, .oe_n, .we_n);
  task_regs_dpram u_tr (.clk, .a_addr(ta_addr), .a_we(ta_we), .a_wdata(ta_wdata), .a_rdata(ta_rdata),
    .b_addr(tb_addr), .b_we(1'b0), .b_wdata(16'd0), .b_rdata(tb_rdata));

  always #5 clk = ~clk;
  initial begin #3000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // global registers, message buffer and interrupt controller played by the testbench
  always @(posedge clk) begin
    if (int_we) int_trig <= int_wdata;
    else        int_trig <= (int_trig & ~int_clr) | int_set;
    if (msg_we) begin msg[msg_widx] <= msg_wdata; writes.push_back(int'(msg_widx)); end
    msg_rdata <= msg[msg_ridx];
    if (irq_req) begin irqs++; last_vec <= irq_vec; end
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (status %h)", what, status); end
  endtask

  task automatic prog(int t, int i, opcode_e op, int rd, int rs, int imm);
    logic [31:0] w;
    w = mk_instr(op, 4'(rd), 4'(rs), 16'(imm));
    mem.poke(18'((64 * t + i) * 2), w[31:16]);
    mem.poke(18'((64 * t + i) * 2 + 1), w[15:0]);
  endtask

  function automatic logic [2:0] st(int t);
    return status[4 * t +: 3];
  endfunction

  task automatic treg(int t, int r, output logic [15:0] v);
    tb_addr = 6'(t * 8 + r); @(negedge clk); v = tb_rdata;
  endtask

  task automatic go(logic [7:0] en);
    enable = en; restart = en; @(negedge clk); restart = 0;
  endtask

  logic [15:0] v;
  int t_last, gaps, ngaps;
  initial begin
    run = 0; enable = 0; restart = 0; turn = 0; ext_trig = 0; int_trig = 0; pps = 0; syn = 0;
    irq_busy = 0; tb_addr = 0; writes = {};
    for (int i = 0; i < 32; i++) msg[i] = 8'(i + 8'h40);
    for (int t = 0; t < 8; t++) start_addr[t*16 +: 16] = 16'(64 * t);
    // task 0: count down 5..1 into byte 3
    prog(0, 0, OP_LDI, 1, 0, 5);
    prog(0, 1, OP_SEND, 1, 0, 3);
    prog(0, 2, OP_DEC, 1, 0, 0);
    prog(0, 3, OP_BNZ, 1, 0, 1);
    prog(0, 4, OP_STOP, 0, 0, 0);
    // task 1: arithmetic, trigger another task, wait for an external trigger, IRQ, PPS
    prog(1, 0, OP_LDI, 2, 0, 16'h10);
    prog(1, 1, OP_ADDI, 2, 0, 16'h22);
    prog(1, 2, OP_SHL, 2, 0, 4);
    prog(1, 3, OP_MOV, 3, 2, 0);
    prog(1, 4, OP_XORI, 3, 0, 16'hFFFF);
    prog(1, 5, OP_WEXT, 0, 0, 16'h0008);
    prog(1, 6, OP_SETT, 0, 0, 16'h0001);
    prog(1, 7, OP_IRQ, 0, 0, 16'h33);
    prog(1, 8, OP_WPPS, 0, 0, 0);
    prog(1, 9, OP_SENDI, 0, 0, 16'h08BB);
    prog(1, 10, OP_STOP, 0, 0, 0);
    // task 2: wait for task 1's trigger, then turns, then Sync, then an illegal command
    prog(2, 0, OP_WINT, 0, 0, 16'h0001);
    prog(2, 1, OP_SENDI, 0, 0, 16'h09CC);
    prog(2, 2, OP_WTREL, 0, 0, 2);
    prog(2, 3, OP_SENDI, 0, 0, 16'h0ADD);
    prog(2, 4, OP_MOV, 4, 8, 0);
    prog(2, 5, OP_WTREG, 4, 0, 0);
    prog(2, 6, OP_WSYNC, 0, 0, 0);
    prog(2, 7, OP_SENDI, 0, 0, 16'h0BEE);
    mem.poke(18'((128 + 8) * 2), 16'hF800);  // opcode 0x3E: illegal
    // task 3: read present byte 4, send to 12, then an illegal register write
    prog(3, 0, OP_RDMSG, 0, 0, 4);
    prog(3, 1, OP_SEND, 0, 0, 12);
    prog(3, 2, OP_MOV, 8, 0, 0);
    // task 4: illegal value
    prog(4, 0, OP_SEND, 0, 0, 40);
    // tasks 5 and 6: endless loops for the round robin check
    prog(5, 0, OP_SENDI, 0, 0, 16'h1455);
    prog(5, 1, OP_JMP, 0, 0, 64 * 5);
    prog(6, 0, OP_SENDI, 0, 0, 16'h1566);
    prog(6, 1, OP_JMP, 0, 0, 64 * 6);
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    run = 1;
    go(8'b0001_1111);
    repeat (2000) @(negedge clk);
    chk("task 0 stopped", st(0) == TS_STOPPED);
    chk("task 0 wrote 5 times", msg[3] == 8'd1);
    treg(1, 2, v); chk("task 1 arithmetic", v == 16'h0320);
    treg(1, 3, v); chk("task 1 xor", v == 16'hFCDF);
    chk("task 1 waits ext", st(1) == TS_WAITING && st(2) == TS_WAITING);
    chk("task 3 read + illegal reg", msg[12] == 8'h44 && st(3) == TS_ILL_REG);
    chk("task 4 illegal value", st(4) == TS_ILL_VAL);
    ext_trig = 16'h0004; repeat (300) @(negedge clk);
    chk("wrong ext bit: still waiting", st(1) == TS_WAITING);
    irq_busy = 1;
    ext_trig = 16'h000C; repeat (300) @(negedge clk);
    chk("task 2 woken by internal trigger", msg[9] == 8'hCC);
    chk("irq retried while busy", irqs == 0 && st(1) == TS_RUNNING);
    irq_busy = 0; repeat (100) @(negedge clk);
    chk("irq issued", irqs == 1 && last_vec == 8'h33);
    chk("waiting for pps", st(1) == TS_WAITING && msg[8] == 8'h48);
    @(negedge clk); pps = 1; @(negedge clk); pps = 0; repeat (200) @(negedge clk);
    chk("pps wake", msg[8] == 8'hBB && st(1) == TS_STOPPED);
    chk("turn wait", msg[10] == 8'h4A);
    turn = 1; repeat (200) @(negedge clk); chk("turn 1 too early", msg[10] == 8'h4A);
    turn = 2; repeat (200) @(negedge clk); chk("turn 2 wakes", msg[10] == 8'hDD);
    chk("waiting on own turn register", st(2) == TS_WAITING);
    turn = 3; repeat (200) @(negedge clk); chk("wtreg does not wait for later turn", st(2) == TS_WAITING);
    turn = 2; repeat (200) @(negedge clk); chk("wtreg wakes, waits sync", st(2) == TS_WAITING && msg[11] == 8'h4B);
    @(negedge clk); syn = 1; @(negedge clk); syn = 0; repeat (200) @(negedge clk);
    chk("sync wake + illegal cmd", msg[11] == 8'hEE && st(2) == TS_ILL_CMD);
    // round robin between two looping tasks
    go(8'b0110_0000);
    writes = {};
    t_last = 0; gaps = 0; ngaps = 0;
    repeat (800) begin
      @(posedge clk);
      if (instr_done) begin
        if (t_last != 0) begin gaps += ($time / 10) - t_last; ngaps++; end
        t_last = $time / 10;
      end
    end
    begin
      int alt;
      alt = 1;
      for (int i = 1; i < writes.size(); i++) if (writes[i] == writes[i - 1]) alt = 0;
      chk("round robin alternates", alt == 1 && writes.size() > 10);
    end
    chk("clocks per instruction", ngaps > 0 && gaps == ngaps * (2 * (WAIT + 3) + 5));
    if (ngaps > 0) $display("clocks per instruction: %0d", gaps / ngaps);
    run = 0; repeat (50) @(negedge clk);
    writes = {}; repeat (200) @(negedge clk);
    chk("run low holds", writes.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
