// tb_bst_master_top: the whole BST master at its default parameters, driven
// the way the CBCM crate drives the card. A VME master model loads four task
// programs into the SRAM and programs the registers; the revolution
// frequency runs at the SPS period (924 bunch clocks, 23 us at 40.079 MHz),
// the PPS on the 40 MHz clock, and a TTC receiver model decodes every frame
// on the BST message line. The tasks:
//   task 0  every turn: wait one turn, send the turn number in bytes 0 and 1
//   task 1  wait for external trigger 0, send byte 5, set internal trigger 0,
//           raise a VME interrupt, stop
//   task 2  wait for internal trigger 0, send byte 6, clear it, wait for
//           Sync, send byte 7, wait for the PPS, send byte 8, stop
//   task 3  an illegal instruction
// The CBCM writes byte 15 itself (sent every turn) and enables the UTC at
// bytes 10..13 (sent once per second). Checked: every frame valid, byte 0/1
// carry the previous turn number each turn, bytes 5..8 and the UTC go out
// exactly once (auto-clear), byte 15 every turn, the UTC value loaded over
// VME, the interrupt and its status/ID, the task status word, task registers
// and SRAM read back over VME while the processor runs, a message that does
// not fit in a short turn (overrun) and the disabled output. Each mechanism is
// counted and a mechanism that never happened counts as a failure.
module tb_bst_master_top;
  import bst_pkg::*;
  localparam int TURN_CLKS = 924;
  localparam logic [2:0] BASE = 3'd1;

  logic clk = 0, clk40 = 0, rst_n = 0, rst40_n = 0;
  logic frev = 0, pps = 0, sync_in = 0;
  logic [15:0] ext_in = 0;
  logic as_n, ds_n, write_n, iack_n, data_oe, dtack_n, irq_n;
  logic [23:1] vaddr;
  logic [15:0] vdo, vdi, bus;
  logic [17:0] sram_addr;
  logic [15:0] sram_dq_o, sram_dq_i;
  logic sram_dq_oe, sram_ce_n, sram_oe_n, sram_we_n, bst_msg, bst_oe;
  // receiver
  logic got, e_bit, ok;
  logic [13:0] r_addr;
  logic [7:0] r_sub, r_data;
  int frames, bad;

  bst_master_top dut (.clk, .rst_n, .clk40, .rst40_n, .frev, .pps, .sync_in, .ext_in,
    .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_write_n(write_n), .vme_iack_n(iack_n), .vme_addr(vaddr),
    .vme_data_i(vdo), .vme_data_o(vdi), .vme_data_oe(data_oe), .vme_dtack_n(dtack_n), .vme_irq_n(irq_n),
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i, .sram_ce_n, .sram_oe_n, .sram_we_n, .bst_msg, .bst_oe);
  sram_model mem (.addr(sram_addr), .dq_in(sram_dq_o), .dq_in_en(sram_dq_oe), .dq_out(sram_dq_i),
                  .ce_n(sram_ce_n), .oe_n(sram_oe_n), .we_n(sram_we_n));
  vme_master m (.clk, .as_n, .ds_n, .write_n, .iack_n, .addr(vaddr), .data_o(vdo), .data_i(bus), .dtack_n);
  assign bus = data_oe ? vdi : 16'hFFFF;
  ttc_rx_model rx (.clk, .line(bst_msg), .got, .addr(r_addr), .e_bit, .sub(r_sub), .data(r_data), .ok, .frames, .bad);

  always #12.476 clk = ~clk;    // 40.079 MHz bunch clock
  always #12.5   clk40 = ~clk40; // 40.000 MHz GMT clock

  int checks = 0, failures = 0;
  initial begin #30ms; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string what, logic ok_);
    checks++;
    if (!ok_) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- frames per turn
  int turn_no = 0;              // revolution edges seen
  int cnt [int][int];           // cnt[sub][turn] = frames
  logic [7:0] val [int][int];   // val[sub][turn]
  int last_sub = -1;
  int n_overrun = 0, n_frames_dis = 0;
  logic frev_gen_en = 1;
  int  turn_len = TURN_CLKS;

  always @(posedge clk) if (got) begin
    if (!ok || r_addr != 14'h0 || !e_bit) begin failures++; $display("bad frame sub %0d", r_sub); end
    cnt[int'(r_sub)][turn_no] = cnt[int'(r_sub)][turn_no] + 1;
    val[int'(r_sub)][turn_no] = r_data;
    if (int'(r_sub) <= last_sub && turn_no == last_turn_seen) n_overrun++;
    last_sub = int'(r_sub);
    last_turn_seen = turn_no;
  end
  int last_turn_seen = -1;

  // revolution frequency: high for 100 clocks every turn_len clocks
  initial begin
    forever begin
      repeat (turn_len - 100) @(posedge clk);
      if (frev_gen_en) begin frev = 1; turn_no++; last_sub = -1; end
      repeat (100) @(posedge clk);
      frev = 0;
    end
  end

  task automatic pps_pulse();
    @(posedge clk40); pps = 1; repeat (40) @(posedge clk40); pps = 0;
  endtask

  // ---------------------------------------------------------------- VME helpers
  function automatic logic [23:0] va(logic [19:0] w);
    return {BASE, w, 1'b0};
  endfunction
  task automatic wreg(logic [4:0] r, logic [15:0] d); m.write16(va(20'h40000 + 20'(r)), d); endtask
  task automatic rreg(logic [4:0] r, output logic [15:0] d); m.read16(va(20'h40000 + 20'(r)), d); endtask

  task automatic load_instr(int t, int i, opcode_e op, int rd, int rs, int imm);
    logic [31:0] w;
    w = mk_instr(op, 4'(rd), 4'(rs), 16'(imm));
    m.write16(va(20'((64 * t + i) * 2)), w[31:16]);
    m.write16(va(20'((64 * t + i) * 2 + 1)), w[15:0]);
  endtask

  function automatic int n_sent(int sub, int from, int to);
    int n;
    n = 0;
    for (int t = from; t <= to; t++) if (cnt.exists(sub) && cnt[sub].exists(t)) n += cnt[sub][t];
    return n;
  endfunction

  function automatic int first_turn_of(int sub);
    if (!cnt.exists(sub)) return -1;
    foreach (cnt[sub][t]) return t;
    return -1;
  endfunction

  int m_switch, m_waits, m_irq, m_autoclr, m_cont, m_utc, m_illegal, m_sram_share, m_swap;

  // task switches between consecutive instructions, and SRAM requests from
  // the processor and VME in the same clock
  logic [2:0] prev_task = 0;
  always @(posedge clk) begin
    if (dut.u_cpu.instr_done) begin
      if (dut.u_cpu.cur != prev_task) m_switch++;
      prev_task = dut.u_cpu.cur;
    end
    if (dut.u_sram.c_req && dut.u_sram.v_req) m_sram_share++;
  end

  logic [15:0] q;
  int n_turn_msgs, n_cont, t_ext, t_pps;
  initial begin
    m_switch = 0; m_waits = 0; m_irq = 0; m_autoclr = 0; m_cont = 0; m_utc = 0; m_illegal = 0;
    m_sram_share = 0; m_swap = 0;
    #200 rst_n = 1; rst40_n = 1;
    repeat (5) @(posedge clk);
    // task programs
    load_instr(0, 0, OP_WTREL, 0, 0, 1);
    load_instr(0, 1, OP_MOV, 1, 8, 0);
    load_instr(0, 2, OP_SEND, 1, 0, 0);
    load_instr(0, 3, OP_SHR, 1, 0, 8);
    load_instr(0, 4, OP_SEND, 1, 0, 1);
    load_instr(0, 5, OP_JMP, 0, 0, 0);
    load_instr(1, 0, OP_WEXT, 0, 0, 16'h0001);
    load_instr(1, 1, OP_SENDI, 0, 0, 16'h055A);
    load_instr(1, 2, OP_SETT, 0, 0, 16'h0001);
    load_instr(1, 3, OP_IRQ, 0, 0, 16'h0077);
    load_instr(1, 4, OP_STOP, 0, 0, 0);
    load_instr(2, 0, OP_WINT, 0, 0, 16'h0001);
    load_instr(2, 1, OP_SENDI, 0, 0, 16'h0666);
    load_instr(2, 2, OP_CLRT, 0, 0, 16'h0001);
    load_instr(2, 3, OP_WSYNC, 0, 0, 0);
    load_instr(2, 4, OP_SENDI, 0, 0, 16'h0777);
    load_instr(2, 5, OP_WPPS, 0, 0, 0);
    load_instr(2, 6, OP_SENDI, 0, 0, 16'h0888);
    load_instr(2, 7, OP_STOP, 0, 0, 0);
    m.write16(va(20'(192 * 2)), 16'hF800);    // task 3: opcode 0x3E, not defined
    m.write16(va(20'(192 * 2 + 1)), 16'h0000);
    load_instr(4, 0, OP_INC, 2, 0, 0);
    load_instr(4, 1, OP_JMP, 0, 0, 64 * 4);
    m.read16(va(20'((64 + 1) * 2 + 1)), q); chk("SRAM loaded over VME", q == 16'h055A);
    // registers
    for (int t = 0; t < 4; t++) wreg(RA_TASK_START + 5'(t), 16'(64 * t));
    wreg(RA_MSG_LEN, 16);
    wreg(RA_UTC_POS, 10);
    wreg(RA_ACLR_LO, 16'h3DE0);               // bytes 5..8 and 10..13 once
    m.write16(va(20'h4010F), 16'h00C3);       // byte 15 of the next message from the CBCM
    wreg(RA_EN_LO, 16'h8000);                 // ... sent every turn
    wreg(RA_UTC_LD_LO, 16'h5678); wreg(RA_UTC_LD_HI, 16'h1234); wreg(RA_UTC_ARM, 1);
    wreg(RA_CTRL, 16'h0007);                  // output, UTC, processor on
    wreg(RA_TASK_START + 5'd4, 16'(64 * 4));
    wreg(RA_TASK_EN, 16'h000F);
    // let it run, with events at known times
    repeat (5 * TURN_CLKS) @(posedge clk);
    rreg(RA_STATUS_LO, q);
    $display("status %h", q);
    chk("task status word", (q[3:0] == 4'hA || q[3:0] == 4'h9) && q[7:4] == 4'hA && q[11:8] == 4'hA && q[15:12] == 4'hB);
    if (q[15:12] == 4'hB) m_illegal++;
    if (q[7:4] == 4'hA && q[11:8] == 4'hA) m_waits++;
    ext_in = 16'h0001; t_ext = turn_no;
    repeat (3 * TURN_CLKS) @(posedge clk);
    ext_in = 0;
    chk("interrupt raised", !irq_n);
    m.iack(q);
    chk("status/ID", q[7:0] == 8'h77 && irq_n);
    if (q[7:0] == 8'h77) m_irq++;
    @(posedge clk); sync_in = 1; repeat (10) @(posedge clk); sync_in = 0;
    repeat (2 * TURN_CLKS) @(posedge clk);
    pps_pulse(); t_pps = turn_no;
    repeat (3 * TURN_CLKS) @(posedge clk);
    pps_pulse();
    repeat (3 * TURN_CLKS) @(posedge clk);
    // VME reads while the processor runs: task register, SRAM, turn number;
    // task 4 keeps the processor fetching all the time
    wreg(RA_TASK_EN, 16'h001F);
    m.read16(va(20'h40200 + 20'(0 * 8 + 1)), q);
    chk("task 0 r1 = turn >> 8", q == 16'(turn_no >> 8));
    for (int i = 0; i < 20; i++) begin
      m.read16(va(20'(i)), q);
      if (q != mem.peek(18'(i))) begin failures++; $display("SRAM read %0d", i); end
    end
    checks++;
    m.read16(va(20'h40200 + 20'(4 * 8 + 2)), q);
    chk("task 4 counting", q > 16'd10);
    rreg(RA_STATUS_LO, q);
    chk("final status", q[7:4] == 4'h8 && q[11:8] == 4'h8 && q[15:12] == 4'hB);
    wreg(RA_TASK_EN, 16'h000F);
    rreg(RA_UTC_HI, q); chk("UTC loaded then counted", q == 16'h1234);
    rreg(RA_UTC_LO, q); chk("UTC low", q == 16'h5679);
    // ---- results per turn
    for (int t = 6; t < turn_no - 1; t++) begin
      checks++;
      if (n_sent(0, t, t) != 1 || n_sent(15, t, t) != 1 || val[15][t] != 8'hC3 ||
          !cnt[0].exists(t - 1) || val[0][t] != 8'(val[0][t - 1] + 1)) begin
        failures++; $display("turn %0d: continuous bytes wrong", t);
      end else m_cont++;
    end
    chk("byte 5 once", n_sent(5, 0, turn_no) == 1 && first_turn_of(5) > t_ext);
    chk("byte 6 once", n_sent(6, 0, turn_no) == 1 && val[6][first_turn_of(6)] == 8'h66);
    chk("byte 7 once", n_sent(7, 0, turn_no) == 1 && val[7][first_turn_of(7)] == 8'h77);
    chk("byte 8 once after PPS", n_sent(8, 0, turn_no) == 1 && first_turn_of(8) > t_pps);
    if (n_sent(5, 0, turn_no) == 1 && n_sent(8, 0, turn_no) == 1) m_autoclr++;
    chk("UTC sent twice", n_sent(10, 0, turn_no) == 2 && n_sent(13, 0, turn_no) == 2);
    begin
      int t1;
      t1 = first_turn_of(10);
      chk("UTC value", t1 > 0 && val[10][t1] == 8'h12 && val[11][t1] == 8'h34 &&
                       val[12][t1] == 8'h56 && val[13][t1] == 8'h78);
      if (t1 > 0 && val[13][t1] == 8'h78) m_utc++;
    end
    chk("no bad frames", bad == 0 && frames > 20);
    m_swap = turn_no;
    // ---- overrun: all 16 bytes every turn with a 300-clock turn
    wreg(RA_ACLR_LO, 16'h0000);
    wreg(RA_EN_LO, 16'hFFFF);
    turn_len = 300;
    repeat (6 * 300) @(posedge clk);
    chk("overrun seen", n_overrun > 0);
    // ---- output disabled
    wreg(RA_CTRL, 16'h0006);
    begin
      int f0;
      repeat (50) @(posedge clk);
      f0 = frames;
      repeat (3 * 300) @(posedge clk);
      chk("output disabled", frames == f0 && !bst_oe);
    end
    // mechanism counts
    $display("task switches=%0d shared SRAM clocks=%0d", m_switch, m_sram_share);
    chk("mechanism: task switching", m_switch > 10);
    chk("mechanism: SRAM shared by processor and VME", m_sram_share > 0);
    $display("mechanisms: cont=%0d autoclr=%0d utc=%0d irq=%0d waits=%0d illegal=%0d overrun=%0d swaps=%0d",
             m_cont, m_autoclr, m_utc, m_irq, m_waits, m_illegal, n_overrun, m_swap);
    chk("mechanism: continuous bytes", m_cont > 0);
    chk("mechanism: auto-clear", m_autoclr > 0);
    chk("mechanism: UTC insertion", m_utc > 0);
    chk("mechanism: interrupt", m_irq > 0);
    chk("mechanism: waits", m_waits > 0);
    chk("mechanism: illegal command", m_illegal > 0);
    chk("mechanism: buffer swaps", m_swap > 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
