// tb_workloads: the two machine workloads of the BST master, run through the
// whole design at its default parameters.
//   SPS  revolution period 924 bunch clocks (23 us), 18-byte message
//   LHC  revolution period 3564 bunch clocks (89 us), 32-byte message
// The CBCM side fills the message over VME and sets every byte to be sent
// each turn (auto-clear off). Task 0 rewrites byte 0 with the turn number
// after every revolution edge. Checked in every steady turn of each workload:
// every byte 0..len-1 arrives exactly once, no byte outside the message is
// sent, the frames are valid, the constant bytes keep their value, byte 0
// advances by one per turn, the last frame ends about 44 clocks per byte
// after the turn starts and well inside the turn, and no overrun occurs.
module tb_workloads;
  import bst_pkg::*;
  localparam logic [2:0] BASE = 3'd1;
  localparam int SPS_CLKS = 924, LHC_CLKS = 3564;
  localparam int SPS_LEN = 18, LHC_LEN = 32;
  localparam int TURNS = 8;   // steady turns checked per workload

  logic clk = 0, clk40 = 0, rst_n = 0, rst40_n = 0;
  logic frev = 0, pps = 0, sync_in = 0;
  logic [15:0] ext_in = 0;
  logic as_n, ds_n, write_n, iack_n, data_oe, dtack_n, irq_n;
  logic [23:1] vaddr;
  logic [15:0] vdo, vdi, bus;
  logic [17:0] sram_addr;
  logic [15:0] sram_dq_o, sram_dq_i;
  logic sram_dq_oe, sram_ce_n, sram_oe_n, sram_we_n, bst_msg, bst_oe;
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

  always #12.476 clk = ~clk;
  always #12.5   clk40 = ~clk40;

  int checks = 0, failures = 0;
  initial begin #10ms; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string what, logic ok_);
    checks++;
    if (!ok_) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- turns and frames
  int turn_len = SPS_CLKS;
  int turn_no = 0;
  int clk_in_turn = 0;
  int cnt [int][int];          // cnt[turn][sub]
  logic [7:0] val [int][int];  // val[turn][sub]
  int ovr [int];               // overrun pulses per turn
  int last_frame_end [int];    // clock in the turn at which the last frame ended
  int n_badframes = 0;

  initial begin
    forever begin
      repeat (turn_len - 100) @(posedge clk);
      frev = 1;
      repeat (100) @(posedge clk);
      frev = 0;
    end
  end

  // the design sees the edge two clocks after the synchronisers; counting
  // turns on the design's own pulse keeps frames and turns aligned
  always @(posedge clk) begin
    if (dut.turn_pulse) begin turn_no++; clk_in_turn = 0; end
    else clk_in_turn++;
    if (rst_n && dut.u_ser.overrun) ovr[turn_no] = ovr[turn_no] + 1;
  end

  always @(posedge clk) if (got) begin
    if (!ok || r_addr != 14'h0 || !e_bit) n_badframes++;
    cnt[turn_no][int'(r_sub)] = cnt[turn_no][int'(r_sub)] + 1;
    val[turn_no][int'(r_sub)] = r_data;
    last_frame_end[turn_no] = clk_in_turn;
  end

  // ---------------------------------------------------------------- VME helpers
  function automatic logic [23:0] va(logic [19:0] w);
    return {BASE, w, 1'b0};
  endfunction
  task automatic wreg(logic [4:0] r, logic [15:0] d); m.write16(va(20'h40000 + 20'(r)), d); endtask
  task automatic wmsg(int idx, logic [7:0] d); m.write16(va(20'h40100 + 20'(idx)), {8'h00, d}); endtask
  task automatic load_instr(int i, opcode_e op, int rd, int rs, int imm);
    logic [31:0] w;
    w = mk_instr(op, 4'(rd), 4'(rs), 16'(imm));
    m.write16(va(20'(i * 2)), w[31:16]);
    m.write16(va(20'(i * 2 + 1)), w[15:0]);
  endtask

  function automatic logic [7:0] pattern(int len, int idx);
    return 8'(len * 8 + idx * 3 + 1);
  endfunction

  // check turns first..first+TURNS-1 of a workload with a len-byte message
  task automatic check_workload(string name, int len, int tlen, int first);
    int missing, extra, wrong, adv, worst_end, n_ovr;
    missing = 0; extra = 0; wrong = 0; adv = 0; worst_end = 0; n_ovr = 0;
    for (int t = first; t < first + TURNS; t++) begin
      for (int s = 0; s < 256; s++) begin
        int n;
        n = (cnt.exists(t) && cnt[t].exists(s)) ? cnt[t][s] : 0;
        if (s < len && n != 1) missing++;
        if (s >= len && n != 0) extra++;
        if (s > 0 && s < len && n == 1 && val[t][s] != pattern(len, s)) wrong++;
      end
      if (t > first && cnt.exists(t) && cnt[t].exists(0) && cnt.exists(t-1) && cnt[t-1].exists(0)
          && val[t][0] != 8'(val[t-1][0] + 1)) adv++;
      if (ovr.exists(t)) n_ovr += ovr[t];
      if (last_frame_end.exists(t) && last_frame_end[t] > worst_end) worst_end = last_frame_end[t];
    end
    chk({name, ": every byte once per turn"}, missing == 0);
    chk({name, ": no byte beyond the message length"}, extra == 0);
    chk({name, ": constant bytes keep their value"}, wrong == 0);
    chk({name, ": byte 0 follows the turn number"}, adv == 0);
    chk({name, ": message ends inside the turn"}, worst_end > 0 && worst_end < tlen);
    chk({name, ": no overrun"}, n_ovr == 0);
    chk({name, ": 44 clocks per byte"}, worst_end >= len * 42 && worst_end <= len * 44 + 8);
    $display("%s: %0d bytes, last frame ends %0d of %0d clocks into the turn", name, len, worst_end, tlen);
  endtask

  int sps_first, lhc_first;
  initial begin
    #200 rst_n = 1; rst40_n = 1;
    repeat (10) @(posedge clk);
    // task 0: after every revolution edge put the turn number into byte 0
    load_instr(0, OP_WTREL, 0, 0, 1);
    load_instr(1, OP_MOV,   0, 8, 0);
    load_instr(2, OP_SEND,  0, 0, 0);
    load_instr(3, OP_JMP,   0, 0, 0);
    wreg(RA_TASK_START, 16'd0);
    // SPS: 18 bytes, all sent every turn
    for (int i = 1; i < SPS_LEN; i++) wmsg(i, pattern(SPS_LEN, i));
    wreg(RA_MSG_LEN, 16'(SPS_LEN));
    wreg(RA_ACLR_LO, 16'h0000);
    wreg(RA_ACLR_HI, 16'h0000);
    wreg(RA_EN_LO, 16'hFFFF);
    wreg(RA_EN_HI, 16'h0003);
    wreg(RA_TASK_EN, 16'h0001);
    wreg(RA_CTRL, 16'h0005);          // output enabled, processor running
    sps_first = turn_no + 3;
    wait (turn_no == sps_first + TURNS);
    check_workload("SPS", SPS_LEN, SPS_CLKS, sps_first);

    // LHC: 32 bytes every turn
    turn_len = LHC_CLKS;
    for (int i = 1; i < LHC_LEN; i++) wmsg(i, pattern(LHC_LEN, i));
    wreg(RA_MSG_LEN, 16'(LHC_LEN));
    wreg(RA_EN_HI, 16'hFFFF);
    lhc_first = turn_no + 3;
    wait (turn_no == lhc_first + TURNS);
    check_workload("LHC", LHC_LEN, LHC_CLKS, lhc_first);

    chk("all frames valid", n_badframes == 0 && bad == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
