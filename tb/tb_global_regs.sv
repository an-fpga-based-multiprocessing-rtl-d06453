// tb_global_regs: checks the turn pulse and turn counter on frev edges with
// their synchroniser delay, the turn clear, the Sync pulse, the two-clock
// delay of the external triggers, and set/clear/write of the internal
// triggers.
module tb_global_regs;
  logic clk = 0, rst_n = 0;
  logic frev, sync_in, turn_clear, int_we;
  logic [15:0] ext_in, int_wdata, int_set, int_clr;
  logic turn_pulse, sync_pulse;
  logic [15:0] turn, ext_trig, int_trig;
  int checks = 0, failures = 0, pulses = 0;

  global_regs dut (.clk, .rst_n, .frev, .sync_in, .ext_in, .turn_clear, .int_we, .int_wdata,
                   .int_set, .int_clr, .turn_pulse, .sync_pulse, .turn, .ext_trig, .int_trig);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (turn_pulse) pulses++;

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    frev = 0; sync_in = 0; turn_clear = 0; int_we = 0; ext_in = 0; int_wdata = 0; int_set = 0; int_clr = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 5; i++) begin
      frev = 1;
      @(negedge clk); chk("no pulse after 1 clock", !turn_pulse);
      @(negedge clk); chk("pulse after 2 clocks", turn_pulse);
      @(negedge clk); chk("pulse one clock", !turn_pulse);
      repeat (3) @(negedge clk);
      frev = 0;
      repeat (4) @(negedge clk);
    end
    chk("turn count 5", turn == 5 && pulses == 5);
    turn_clear = 1; @(negedge clk); turn_clear = 0; chk("turn cleared", turn == 0);
    sync_in = 1; @(negedge clk); @(negedge clk); chk("sync pulse", sync_pulse);
    @(negedge clk); chk("sync one clock", !sync_pulse);
    ext_in = 16'hA5A5; @(negedge clk); chk("ext delay", ext_trig == 0);
    @(negedge clk); chk("ext sampled", ext_trig == 16'hA5A5);
    int_set = 16'h0011; @(negedge clk); int_set = 0; chk("int set", int_trig == 16'h0011);
    int_clr = 16'h0001; int_set = 16'h0100; @(negedge clk); int_clr = 0; int_set = 0;
    chk("int set/clr", int_trig == 16'h0110);
    int_clr = 16'h0100; int_set = 16'h0100; @(negedge clk); int_clr = 0; int_set = 0;
    chk("set wins", int_trig == 16'h0110);
    int_we = 1; int_wdata = 16'h7777; @(negedge clk); int_we = 0; chk("int write", int_trig == 16'h7777);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
