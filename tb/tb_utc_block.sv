// tb_utc_block: runs the 40 MHz side and a bunch clock of a different period.
// Checks that each PPS advances the seconds by one, that a value loaded and
// armed by the CBCM is taken at the next PPS (not before), that new_sec
// pulses once per PPS on the bunch clock side and that the sub-second counter
// restarts at the PPS.
module tb_utc_block;
  logic clk40 = 0, clk = 0, rst40_n = 0, rst_n = 0;
  logic pps, arm_tgl, new_sec;
  logic [31:0] load_val, utc_sec;
  logic [9:0] subsec;
  int checks = 0, failures = 0, news = 0;

  utc_block #(.SUBSEC_W(10)) dut (.clk40, .rst40_n, .pps, .clk, .rst_n, .load_val, .arm_tgl,
                                  .utc_sec, .new_sec, .subsec);
  always #12.5 clk40 = ~clk40;
  always #12.475 clk = ~clk;
  always @(posedge clk) if (rst_n && new_sec) news++;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: utc %0d news %0d", what, utc_sec, news); end
  endtask

  task automatic pulse_pps();
    pps = 1; repeat (10) @(posedge clk40); pps = 0; repeat (200) @(posedge clk40);
  endtask

  initial begin
    pps = 0; arm_tgl = 0; load_val = 0;
    #100 rst40_n = 1; rst_n = 1;
    repeat (20) @(posedge clk40);
    pulse_pps(); chk("first second", utc_sec == 1 && news == 1);
    chk("subsec restarted", subsec >= 200 && subsec < 215);
    pulse_pps(); pulse_pps(); chk("third second", utc_sec == 3 && news == 3);
    load_val = 32'd1_000_000; arm_tgl = 1;
    repeat (50) @(posedge clk40);
    chk("load waits for PPS", utc_sec == 3);
    pulse_pps(); chk("loaded", utc_sec == 1_000_000 && news == 4);
    pulse_pps(); chk("counts on", utc_sec == 1_000_001 && news == 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
