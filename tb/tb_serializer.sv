// tb_serializer: sends messages with random enable bits, lengths and UTC
// positions and decodes the line with a TTC receiver model. Every enabled
// byte below the message length must arrive once, in index order, with its
// index as sub-address, the right data (UTC seconds in the UTC window), the
// TTCrx address and E bit, a valid check field, and 42 clocks per frame.
// Also checks the idle line with the output disabled and the overrun when a
// new turn starts during a frame.
module tb_serializer;
  localparam logic [13:0] ADDR = 14'h2A5C;
  logic clk = 0, rst_n = 0;
  logic start, utc_en, oe_ctrl, bst_msg, bst_oe, frame_start, overrun;
  logic [31:0] present_en, utc_sec;
  logic [5:0] msg_len;
  logic [4:0] utc_pos, rd_idx;
  logic [7:0] rd_data;
  logic [7:0] buffer [32];
  int checks = 0, failures = 0, overruns = 0;
  // receiver
  logic got, e_bit, ok;
  logic [13:0] r_addr;
  logic [7:0] r_sub, r_data;
  int frames, bad;
  int exp_idx [$];
  int last_start;

  serializer #(.TTCRX_ADDR(ADDR)) dut (.clk, .rst_n, .start, .present_en, .msg_len, .utc_en, .utc_pos,
    .utc_sec, .oe_ctrl, .rd_idx, .rd_data, .bst_msg, .bst_oe, .frame_start, .overrun);
  ttc_rx_model rx (.clk, .line(bst_msg), .got, .addr(r_addr), .e_bit, .sub(r_sub), .data(r_data), .ok, .frames, .bad);

  always #5 clk = ~clk;
  always @(posedge clk) rd_data <= buffer[rd_idx];
  always @(posedge clk) if (overrun) overruns++;
  initial begin #3000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [7:0] expect_byte(int i);
    if (utc_en && i >= utc_pos && i < utc_pos + 4) return utc_sec[8 * (3 - (i - utc_pos)) +: 8];
    return buffer[i];
  endfunction

  // frame checker
  always @(posedge clk) begin
    if (frame_start) begin
      if (last_start >= 0 && ($time / 10 - last_start) < 42) begin failures++; $display("frames too close"); end
      last_start = $time / 10;
    end
    if (got) begin
      checks++;
      if (exp_idx.size() == 0) begin
        failures++; $display("unexpected frame sub %0d", r_sub);
      end else begin
        int i;
        i = exp_idx.pop_front();
        if (!ok || r_addr != ADDR || !e_bit || r_sub != 8'(i) || r_data != expect_byte(i)) begin
          failures++;
          $display("frame: ok %0d sub %0d want %0d data %h want %h", ok, r_sub, i, r_data, expect_byte(i));
        end
      end
    end
  end

  initial begin
    start = 0; utc_en = 0; oe_ctrl = 1; present_en = 0; utc_sec = 0; msg_len = 32; utc_pos = 0;
    last_start = -1;
    for (int i = 0; i < 32; i++) buffer[i] = 8'($urandom);
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      int n, cyc;
      present_en = $urandom;
      msg_len = 6'($urandom % 33);
      utc_en = t % 2;
      utc_pos = 5'($urandom % 29);
      utc_sec = $urandom;
      for (int i = 0; i < 32; i++) buffer[i] = 8'($urandom);
      n = 0;
      for (int i = 0; i < msg_len; i++) if (present_en[i]) begin exp_idx.push_back(i); n++; end
      start = 1; @(negedge clk); start = 0;
      cyc = 0;
      while (exp_idx.size() != 0 && cyc < 5000) begin @(negedge clk); cyc++; end
      repeat (45) @(negedge clk);
      checks++;
      if (exp_idx.size() != 0) begin failures++; $display("turn %0d: %0d frames missing", t, exp_idx.size()); exp_idx.delete(); end
      // duration: 44 clocks per sent byte + 1 per skipped one, +2
      checks++;
      if (cyc > n * 44 + (msg_len - n) + 4 || (n > 0 && cyc < n * 42)) begin
        failures++; $display("turn %0d: %0d bytes took %0d clocks", t, n, cyc);
      end
    end
    checks++; if (bad != 0) begin failures++; $display("%0d bad frames", bad); end
    // output disabled: line stays idle
    oe_ctrl = 0; present_en = '1; msg_len = 32; utc_en = 0;
    start = 1; @(negedge clk); start = 0;
    begin
      int low;
      low = 0;
      repeat (500) begin @(negedge clk); if (!bst_msg) low++; end
      checks++; if (low != 0 || bst_oe) begin failures++; $display("line not idle when disabled"); end
    end
    repeat (1500) @(negedge clk);
    // overrun: a new turn in the middle of a frame
    oe_ctrl = 1; present_en = 32'h0000_0003; msg_len = 32;
    exp_idx.push_back(0);
    start = 1; @(negedge clk); start = 0;
    repeat (20) @(negedge clk);
    exp_idx.push_back(0); exp_idx.push_back(1);
    start = 1; @(negedge clk); start = 0;
    repeat (200) @(negedge clk);
    checks++; if (overruns != 1) begin failures++; $display("overrun count %0d", overruns); end
    checks++; if (exp_idx.size() != 0) begin failures++; $display("restart after overrun"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
