// tb_msg_dpram: the processor and VME fill the next buffer, the swap makes it
// the present one, and the reads of all three ports and the VME writes to the
// present buffer are compared with a reference model of both buffers.
module tb_msg_dpram;
  logic clk = 0, rst_n = 0;
  logic swap, c_we, v_we;
  logic [4:0] c_widx, c_ridx, s_ridx;
  logic [5:0] v_addr;
  logic [7:0] c_wdata, c_rdata, s_rdata, v_wdata, v_rdata;
  logic [7:0] pres [32], nxt [32];
  int checks = 0, failures = 0;

  msg_dpram dut (.clk, .rst_n, .swap, .c_we, .c_widx, .c_wdata, .c_ridx, .c_rdata, .s_ridx, .s_rdata,
                 .v_addr, .v_we, .v_wdata, .v_rdata);
  always #5 clk = ~clk;
  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    swap = 0; c_we = 0; v_we = 0; c_widx = 0; c_ridx = 0; s_ridx = 0; v_addr = 0; c_wdata = 0; v_wdata = 0;
    for (int i = 0; i < 32; i++) begin pres[i] = 0; nxt[i] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int turn = 0; turn < 6; turn++) begin
      for (int k = 0; k < 40; k++) begin
        c_we = $urandom % 2; c_widx = 5'($urandom); c_wdata = 8'($urandom);
        v_we = $urandom % 3 == 0; v_addr = 6'($urandom); v_wdata = 8'($urandom);
        c_ridx = 5'($urandom); s_ridx = 5'($urandom);
        @(negedge clk);
        // reads return what was there before this clock's writes
        chk("cpu read", c_rdata == pres[c_ridx]);
        chk("ser read", s_rdata == pres[s_ridx]);
        chk("vme read", v_rdata == (v_addr[5] ? pres[v_addr[4:0]] : nxt[v_addr[4:0]]));
        if (c_we) nxt[c_widx] = c_wdata;
        if (v_we) begin
          if (v_addr[5]) pres[v_addr[4:0]] = v_wdata;
          else           nxt[v_addr[4:0]] = v_wdata;
        end
      end
      c_we = 0; v_we = 0;
      swap = 1; @(negedge clk); swap = 0;
      for (int i = 0; i < 32; i++) pres[i] = nxt[i];
      for (int i = 0; i < 32; i++) begin
        s_ridx = 5'(i); v_addr = {1'b1, 5'(i)}; @(negedge clk);
        chk("after swap present", s_rdata == pres[i] && v_rdata == pres[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
