// tb_task_regs_dpram: writes every register through one port and reads it
// back through both, against a reference array; checks the one-clock read
// latency and that a processor write wins over a simultaneous VME write.
module tb_task_regs_dpram;
  logic clk = 0;
  logic [5:0] aa, ba;
  logic awe, bwe;
  logic [15:0] awd, bwd, ard, brd;
  logic [15:0] ref_m [64];
  int checks = 0, failures = 0;

  task_regs_dpram dut (.clk, .a_addr(aa), .a_we(awe), .a_wdata(awd), .a_rdata(ard),
                       .b_addr(ba), .b_we(bwe), .b_wdata(bwd), .b_rdata(brd));
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    awe = 0; bwe = 0; aa = 0; ba = 0; awd = 0; bwd = 0;
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      ref_m[i] = 16'($urandom);
      if (i % 2 == 0) begin aa = 6'(i); awe = 1; awd = ref_m[i]; bwe = 0; end
      else            begin ba = 6'(i); bwe = 1; bwd = ref_m[i]; awe = 0; end
      @(negedge clk);
    end
    awe = 0; bwe = 0;
    for (int i = 0; i < 64; i++) begin
      aa = 6'(i); ba = 6'(63 - i);
      @(negedge clk);
      checks += 2;
      if (ard != ref_m[i])      begin failures++; $display("A read %0d", i); end
      if (brd != ref_m[63 - i]) begin failures++; $display("B read %0d", 63 - i); end
    end
    // simultaneous write to the same word
    aa = 6'd9; ba = 6'd9; awe = 1; bwe = 1; awd = 16'h1234; bwd = 16'h5678;
    @(negedge clk);
    awe = 0; bwe = 0;
    @(negedge clk);
    checks++; if (ard != 16'h1234) begin failures++; $display("write priority"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
