// tb_fetch_unit: fetches instructions through a simple memory responder with
// a random acknowledge delay and checks the word order (high word at 2*pc),
// the done pulse and busy.
module tb_fetch_unit;
  logic clk = 0, rst_n = 0;
  logic start, busy, done, mem_req, mem_ack;
  logic [15:0] pc, mem_rdata;
  logic [31:0] instr;
  logic [17:0] mem_addr;
  int checks = 0, failures = 0, dly;

  fetch_unit dut (.clk, .rst_n, .start, .pc, .busy, .done, .instr, .mem_req, .mem_addr, .mem_ack, .mem_rdata);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [15:0] word(logic [17:0] a);
    return 16'(a * 16'h9E37 + 16'h1111);
  endfunction

  // responder: acknowledges a held request after a random delay
  always @(posedge clk) begin
    mem_ack <= 0;
    if (mem_req && !mem_ack) begin
      if (dly == 0) begin
        mem_ack <= 1; mem_rdata <= word(mem_addr); dly = $urandom % 4;
      end else dly--;
    end
  end

  initial begin
    start = 0; pc = 0; mem_ack = 0; mem_rdata = 0; dly = 1;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int i = 0; i < 50; i++) begin
      logic [15:0] p;
      p = 16'($urandom);
      pc = p; start = 1; @(negedge clk); start = 0; pc = 16'hFFFF;
      checks++; if (!busy) begin failures++; $display("not busy"); end
      while (!done) @(negedge clk);
      checks++;
      if (instr != {word({p, 1'b0}), word({p, 1'b1})}) begin
        failures++; $display("pc %h instr %h", p, instr);
      end
      @(negedge clk);
      checks++; if (busy || done) begin failures++; $display("done not one clock"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
