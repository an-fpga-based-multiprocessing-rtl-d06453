// tb_task_scheduler: checks the round robin order against a reference model:
// with all tasks ready the grants go 0,1,...,7,0; with random ready sets each
// grant is the first ready task after the last one granted; no ready task
// gives no grant; the pointer only moves on `advance`.
module tb_task_scheduler;
  logic clk = 0, rst_n = 0;
  logic [7:0] ready;
  logic advance;
  logic gv;
  logic [2:0] gid;
  int checks = 0, failures = 0;
  int last;

  task_scheduler dut (.clk, .rst_n, .ready, .advance, .grant_valid(gv), .grant_id(gid));

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int model(int l, logic [7:0] r);
    for (int k = 1; k <= 8; k++) if (r[(l + k) % 8]) return (l + k) % 8;
    return -1;
  endfunction

  initial begin
    ready = '0; advance = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (gv) begin failures++; $display("grant with nothing ready"); end
    ready = 8'hFF; advance = 1;
    for (int i = 0; i < 16; i++) begin
      #1; checks++;
      if (!gv || gid != 3'(i % 8)) begin failures++; $display("all ready: step %0d got %0d", i, gid); end
      @(negedge clk);
    end
    last = 7;
    for (int i = 0; i < 300; i++) begin
      ready = 8'($urandom);
      advance = ($urandom % 4) != 0;
      #1;
      checks++;
      if (model(last, ready) < 0) begin
        if (gv) begin failures++; $display("unexpected grant"); end
      end else if (!gv || int'(gid) != model(last, ready)) begin
        failures++; $display("rr: last %0d ready %b got %0d want %0d", last, ready, gid, model(last, ready));
      end
      if (advance && gv) last = gid;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
