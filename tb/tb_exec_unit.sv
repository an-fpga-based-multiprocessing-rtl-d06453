// tb_exec_unit: drives the execution block with decoded instructions (from the
// decoder) and operand values, and compares results, next program counter,
// new task situation, message writes, trigger changes and interrupt requests
// with values worked out by hand.
module tb_exec_unit;
  import bst_pkg::*;
  logic [31:0] instr;
  decoded_t dec;
  logic [15:0] a, b, turn;
  logic [15:0] pc;
  logic [7:0]  mbyte;
  logic        busy;
  logic rd_we, msg_we, irq;
  logic [15:0] res, pcn, iset, iclr, warg;
  task_state_e ns;
  wait_kind_e  wk;
  logic [4:0]  midx;
  logic [7:0]  mwd, ivec;
  int checks = 0, failures = 0;

  decode_unit u_d (.instr, .dec);
  exec_unit dut (.dec, .a, .b, .pc, .turn, .msg_byte(mbyte), .irq_busy(busy),
                 .rd_we, .result(res), .pc_next(pcn), .new_state(ns), .wkind(wk), .warg,
                 .msg_we, .msg_idx(midx), .msg_wdata(mwd), .int_set(iset), .int_clr(iclr),
                 .irq_req(irq), .irq_vec(ivec));
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(opcode_e op, logic [3:0] rd, logic [3:0] rs, logic [15:0] imm);
    instr = mk_instr(op, rd, rs, imm); #1;
  endtask

  initial begin
    a = 16'h00F0; b = 16'h0F0F; pc = 16'd100; turn = 16'd500; mbyte = 8'hA5; busy = 0;
    run(OP_LDI, 1, 0, 16'hBEEF); chk("ldi", rd_we && res == 16'hBEEF && pcn == 101 && ns == TS_RUNNING);
    run(OP_ADD, 1, 2, 0);        chk("add", rd_we && res == 16'h0FFF);
    run(OP_SUB, 1, 2, 0);        chk("sub", res == 16'hF1E1);
    run(OP_ADDI,1, 0, 16'h0010); chk("addi", res == 16'h0100);
    run(OP_SUBI,1, 0, 16'h00F1); chk("subi", res == 16'hFFFF);
    run(OP_INC, 1, 0, 0);        chk("inc", res == 16'h00F1);
    run(OP_DEC, 1, 0, 0);        chk("dec", res == 16'h00EF);
    run(OP_AND, 1, 2, 0);        chk("and", res == 16'h0000);
    run(OP_OR,  1, 2, 0);        chk("or", res == 16'h0FFF);
    run(OP_XORI,1, 0, 16'h00FF); chk("xori", res == 16'h000F);
    run(OP_ANDI,1, 0, 16'h0030); chk("andi", res == 16'h0030);
    run(OP_ORI, 1, 0, 16'h1000); chk("ori", res == 16'h10F0);
    run(OP_XOR, 1, 2, 0);        chk("xor", res == 16'h0FFF);
    run(OP_MOV, 1, 2, 0);        chk("mov", res == 16'h0F0F);
    run(OP_SHL, 1, 0, 16'd4);    chk("shl", res == 16'h0F00);
    run(OP_SHR, 1, 0, 16'd4);    chk("shr", res == 16'h000F);
    run(OP_SHL, 1, 0, 16'd16);   chk("shl illegal", ns == TS_ILL_VAL && !rd_we && pcn == 100);
    run(OP_JMP, 0, 0, 16'd7);    chk("jmp", pcn == 7 && !rd_we);
    run(OP_BEQ, 1, 2, 16'd9);    chk("beq not taken", pcn == 101);
    run(OP_BNE, 1, 2, 16'd9);    chk("bne taken", pcn == 9);
    run(OP_BZ,  1, 0, 16'd9);    chk("bz not taken", pcn == 101);
    run(OP_BNZ, 1, 0, 16'd9);    chk("bnz taken", pcn == 9);
    a = 16'h0F0F;
    run(OP_BEQ, 1, 2, 16'd9);    chk("beq taken", pcn == 9);
    a = 16'h0000;
    run(OP_BZ,  1, 0, 16'd11);   chk("bz taken", pcn == 11);
    a = 16'h1234;
    run(OP_SEND, 1, 0, 16'd17);  chk("send", msg_we && midx == 17 && mwd == 8'h34 && pcn == 101);
    run(OP_SEND, 1, 0, 16'd32);  chk("send illegal", !msg_we && ns == TS_ILL_VAL && pcn == 100);
    run(OP_SENDI,0, 0, 16'h1F5A); chk("sendi", msg_we && midx == 31 && mwd == 8'h5A);
    run(OP_SENDI,0, 0, 16'h205A); chk("sendi illegal", !msg_we && ns == TS_ILL_VAL);
    run(OP_RDMSG,3, 0, 16'd4);   chk("rdmsg", rd_we && res == 16'h00A5);
    run(OP_IRQ, 0, 0, 16'h0042); chk("irq", irq && ivec == 8'h42 && pcn == 101);
    busy = 1;
    run(OP_IRQ, 0, 0, 16'h0042); chk("irq busy", !irq && pcn == 100 && ns == TS_RUNNING);
    busy = 0;
    run(OP_WEXT, 0, 0, 16'h0003); chk("wext", ns == TS_WAITING && wk == W_EXT && warg == 3 && pcn == 101);
    run(OP_WINT, 0, 0, 16'h0100); chk("wint", ns == TS_WAITING && wk == W_INT && warg == 16'h0100);
    run(OP_WTREL,0, 0, 16'd10);  chk("wtrel", wk == W_TURN && warg == 510);
    run(OP_WTABS,0, 0, 16'd777); chk("wtabs", wk == W_TURN && warg == 777);
    run(OP_WTREG,1, 0, 0);       chk("wtreg", wk == W_TURN && warg == 16'h1234);
    run(OP_WPPS, 0, 0, 0);       chk("wpps", ns == TS_WAITING && wk == W_PPS);
    run(OP_WSYNC,0, 0, 0);       chk("wsync", ns == TS_WAITING && wk == W_SYNC);
    run(OP_SETT, 0, 0, 16'h0005); chk("sett", iset == 5 && iclr == 0);
    run(OP_CLRT, 0, 0, 16'h0004); chk("clrt", iclr == 4 && iset == 0);
    run(OP_STOP, 0, 0, 0);       chk("stop", ns == TS_STOPPED && pcn == 100);
    instr = {6'h3E, 26'h0}; #1;  chk("illegal cmd", ns == TS_ILL_CMD && !rd_we && pcn == 100);
    run(OP_MOV, 8, 1, 0);        chk("illegal reg", ns == TS_ILL_REG && !rd_we);
    run(OP_NOP, 0, 0, 0);        chk("nop", !rd_we && !msg_we && pcn == 101 && ns == TS_RUNNING);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
