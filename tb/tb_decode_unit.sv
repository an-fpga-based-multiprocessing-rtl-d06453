// tb_decode_unit: decodes one instruction of each kind and compares the
// fields, the read/write flags and the illegal flags with expected values.
module tb_decode_unit;
  import bst_pkg::*;
  logic [31:0] instr;
  decoded_t dec;
  int checks = 0, failures = 0;

  decode_unit dut (.instr, .dec);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic t(logic [31:0] i, logic rr, logic rs, logic wr, logic iop, logic ireg);
    instr = i; #1;
    checks++;
    if ({dec.reads_rd, dec.reads_rs, dec.writes_rd, dec.illegal_op, dec.illegal_reg} !== {rr, rs, wr, iop, ireg} ||
        dec.rd != i[25:22] || dec.rs != i[21:18] || dec.imm != i[15:0]) begin
      failures++;
      $display("instr %h: flags %b%b%b%b%b", i, dec.reads_rd, dec.reads_rs, dec.writes_rd, dec.illegal_op, dec.illegal_reg);
    end
  endtask

  initial begin
    t(mk_instr(OP_LDI,  4'd3, 4'd0, 16'h1234), 0, 0, 1, 0, 0);
    t(mk_instr(OP_ADD,  4'd1, 4'd2, 16'h0000), 1, 1, 1, 0, 0);
    t(mk_instr(OP_ADDI, 4'd7, 4'd0, 16'h0005), 1, 0, 1, 0, 0);
    t(mk_instr(OP_MOV,  4'd2, 4'd8, 16'h0000), 0, 1, 1, 0, 0);  // read turn: fine
    t(mk_instr(OP_MOV,  4'd8, 4'd1, 16'h0000), 0, 1, 1, 0, 1);  // write turn: illegal
    t(mk_instr(OP_MOV,  4'd9, 4'd1, 16'h0000), 0, 1, 1, 0, 1);  // write ext: illegal
    t(mk_instr(OP_MOV,  4'd10, 4'd1, 16'h0000), 0, 1, 1, 0, 0); // write int: fine
    t(mk_instr(OP_ADD,  4'd1, 4'd12, 16'h0000), 1, 1, 1, 0, 1); // reg 12: illegal
    t(mk_instr(OP_BEQ,  4'd1, 4'd2, 16'h0040), 1, 1, 0, 0, 0);
    t(mk_instr(OP_BZ,   4'd1, 4'd15, 16'h0040), 1, 0, 0, 0, 0); // rs unused
    t(mk_instr(OP_JMP,  4'd15, 4'd15, 16'h0040), 0, 0, 0, 0, 0);
    t(mk_instr(OP_SEND, 4'd4, 4'd0, 16'h0003), 1, 0, 0, 0, 0);
    t(mk_instr(OP_RDMSG,4'd4, 4'd0, 16'h0003), 0, 0, 1, 0, 0);
    t(mk_instr(OP_WTREG,4'd11, 4'd0, 16'h0000), 1, 0, 0, 0, 1);
    t(mk_instr(OP_WPPS, 4'd0, 4'd0, 16'h0000), 0, 0, 0, 0, 0);
    t(mk_instr(OP_STOP, 4'd0, 4'd0, 16'h0000), 0, 0, 0, 0, 0);
    t({6'h3E, 26'h0}, 0, 0, 0, 1, 0);
    t({6'h11, 26'h0}, 0, 0, 0, 1, 0);
    checks++; instr = mk_instr(OP_SETT, 0, 0, 16'h0001); #1;
    if (dec.op != OP_SETT) begin failures++; $display("opcode field"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
