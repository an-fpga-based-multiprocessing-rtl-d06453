// decode_unit: splits a 32-bit instruction into its fields and classifies it.
//
// Purely combinational. It reports which of the register fields the
// instruction reads and writes, flags an opcode that is not in the
// instruction set (the task is then stopped with "illegal command") and flags
// a register number that the instruction may not use: numbers 11..15 do not
// exist, and the turn number (8) and the external triggers (9) are read only
// (the task is then stopped with "illegal register"). The field layout and
// opcode values are this design's own (see bst_pkg); the decoder as a unit
// between fetch and execution follows the design description. There the
// decoder also fetches the operands; here bst_cpu's control steps read them
// from the register DPRAM, using the fields and flags given here.
module decode_unit
  import bst_pkg::*;
(
  input  logic [31:0] instr,
  output decoded_t    dec
);
  function automatic logic bad_read(logic [3:0] r);
    return r > REG_INT;
  endfunction

  function automatic logic bad_write(logic [3:0] r);
    return r > REG_INT || r == REG_TURN || r == REG_EXT;
  endfunction

  always_comb begin
    logic [5:0] raw;
    raw           = instr[31:26];
    dec           = '0;
    dec.op        = opcode_e'(raw);
    dec.rd        = instr[25:22];
    dec.rs        = instr[21:18];
    dec.imm       = instr[15:0];
    unique case (raw)
      OP_NOP, OP_JMP, OP_IRQ, OP_SENDI, OP_WEXT, OP_WINT, OP_SETT, OP_CLRT,
      OP_WTREL, OP_WTABS, OP_WPPS, OP_WSYNC, OP_STOP: ;
      OP_LDI:                                    dec.writes_rd = 1'b1;
      OP_MOV:              begin dec.reads_rs = 1'b1; dec.writes_rd = 1'b1; end
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR:
        begin dec.reads_rd = 1'b1; dec.reads_rs = 1'b1; dec.writes_rd = 1'b1; end
      OP_ADDI, OP_SUBI, OP_INC, OP_DEC, OP_ANDI, OP_ORI, OP_XORI, OP_SHL, OP_SHR:
        begin dec.reads_rd = 1'b1; dec.writes_rd = 1'b1; end
      OP_BEQ, OP_BNE:      begin dec.reads_rd = 1'b1; dec.reads_rs = 1'b1; end
      OP_BZ, OP_BNZ, OP_SEND, OP_WTREG:          dec.reads_rd = 1'b1;
      OP_RDMSG:                                  dec.writes_rd = 1'b1;
      default:                                   dec.illegal_op = 1'b1;
    endcase
    dec.illegal_reg = (dec.reads_rd  && bad_read(dec.rd))  ||
                      (dec.reads_rs  && bad_read(dec.rs))  ||
                      (dec.writes_rd && bad_write(dec.rd));
  end

endmodule
