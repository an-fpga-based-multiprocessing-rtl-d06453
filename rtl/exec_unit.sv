// exec_unit: the execution block. Computes what one instruction does to its
// task: the register result, the next program counter, the task's new
// situation (running, waiting with a condition, stopped, or stopped on an
// illegal command, value or register), a write into the next turn's message,
// a change of the internal triggers and a VME interrupt request.
//
// Purely combinational; the control unit (bst_cpu) applies the outputs in its
// execute clock. `a` is the value of register rd and `b` that of rs (already
// selected between local and global registers), `msg_byte` the byte of the
// message being sent that a RDMSG addresses. An IRQ instruction finds
// `irq_busy` high while the previous interrupt has not been acknowledged; it
// then leaves the program counter alone, so the task retries it at its next
// turn. Illegal values are a message byte index beyond the 32-byte message
// and a shift count above 15. The categories of instructions follow the
// design description; the operations in each category and their encoding are
// this design's own.
module exec_unit
  import bst_pkg::*;
(
  input  decoded_t                dec,
  input  logic [DATA_W-1:0]       a,
  input  logic [DATA_W-1:0]       b,
  input  logic [PC_W-1:0]         pc,
  input  logic [DATA_W-1:0]       turn,
  input  logic [7:0]              msg_byte,
  input  logic                    irq_busy,
  output logic                    rd_we,      // write result to register rd
  output logic [DATA_W-1:0]       result,
  output logic [PC_W-1:0]         pc_next,
  output task_state_e             new_state,
  output wait_kind_e              wkind,
  output logic [15:0]             warg,
  output logic                    msg_we,
  output logic [MSG_IDX_W-1:0]    msg_idx,
  output logic [7:0]              msg_wdata,
  output logic [DATA_W-1:0]       int_set,
  output logic [DATA_W-1:0]       int_clr,
  output logic                    irq_req,
  output logic [7:0]              irq_vec
);
  logic [15:0] imm;
  assign imm = dec.imm;

  always_comb begin
    rd_we     = 1'b0;
    result    = '0;
    pc_next   = pc + 1'b1;
    new_state = TS_RUNNING;
    wkind     = W_NONE;
    warg      = '0;
    msg_we    = 1'b0;
    msg_idx   = imm[MSG_IDX_W-1:0];
    msg_wdata = a[7:0];
    int_set   = '0;
    int_clr   = '0;
    irq_req   = 1'b0;
    irq_vec   = imm[7:0];
    if (dec.illegal_op) begin
      new_state = TS_ILL_CMD;
      pc_next   = pc;
    end else if (dec.illegal_reg) begin
      new_state = TS_ILL_REG;
      pc_next   = pc;
    end else begin
      unique case (dec.op)
        OP_LDI:  begin rd_we = 1'b1; result = imm;            end
        OP_MOV:  begin rd_we = 1'b1; result = b;              end
        OP_ADD:  begin rd_we = 1'b1; result = a + b;          end
        OP_ADDI: begin rd_we = 1'b1; result = a + imm;        end
        OP_SUB:  begin rd_we = 1'b1; result = a - b;          end
        OP_SUBI: begin rd_we = 1'b1; result = a - imm;        end
        OP_INC:  begin rd_we = 1'b1; result = a + 1'b1;       end
        OP_DEC:  begin rd_we = 1'b1; result = a - 1'b1;       end
        OP_AND:  begin rd_we = 1'b1; result = a & b;          end
        OP_ANDI: begin rd_we = 1'b1; result = a & imm;        end
        OP_OR:   begin rd_we = 1'b1; result = a | b;          end
        OP_ORI:  begin rd_we = 1'b1; result = a | imm;        end
        OP_XOR:  begin rd_we = 1'b1; result = a ^ b;          end
        OP_XORI: begin rd_we = 1'b1; result = a ^ imm;        end
        OP_SHL, OP_SHR: begin
          if (imm[15:4] != '0) begin
            new_state = TS_ILL_VAL;
            pc_next   = pc;
          end else begin
            rd_we  = 1'b1;
            result = (dec.op == OP_SHL) ? a << imm[3:0] : a >> imm[3:0];
          end
        end
        OP_JMP:  pc_next = imm;
        OP_BEQ:  if (a == b)   pc_next = imm;
        OP_BNE:  if (a != b)   pc_next = imm;
        OP_BZ:   if (a == '0)  pc_next = imm;
        OP_BNZ:  if (a != '0)  pc_next = imm;
        OP_IRQ: begin
          if (irq_busy) pc_next = pc;
          else          irq_req = 1'b1;
        end
        OP_SEND, OP_RDMSG: begin
          if (imm[15:MSG_IDX_W] != '0) begin
            new_state = TS_ILL_VAL;
            pc_next   = pc;
          end else if (dec.op == OP_SEND) begin
            msg_we = 1'b1;
          end else begin
            rd_we  = 1'b1;
            result = {8'h00, msg_byte};
          end
        end
        OP_SENDI: begin
          if (imm[15:8+MSG_IDX_W] != '0) begin
            new_state = TS_ILL_VAL;
            pc_next   = pc;
          end else begin
            msg_we    = 1'b1;
            msg_idx   = imm[8 +: MSG_IDX_W];
            msg_wdata = imm[7:0];
          end
        end
        OP_WEXT:  begin new_state = TS_WAITING; wkind = W_EXT;  warg = imm;        end
        OP_WINT:  begin new_state = TS_WAITING; wkind = W_INT;  warg = imm;        end
        OP_SETT:  int_set = imm;
        OP_CLRT:  int_clr = imm;
        OP_WTREL: begin new_state = TS_WAITING; wkind = W_TURN; warg = turn + imm; end
        OP_WTABS: begin new_state = TS_WAITING; wkind = W_TURN; warg = imm;        end
        OP_WTREG: begin new_state = TS_WAITING; wkind = W_TURN; warg = a;          end
        OP_WPPS:  begin new_state = TS_WAITING; wkind = W_PPS;                     end
        OP_WSYNC: begin new_state = TS_WAITING; wkind = W_SYNC;                    end
        OP_STOP:  begin new_state = TS_STOPPED; pc_next = pc;                      end
        default: ;
      endcase
    end
  end

endmodule
