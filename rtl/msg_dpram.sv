// msg_dpram: the two message buffers - the message being sent in this
// revolution period (present) and the one being built for the next (next).
//
// Three users share it. The processor writes bytes of the next message and
// reads bytes of the present one; the serializer reads the present one; the
// VME side reads and writes both, bit 5 of its byte address choosing the
// present (1) or next (0) buffer. All reads are synchronous, one clock after
// the address. At `swap`, the start of a revolution period, the next message
// becomes the present one; the next buffer keeps its contents, so a byte that
// is sent every turn keeps its value until someone rewrites it and the buffer
// exchange stays invisible to tasks and to the CBCM. Writes in the swap
// clock land in the next buffer after the copy; a VME write to the present
// buffer in that clock is lost. When the processor and VME write the same
// next-buffer byte in one clock, the VME value is kept.
// The three users and their rights follow the design description. The
// description stores both buffers in one dual port RAM without saying how
// they change places; this design copies the whole next buffer into the
// present one at the swap, so that continuously sent bytes need not be
// rewritten.
module msg_dpram
  import bst_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 swap,
  // processor
  input  logic                 c_we,
  input  logic [MSG_IDX_W-1:0] c_widx,
  input  logic [7:0]           c_wdata,
  input  logic [MSG_IDX_W-1:0] c_ridx,
  output logic [7:0]           c_rdata,
  // serializer
  input  logic [MSG_IDX_W-1:0] s_ridx,
  output logic [7:0]           s_rdata,
  // VME
  input  logic [MSG_IDX_W:0]   v_addr,
  input  logic                 v_we,
  input  logic [7:0]           v_wdata,
  output logic [7:0]           v_rdata
);
  logic [7:0] present_q [MSG_BYTES];
  logic [7:0] next_q    [MSG_BYTES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MSG_BYTES; i++) begin
        present_q[i] <= '0;
        next_q[i]    <= '0;
      end
    end else begin
      if (swap) begin
        for (int i = 0; i < MSG_BYTES; i++) present_q[i] <= next_q[i];
      end else if (v_we && v_addr[MSG_IDX_W]) begin
        present_q[v_addr[MSG_IDX_W-1:0]] <= v_wdata;
      end
      if (c_we) next_q[c_widx] <= c_wdata;
      if (v_we && !v_addr[MSG_IDX_W]) next_q[v_addr[MSG_IDX_W-1:0]] <= v_wdata;
    end
  end

  always_ff @(posedge clk) begin
    c_rdata <= present_q[c_ridx];
    s_rdata <= present_q[s_ridx];
    v_rdata <= v_addr[MSG_IDX_W] ? present_q[v_addr[MSG_IDX_W-1:0]]
                                 : next_q[v_addr[MSG_IDX_W-1:0]];
  end

endmodule
