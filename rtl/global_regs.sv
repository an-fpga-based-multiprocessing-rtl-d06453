// global_regs: the three 16-bit global registers every task can read - the
// turn number, the external triggers and the internal triggers - and the
// synchronisation of the board's timing inputs to the bunch clock.
//
// The revolution frequency input `frev`, the Sync input and the 16 external
// event inputs from the VME P2 connector are asynchronous; each passes two
// flip-flops. A rising edge of the synchronised `frev` gives `turn_pulse`, one
// bunch clock long, which starts a new revolution period and increments the
// turn number; `turn_clear` sets the turn number to zero. A rising edge of
// Sync gives `sync_pulse`. The external trigger register is the synchronised
// level of the 16 inputs, sampled every clock. The internal triggers are set
// and cleared bit by bit by the tasks (`int_set`, `int_clr`), or written whole
// (`int_we`); when one clock both sets and clears a bit, setting wins. The
// three registers and their purpose come from the design description; the
// synchronisers, the edge detection and the set/clear rules are this
// design's own.
module global_regs
  import bst_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  frev,
  input  logic                  sync_in,
  input  logic [EXT_TRIG_W-1:0] ext_in,
  input  logic                  turn_clear,
  input  logic                  int_we,
  input  logic [DATA_W-1:0]     int_wdata,
  input  logic [DATA_W-1:0]     int_set,
  input  logic [DATA_W-1:0]     int_clr,
  output logic                  turn_pulse,
  output logic                  sync_pulse,
  output logic [DATA_W-1:0]     turn,
  output logic [EXT_TRIG_W-1:0] ext_trig,
  output logic [DATA_W-1:0]     int_trig
);
  logic [2:0]            frev_s, sync_s;
  logic [EXT_TRIG_W-1:0] ext_s1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frev_s   <= '0;
      sync_s   <= '0;
      ext_s1   <= '0;
      ext_trig <= '0;
    end else begin
      frev_s   <= {frev_s[1:0], frev};
      sync_s   <= {sync_s[1:0], sync_in};
      ext_s1   <= ext_in;
      ext_trig <= ext_s1;
    end
  end

  assign turn_pulse = frev_s[1] && !frev_s[2];
  assign sync_pulse = sync_s[1] && !sync_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          turn <= '0;
    else if (turn_clear) turn <= '0;
    else if (turn_pulse) turn <= turn + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      int_trig <= '0;
    else if (int_we) int_trig <= int_wdata;
    else             int_trig <= (int_trig & ~int_clr) | int_set;
  end

endmodule
