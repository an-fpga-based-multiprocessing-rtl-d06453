// utc_block: keeps the UTC time of the board, counting seconds on the Pulse
// Per Second and the 40.000 MHz clock of the GMT network, and hands it to
// the bunch clock side of the design.
//
// In the 40 MHz domain the PPS input passes two flip-flops; on each of its
// rising edges the seconds counter advances by one, or, if the CBCM has armed
// a load, takes the loaded value instead, and the sub-second counter (40 MHz
// ticks since the last PPS) restarts from zero. The CBCM arms a load by
// writing the value (`load_val`, held stable by the register block) and
// toggling `arm_tgl`; the toggle crosses into the 40 MHz domain through two
// flip-flops. After each PPS the 40 MHz side toggles a flag; the bunch clock
// side synchronises the flag, copies the seconds (stable by then, as they
// change only once a second) into `utc_sec` and pulses `new_sec` for one
// bunch clock. `new_sec` is the PPS event that tasks wait for.
// Only this block runs on the 40 MHz clock, as in the design description,
// which also gives the PPS and 40 MHz inputs and the setup by the CBCM. The
// toggle handshakes, the 32-bit seconds format and the load-at-next-PPS rule
// are this design's own.
module utc_block #(
  parameter int SUBSEC_W = 26
) (
  input  logic                clk40,
  input  logic                rst40_n,
  input  logic                pps,
  input  logic                clk,
  input  logic                rst_n,
  input  logic [31:0]         load_val,
  input  logic                arm_tgl,
  output logic [31:0]         utc_sec,
  output logic                new_sec,
  output logic [SUBSEC_W-1:0] subsec
);
  // 40 MHz domain
  logic [2:0]  pps_s;
  logic [2:0]  arm_s;
  logic        armed;
  logic [31:0] sec40;
  logic        upd_tgl;

  always_ff @(posedge clk40 or negedge rst40_n) begin
    if (!rst40_n) begin
      pps_s   <= '0;
      arm_s   <= '0;
      armed   <= 1'b0;
      sec40   <= '0;
      subsec  <= '0;
      upd_tgl <= 1'b0;
    end else begin
      pps_s <= {pps_s[1:0], pps};
      arm_s <= {arm_s[1:0], arm_tgl};
      if (pps_s[1] && !pps_s[2]) begin
        sec40   <= armed ? load_val : sec40 + 1'b1;
        armed   <= 1'b0;
        subsec  <= '0;
        upd_tgl <= !upd_tgl;
      end else begin
        subsec <= subsec + 1'b1;
        if (arm_s[1] != arm_s[2]) armed <= 1'b1;
      end
    end
  end

  // bunch clock domain
  logic [2:0] upd_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upd_s   <= '0;
      utc_sec <= '0;
      new_sec <= 1'b0;
    end else begin
      upd_s   <= {upd_s[1:0], upd_tgl};
      new_sec <= upd_s[1] != upd_s[2];
      if (upd_s[1] != upd_s[2]) utc_sec <= sec40;
    end
  end

endmodule
