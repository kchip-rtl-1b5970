// PACE synchronization monitor.
// The pipelines of all PACE chips run in lock-step, so every enabled PACE must
// raise and drop DataValid in exactly the cycles in which the Kchip's own
// readout sequencer expects data (seq_active), and all enabled PACE chips must
// show the same AlmostFull level. Both are compared on every clock.
// oos_now flags, per PACE, a DataValid that differs from the sequencer in this
// cycle; af_mismatch_now flags AlmostFull levels that disagree. The sticky
// copies hold the flags for the status register until clr is pulsed.
// The cross-checks follow the Kchip description; the flag layout is this
// design's choice.
module kchip_sync_monitor #(
  parameter int unsigned N_PACE = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic [N_PACE-1:0] pace_en,
  input  logic [N_PACE-1:0] dv,
  input  logic [N_PACE-1:0] af,
  input  logic              seq_active,
  output logic [N_PACE-1:0] oos_now,
  output logic              af_mismatch_now,
  output logic [N_PACE-1:0] oos_sticky,
  output logic              af_mismatch_sticky
);

  logic [N_PACE-1:0] af_en;

  always_comb begin
    for (int i = 0; i < N_PACE; i++) oos_now[i] = pace_en[i] && (dv[i] != seq_active);
    af_en = af & pace_en;
    af_mismatch_now = (af_en != '0) && (af_en != pace_en);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oos_sticky         <= '0;
      af_mismatch_sticky <= 1'b0;
    end else if (clr) begin
      oos_sticky         <= '0;
      af_mismatch_sticky <= 1'b0;
    end else begin
      oos_sticky         <= oos_sticky | oos_now;
      af_mismatch_sticky <= af_mismatch_sticky | af_mismatch_now;
    end
  end

endmodule
