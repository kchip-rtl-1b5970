// Readout controller: trigger handling, event identifiers and overflow prevention.
// - Bunch counter (BC): counts clock cycles, wraps at ORBIT, cleared by resync.
// - Event counter (EC): counts every trigger, accepted or not, cleared by
//   resync; the first trigger after a resync is event 1.
// - Trigger inhibit: when enabled, a trigger that arrives while any FIFO (the
//   Kchip Data, Column Address or Trigger FIFO, or an enabled PACE) signals
//   almost full is not sent to the PACE chips. It is still written into the
//   Trigger FIFO, marked NULL, so the packet stream keeps one packet per
//   trigger and event synchronization is kept.
// - Every trigger writes two words into the Trigger FIFO on consecutive cycles
//   (word 0: BC and flags, word 1: EC). A trigger that finds the Trigger FIFO
//   without room for both words is lost and counted.
// - Accepted triggers and resync commands are re-sent to the PACE chips on
//   pace_trig with the three-bit serial code; pace_l1a pulses when a trigger
//   code starts, so that the readout sequencer expects one more event.
// - A calibration trigger request is held until it does not collide with a
//   physics trigger, then handled as a trigger with the calib flag set.
// The NULL-event scheme and the enable follow the Kchip description; the word
// layout, the ORBIT wrap and the queueing are this design's choices.
module kchip_trig_ctrl
  import kchip_pkg::*;
#(
  parameter int unsigned ORBIT = 3564
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            l1a,         // decoded trigger
  input  logic            cal_trig,    // calibration trigger request
  input  logic            resync,      // decoded resync
  input  logic            inhibit_en,  // trigger inhibit enable
  input  logic            busy_af,     // OR of all almost-full conditions
  input  logic [$clog2(CTRL_DEPTH):0] tfifo_count,
  output logic            tfifo_push,
  output logic [CTRL_W-1:0] tfifo_din,
  output logic            pace_trig,   // serial command line to the PACE chips
  output logic            pace_l1a,    // a trigger code is being sent (pulse)
  output logic            inhibit_now, // triggers are gated this cycle
  output logic [BC_W-1:0] bc,
  output logic [EC_W-1:0] ec,
  output logic [15:0]     n_null,      // NULL events inserted (saturating)
  output logic [15:0]     n_lost       // triggers lost to a full Trigger FIFO
);

  localparam int unsigned TCW = $clog2(CTRL_DEPTH) + 1;

  logic       trig, is_cal, cal_pend, w1_pend, room;
  trig_w1_t   w1_q;
  logic [2:0] pend_q;          // accepted triggers waiting for the encoder
  // encoder state: [4:3] bits left to send, [2:0] shift register
  logic [4:0] enc_q, enc_d;
  logic       pend_inc, pend_dec, start_trig, start_rsync, rsync_pend;

  assign inhibit_now = inhibit_en && busy_af;
  // a calibration request waits for a cycle with no trigger and no pending word 1
  assign trig   = l1a || (cal_pend && !w1_pend);
  assign is_cal = !l1a;
  assign room   = (tfifo_count <= TCW'(CTRL_DEPTH - 2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bc       <= '0;
      ec       <= '0;
      cal_pend <= 1'b0;
      w1_pend  <= 1'b0;
      w1_q     <= '0;
      n_null   <= '0;
      n_lost   <= '0;
    end else begin
      if (resync || bc == BC_W'(ORBIT - 1)) bc <= '0;
      else                                  bc <= bc + 1'b1;
      if (cal_trig) cal_pend <= 1'b1;
      else if (trig && is_cal) cal_pend <= 1'b0;
      w1_pend <= 1'b0;
      if (resync) begin
        ec <= '0;
      end else if (trig && !w1_pend) begin
        ec <= ec + 1'b1;
        if (room) begin
          w1_pend <= 1'b1;
          w1_q    <= '{pad: '0, ec: ec + 1'b1};
          if (inhibit_now && n_null != '1) n_null <= n_null + 1'b1;
        end else if (n_lost != '1) begin
          n_lost <= n_lost + 1'b1;
        end
      end else if (l1a && w1_pend && n_lost != '1) begin
        n_lost <= n_lost + 1'b1;   // collided with a calibration trigger
      end
    end
  end

  // Trigger FIFO write: word 0 in the trigger cycle, word 1 in the next.
  always_comb begin
    trig_w0_t w0;
    w0 = '{pad: '0, calib: is_cal, null_ev: inhibit_now, bc: bc};
    tfifo_push = 1'b0;
    tfifo_din  = '0;
    if (w1_pend) begin
      tfifo_push = 1'b1;
      tfifo_din  = w1_q;
    end else if (trig && !resync && room) begin
      tfifo_push = 1'b1;
      tfifo_din  = w0;
    end
  end

  // Serial encoder towards the PACE chips.
  assign pend_inc    = trig && !w1_pend && !resync && room && !inhibit_now;
  assign start_rsync = (enc_q[4:3] == 2'd0) && rsync_pend;
  assign start_trig  = (enc_q[4:3] == 2'd0) && !rsync_pend && (pend_q != 3'd0);
  assign pend_dec    = start_trig;
  assign pace_l1a    = start_trig;

  always_comb begin
    enc_d = enc_q;
    if (enc_q[4:3] != 2'd0) enc_d = {enc_q[4:3] - 2'd1, enc_q[1:0], 1'b0};
    if (start_rsync) enc_d = {2'd3, CMD_RESYNC};
    if (start_trig)  enc_d = {2'd3, CMD_TRIGGER};
  end

  assign pace_trig = (enc_q[4:3] != 2'd0) && enc_q[2];

  kchip_tmr_reg #(.WIDTH(5)) u_enc (
    .clk(clk), .rst_n(rst_n), .load(1'b1), .d(enc_d), .upset(3'b000), .q(enc_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q     <= '0;
      rsync_pend <= 1'b0;
    end else begin
      if (resync) begin
        pend_q     <= '0;
        rsync_pend <= 1'b1;
      end else begin
        if (start_rsync) rsync_pend <= 1'b0;
        pend_q <= pend_q + 3'(pend_inc) - 3'(pend_dec);
      end
    end
  end

endmodule
