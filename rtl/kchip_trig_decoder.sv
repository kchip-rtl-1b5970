// Serial trigger command decoder.
// The trigger line is idle low. A command starts with a 1 and is three bits
// long, one bit per clock: 100 = trigger (L1A), 110 = calibrate, 101 = resync
// (reset of the bunch and event counters). 111 is not a command and is
// reported on the error output. The strobe for a command is a one-cycle pulse
// in the cycle after its last bit. The shift state is triplicated (kchip_tmr_reg).
// The Kchip decodes trigger commands; this three-bit code is this design's
// choice, modelled on the front-end chips of the same detector generation.
module kchip_trig_decoder
  import kchip_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic trig_in,
  output logic l1a,
  output logic calib,
  output logic resync,
  output logic cmd_err
);

  // state: [2:1] bits still to receive, [0] second bit of the command
  logic [2:0] st_q, st_d;
  logic       busy;
  logic [1:0] cnt;
  logic       b1;
  logic       done;
  logic [2:0] code;

  assign cnt  = st_q[2:1];
  assign b1   = st_q[0];
  assign busy = (cnt != 2'd0);
  assign done = (cnt == 2'd1);
  assign code = {1'b1, b1, trig_in};

  always_comb begin
    st_d = st_q;
    if (!busy) begin
      if (trig_in) st_d = {2'd2, 1'b0};
    end else begin
      st_d = {cnt - 2'd1, trig_in};
    end
  end

  kchip_tmr_reg #(.WIDTH(3)) u_state (
    .clk(clk), .rst_n(rst_n), .load(1'b1), .d(st_d), .upset(3'b000), .q(st_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1a     <= 1'b0;
      calib   <= 1'b0;
      resync  <= 1'b0;
      cmd_err <= 1'b0;
    end else begin
      l1a     <= done && (code == CMD_TRIGGER);
      calib   <= done && (code == CMD_CALIB);
      resync  <= done && (code == CMD_RESYNC);
      cmd_err <= done && (code == 3'b111);
    end
  end

endmodule
