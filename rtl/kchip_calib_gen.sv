// Calibration event generator.
// On a calibrate command the Kchip sends the PACE chips a calibration pulse of
// programmable width (width_m1+1 = 1..256 clock cycles), starting the cycle
// after the command strobe. A programmable fraction of a clock of extra delay
// is added afterwards by the DLL (kchip_dll). When auto-trigger is enabled, a
// one-cycle calibration trigger is raised exactly `latency` cycles after the
// first cycle of the pulse, so that the cells holding the calibration signal
// are read out like a physics event. Commands that arrive while a calibration
// is in progress are ignored. The state is triplicated (kchip_tmr_reg).
// Width range, trigger-after-latency and the disable follow the Kchip
// description; the counting scheme and the ignore rule are this design's.
module kchip_calib_gen #(
  parameter int unsigned LAT_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             calib,      // calibrate command strobe
  input  logic [7:0]       width_m1,   // pulse width minus one
  input  logic [LAT_W-1:0] latency,    // cycles from pulse start to trigger
  input  logic             trig_en,    // automatic calibration trigger enable
  output logic             cal_pulse,  // to the DLL
  output logic             cal_trig    // calibration trigger request (pulse)
);

  typedef struct packed {
    logic             pulse_on;
    logic [7:0]       pulse_left;   // remaining cycles after this one
    logic             lat_on;
    logic [LAT_W-1:0] lat_left;
  } cal_state_t;

  cal_state_t s_q, s_d;
  logic       busy;

  assign busy      = s_q.pulse_on || s_q.lat_on;
  assign cal_pulse = s_q.pulse_on;
  assign cal_trig  = s_q.lat_on && (s_q.lat_left == '0);

  always_comb begin
    s_d = s_q;
    if (s_q.pulse_on) begin
      if (s_q.pulse_left == 8'd0) s_d.pulse_on = 1'b0;
      else                        s_d.pulse_left = s_q.pulse_left - 8'd1;
    end
    if (s_q.lat_on) begin
      if (s_q.lat_left == '0) s_d.lat_on = 1'b0;
      else                    s_d.lat_left = s_q.lat_left - 1'b1;
    end
    if (calib && !busy) begin
      s_d.pulse_on   = 1'b1;
      s_d.pulse_left = width_m1;
      s_d.lat_on     = trig_en;
      s_d.lat_left   = latency;
    end
  end

  kchip_tmr_reg #(.WIDTH($bits(cal_state_t))) u_state (
    .clk(clk), .rst_n(rst_n), .load(1'b1), .d(s_d), .upset(3'b000), .q(s_q)
  );

endmodule
