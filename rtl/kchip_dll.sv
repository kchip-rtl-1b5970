// Behavioural model of the calibration-pulse DLL (an analog macro).
// The real block is a delay-locked loop locked to the 40 MHz clock that delays
// the calibration pulse in 16 steps of 3.25 ns. This model reproduces only the
// delay: cal_out follows cal_in after step * STEP_PS picoseconds, using a
// transport delay. It is not synthesizable and stands in for the macro in
// simulation. Step count and step size follow the Kchip description.
module kchip_dll #(
  parameter int unsigned STEPS   = 16,
  parameter int unsigned STEP_PS = 3250
) (
  input  logic                     clk,     // reference clock (lock only)
  input  logic [$clog2(STEPS)-1:0] step,    // delay setting
  input  logic                     cal_in,
  output logic                     cal_out
);

  always @(cal_in or step) begin
    cal_out <= #(step * STEP_PS * 1ps) cal_in;
  end

  // The reference clock only sets the lock point of the real DLL.
  logic unused_clk;
  assign unused_clk = clk;

endmodule
