// Dual-ported SRAM: the Kchip FIFO storage macro.
// One write port and one read port on the same clock. The read is synchronous:
// the word at raddr appears on rdata after the clock edge at which re is high.
// A read of the address being written in the same cycle returns the old word.
// Sizes are parameters; the chip uses 1024x18 (Data FIFOs) and 128x27
// (Column Address and Trigger FIFOs). Written as a plain array so synthesis can
// map it to a macro; the contents are not reset, as in a real SRAM.
module kchip_dp_sram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 18,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
