// Triple-modular-redundant register for SEU tolerance.
// Every configuration register and state machine state of the Kchip is held in
// three copies. The output is the bitwise majority of the copies, and the
// voted value (or the new value on a load) is written back into all three at
// every clock, so a single upset in one copy is masked at once and repaired at
// the next edge. The upset input flips the selected copies for one cycle; it
// exists for fault-injection tests and is tied to zero in normal use.
// Triplication follows the Kchip description; the refresh scheme and the
// injection input are this design's choices.
module kchip_tmr_reg #(
  parameter int unsigned WIDTH      = 8,
  parameter logic [WIDTH-1:0] RESET = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  input  logic [2:0]       upset,   // fault injection: invert copy k
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] r0, r1, r2;
  logic [WIDTH-1:0] nxt;

  assign q   = (r0 & r1) | (r1 & r2) | (r0 & r2);
  assign nxt = load ? d : q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0 <= RESET;
      r1 <= RESET;
      r2 <= RESET;
    end else begin
      r0 <= upset[0] ? ~nxt : nxt;
      r1 <= upset[1] ? ~nxt : nxt;
      r2 <= upset[2] ? ~nxt : nxt;
    end
  end

endmodule
