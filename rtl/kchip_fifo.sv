// FIFO controller around one dual-ported SRAM (kchip_dp_sram).
// Used for the four Data FIFOs (1024x18), the Column Address FIFO and the
// Trigger FIFO (128x27). The output is first-word-fall-through: while empty is
// low, dout holds the oldest word, and pop removes it at the clock edge.
// The SRAM read address is always the read pointer of the next cycle, so a
// popped word is replaced by the next one without a bubble. A written word
// becomes visible two edges after push (one for the write, one for the read),
// which is why empty compares against a one-cycle-delayed write pointer.
// Occupancy (count) and almost_full use the undelayed pointer. A push into a
// full FIFO is dropped and reported by a one-cycle overflow pulse; a pop of an
// empty FIFO is ignored. The almost-full level is this design's choice.
module kchip_fifo #(
  parameter int unsigned DEPTH    = 1024,
  parameter int unsigned WIDTH    = 18,
  parameter int unsigned AF_LEVEL = DEPTH - 96,
  localparam int unsigned AW      = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,          // synchronous flush
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic             almost_full,  // count >= AF_LEVEL
  output logic             overflow,     // push while full (pulse)
  output logic [AW:0]      count
);

  logic [AW:0] wp, rp, wp_vis, rp_nxt;
  logic        do_push, do_pop;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (rp == wp_vis);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rp_nxt  = rp + (AW+1)'(do_pop);
  assign count   = wp - rp;
  assign almost_full = (count >= (AW+1)'(AF_LEVEL));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      wp_vis   <= '0;
      overflow <= 1'b0;
    end else if (clr) begin
      wp       <= '0;
      rp       <= '0;
      wp_vis   <= '0;
      overflow <= 1'b0;
    end else begin
      wp       <= wp + (AW+1)'(do_push);
      rp       <= rp_nxt;
      wp_vis   <= wp;
      overflow <= push && full;
    end
  end

  kchip_dp_sram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_ram (
    .clk  (clk),
    .we   (do_push),
    .waddr(wp[AW-1:0]),
    .wdata(din),
    .re   (1'b1),
    .raddr(rp_nxt[AW-1:0]),
    .rdata(dout)
  );

  a_count_in_range: assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));

endmodule
