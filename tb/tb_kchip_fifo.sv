// Testbench for kchip_fifo at the Data FIFO size (1024x18).
// Random pushes and pops against a queue model: checks the first-word-fall-
// through data, empty, full, count, almost_full and the overflow pulse, then
// fills the FIFO completely and drains it, and checks a flush. Also checks
// that a word pushed into an empty FIFO is visible after two clock edges.
module tb_kchip_fifo;
  localparam int DEPTH = 1024, WIDTH = 18, AF = DEPTH - 96;
  logic clk = 0, rst_n = 0, clr = 0, push = 0, pop = 0;
  logic [WIDTH-1:0] din = 0, dout;
  logic empty, full, almost_full, overflow;
  logic [10:0] count;
  logic [WIDTH-1:0] q[$];
  int checks = 0, failures = 0;
  int vis_wait;

  kchip_fifo #(.DEPTH(DEPTH), .WIDTH(WIDTH), .AF_LEVEL(AF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // one clock with the given request; the model follows the same rule
  task automatic step(bit ps, bit pp, logic [WIDTH-1:0] d);
    bit was_full;
    push = ps; pop = pp; din = d;
    was_full = full;
    if (pp && !empty) begin
      chk(dout == q[0], "dout");
      void'(q.pop_front());
    end
    if (ps && !was_full) q.push_back(d);
    @(posedge clk);
    #1;
    chk(overflow == (ps && was_full), "overflow pulse");
    push = 0; pop = 0;
    chk(int'(count) == q.size(), "count");
    chk(full == (q.size() == DEPTH), "full");
    chk(almost_full == (q.size() >= AF), "almost_full");
  endtask

  initial begin
    #12 rst_n = 1;
    @(negedge clk);
    chk(empty && count == 0, "empty after reset");
    // visibility latency
    step(1, 0, 18'h2A5A5);
    chk(empty, "not yet visible after one edge");
    @(posedge clk); #1;
    chk(!empty && dout == 18'h2A5A5, "visible after two edges");
    // random traffic
    for (int n = 0; n < 6000; n++)
      step(($urandom % 4) != 0, ($urandom % 3) == 0 && !empty, WIDTH'($urandom));
    // fill to full, one extra push overflows
    while (q.size() < DEPTH) step(1, 0, WIDTH'($urandom));
    step(1, 0, '1);
    chk(full, "full at depth");
    // drain completely, back to back
    @(posedge clk); #1;
    while (q.size() > 0) begin
      chk(!empty, "data present while draining");
      step(0, 1, '0);
    end
    @(posedge clk); #1;
    chk(empty, "empty after drain");
    // flush
    for (int n = 0; n < 20; n++) step(1, 0, WIDTH'(n));
    clr = 1; @(posedge clk); #1; clr = 0; q.delete();
    chk(count == 0, "flush clears count");
    @(posedge clk); #1;
    chk(empty, "flush empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
