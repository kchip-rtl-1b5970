// Testbench for kchip_tmr_reg: loads values, then injects an upset into each
// single copy and checks that the output never changes and that the copy is
// repaired (a later upset of another copy is still masked). Also checks that
// two simultaneous upsets do change the output, as majority voting implies.
module tb_kchip_tmr_reg;
  logic clk = 0, rst_n = 0, load = 0;
  logic [7:0] d = 0, q;
  logic [2:0] upset = 0;
  int checks = 0, failures = 0;

  kchip_tmr_reg #(.WIDTH(8), .RESET(8'h5C)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s q=%h", what, q); end
  endtask

  initial begin
    #7 chk(q == 8'h5C, "reset value");
    #5 rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      logic [7:0] v;
      v = 8'($urandom);
      @(negedge clk); load = 1; d = v;
      @(negedge clk); load = 0; d = ~v;
      chk(q == v, "load");
      for (int k = 0; k < 3; k++) begin
        upset = 3'b001 << k;
        @(negedge clk); upset = 0;
        chk(q == v, "single upset masked");
        @(negedge clk);
        chk(q == v, "after repair");
      end
    end
    // double upset defeats the vote
    @(negedge clk); load = 1; d = 8'h0F;
    @(negedge clk); load = 0; upset = 3'b011;
    @(negedge clk); upset = 0;
    chk(q == 8'hF0, "double upset flips output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
