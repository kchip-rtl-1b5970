// Testbench for kchip_dp_sram at the Data FIFO size (1024x18).
// Writes a pseudo-random word to every address, reads all back through the
// registered read port, and checks the one-cycle read latency and that a read
// of the address being written returns the old word.
module tb_kchip_dp_sram;
  localparam int DEPTH = 1024, WIDTH = 18;
  logic clk = 0, we = 0, re = 0;
  logic [9:0] waddr = 0, raddr = 0;
  logic [WIDTH-1:0] wdata = 0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  kchip_dp_sram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WIDTH-1:0] pat(int a, int k);
    return WIDTH'((a * 2654435761 + k * 40503) >> 3);
  endfunction

  initial begin
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      we = 1; waddr = 10'(a); wdata = pat(a, 1); model[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      re = 1; raddr = 10'(a);
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        if (failures < 5) $display("read %0d: got %h want %h", a, rdata, model[a]);
      end
    end
    // collision: write new data and read the same address in one cycle
    we = 1; waddr = 10'd77; wdata = pat(77, 2); re = 1; raddr = 10'd77;
    @(negedge clk);
    we = 0;
    checks++;
    if (rdata !== model[77]) begin failures++; $display("collision read not old data"); end
    @(negedge clk);
    checks++;
    if (rdata !== pat(77, 2)) begin failures++; $display("new data not read"); end
    // read enable low holds the output
    re = 0; raddr = 10'd3;
    @(negedge clk);
    checks++;
    if (rdata !== pat(77, 2)) begin failures++; $display("rdata changed with re low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
