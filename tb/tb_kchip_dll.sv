// Testbench for the DLL model kchip_dll: for each of the 16 steps, checks
// that a rising and a falling edge of the input appear at the output after
// step x 3.25 ns.
`timescale 1ns/1ps
module tb_kchip_dll;
  logic clk = 0, cal_in = 0, cal_out;
  logic [3:0] step = 0;
  int checks = 0, failures = 0;

  kchip_dll dut (.*);

  always #12.5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, t1, want;
    #100;
    for (int s = 0; s < 16; s++) begin
      step = 4'(s);
      want = s * 3.25;
      #50;
      t0 = $realtime;
      cal_in = 1;
      if (s == 0) #0.001; else wait (cal_out === 1'b1);
      t1 = $realtime;
      checks++;
      if (cal_out !== 1'b1 || (t1 - t0) < want - 0.01 || (t1 - t0) > want + 0.01) begin
        failures++; $display("step %0d rise delay %0.3f want %0.3f", s, t1 - t0, want);
      end
      #60;
      t0 = $realtime;
      cal_in = 0;
      if (s == 0) #0.001; else wait (cal_out === 1'b0);
      t1 = $realtime;
      checks++;
      if (cal_out !== 1'b0 || (t1 - t0) < want - 0.01 || (t1 - t0) > want + 0.01) begin
        failures++; $display("step %0d fall delay %0.3f want %0.3f", s, t1 - t0, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
