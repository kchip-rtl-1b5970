// Testbench for kchip_calib_gen: for random widths (including 1 and 256) and
// latencies, checks that the calibration pulse starts the cycle after the
// command, lasts width cycles, that the calibration trigger comes exactly
// `latency` cycles after the pulse start, that no trigger comes when the
// automatic trigger is disabled, and that a command during a calibration is
// ignored.
module tb_kchip_calib_gen;
  logic clk = 0, rst_n = 0, calib = 0, trig_en = 0;
  logic [7:0] width_m1 = 0, latency = 0;
  logic cal_pulse, cal_trig;
  int checks = 0, failures = 0;

  kchip_calib_gen #(.LAT_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic run(int w, int lat, bit en, bit extra_cmd);
    int t_start, t_end, t_trig, n_trig;
    width_m1 = 8'(w - 1); latency = 8'(lat); trig_en = en;
    @(negedge clk); calib = 1;
    @(negedge clk); calib = 0;
    t_start = -1; t_end = -1; t_trig = -1; n_trig = 0;
    for (int c = 0; c < 600; c++) begin
      if (cal_pulse && t_start < 0) t_start = c;
      if (!cal_pulse && t_start >= 0 && t_end < 0) t_end = c;
      if (cal_trig) begin n_trig++; t_trig = c; end
      if (extra_cmd && c == 2) calib = 1;
      @(negedge clk);
      calib = 0;
    end
    chk(t_start == 0, "pulse starts after command");
    chk(t_end - t_start == w, $sformatf("width %0d got %0d", w, t_end - t_start));
    if (en) chk(n_trig == 1 && t_trig - t_start == lat, $sformatf("latency %0d got %0d", lat, t_trig - t_start));
    else    chk(n_trig == 0, "no trigger when disabled");
  endtask

  initial begin
    #12 rst_n = 1;
    run(1, 10, 1, 0);
    run(256, 200, 1, 0);
    run(5, 0, 1, 0);
    run(40, 128, 0, 0);
    run(7, 30, 1, 1);
    for (int n = 0; n < 20; n++) run(1 + $urandom % 256, $urandom % 256, $urandom % 2, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
