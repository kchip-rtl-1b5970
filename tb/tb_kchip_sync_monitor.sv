// Testbench for kchip_sync_monitor: random DataValid and AlmostFull patterns,
// enable masks and sequencer states; the per-PACE out-of-sync flags, the
// AlmostFull mismatch flag and their sticky copies are compared with a model
// every cycle, and a clear is checked.
module tb_kchip_sync_monitor;
  logic clk = 0, rst_n = 0, clr = 0, seq_active = 0, af_mismatch_now, af_mismatch_sticky;
  logic [3:0] pace_en = 4'hF, dv = 0, af = 0, oos_now, oos_sticky;
  logic [3:0] m_oos_st = 0;
  logic m_af_st = 0;
  int checks = 0, failures = 0, n_oos = 0, n_afm = 0;

  kchip_sync_monitor #(.N_PACE(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      logic [3:0] e_oos, afe;
      logic e_afm;
      @(negedge clk);
      clr = (n % 500) == 499;
      pace_en = ($urandom % 3 == 0) ? 4'($urandom) : 4'hF;
      seq_active = $urandom % 2;
      // mostly in sync, sometimes one PACE differs
      dv = {4{seq_active}};
      if ($urandom % 5 == 0) dv[$urandom % 4] ^= 1'b1;
      af = {4{1'($urandom % 2)}};
      if ($urandom % 5 == 0) af[$urandom % 4] ^= 1'b1;
      #1;
      e_oos = pace_en & (dv ^ {4{seq_active}});
      afe = af & pace_en;
      e_afm = (afe != 0) && (afe != pace_en);
      checks++;
      if (oos_now != e_oos || af_mismatch_now != e_afm) begin
        failures++; $display("now flags: oos %b want %b, afm %b want %b", oos_now, e_oos, af_mismatch_now, e_afm);
      end
      if (e_oos != 0) n_oos++;
      if (e_afm) n_afm++;
      @(posedge clk); #1;
      if (clr) begin m_oos_st = 0; m_af_st = 0; end
      else begin m_oos_st |= e_oos; m_af_st |= e_afm; end
      checks++;
      if (oos_sticky != m_oos_st || af_mismatch_sticky != m_af_st) begin
        failures++; $display("sticky flags differ");
      end
    end
    checks++;
    if (n_oos == 0 || n_afm == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
