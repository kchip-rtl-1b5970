// Testbench for kchip_trig_ctrl. The Trigger FIFO is a queue in the
// testbench. Random triggers, calibration requests, almost-full periods and
// resyncs are applied; every pair of words written is checked against a
// model of BC and EC (BC = cycle count since the last resync, modulo 3564;
// EC = trigger number since the last resync; a calibration request is taken
// one cycle after it is raised, so its BC is one higher), the NULL and calib flags are
// checked, and the serial line to the PACE chips is decoded and must carry
// exactly one 100 code per accepted trigger and one 101 per resync. A full
// Trigger FIFO must make triggers be lost and counted.
module tb_kchip_trig_ctrl;
  import kchip_pkg::*;
  logic clk = 0, rst_n = 0, l1a = 0, cal_trig = 0, resync = 0, inhibit_en = 1, busy_af = 0;
  logic [7:0] tfifo_count;
  logic tfifo_push, pace_trig, pace_l1a, inhibit_now;
  logic [CTRL_W-1:0] tfifo_din;
  logic [BC_W-1:0] bc;
  logic [EC_W-1:0] ec;
  logic [15:0] n_null, n_lost;
  logic [CTRL_W-1:0] q[$];
  int checks = 0, failures = 0;
  int cyc = 0, bc_ref = 0, ec_ref = 0;
  int exp_codes_trig = 0, exp_codes_rsync = 0, got_trig = 0, got_rsync = 0;
  int n_nulls_seen = 0, n_cal_seen = 0, n_lost_ref = 0;
  bit fill_mode = 0;
  // expected entries {null, calib, bc, ec}
  typedef struct { bit nul; bit cal; int bcv; int ecv; } ent_t;
  ent_t exp_q[$];

  kchip_trig_ctrl dut (.*);

  assign tfifo_count = fill_mode ? 8'd127 : 8'(q.size());

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // reference BC runs in lock-step with the DUT's clock
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (resync || bc_ref == 3563) bc_ref <= 0; else bc_ref <= bc_ref + 1;
  end

  // capture FIFO writes
  always @(posedge clk) if (rst_n && tfifo_push) q.push_back(tfifo_din);

  // decode the serial line
  int sh = 0, nb = 0;
  always @(posedge clk) if (rst_n) begin
    if (nb == 0) begin
      if (pace_trig) begin nb = 1; sh = 1; end
    end else begin
      sh = sh * 2 + int'(pace_trig); nb++;
      if (nb == 3) begin
        if (sh == 4) got_trig++; else if (sh == 5) got_rsync++;
        else begin failures++; $display("bad code %b", 3'(sh)); end
        nb = 0;
      end
    end
  end

  task automatic trigger(bit cal);
    @(negedge clk);
    ec_ref++;
    if (cal) cal_trig = 1; else l1a = 1;
    if (fill_mode) n_lost_ref++;
    else begin
      exp_q.push_back('{nul: inhibit_en && busy_af, cal: cal, bcv: (bc_ref + int'(cal)) % 3564, ecv: ec_ref});
      if (!(inhibit_en && busy_af)) exp_codes_trig++;
    end
    @(negedge clk);
    l1a = 0; cal_trig = 0;
    repeat (4 + $urandom % 6) @(negedge clk);
  endtask

  task automatic check_fifo();
    repeat (10) @(negedge clk);
    chk(q.size() == 2 * exp_q.size(), $sformatf("fifo words %0d entries %0d", q.size(), exp_q.size()));
    while (exp_q.size() > 0 && q.size() >= 2) begin
      trig_w0_t w0;
      trig_w1_t w1;
      ent_t e;
      w0 = q.pop_front(); w1 = q.pop_front(); e = exp_q.pop_front();
      chk(int'(w0.bc) == e.bcv, $sformatf("bc %0d want %0d", w0.bc, e.bcv));
      chk(int'(w1.ec) == e.ecv, $sformatf("ec %0d want %0d", w1.ec, e.ecv));
      chk(w0.null_ev == e.nul, "null flag");
      chk(w0.calib == e.cal, "calib flag");
      if (w0.null_ev) n_nulls_seen++;
      if (w0.calib) n_cal_seen++;
    end
  endtask

  initial begin
    #12 rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      busy_af = ($urandom % 4) == 0;
      inhibit_en = ($urandom % 8) != 0;
      trigger(($urandom % 6) == 0);
      if (n % 50 == 25) begin
        check_fifo();
        @(negedge clk); resync = 1; ec_ref = 0; exp_codes_rsync++;
        @(negedge clk); resync = 0;
        repeat (5) @(negedge clk);
        chk(ec == 0, "resync clears EC");
      end
    end
    busy_af = 0;
    check_fifo();
    // full Trigger FIFO: triggers are lost
    fill_mode = 1;
    repeat (3) trigger(0);
    fill_mode = 0;
    repeat (20) @(negedge clk);
    chk(int'(n_lost) == n_lost_ref, $sformatf("lost %0d want %0d", n_lost, n_lost_ref));
    chk(q.size() == 0, "nothing written while full");
    // let BC wrap
    repeat (3700) @(negedge clk);
    chk(int'(bc) == bc_ref, "bc after wrap");
    chk(got_trig == exp_codes_trig, $sformatf("trigger codes %0d want %0d", got_trig, exp_codes_trig));
    chk(got_rsync == exp_codes_rsync, $sformatf("resync codes %0d want %0d", got_rsync, exp_codes_rsync));
    chk(n_nulls_seen > 0 && int'(n_null) == n_nulls_seen, $sformatf("null count %0d seen %0d", n_null, n_nulls_seen));
    chk(n_cal_seen > 0, "calibration triggers seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
