// Testbench for kchip_readout_seq with the PACE model (tb_pace_model).
// Phase 1: triggers with all four PACE chips enabled; every Data FIFO and
//   Column Address FIFO write is compared with the values the model sent,
//   each completed event must be queued once with a clear out-of-sync flag,
//   and the DataValid expectation must match every chip.
// Phase 2: only PACE 0, 1 and 3 enabled: PACE 2 must get no writes.
// Phase 3: PACE 1 delayed by one cycle: its events must carry the
//   out-of-sync flag.
// Phase 4: DataValid with no trigger pending is not stored; in test mode
//   it is.
// The almost-full output is compared every cycle with the room rule:
// count + 96 x (pending + in progress + 1) > 1024 for any enabled Data FIFO,
// or the same with 12 words per event for the Column Address FIFO.
module tb_kchip_readout_seq;
  import kchip_pkg::*;
  logic clk = 0, rst_n = 0, resync = 0, test_mode = 0, pace_l1a = 0, trig_pulse = 0;
  logic [3:0] pace_en = 4'hF, dv, af, oos_now, data_push;
  logic [11:0] adc [4];
  logic seq_active, col_push, ev_pop = 0, ev_empty, ev_oos, fifo_af;
  logic [DATA_W-1:0] data_din [4];
  logic [10:0] data_count [4];
  logic [CTRL_W-1:0] col_din;
  logic [7:0] col_count;
  logic [4:0] pend;
  int skew [4] = '{0, 0, 0, 0};
  int n_rej;
  int checks = 0, failures = 0;
  int dcnt [4] = '{0, 0, 0, 0};
  int ccnt = 0;
  int exp_ev = 0;          // event number the next data belongs to
  int dpos [4] = '{0, 0, 0, 0};
  int cpos = 0, cev = 0, cwe = 0;
  bit check_data = 1;

  kchip_readout_seq dut (.*);
  tb_pace_model #(.GAP(20)) pace (.clk(clk), .trig_line(1'b0), .trig_pulse(trig_pulse), .skew(skew),
                                  .adc(adc), .dv(dv), .af(af), .n_rejected(n_rej));

  always_comb begin
    for (int i = 0; i < 4; i++) data_count[i] = 11'(dcnt[i]);
    col_count = 8'(ccnt);
    oos_now = pace_en & (dv ^ {4{seq_active}});
  end

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 12) $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // check FIFO writes against the model
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < 4; p++) if (data_push[p]) begin
      data_word_t w;
      int ev, col, s;
      w = data_din[p];
      ev = dpos[p] / 96; col = (dpos[p] % 96) / 32; s = dpos[p] % 32;
      chk(pace_en[p], "write for a disabled PACE");
      if (check_data)
        chk(w.sample == pace.sample_val(p, ev, col, s) && int'(w.col) == col,
            $sformatf("data p%0d ev%0d col%0d s%0d: %h", p, ev, col, s, w.sample));
      dpos[p]++; dcnt[p]++;
    end
    if (col_push) begin
      col_word_t cw;
      cw = col_din;
      if (check_data)
        chk(cw.addr == pace.col_addr(cev, int'(cw.col)) && pace_en[cw.pace],
            $sformatf("column word ev%0d: %h", cev, cw));
      ccnt++; cpos++; cwe++;
      if (cwe == 3 * $countones(pace_en)) begin cev++; cwe = 0; end
    end
  end

  // room rule, checked away from the clock edge
  always @(negedge clk) if (rst_n) begin
    int in_fl, need_d, need_c;
    bit af_ref;
    in_fl = (int'(pend) > 14 ? 14 : int'(pend)) + int'(dut.s_q.active || dut.s_q.col != 0) + 1;
    need_d = in_fl * 96; need_c = in_fl * 12;
    af_ref = (ccnt + need_c > 128);
    for (int p = 0; p < 4; p++) if (pace_en[p] && dcnt[p] + need_d > 1024) af_ref = 1;
    chk(fifo_af == af_ref, "fifo_af rule");
  end

  task automatic trig();
    @(negedge clk); pace_l1a = 1; trig_pulse = 1;
    @(negedge clk); pace_l1a = 0; trig_pulse = 0;
  endtask

  task automatic drain_events(int n, bit want_oos);
    for (int k = 0; k < n; k++) begin
      int t;
      t = 0;
      while (ev_empty && t < 2000) begin @(negedge clk); t++; end
      chk(!ev_empty, "event completed");
      chk(ev_oos == want_oos, $sformatf("event out-of-sync flag %0d want %0d", ev_oos, want_oos));
      ev_pop = 1; @(negedge clk); ev_pop = 0; @(negedge clk);
    end
  endtask

  initial begin
    #12 rst_n = 1;
    repeat (5) @(negedge clk);
    // phase 1: four PACE chips, 6 events, triggers close together
    for (int k = 0; k < 6; k++) begin trig(); repeat (30) @(negedge clk); end
    drain_events(6, 0);
    repeat (200) @(negedge clk);
    chk(ev_empty && pend == 0, "no extra events");
    for (int p = 0; p < 4; p++) chk(dpos[p] == 6 * 96, $sformatf("pace %0d words %0d", p, dpos[p]));
    chk(cpos == 6 * 12, "column words");
    // phase 2: PACE 2 disabled
    pace_en = 4'b1011;
    for (int p = 0; p < 4; p++) dpos[p] = 6 * 96;
    for (int k = 0; k < 2; k++) begin trig(); repeat (10) @(negedge clk); end
    drain_events(2, 0);
    repeat (200) @(negedge clk);
    chk(dpos[2] == 6 * 96 && dpos[0] == 8 * 96, "disabled PACE not written");
    // phase 3: PACE 1 one cycle late
    pace_en = 4'hF; check_data = 0; skew[1] = 1;
    trig();
    drain_events(1, 1);
    skew[1] = 0;
    trig();
    drain_events(1, 0);
    repeat (200) @(negedge clk);
    // phase 4: DataValid without a trigger
    begin
      int n0;
      n0 = dcnt[0];
      force dv = 4'hF;
      repeat (3) @(negedge clk);
      chk(!seq_active && dcnt[0] == n0, "no capture without trigger");
      test_mode = 1;
      repeat (3) @(negedge clk);
      chk(seq_active && dcnt[0] > n0, "test mode captures");
      release dv;
      test_mode = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
