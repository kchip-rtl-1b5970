// Trigger-rate workload for kchip_top at its default sizes, with the PACE
// model (10-event queues, about 6.9 us per event) on four PACE chips.
// Triggers arrive with exponentially distributed gaps (a Poisson process)
// first at a mean rate of 100 kHz, then at 200 kHz, 600 triggers each.
// Every packet is checked as in the end-to-end test (EC sequence, NULL
// packets, column words and every sample). At the end no trigger may have
// been lost, no PACE may have rejected a trigger and no FIFO may have
// overflowed; the NULL-event fraction and the highest Data, Column Address
// and Trigger FIFO occupancies are printed.
module tb_kchip_rate;
  import kchip_pkg::*;
  logic clk = 0, rst_n = 0, trig_cmd = 0;
  logic pace_trig, pace_cal;
  logic [11:0] pace_adc [4];
  logic [3:0] pace_dv, pace_af;
  logic [15:0] gol_data;
  logic gol_tx_en, gol_tx_er;
  logic scl, sda, sda_oe;
  int skew [4] = '{0, 0, 0, 0};
  int n_rej;
  int checks = 0, failures = 0;
  int cyc = 0;

  kchip_top dut (
    .clk, .rst_n, .trig_cmd, .pace_trig, .pace_cal, .pace_adc, .pace_dv, .pace_af,
    .gol_data, .gol_tx_en, .gol_tx_er, .scl, .sda_in(sda), .sda_oe,
    .chip_addr(2'b01), .id_fuses(16'hC0DE)
  );

  tb_pace_model #(.GAP(59)) pace (.clk, .trig_line(pace_trig), .trig_pulse(1'b0), .skew(skew),
                                  .adc(pace_adc), .dv(pace_dv), .af(pace_af), .n_rejected(n_rej));
  tb_i2c_master #(.HALF(6)) i2c (.clk, .sda_oe, .scl, .sda);

  always #12.5 clk = ~clk;      // 40 MHz
  always @(posedge clk) cyc++;

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 15) $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // ------------------------------------------------------------ trigger line
  int cmd_cyc[$];        // cycle of each trigger command sent (for BC)
  task automatic send_cmd(logic [2:0] code);
    for (int b = 2; b >= 0; b--) begin
      @(negedge clk); trig_cmd = code[b];
    end
    @(negedge clk); trig_cmd = 0;
    if (code == CMD_TRIGGER) cmd_cyc.push_back(cyc);
  endtask

  // ------------------------------------------------------------ I2C access
  task automatic reg_wr(int r, logic [7:0] v);
    bit ok;
    i2c.write_byte({2'b01, 5'(r)}, v, ok);
    chk(ok, $sformatf("I2C write reg %0d acknowledged", r));
  endtask
  task automatic reg_rd(int r, output logic [7:0] v);
    bit ok;
    i2c.read_byte({2'b01, 5'(r)}, v, ok);
    chk(ok, $sformatf("I2C read reg %0d acknowledged", r));
  endtask

  // ------------------------------------------------------------ GOL decoder
  logic [15:0] cur[$];
  bit   in_pkt = 0;
  int   pace_ev = 0;           // next PACE event number expected
  int   last_ec = 0;
  int   last_bc = -1, last_cmd = -1;
  bit   expect_manual = 0;     // next packet is the hand-loaded test-mode event
  int   n_normal = 0, n_null = 0, n_calib = 0, n_oos = 0, n_two = 0, n_manual = 0;
  int   sof_prev = -1, max_period = 0, n_period = 0;
  logic [3:0] en_now = 4'hF;
  int   idle_cnt = 0;

  task automatic check_pkt();
    logic nul, oos, cal;
    logic [11:0] bcv;
    logic [3:0] en;
    int ec, np, k, nwords;
    logic [127:0] bits;
    int nb, w;
    if (cur.size() < 3) begin chk(0, "short packet"); return; end
    {nul, oos, cal} = cur[0][15:13];
    bcv = cur[0][11:0];
    en  = cur[1][15:12];
    ec  = {cur[1][7:0], cur[2]};
    np  = $countones(en);
    if (expect_manual) begin
      // hand-loaded event: header from the Trigger FIFO words written over I2C
      chk(ec == 24'h00BEEF && bcv == 12'h123 && !nul, "test-mode event header");
      chk(cur.size() == 3 + 3 * np + 72 * np, "test-mode event length");
      n_manual++;
      expect_manual = 0;
      return;
    end
    chk(ec == last_ec + 1, $sformatf("EC %0d after %0d", ec, last_ec));
    last_ec = ec;
    if (!cal && cmd_cyc.size() > 0) begin
      int t;
      t = cmd_cyc.pop_front();
      if (last_cmd >= 0)
        chk(int'(bcv) == (last_bc + (t - last_cmd)) % 3564, $sformatf("BC %0d", bcv));
      last_bc = int'(bcv); last_cmd = t;
    end
    if (nul) begin
      n_null++;
      chk(cur.size() == 3, "NULL packet is header only");
      return;
    end
    chk(en == en_now, "PACE enable field");
    nwords = 3 + 3 * np + 72 * np;
    chk(cur.size() == nwords, $sformatf("packet length %0d want %0d", cur.size(), nwords));
    k = pace_ev++;
    if (cal) n_calib++;
    if (oos) begin n_oos++; return; end
    if (np == 2) n_two++;
    n_normal++;
    if (cur.size() != nwords) return;
    w = 3;
    for (int c = 0; c < 3; c++)
      for (int p = 0; p < 4; p++) if (en[p]) begin
        chk(cur[w] == {2'(p), 2'(c), 4'h0, pace.col_addr(k, c)}, $sformatf("column word ev %0d", k));
        w++;
      end
    bits = 0; nb = 0;
    for (int s = 0; s < 96; s++)
      for (int p = 0; p < 4; p++) if (en[p]) begin
        while (nb < 12) begin bits |= 128'(cur[w]) << nb; nb += 16; w++; end
        checks++;
        if (bits[11:0] != pace.sample_val(p, k, s / 32, s % 32)) begin
          failures++;
          if (failures < 15) $display("FAIL sample ev %0d pace %0d s %0d: %h", k, p, s, bits[11:0]);
        end
        bits >>= 12; nb -= 12;
      end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (gol_tx_er && !gol_tx_en) begin
      if (in_pkt) check_pkt();
      in_pkt = 1; cur.delete();
      if (sof_prev >= 0 && en_now == 4'hF && idle_cnt < 10) begin
        if (cyc - sof_prev > max_period) max_period = cyc - sof_prev;
        n_period++;
      end
      sof_prev = cyc; idle_cnt = 0;
    end else if (gol_tx_en) begin
      if (in_pkt) cur.push_back(gol_data);
      else chk(0, "data word outside a packet");
    end else begin
      idle_cnt++;
      // a long IDLE run ends the packet (there is no end marker)
      if (in_pkt && idle_cnt == 6) begin check_pkt(); in_pkt = 0; end
    end
  end

  // calibration pulse width
  int cal_hi = 0, cal_width_seen = -1;
  always @(posedge clk) begin
    if (pace_cal) cal_hi++;
    else if (cal_hi > 0) begin cal_width_seen = cal_hi; cal_hi = 0; end
  end

  task automatic wait_quiet(int n);
    // wait until the GOL has been idle for n cycles
    int q;
    q = 0;
    while (q < n) begin
      @(negedge clk);
      if (gol_tx_en || gol_tx_er) q = 0; else q++;
    end
  endtask

  // FIFO occupancy high-water marks
  int max_d = 0, max_c = 0, max_t = 0;
  always @(posedge clk) if (rst_n && cyc > 4) begin
    if (int'(dut.g_data_fifo[0].u_df.count) > max_d) max_d = int'(dut.g_data_fifo[0].u_df.count);
    if (int'(dut.u_cf.count) > max_c) max_c = int'(dut.u_cf.count);
    if (int'(dut.u_tf.count) > max_t) max_t = int'(dut.u_tf.count);
  end

  task automatic run_rate(int mean_cycles, int n_trig);
    int n0, z0;
    n0 = n_normal; z0 = n_null;
    for (int n = 0; n < n_trig; n++) begin
      real u;
      int gap;
      u = real'(($urandom % 1000000) + 1) / 1000001.0;
      gap = int'(-$ln(u) * real'(mean_cycles)) - 4;
      if (gap > 0) repeat (gap) @(negedge clk);
      send_cmd(CMD_TRIGGER);
    end
    wait_quiet(3000);
    $display("mean gap %0d cycles: %0d triggers, %0d normal, %0d NULL packets", mean_cycles, n_trig,
             n_normal - n0, n_null - z0);
    chk(n_normal - n0 + n_null - z0 == n_trig, "one packet per trigger");
  endtask

  initial begin
    logic [7:0] v;
    #40 rst_n = 1;
    repeat (20) @(negedge clk);
    send_cmd(CMD_RESYNC);
    repeat (200) @(negedge clk);
    reg_wr(24, 8'h0C);      // flush FIFOs and clear status after power-up
    repeat (20) @(negedge clk);
    run_rate(400, 600);     // 100 kHz at 40 MHz
    run_rate(200, 600);     // 200 kHz
    reg_rd(13, v); chk(v == 8'd0, "no trigger lost");
    reg_rd(4, v);  chk(v == 8'h00, $sformatf("no overflow, no sync error, status %h", v));
    chk(n_rej == 0, "no PACE rejected a trigger");
    chk(n_null > 0, "NULL events inserted at 200 kHz");
    $display("highest occupancy: Data FIFO %0d, Column Address FIFO %0d, Trigger FIFO %0d words",
             max_d, max_c, max_t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
