// End-to-end testbench of kchip_top at its default sizes (four PACE chips,
// 1024x18 Data FIFOs, 128x27 control FIFOs), with the PACE model
// (tb_pace_model) on the trigger line and ADC buses, an I2C master
// (tb_i2c_master) and a decoder of the GOL stream. Every packet is checked:
// EC must count up by one per trigger, BC must advance like the trigger
// command times, column words and all samples must equal what the PACE
// model sent for that event. Scenarios, each of which must occur:
//   - physics triggers at about 100 kHz: normal events;
//   - a burst of triggers: the PACE queues fill, AlmostFull inhibits
//     triggers and NULL events are inserted; nothing is lost;
//   - a calibrate command: calibration pulse of the programmed width on
//     pace_cal and an event flagged calib;
//   - one PACE delayed by a cycle: packets flagged out of sync and the
//     status register bit set, read over I2C;
//   - a resync: EC restarts at 1;
//   - two PACE chips enabled over I2C: shorter packets;
//   - test mode: a word written into a FIFO over I2C is read back over I2C,
//     and an event loaded by hand over I2C is sent on the GOL.
// The four-PACE packet period must not exceed 7.8 us (312 cycles); it is
// measured between packets sent back to back (at most 3 IDLE cycles apart),
// i.e. when the next event was already waiting. Upsets are injected into one
// copy of the triplicated state registers while events are read out; every
// packet must still be correct.
module tb_kchip_top;
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
    repeat (400000) @(posedge clk);
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
      if (sof_prev >= 0 && en_now == 4'hF && idle_cnt <= 3) begin
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

  // Single-event upset injection: flip one of the three copies of a
  // triplicated state register for one clock. Majority voting must hide it.
  int n_seu = 0;
  task automatic inject_seu(int k);
    logic [2:0] c;
    c = 3'b001 << ($urandom % 3);
    @(negedge clk);
    case (k % 7)
      0: force dut.u_dec.u_state.upset = c;
      1: force dut.u_cal.u_state.upset = c;
      2: force dut.u_tc.u_enc.upset = c;
      3: force dut.u_seq.u_state.upset = c;
      4: force dut.u_fmt.u_state.upset = c;
      5: force dut.u_i2c.u_state.upset = c;
      default: force dut.u_regs.g_cfg[0].u_reg.upset = c;
    endcase
    @(negedge clk);
    case (k % 7)
      0: release dut.u_dec.u_state.upset;
      1: release dut.u_cal.u_state.upset;
      2: release dut.u_tc.u_enc.upset;
      3: release dut.u_seq.u_state.upset;
      4: release dut.u_fmt.u_state.upset;
      5: release dut.u_i2c.u_state.upset;
      default: release dut.u_regs.g_cfg[0].u_reg.upset;
    endcase
    n_seu++;
  endtask

  task automatic wait_quiet(int n);
    // wait until the GOL has been idle for n cycles
    int q;
    q = 0;
    while (q < n) begin
      @(negedge clk);
      if (gol_tx_en || gol_tx_er) q = 0; else q++;
    end
  endtask

  initial begin
    logic [7:0] v;
    int n_inh;
    #40 rst_n = 1;
    repeat (20) @(negedge clk);
    // ID fuses
    reg_rd(14, v); chk(v == 8'hDE, "ID fuses low byte");
    reg_rd(15, v); chk(v == 8'hC0, "ID fuses high byte");
    // resync so that BC/EC start from a known point
    send_cmd(CMD_RESYNC);
    repeat (20) @(negedge clk);
    // 1. physics triggers at about 100 kHz (400 cycles mean spacing)
    // with an upset injected into a triplicated register after each trigger
    for (int n = 0; n < 20; n++) begin
      send_cmd(CMD_TRIGGER);
      repeat ($urandom % 300) @(negedge clk);
      inject_seu(n);
      repeat (100 + $urandom % 300) @(negedge clk);
    end
    wait_quiet(400);
    chk(n_normal == 20, $sformatf("normal events %0d", n_normal));
    // 2. burst: inhibit and NULL events
    for (int n = 0; n < 40; n++) begin
      send_cmd(CMD_TRIGGER);
      repeat (2) @(negedge clk);
    end
    wait_quiet(2000);
    reg_rd(11, v); n_inh = v;
    chk(n_null > 0 && n_inh == n_null, $sformatf("NULL events %0d, counter %0d", n_null, n_inh));
    chk(n_rej == 0, "PACE never rejected a trigger");
    reg_rd(4, v);
    chk(v[6] == 0, "no FIFO overflow");
    // 3. calibration: width 20 cycles, latency 40, DLL step 3
    reg_wr(1, 8'd19); reg_wr(3, 8'd40); reg_wr(2, 8'd3);
    send_cmd(CMD_CALIB);
    wait_quiet(800);
    chk(n_calib == 1, "calibration event");
    chk(cal_width_seen == 20, $sformatf("calibration pulse width %0d", cal_width_seen));
    // 4. PACE 2 one cycle late
    reg_rd(4, v);
    chk(v[4:0] == 5'h0, $sformatf("no sync error before the skew, status %h", v));
    skew[2] = 1;
    send_cmd(CMD_TRIGGER);
    wait_quiet(800);
    skew[2] = 0;
    chk(n_oos == 1, "out-of-sync event");
    reg_rd(4, v);
    chk(v[3:0] == 4'b0100, $sformatf("only PACE 2 out of sync, status %h", v));
    reg_wr(24, 8'h04);               // clear sticky status
    reg_rd(4, v);
    chk(v[3:0] == 4'h0, "status cleared");
    // 5. resync: EC restarts, PACE numbering restarts
    send_cmd(CMD_RESYNC);
    repeat (20) @(negedge clk);
    last_ec = 0; pace_ev = 0; last_cmd = -1; last_bc = -1; cmd_cyc.delete();
    send_cmd(CMD_TRIGGER);
    wait_quiet(800);
    chk(last_ec == 1, "EC restarts at 1 after resync");
    // 6. two PACE chips
    reg_wr(0, 8'h3E);                // PACE 0 and 1, other settings unchanged
    en_now = 4'b0011;
    repeat (3) begin send_cmd(CMD_TRIGGER); repeat (500) @(negedge clk); end
    wait_quiet(800);
    chk(n_two == 3, "two-PACE events");
    // 7. test mode, output disabled: write a word into Data FIFO 1 and read it back
    reg_wr(0, 8'h37);                // test mode, out_en = 0
    reg_wr(16, 8'd1);
    reg_wr(17, 8'h34); reg_wr(18, 8'h12); reg_wr(19, 8'h00); reg_wr(20, 8'h00);
    reg_wr(24, 8'h01);               // push
    reg_rd(21, v); chk(v == 8'h34, "FIFO word read back over I2C (low)");
    reg_rd(22, v); chk(v == 8'h12, "FIFO word read back over I2C (high)");
    reg_wr(24, 8'h02);               // pop
    reg_rd(5, v); chk(v[1] == 1'b1, "Data FIFO 1 empty again");
    // test mode: load one two-PACE event over I2C and send it on the GOL
    begin
      reg_wr(16, 8'd4);              // column words
      for (int c = 0; c < 3; c++)
        for (int p = 0; p < 2; p++) begin
          reg_wr(17, 8'(c * 10 + p)); reg_wr(18, {2'(p), 2'(c), 4'h0}); reg_wr(24, 8'h01);
        end
      reg_wr(18, 8'h00);
      for (int p = 0; p < 2; p++) begin
        reg_wr(16, 8'(p));
        for (int s = 0; s < 96; s++) begin
          reg_wr(17, 8'(s)); reg_wr(24, 8'h01);
        end
      end
      reg_wr(16, 8'd5);              // trigger words
      reg_wr(17, 8'h23); reg_wr(18, 8'h01); reg_wr(24, 8'h01);
      reg_wr(17, 8'hEF); reg_wr(18, 8'hBE); reg_wr(24, 8'h01);
      expect_manual = 1;
      reg_wr(0, 8'h3F);              // output on, still test mode
      wait_quiet(800);
      chk(n_manual == 1, "test-mode event sent on the GOL");
    end
    // mechanisms
    chk(n_normal >= 20, "normal events seen");
    chk(n_null > 0, "NULL events seen");
    chk(n_calib > 0, "calibration events seen");
    chk(n_oos > 0, "out-of-sync events seen");
    chk(n_two > 0, "reduced PACE configuration seen");
    chk(n_manual > 0, "test-mode event seen");
    chk(n_seu >= 20, "upsets injected into triplicated registers");
    chk(n_period > 0 && max_period <= 312, $sformatf("packet period %0d cycles", max_period));
    $display("normal %0d null %0d calib %0d oos %0d two-PACE %0d test-mode %0d upsets %0d, max period %0d",
             n_normal, n_null, n_calib, n_oos, n_two, n_manual, n_seu, max_period);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
