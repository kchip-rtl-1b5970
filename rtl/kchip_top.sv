// Kchip: data concentrator for up to four PACE front-end chips.
// Data path: each PACE sends, per trigger, 3 columns of 32 twelve-bit samples
// on its ADC bus. The readout sequencer (kchip_readout_seq) writes the samples
// into one 1024x18 Data FIFO per PACE and the column addresses into the
// 128x27 Column Address FIFO. The packet formatter (kchip_packet_fmt) reads the
// Trigger FIFO (128x27, two words per trigger) and, for every trigger in
// order, sends a packet to the GOL serializer: SOF, header with BC, EC and
// flags, column addresses, then all samples packed into 16-bit words. Between
// packets it sends IDLE.
// Control path: the serial trigger line is decoded (kchip_trig_decoder).
// Triggers get BC/EC identifiers and are forwarded to the PACE chips by
// kchip_trig_ctrl, which gates them and inserts NULL events when a FIFO is
// about to overflow and the inhibit is enabled. A calibrate command makes
// kchip_calib_gen send a calibration pulse (delayed in fine steps by the DLL
// model kchip_dll) and, after the programmed latency, a trigger.
// kchip_sync_monitor compares the PACE DataValid and AlmostFull lines with the
// sequencer and with each other every cycle. Registers and FIFOs are reached
// over I2C (kchip_i2c_slave, kchip_regfile); in test mode the FIFOs can be
// written and read from there. State machines and configuration registers
// are triplicated. One clock domain: the 40 MHz system clock.
// The partitioning follows the Kchip description; the pin-level framing of
// the PACE and GOL buses and the register map are this design's choices.
module kchip_top
  import kchip_pkg::*;
#(
  parameter int unsigned N_PACE      = 4,
  parameter int unsigned DFIFO_DEPTH = kchip_pkg::DATA_DEPTH,
  parameter int unsigned CFIFO_DEPTH = kchip_pkg::CTRL_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  // trigger command line and distribution to the PACE chips
  input  logic              trig_cmd,
  output logic              pace_trig,
  output logic              pace_cal,
  // PACE readout
  input  logic [ADC_W-1:0]  pace_adc [N_PACE],
  input  logic [N_PACE-1:0] pace_dv,
  input  logic [N_PACE-1:0] pace_af,
  // GOL parallel bus
  output logic [15:0]       gol_data,
  output logic              gol_tx_en,
  output logic              gol_tx_er,
  // I2C
  input  logic              scl,
  input  logic              sda_in,
  output logic              sda_oe,
  input  logic [1:0]        chip_addr,
  input  logic [15:0]       id_fuses
);

  localparam int unsigned DCW = $clog2(DFIFO_DEPTH) + 1;
  localparam int unsigned CCW = $clog2(CFIFO_DEPTH) + 1;

  // configuration
  logic              test_mode, inhibit_en, cal_trig_en, out_en;
  logic [3:0]        pace_en_reg;
  logic [N_PACE-1:0] pace_en;
  logic [7:0]        cal_width_m1, cal_latency;
  logic [3:0]        cal_step;

  // trigger path
  logic l1a, calib, resync, cmd_err, cal_trig, cal_pulse_sync, pace_l1a, inhibit_now;
  logic [BC_W-1:0] bc;
  logic [EC_W-1:0] ec;
  logic [15:0]     n_null, n_lost;

  // FIFOs
  logic [N_PACE-1:0] df_push, df_pop, df_empty, df_full, df_af, df_ovf;
  logic [N_PACE-1:0] seq_df_push, fmt_df_pop;
  logic [DATA_W-1:0] df_din [N_PACE];
  logic [DATA_W-1:0] seq_df_din [N_PACE];
  logic [DATA_W-1:0] df_dout [N_PACE];
  logic [DCW-1:0]    df_count [N_PACE];
  logic              cf_push, cf_pop, cf_empty, cf_full, cf_af, cf_ovf, seq_cf_push, fmt_cf_pop;
  logic [CTRL_W-1:0] cf_din, cf_dout, seq_cf_din;
  logic [CCW-1:0]    cf_count;
  logic              tf_push, tf_pop, tf_empty, tf_full, tf_af, tf_ovf, tc_tf_push, fmt_tf_pop;
  logic [CTRL_W-1:0] tf_din, tf_dout, tc_tf_din;
  logic [CCW-1:0]    tf_count;

  // readout and monitoring
  logic              seq_active, ev_empty, ev_oos, ev_pop, seq_af, busy_af;
  logic [4:0]        pend;
  logic [N_PACE-1:0] oos_now, oos_sticky;
  logic              af_mm_now, af_mm_sticky;

  // register access
  logic [4:0]        reg_idx;
  logic              reg_wr, reg_rd, clr_status, flush, reg_push, reg_pop;
  logic [7:0]        reg_wdata, reg_rdata, status0, status1;
  logic [2:0]        fifo_sel;
  logic [CTRL_W-1:0] fifo_wdata, fifo_rdata;
  logic              ovf_sticky, cmd_err_sticky, pkt_done;

  assign pace_en = N_PACE'(pace_en_reg);

  // ---------------------------------------------------------------- trigger
  kchip_trig_decoder u_dec (
    .clk(clk), .rst_n(rst_n), .trig_in(trig_cmd),
    .l1a(l1a), .calib(calib), .resync(resync), .cmd_err(cmd_err)
  );

  kchip_calib_gen #(.LAT_W(8)) u_cal (
    .clk(clk), .rst_n(rst_n), .calib(calib), .width_m1(cal_width_m1),
    .latency(cal_latency), .trig_en(cal_trig_en),
    .cal_pulse(cal_pulse_sync), .cal_trig(cal_trig)
  );

  kchip_dll u_dll (
    .clk(clk), .step(cal_step), .cal_in(cal_pulse_sync), .cal_out(pace_cal)
  );

  assign busy_af = seq_af || tf_af || (|(pace_af & pace_en));

  kchip_trig_ctrl u_tc (
    .clk(clk), .rst_n(rst_n), .l1a(l1a), .cal_trig(cal_trig), .resync(resync),
    .inhibit_en(inhibit_en), .busy_af(busy_af), .tfifo_count(tf_count),
    .tfifo_push(tc_tf_push), .tfifo_din(tc_tf_din), .pace_trig(pace_trig),
    .pace_l1a(pace_l1a), .inhibit_now(inhibit_now), .bc(bc), .ec(ec),
    .n_null(n_null), .n_lost(n_lost)
  );

  // ---------------------------------------------------------------- readout
  kchip_sync_monitor #(.N_PACE(N_PACE)) u_mon (
    .clk(clk), .rst_n(rst_n), .clr(clr_status), .pace_en(pace_en), .dv(pace_dv),
    .af(pace_af), .seq_active(seq_active), .oos_now(oos_now),
    .af_mismatch_now(af_mm_now), .oos_sticky(oos_sticky), .af_mismatch_sticky(af_mm_sticky)
  );

  kchip_readout_seq #(.N_PACE(N_PACE), .DFIFO_DEPTH(DFIFO_DEPTH), .CFIFO_DEPTH(CFIFO_DEPTH)) u_seq (
    .clk(clk), .rst_n(rst_n), .resync(resync), .test_mode(test_mode), .pace_en(pace_en),
    .pace_l1a(pace_l1a), .adc(pace_adc), .dv(pace_dv), .oos_now(oos_now),
    .seq_active(seq_active), .data_push(seq_df_push), .data_din(seq_df_din),
    .data_count(df_count), .col_push(seq_cf_push), .col_din(seq_cf_din), .col_count(cf_count),
    .ev_pop(ev_pop), .ev_empty(ev_empty), .ev_oos(ev_oos), .pend(pend), .fifo_af(seq_af)
  );

  // FIFO write and read sources: the data path, or the register port.
  always_comb begin
    for (int i = 0; i < N_PACE; i++) begin
      df_push[i] = seq_df_push[i] || (reg_push && fifo_sel == 3'(i));
      df_din[i]  = (reg_push && fifo_sel == 3'(i)) ? fifo_wdata[DATA_W-1:0] : seq_df_din[i];
      df_pop[i]  = fmt_df_pop[i] || (reg_pop && fifo_sel == 3'(i));
    end
    cf_push = seq_cf_push || (reg_push && fifo_sel == 3'd4);
    cf_din  = (reg_push && fifo_sel == 3'd4) ? fifo_wdata : seq_cf_din;
    cf_pop  = fmt_cf_pop || (reg_pop && fifo_sel == 3'd4);
    tf_push = tc_tf_push || (reg_push && fifo_sel == 3'd5);
    tf_din  = (reg_push && fifo_sel == 3'd5) ? fifo_wdata : tc_tf_din;
    tf_pop  = fmt_tf_pop || (reg_pop && fifo_sel == 3'd5);
    fifo_rdata = '0;
    for (int i = 0; i < N_PACE; i++)
      if (fifo_sel == 3'(i)) fifo_rdata = CTRL_W'(df_dout[i]);
    if (fifo_sel == 3'd4) fifo_rdata = cf_dout;
    if (fifo_sel == 3'd5) fifo_rdata = tf_dout;
  end

  for (genvar i = 0; i < N_PACE; i++) begin : g_data_fifo
    kchip_fifo #(.DEPTH(DFIFO_DEPTH), .WIDTH(DATA_W), .AF_LEVEL(DFIFO_DEPTH - N_COL * N_SAMP)) u_df (
      .clk(clk), .rst_n(rst_n), .clr(flush), .push(df_push[i]), .din(df_din[i]),
      .pop(df_pop[i]), .dout(df_dout[i]), .empty(df_empty[i]), .full(df_full[i]),
      .almost_full(df_af[i]), .overflow(df_ovf[i]), .count(df_count[i])
    );
  end

  kchip_fifo #(.DEPTH(CFIFO_DEPTH), .WIDTH(CTRL_W), .AF_LEVEL(CFIFO_DEPTH - N_COL * N_PACE)) u_cf (
    .clk(clk), .rst_n(rst_n), .clr(flush), .push(cf_push), .din(cf_din),
    .pop(cf_pop), .dout(cf_dout), .empty(cf_empty), .full(cf_full),
    .almost_full(cf_af), .overflow(cf_ovf), .count(cf_count)
  );

  kchip_fifo #(.DEPTH(CFIFO_DEPTH), .WIDTH(CTRL_W), .AF_LEVEL(CFIFO_DEPTH - 8)) u_tf (
    .clk(clk), .rst_n(rst_n), .clr(flush), .push(tf_push), .din(tf_din),
    .pop(tf_pop), .dout(tf_dout), .empty(tf_empty), .full(tf_full),
    .almost_full(tf_af), .overflow(tf_ovf), .count(tf_count)
  );

  kchip_packet_fmt #(.N_PACE(N_PACE)) u_fmt (
    .clk(clk), .rst_n(rst_n), .enable(out_en), .test_mode(test_mode), .pace_en(pace_en),
    .tf_empty(tf_empty), .tf_dout(tf_dout), .tf_pop(fmt_tf_pop),
    .cf_empty(cf_empty), .cf_dout(cf_dout), .cf_pop(fmt_cf_pop),
    .df_empty(df_empty), .df_dout(df_dout), .df_pop(fmt_df_pop),
    .ev_empty(ev_empty), .ev_oos(ev_oos), .ev_pop(ev_pop),
    .gol_data(gol_data), .gol_tx_en(gol_tx_en), .gol_tx_er(gol_tx_er), .pkt_done(pkt_done)
  );

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ovf_sticky     <= 1'b0;
      cmd_err_sticky <= 1'b0;
    end else if (clr_status) begin
      ovf_sticky     <= 1'b0;
      cmd_err_sticky <= 1'b0;
    end else begin
      ovf_sticky     <= ovf_sticky || (|df_ovf) || cf_ovf || tf_ovf;
      cmd_err_sticky <= cmd_err_sticky || cmd_err;
    end
  end

  always_comb begin
    status0 = {cmd_err_sticky, ovf_sticky, inhibit_now, af_mm_sticky, 4'(oos_sticky)};
    status1 = {busy_af, tf_full, tf_empty, cf_empty, 4'(df_empty)};
  end

  kchip_i2c_slave u_i2c (
    .clk(clk), .rst_n(rst_n), .chip_addr(chip_addr), .scl(scl), .sda_in(sda_in),
    .sda_oe(sda_oe), .reg_idx(reg_idx), .wr_stb(reg_wr), .wr_data(reg_wdata),
    .rd_stb(reg_rd), .rd_data(reg_rdata)
  );

  kchip_regfile u_regs (
    .clk(clk), .rst_n(rst_n), .idx(reg_idx), .wr_stb(reg_wr), .wr_data(reg_wdata),
    .rd_data(reg_rdata), .test_mode(test_mode), .inhibit_en(inhibit_en),
    .cal_trig_en(cal_trig_en), .out_en(out_en), .pace_en(pace_en_reg),
    .cal_width_m1(cal_width_m1), .cal_step(cal_step), .cal_latency(cal_latency),
    .status0(status0), .status1(status1), .bc(bc), .ec(ec), .n_null(n_null),
    .n_lost(n_lost), .id_fuses(id_fuses), .fifo_sel(fifo_sel), .fifo_wdata(fifo_wdata),
    .fifo_push(reg_push), .fifo_pop(reg_pop), .fifo_rdata(fifo_rdata),
    .clr_status(clr_status), .flush(flush)
  );

endmodule
