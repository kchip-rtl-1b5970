// Testbench for kchip_packet_fmt, with real kchip_fifo instances as its
// Trigger, Column Address and Data FIFOs. The testbench writes events into
// the FIFOs, reports them complete on the event queue, decodes the GOL
// stream and compares every packet with one built independently from the
// same event: header fields, column words and the samples unpacked from the
// 16-bit words. Covered: normal events with four and with two PACE chips,
// NULL events, the out-of-sync and calib flags, a normal event that waits
// for its completion report, and test mode. With four PACE chips a packet
// must be 304 words without gaps and back-to-back events must start 307
// cycles apart.
module tb_kchip_packet_fmt;
  import kchip_pkg::*;
  logic clk = 0, rst_n = 0, enable = 1, test_mode = 0;
  logic [3:0] pace_en = 4'hF;
  logic tf_empty, tf_pop, cf_empty, cf_pop, ev_empty, ev_pop, pkt_done;
  logic [CTRL_W-1:0] tf_dout, cf_dout;
  logic [3:0] df_empty, df_pop;
  logic [DATA_W-1:0] df_dout [4];
  logic ev_oos;
  logic [15:0] gol_data;
  logic gol_tx_en, gol_tx_er;
  // FIFO write side
  logic tf_push = 0, cf_push = 0;
  logic [3:0] df_push = 0;
  logic [CTRL_W-1:0] tf_din = 0, cf_din = 0;
  logic [DATA_W-1:0] df_din [4];
  int n_ev_ready = 0;
  bit oos_q[$];
  int checks = 0, failures = 0;
  // expected packets
  typedef logic [15:0] pkt_t[$];
  pkt_t exp_pkts[$];
  int sof_times[$];
  int cyc = 0;

  kchip_packet_fmt dut (.*);

  kchip_fifo #(.DEPTH(128), .WIDTH(CTRL_W)) u_tf (.clk, .rst_n, .clr(1'b0), .push(tf_push), .din(tf_din),
    .pop(tf_pop), .dout(tf_dout), .empty(tf_empty), .full(), .almost_full(), .overflow(), .count());
  kchip_fifo #(.DEPTH(128), .WIDTH(CTRL_W)) u_cf (.clk, .rst_n, .clr(1'b0), .push(cf_push), .din(cf_din),
    .pop(cf_pop), .dout(cf_dout), .empty(cf_empty), .full(), .almost_full(), .overflow(), .count());
  for (genvar p = 0; p < 4; p++) begin : g_df
    kchip_fifo #(.DEPTH(1024), .WIDTH(DATA_W)) u_df (.clk, .rst_n, .clr(1'b0), .push(df_push[p]),
      .din(df_din[p]), .pop(df_pop[p]), .dout(df_dout[p]), .empty(df_empty[p]), .full(),
      .almost_full(), .overflow(), .count());
  end

  assign ev_empty = (n_ev_ready == 0);
  assign ev_oos   = oos_q.size() > 0 ? oos_q[0] : 1'b0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the event queue is popped after the edge at which ev_pop was seen
  logic pop_seen = 0;
  always @(posedge clk) pop_seen <= ev_pop;
  always @(negedge clk) if (pop_seen) begin
    n_ev_ready--; void'(oos_q.pop_front()); pop_seen <= 0;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 12) $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  function automatic logic [11:0] smp(int ev, int p, int k);
    return 12'((ev * 331 + p * 1237 + k * 7) ^ (k << 5));
  endfunction

  // write one event into the FIFOs and build its expected packet
  task automatic put_event(int ev, bit nul, bit cal, bit oos, logic [3:0] en, bit report);
    trig_w0_t w0;
    trig_w1_t w1;
    logic [15:0] pk[$];
    logic [127:0] bits;
    int nb;
    w0 = '{pad: 0, calib: cal, null_ev: nul, bc: 12'(ev * 101)};
    w1 = '{pad: 0, ec: 24'(ev * 70001)};
    pk.push_back({nul, oos && !nul, cal, 1'b0, w0.bc});
    pk.push_back({en, 4'h0, w1.ec[23:16]});
    pk.push_back(w1.ec[15:0]);
    if (!nul) begin
      for (int c = 0; c < 3; c++)
        for (int p = 0; p < 4; p++) if (en[p]) begin
          col_word_t cw;
          cw = '{pad: 0, pace: 2'(p), col: 2'(c), zero: 0, addr: 8'(ev * 5 + c)};
          @(negedge clk); cf_push = 1; cf_din = cw; @(negedge clk); cf_push = 0;
          pk.push_back(cw[15:0]);
        end
      bits = 0; nb = 0;
      for (int k = 0; k < 96; k++) begin
        @(negedge clk);
        for (int p = 0; p < 4; p++) begin
          df_push[p] = en[p];
          df_din[p] = {4'h0, 2'(k / 32), smp(ev, p, k)};
          if (en[p]) begin
            bits |= 128'(smp(ev, p, k)) << nb; nb += 12;
          end
        end
        while (nb >= 16) begin pk.push_back(bits[15:0]); bits >>= 16; nb -= 16; end
      end
      @(negedge clk); df_push = 0;
    end
    @(negedge clk); tf_push = 1; tf_din = w0; @(negedge clk); tf_din = w1; @(negedge clk); tf_push = 0;
    if (report && !nul) begin oos_q.push_back(oos); n_ev_ready++; end
    exp_pkts.push_back(pk);
  endtask

  // receiver
  int n_pkts = 0, n_null_pkts = 0, n_gap_words = 0;
  logic [15:0] cur[$];
  bit in_pkt = 0;
  int  start_cyc = 0;
  task automatic close_pkt();
    pkt_t e;
    chk(exp_pkts.size() > 0, "unexpected packet");
    if (exp_pkts.size() > 0) begin
      e = exp_pkts.pop_front();
      chk(cur.size() == e.size(), $sformatf("packet %0d length %0d want %0d", n_pkts, cur.size(), e.size()));
      for (int i = 0; i < e.size() && i < cur.size(); i++) begin
        checks++;
        if (cur[i] != e[i]) begin
          chk(0, $sformatf("packet %0d word %0d: %h want %h", n_pkts, i, cur[i], e[i]));
          break;
        end
      end
      if (e.size() == 3) n_null_pkts++;
    end
    n_pkts++;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (gol_tx_er && !gol_tx_en) begin
      if (in_pkt) close_pkt();
      in_pkt = 1; cur.delete(); sof_times.push_back(cyc);
    end else if (gol_tx_en && in_pkt) cur.push_back(gol_data);
    else if (in_pkt && pace_en == 4'hF) n_gap_words++;
    if (pkt_done && in_pkt) begin
      close_pkt(); in_pkt = 0;
    end
  end

  task automatic finish_stream();
    repeat (400) @(negedge clk);
    if (in_pkt) begin close_pkt(); in_pkt = 0; end
  endtask

  initial begin
    for (int p = 0; p < 4; p++) df_din[p] = 0;
    #12 rst_n = 1;
    // two back-to-back four-PACE events, loaded before output is enabled
    enable = 0;
    put_event(1, 0, 0, 0, 4'hF, 1);
    put_event(2, 0, 1, 1, 4'hF, 1);
    put_event(3, 1, 0, 0, 4'hF, 1);
    @(negedge clk); enable = 1;
    repeat (900) @(negedge clk);
    finish_stream();
    chk(n_gap_words == 0, $sformatf("IDLE words inside four-PACE packets: %0d", n_gap_words));
    chk(sof_times.size() == 3 && sof_times[1] - sof_times[0] == 307,
        $sformatf("event period %0d cycles", sof_times.size() > 1 ? sof_times[1] - sof_times[0] : -1));
    // a normal event waits for its completion report
    put_event(4, 0, 0, 0, 4'hF, 0);
    repeat (200) @(negedge clk);
    chk(!in_pkt && n_pkts == 3, "normal event must wait for completion");
    oos_q.push_back(0); n_ev_ready++;
    finish_stream();
    // two PACE chips
    pace_en = 4'b0101;
    put_event(5, 0, 0, 0, 4'b0101, 1);
    put_event(6, 1, 0, 0, 4'b0101, 1);
    finish_stream();
    pace_en = 4'b0010;
    put_event(7, 0, 0, 0, 4'b0010, 1);
    finish_stream();
    // test mode: no completion report needed
    pace_en = 4'hF; test_mode = 1;
    put_event(8, 0, 0, 0, 4'hF, 0);
    finish_stream();
    chk(n_pkts == 8 && exp_pkts.size() == 0, $sformatf("packets %0d", n_pkts));
    chk(n_null_pkts == 2, "null packets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
