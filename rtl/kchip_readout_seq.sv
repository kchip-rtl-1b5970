// Internal readout sequencer (data concentration).
// Each accepted trigger makes every enabled PACE chip send 3 columns of 32
// samples. On its ADC bus a PACE sends one column as DataValid high for 33
// cycles: first the column address (low 8 bits), then the 32 twelve-bit
// samples. The sequencer counts triggers sent to the PACE chips (pace_l1a);
// when one is pending and an enabled PACE raises DataValid, it starts a column
// and expects DataValid for exactly 33 cycles (seq_active, compared per PACE by
// kchip_sync_monitor). A new column can only start after a cycle in which all
// enabled DataValid lines were low, so a late PACE cannot start a column of
// its own. Samples of each enabled PACE go straight into that
// PACE's Data FIFO, one word per cycle. The column addresses are latched in
// the first cycle and written into the shared Column Address FIFO during the
// next cycles, one enabled PACE per cycle. When the third column of an event
// ends, the event is recorded in a small event queue together with an
// out-of-sync flag that is set if any enabled PACE disagreed with the
// sequencer during the event; the packet formatter starts a normal event only
// when this queue is not empty.
// Overflow prevention: fifo_af is raised when the Data or Column Address FIFOs
// could not take every event already triggered (pending and in progress) plus
// one more, so that the trigger inhibit acts before anything is lost.
// In test mode, columns are taken without a pending trigger, so the FIFOs can
// be filled from the ADC bus alone. The state is triplicated.
// Event shape, FIFO use and the monitoring follow the Kchip description; the
// ADC-bus framing, the event queue and the fill rule are this design's choices.
module kchip_readout_seq
  import kchip_pkg::*;
#(
  parameter int unsigned N_PACE     = 4,
  parameter int unsigned DFIFO_DEPTH = kchip_pkg::DATA_DEPTH,
  parameter int unsigned CFIFO_DEPTH = kchip_pkg::CTRL_DEPTH,
  parameter int unsigned EVQ_DEPTH  = 16,
  localparam int unsigned DCW = $clog2(DFIFO_DEPTH) + 1,
  localparam int unsigned CCW = $clog2(CFIFO_DEPTH) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              resync,
  input  logic              test_mode,
  input  logic [N_PACE-1:0] pace_en,
  input  logic              pace_l1a,      // a trigger was sent to the PACE chips
  input  logic [ADC_W-1:0]  adc [N_PACE],
  input  logic [N_PACE-1:0] dv,
  input  logic [N_PACE-1:0] oos_now,       // from the sync monitor
  output logic              seq_active,    // DataValid expected this cycle
  // Data FIFOs
  output logic [N_PACE-1:0] data_push,
  output logic [DATA_W-1:0] data_din [N_PACE],
  input  logic [DCW-1:0]    data_count [N_PACE],
  // Column Address FIFO
  output logic              col_push,
  output logic [CTRL_W-1:0] col_din,
  input  logic [CCW-1:0]    col_count,
  // event queue towards the packet formatter
  input  logic              ev_pop,
  output logic              ev_empty,
  output logic              ev_oos,
  output logic [4:0]        pend,          // triggered events not yet started
  output logic              fifo_af
);

  localparam int unsigned EV_WORDS = N_COL * N_SAMP;   // 96 per PACE

  typedef struct packed {
    logic       active;
    logic       armed;   // all enabled DataValid seen low since the last column
    logic [5:0] cyc;     // 0 = address cycle, 1..32 = samples
    logic [1:0] col;
    logic [4:0] pend;
    logic       ev_oos;
  } seq_state_t;

  seq_state_t s_q, s_d;
  logic [CADDR_W-1:0] caddr_q [N_PACE];
  logic       any_dv, start, last_cyc, ev_done;
  logic [3:0] in_flight;

  assign any_dv   = |(dv & pace_en);
  assign start    = !s_q.active && s_q.armed && any_dv && (s_q.pend != 5'd0 || s_q.col != 2'd0 || test_mode);
  assign seq_active = s_q.active || start;
  assign last_cyc = s_q.active && (s_q.cyc == 6'(N_SAMP));
  assign ev_done  = last_cyc && (s_q.col == 2'(N_COL - 1));
  assign pend     = s_q.pend;

  always_comb begin
    s_d = s_q;
    if (pace_l1a && s_q.pend != '1) s_d.pend = s_q.pend + 5'd1;
    if (!s_q.active && !any_dv) s_d.armed = 1'b1;
    if (start) begin
      s_d.active = 1'b1;
      s_d.armed  = 1'b0;
      s_d.cyc    = 6'd1;
      if (s_q.col == 2'd0) begin
        if (s_q.pend != 5'd0) s_d.pend = s_d.pend - 5'd1;
        s_d.ev_oos = |oos_now;
      end else begin
        s_d.ev_oos = s_q.ev_oos | (|oos_now);
      end
    end else if (s_q.active) begin
      s_d.ev_oos = s_q.ev_oos | (|oos_now);
      if (last_cyc) begin
        s_d.active = 1'b0;
        s_d.cyc    = 6'd0;
        s_d.col    = (s_q.col == 2'(N_COL - 1)) ? 2'd0 : s_q.col + 2'd1;
      end else begin
        s_d.cyc = s_q.cyc + 6'd1;
      end
    end else if (s_q.col == 2'd0) begin
      // a DataValid with no trigger pending is flagged but not stored
      s_d.ev_oos = 1'b0;
    end
    if (resync) s_d = '0;
  end

  kchip_tmr_reg #(.WIDTH($bits(seq_state_t))) u_state (
    .clk(clk), .rst_n(rst_n), .load(1'b1), .d(s_d), .upset(3'b000), .q(s_q)
  );

  // Column addresses: latched at the start, written in cycles 1..N_PACE.
  always_ff @(posedge clk) begin
    for (int i = 0; i < N_PACE; i++)
      if (start) caddr_q[i] <= adc[i][CADDR_W-1:0];
  end

  always_comb begin
    col_word_t cw;
    col_push = 1'b0;
    cw       = '0;
    for (int i = 0; i < N_PACE; i++) begin
      if (s_q.active && s_q.cyc == 6'(i + 1) && pace_en[i]) begin
        col_push = 1'b1;
        cw.pace  = 2'(i);
        cw.col   = s_q.col;
        cw.addr  = caddr_q[i];
      end
    end
    col_din = cw;
  end

  // Samples: one word per cycle into each enabled PACE's Data FIFO.
  always_comb begin
    for (int i = 0; i < N_PACE; i++) begin
      data_word_t dw;
      dw           = '0;
      dw.col       = s_q.col;
      dw.sample    = adc[i];
      data_din[i]  = dw;
      data_push[i] = s_q.active && pace_en[i];
    end
  end

  // Room check for everything already triggered plus one more event.
  always_comb begin
    logic [DCW+3:0] need_d;
    logic [CCW+5:0] need_c;
    in_flight = 4'(s_q.pend > 5'd14 ? 5'd14 : s_q.pend) + 4'(s_q.active || s_q.col != 2'd0) + 4'd1;
    need_d  = (DCW+4)'(in_flight) * (DCW+4)'(EV_WORDS);
    need_c  = (CCW+6)'(in_flight) * (CCW+6)'(N_COL * N_PACE);
    fifo_af = ((CCW+6)'(col_count) + need_c > (CCW+6)'(CFIFO_DEPTH));
    for (int i = 0; i < N_PACE; i++)
      if (pace_en[i] && ((DCW+4)'(data_count[i]) + need_d > (DCW+4)'(DFIFO_DEPTH))) fifo_af = 1'b1;
  end

  // Event queue: one entry per completed event, holding its out-of-sync flag.
  logic [$clog2(EVQ_DEPTH):0] evq_count;
  logic evq_full, evq_af, evq_ovf;
  logic [0:0] evq_dout;

  kchip_fifo #(.DEPTH(EVQ_DEPTH), .WIDTH(1), .AF_LEVEL(EVQ_DEPTH - 1)) u_evq (
    .clk(clk), .rst_n(rst_n), .clr(resync),
    .push(ev_done), .din(s_d.ev_oos),
    .pop(ev_pop), .dout(evq_dout), .empty(ev_empty),
    .full(evq_full), .almost_full(evq_af), .overflow(evq_ovf), .count(evq_count)
  );
  assign ev_oos = evq_dout[0];

endmodule
