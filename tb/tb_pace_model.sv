// Behavioural model of the PACE front-end chips as seen by the Kchip, for
// testbenches only. Each trigger (a 100 code on trig_line, or a trig_pulse)
// queues one event; up to FIFO_EV events are held and almost_full is raised
// when AF_EV or more are waiting. An event is read out as N_COL columns: for
// each column DataValid is high for 1+N_SAMP cycles, first carrying the
// column address, then the samples, followed by GAP idle cycles. All chips
// run in lock-step; skew[i] delays chip i by that many cycles to create a
// loss of synchronization. A 101 code empties the queues and restarts the
// event numbering. Values are given by the functions sample_val and
// col_addr so checkers can recompute them.
module tb_pace_model #(
  parameter int N_PACE  = 4,
  parameter int N_COL   = 3,
  parameter int N_SAMP  = 32,
  parameter int GAP     = 59,
  parameter int LAT     = 6,
  parameter int FIFO_EV = 10,
  parameter int AF_EV   = 8
) (
  input  logic        clk,
  input  logic        trig_line,
  input  logic        trig_pulse,
  input  int          skew [N_PACE],
  output logic [11:0] adc [N_PACE],
  output logic [N_PACE-1:0] dv,
  output logic [N_PACE-1:0] af,
  output int          n_rejected
);

  function automatic logic [11:0] sample_val(int p, int ev, int col, int s);
    return 12'((p * 1000 + ev * 37 + col * 97 + s * 13) & 12'hFFF);
  endfunction

  function automatic logic [7:0] col_addr(int ev, int col);
    return 8'((ev * 7 + col * 3) % 192);
  endfunction

  int   pending = 0, ev_num = 0;
  bit   busy = 0;
  int   phase = 0;             // cycle within the current event, negative during latency
  int   cur_ev = 0;
  int   sh = 0, nb = 0;
  localparam int COL_LEN = 1 + N_SAMP + GAP;
  localparam int HIST = 16;
  // history of the reference (unskewed) outputs, for skewed chips
  logic        h_dv [HIST];
  int          h_ev [HIST], h_col [HIST], h_k [HIST];

  initial n_rejected = 0;

  always @(posedge clk) begin
    bit t, rs;
    t = trig_pulse; rs = 0;
    if (nb == 0) begin
      if (trig_line) begin nb = 1; sh = 1; end
    end else begin
      sh = sh * 2 + int'(trig_line); nb++;
      if (nb == 3) begin
        if (sh == 4) t = 1;
        if (sh == 5) rs = 1;
        nb = 0;
      end
    end
    if (rs) begin
      pending = 0; ev_num = 0; busy = 0;
    end
    if (t) begin
      if (pending < FIFO_EV) pending++;
      else n_rejected++;
    end
    // event readout
    if (!busy && pending > 0) begin
      busy = 1; phase = -LAT; cur_ev = ev_num;
    end
    for (int k = HIST - 1; k > 0; k--) begin
      h_dv[k] = h_dv[k-1]; h_ev[k] = h_ev[k-1]; h_col[k] = h_col[k-1]; h_k[k] = h_k[k-1];
    end
    h_dv[0] = 0; h_ev[0] = cur_ev; h_col[0] = 0; h_k[0] = 0;
    if (busy && phase >= 0) begin
      int col, k;
      col = phase / COL_LEN; k = phase % COL_LEN;
      h_col[0] = col; h_k[0] = k;
      h_dv[0] = (k <= N_SAMP);
      phase++;
      if (phase == N_COL * COL_LEN) begin
        busy = 0; pending--; ev_num++;
      end
    end else if (busy) phase++;
    for (int p = 0; p < N_PACE; p++) begin
      int d;
      d = skew[p];
      dv[p]  <= h_dv[d];
      adc[p] <= !h_dv[d] ? 12'h000 :
                (h_k[d] == 0) ? 12'(col_addr(h_ev[d], h_col[d])) : sample_val(p, h_ev[d], h_col[d], h_k[d] - 1);
      af[p]  <= (pending >= AF_EV);
    end
  end

  initial begin
    for (int k = 0; k < HIST; k++) begin h_dv[k] = 0; h_ev[k] = 0; h_col[k] = 0; h_k[k] = 0; end
    dv = '0; af = '0;
    for (int p = 0; p < N_PACE; p++) adc[p] = '0;
  end

endmodule
