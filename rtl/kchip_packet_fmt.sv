// Event packet formatter and link layer towards the GOL serializer.
// Each cycle one symbol goes to the GOL: IDLE (tx_en=0, tx_er=0), SOF
// (tx_en=0, tx_er=1) or a 16-bit data word (tx_en=1). IDLE fills the link
// between frames and may also appear inside a frame when data is late; the
// receiver skips it. Both control symbols are signalled on the GOL control
// pins, so they exist in either GOL encoding (CIMT or 8b/10b).
// One packet per trigger, in trigger order, taken from the Trigger FIFO:
//   SOF
//   H0 = {null, out_of_sync, calib, 0, BC[11:0]}
//   H1 = {pace_en[3:0], 4'h0, EC[23:16]}
//   H2 = EC[15:0]
//   then, for a normal event only:
//   3 x N column words, one per column and enabled PACE, as stored in the
//     Column Address FIFO: {pace[1:0], col[1:0], 4'h0, address[7:0]}
//   72 x N data words: the 96 twelve-bit samples of each enabled PACE,
//     taken sample by sample from all enabled Data FIFOs at once (lowest PACE
//     in the lowest bits) and packed back to back, LSB first, into 16-bit words.
// A NULL event (an inhibited trigger) is SOF and the three header words only.
// A normal event is started only when the readout sequencer has reported it
// complete (ev_empty low); in test mode this wait is skipped so FIFOs loaded
// by hand can be sent. With four PACE chips a normal packet is 1+3+12+288 =
// 304 words, sent back to back, plus three IDLE cycles while the next
// trigger entry is read: 307 cycles, 7.7 us per event at 40 MHz.
// The packing keeps up to 64 bits; it is filled while the header is sent, so
// the data words follow without gaps when four PACE chips are enabled.
// The packet content follows the Kchip description (SOF/IDLE, 16-bit words,
// BC/EC, null events, out-of-sync flag); the field layout is this design's.
module kchip_packet_fmt
  import kchip_pkg::*;
#(
  parameter int unsigned N_PACE = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic              test_mode,
  input  logic [N_PACE-1:0] pace_en,
  // Trigger FIFO
  input  logic              tf_empty,
  input  logic [CTRL_W-1:0] tf_dout,
  output logic              tf_pop,
  // Column Address FIFO
  input  logic              cf_empty,
  input  logic [CTRL_W-1:0] cf_dout,
  output logic              cf_pop,
  // Data FIFOs
  input  logic [N_PACE-1:0] df_empty,
  input  logic [DATA_W-1:0] df_dout [N_PACE],
  output logic [N_PACE-1:0] df_pop,
  // event queue of the readout sequencer
  input  logic              ev_empty,
  input  logic              ev_oos,
  output logic              ev_pop,
  // GOL parallel bus
  output logic [15:0]       gol_data,
  output logic              gol_tx_en,
  output logic              gol_tx_er,
  output logic              pkt_done      // pulse at the last word of a packet
);

  typedef enum logic [2:0] {
    F_IDLE, F_W1, F_WAIT, F_SOF, F_H0, F_H1, F_H2, F_COL
  } fst_e;
  // F_COL is followed by the data phase, flagged by data_ph.

  fst_e       st_q, st_d;
  trig_w0_t   w0_q;
  trig_w1_t   w1_q;
  logic       oos_q, data_ph_q, data_ph_d;
  logic [3:0] ncol_q;          // column words left
  logic [6:0] grp_q;           // sample groups left to load (96 per event)
  logic [63:0] acc_q;
  logic [6:0]  cnt_q;          // valid bits in acc_q
  logic [2:0]  npace;
  logic [6:0]  gbits;          // bits per group: 12 per enabled PACE
  logic [47:0] grp;
  link_sym_e   sym;
  logic [15:0] word;
  logic        load, out_ok, loading_ph;
  logic [6:0]  after_out;
  logic [3:0]  ncol_d;
  logic [6:0]  grp_d;
  logic        fst_load;
  col_word_t   cw;

  assign cw = cf_dout;

  always_comb begin
    npace = '0;
    for (int i = 0; i < N_PACE; i++) npace = npace + 3'(pace_en[i]);
    gbits = 7'(npace) * 7'(ADC_W);
  end

  // Group of one sample from each enabled PACE, packed densely.
  always_comb begin
    logic [6:0] off;
    data_word_t dw;
    grp = '0;
    off = '0;
    for (int i = 0; i < N_PACE; i++) begin
      dw = df_dout[i];
      if (pace_en[i]) begin
        grp = grp | (48'(dw.sample) << off);
        off = off + 7'(ADC_W);
      end
    end
  end

  // Bit packer.
  assign loading_ph = (st_q == F_SOF) || (st_q == F_H0) || (st_q == F_H1) ||
                      (st_q == F_H2) || (st_q == F_COL);
  assign out_ok    = data_ph_q && (cnt_q >= 7'd16);
  assign after_out = cnt_q - (out_ok ? 7'd16 : 7'd0);
  assign load      = (loading_ph || data_ph_q) && !w0_q.null_ev && (grp_q != '0) &&
                     ((df_empty & pace_en) == '0) && (after_out + gbits <= 7'd64);
  assign df_pop    = load ? pace_en : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0;
      cnt_q <= '0;
    end else begin
      acc_q <= (out_ok ? (acc_q >> 16) : acc_q) | (load ? (64'(grp) << after_out) : 64'd0);
      cnt_q <= after_out + (load ? gbits : 7'd0);
    end
  end

  // Packet sequencer.
  always_comb begin
    st_d      = st_q;
    data_ph_d = data_ph_q;
    sym       = SYM_IDLE;
    word      = '0;
    tf_pop    = 1'b0;
    cf_pop    = 1'b0;
    ev_pop    = 1'b0;
    ncol_d    = ncol_q;
    grp_d     = grp_q - (load ? 7'd1 : 7'd0);
    pkt_done  = 1'b0;
    fst_load  = 1'b0;
    if (data_ph_q) begin
      if (out_ok) begin
        sym  = SYM_DATA;
        word = acc_q[15:0];
      end
      if (after_out == '0 && grp_q == '0) begin
        data_ph_d = 1'b0;
        pkt_done  = 1'b1;
      end
    end else begin
      unique case (st_q)
        F_IDLE: if (enable && !tf_empty) begin
          tf_pop   = 1'b1;
          fst_load = 1'b1;       // latch word 0
          st_d     = F_W1;
        end
        F_W1: if (!tf_empty) begin
          tf_pop = 1'b1;         // latch word 1
          st_d   = F_WAIT;
        end
        F_WAIT: if (w0_q.null_ev || test_mode || !ev_empty) begin
          ev_pop = !w0_q.null_ev && !test_mode;
          st_d   = F_SOF;
        end
        F_SOF: begin
          sym  = SYM_SOF;
          st_d = F_H0;
        end
        F_H0: begin
          sym  = SYM_DATA;
          word = {w0_q.null_ev, oos_q, w0_q.calib, 1'b0, w0_q.bc};
          st_d = F_H1;
        end
        F_H1: begin
          sym  = SYM_DATA;
          word = {4'(pace_en), 4'h0, w1_q.ec[23:16]};
          st_d = F_H2;
        end
        F_H2: begin
          sym  = SYM_DATA;
          word = w1_q.ec[15:0];
          if (w0_q.null_ev) begin
            st_d     = F_IDLE;
            pkt_done = 1'b1;
          end else begin
            st_d = F_COL;
          end
        end
        F_COL: begin
          if (ncol_q == '0) begin
            st_d      = F_IDLE;
            data_ph_d = 1'b1;
          end else if (!cf_empty) begin
            sym    = SYM_DATA;
            word   = cw[15:0];
            cf_pop = 1'b1;
            ncol_d = ncol_q - 4'd1;
            if (ncol_q == 4'd1) begin
              st_d      = F_IDLE;
              data_ph_d = 1'b1;
            end
          end
        end
        default: st_d = F_IDLE;
      endcase
    end
  end

  // The state is triplicated; data-path registers are not.
  kchip_tmr_reg #(.WIDTH(4)) u_state (
    .clk(clk), .rst_n(rst_n), .load(1'b1), .d({data_ph_d, st_d}), .upset(3'b000),
    .q({data_ph_q, st_q})
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w0_q   <= '0;
      w1_q   <= '0;
      oos_q  <= 1'b0;
      ncol_q <= '0;
      grp_q  <= '0;
    end else begin
      ncol_q <= ncol_d;
      grp_q  <= grp_d;
      if (fst_load) w0_q <= tf_dout;
      if (st_q == F_W1 && tf_pop) w1_q <= tf_dout;
      if (st_q == F_WAIT && st_d == F_SOF) begin
        oos_q  <= ev_pop ? ev_oos : 1'b0;
        ncol_q <= w0_q.null_ev ? 4'd0 : 4'(npace * 3'(N_COL));
        grp_q  <= (w0_q.null_ev || npace == '0) ? 7'd0 : 7'(N_COL * N_SAMP);
      end
    end
  end

  always_comb begin
    gol_data  = word;
    gol_tx_en = (sym == SYM_DATA);
    gol_tx_er = (sym == SYM_SOF);
  end

endmodule
