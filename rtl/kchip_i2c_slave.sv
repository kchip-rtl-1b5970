// I2C slave, fully synchronous to the 40 MHz system clock.
// SCL and SDA are resynchronized by two flip-flops and their edges are found
// by comparing with the previous sample, so the interface needs no clock of
// its own; at 40 MHz it follows SCL up to a few Mbit/s.
// Protocol: 7-bit addressing, one data byte per transfer:
//   write: START, {addr, 0}, ACK, data, ACK, STOP
//   read:  START, {addr, 1}, ACK, data from the slave, master NACK, STOP
// The slave answers the 32 addresses whose upper two bits equal chip_addr;
// the lower five bits select the register (reg_idx). A received data byte is
// handed over with a one-cycle wr_stb. For a read, rd_stb pulses when the
// address is acknowledged and rd_data is taken one cycle later.
// sda_oe high pulls SDA low (open drain). The state is triplicated.
// Addressing mode, single-byte transfers and the synchronous design follow the
// Kchip description; the mapping of addresses to registers is this design's.
module kchip_i2c_slave (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] chip_addr,
  input  logic       scl,
  input  logic       sda_in,
  output logic       sda_oe,
  output logic [4:0] reg_idx,
  output logic       wr_stb,
  output logic [7:0] wr_data,
  output logic       rd_stb,
  input  logic [7:0] rd_data
);

  typedef enum logic [3:0] {
    S_IDLE, S_ADDR, S_ACHK, S_ACKA, S_WDATA, S_WCHK, S_ACKW, S_RDATA, S_ACKR, S_WSTOP
  } i2c_st_e;

  typedef struct packed {
    i2c_st_e    st;
    logic [3:0] bitcnt;
    logic       rnw;
    logic       oe;
  } i2c_state_t;

  i2c_state_t s_q, s_d;
  logic [2:0] scl_sh, sda_sh;
  logic       scl_rise, scl_fall, start_c, stop_c, sda_v;
  logic [7:0] sr_q, sr_d, tx_q, tx_d;
  logic       load_tx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_sh <= '1;
      sda_sh <= '1;
    end else begin
      scl_sh <= {scl_sh[1:0], scl};
      sda_sh <= {sda_sh[1:0], sda_in};
    end
  end

  assign scl_rise = scl_sh[1] && !scl_sh[2];
  assign scl_fall = !scl_sh[1] && scl_sh[2];
  assign sda_v    = sda_sh[1];
  assign start_c  = scl_sh[1] && scl_sh[2] && !sda_sh[1] && sda_sh[2];
  assign stop_c   = scl_sh[1] && scl_sh[2] && sda_sh[1] && !sda_sh[2];

  always_comb begin
    s_d    = s_q;
    sr_d   = sr_q;
    tx_d   = load_tx_q ? rd_data : tx_q;
    wr_stb = 1'b0;
    rd_stb = 1'b0;
    if (start_c) begin
      s_d = '{st: S_ADDR, bitcnt: 4'd0, rnw: 1'b0, oe: 1'b0};
    end else if (stop_c) begin
      s_d = '{st: S_IDLE, bitcnt: 4'd0, rnw: 1'b0, oe: 1'b0};
    end else begin
      unique case (s_q.st)
        S_ADDR, S_WDATA: if (scl_rise) begin
          sr_d = {sr_q[6:0], sda_v};
          s_d.bitcnt = s_q.bitcnt + 4'd1;
          if (s_q.bitcnt == 4'd7) s_d.st = (s_q.st == S_ADDR) ? S_ACHK : S_WCHK;
        end
        S_ACHK: if (scl_fall) begin
          if (sr_q[7:6] == chip_addr) begin
            s_d.oe  = 1'b1;
            s_d.rnw = sr_q[0];
            s_d.st  = S_ACKA;
            rd_stb  = sr_q[0];
          end else begin
            s_d.st = S_IDLE;
          end
        end
        S_ACKA: if (scl_fall) begin
          s_d.bitcnt = 4'd0;
          if (s_q.rnw) begin
            s_d.st = S_RDATA;
            s_d.oe = !tx_q[7];
          end else begin
            s_d.st = S_WDATA;
            s_d.oe = 1'b0;
          end
        end
        S_WCHK: if (scl_fall) begin
          s_d.oe = 1'b1;
          wr_stb = 1'b1;
          s_d.st = S_ACKW;
        end
        S_ACKW: if (scl_fall) begin
          s_d.oe = 1'b0;
          s_d.st = S_WSTOP;
        end
        S_RDATA: if (scl_fall) begin
          if (s_q.bitcnt == 4'd7) begin
            s_d.oe = 1'b0;
            s_d.st = S_ACKR;
          end else begin
            tx_d       = {tx_q[6:0], 1'b0};
            s_d.oe     = !tx_q[6];
            s_d.bitcnt = s_q.bitcnt + 4'd1;
          end
        end
        S_ACKR: if (scl_fall) s_d.st = S_WSTOP;   // single byte: ignore the master's ACK
        default: ;
      endcase
    end
  end

  kchip_tmr_reg #(.WIDTH($bits(i2c_state_t))) u_state (
    .clk(clk), .rst_n(rst_n), .load(1'b1), .d(s_d), .upset(3'b000), .q(s_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_q      <= '0;
      tx_q      <= '0;
      load_tx_q <= 1'b0;
      reg_idx   <= '0;
    end else begin
      sr_q      <= sr_d;
      tx_q      <= tx_d;
      load_tx_q <= rd_stb;
      if (s_q.st == S_ACHK && scl_fall) reg_idx <= sr_q[5:1];
    end
  end

  assign sda_oe  = s_q.oe;
  assign wr_data = sr_q;

endmodule
