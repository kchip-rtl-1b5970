// Status and control registers (25 registers of 8 bits), reached over I2C.
//   0  CTRL        rw  [0] test mode, [1] trigger inhibit enable,
//                      [2] calibration trigger enable, [3] packet output
//                      enable, [7:4] PACE enable mask          reset 8'hFE
//   1  CAL_WIDTH   rw  calibration pulse width minus one      reset 8'd0
//   2  CAL_DELAY   rw  [3:0] DLL delay step                   reset 8'd0
//   3  CAL_LATENCY rw  cycles from pulse to trigger           reset 8'd128
//   4  STATUS0     ro  [3:0] PACE out of sync, [4] AlmostFull mismatch,
//                      [5] inhibit active, [6] FIFO overflow, [7] bad command
//   5  STATUS1     ro  [3:0] Data FIFO empty, [4] Column FIFO empty,
//                      [5] Trigger FIFO empty, [6] Trigger FIFO full,
//                      [7] almost-full condition
//   6,7   BC       ro  bunch counter, low byte first
//   8-10  EC       ro  event counter, low byte first
//   11,12 NULLS    ro  number of NULL events inserted
//   13    LOST     ro  number of triggers lost (low byte)
//   14,15 ID       ro  ID fuse bits
//   16 FIFO_SEL    rw  0-3 Data FIFO of a PACE, 4 Column Address, 5 Trigger
//   17-20 FIFO_WD  rw  27-bit word to write into the selected FIFO
//   21-23 FIFO_RD  ro  oldest word of the selected FIFO, bits 23:0
//   24 FIFO_CMD    wo  [0] push FIFO_WD, [1] pop, [2] clear sticky status,
//                      [3] flush all FIFOs;  read: FIFO_RD bits 26:24
// Configuration registers are triplicated (kchip_tmr_reg); status is read
// live. Push, pop, clear and flush are one-cycle pulses on the write.
// The register count and the FIFO access follow the Kchip description; the
// map and the reset values are this design's choices.
module kchip_regfile
  import kchip_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [4:0]        idx,
  input  logic              wr_stb,
  input  logic [7:0]        wr_data,
  output logic [7:0]        rd_data,
  // configuration
  output logic              test_mode,
  output logic              inhibit_en,
  output logic              cal_trig_en,
  output logic              out_en,
  output logic [3:0]        pace_en,
  output logic [7:0]        cal_width_m1,
  output logic [3:0]        cal_step,
  output logic [7:0]        cal_latency,
  // status
  input  logic [7:0]        status0,
  input  logic [7:0]        status1,
  input  logic [BC_W-1:0]   bc,
  input  logic [EC_W-1:0]   ec,
  input  logic [15:0]       n_null,
  input  logic [15:0]       n_lost,
  input  logic [15:0]       id_fuses,
  // FIFO access
  output logic [2:0]        fifo_sel,
  output logic [CTRL_W-1:0] fifo_wdata,
  output logic              fifo_push,
  output logic              fifo_pop,
  input  logic [CTRL_W-1:0] fifo_rdata,
  output logic              clr_status,
  output logic              flush
);

  localparam int unsigned N_CFG = 9;
  // triplicated registers: 0..3 and 16..20
  localparam logic [4:0] CFG_IDX [N_CFG] = '{5'd0, 5'd1, 5'd2, 5'd3, 5'd16, 5'd17, 5'd18, 5'd19, 5'd20};
  localparam logic [7:0] CFG_RST [N_CFG] = '{8'hFE, 8'd0, 8'd0, 8'd128, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0};

  logic [7:0] cfg [N_CFG];

  for (genvar k = 0; k < N_CFG; k++) begin : g_cfg
    kchip_tmr_reg #(.WIDTH(8), .RESET(CFG_RST[k])) u_reg (
      .clk(clk), .rst_n(rst_n), .load(wr_stb && idx == CFG_IDX[k]), .d(wr_data),
      .upset(3'b000), .q(cfg[k])
    );
  end

  assign test_mode    = cfg[0][0];
  assign inhibit_en   = cfg[0][1];
  assign cal_trig_en  = cfg[0][2];
  assign out_en       = cfg[0][3];
  assign pace_en      = cfg[0][7:4];
  assign cal_width_m1 = cfg[1];
  assign cal_step     = cfg[2][3:0];
  assign cal_latency  = cfg[3];
  assign fifo_sel     = cfg[4][2:0];
  assign fifo_wdata   = {cfg[8][2:0], cfg[7], cfg[6], cfg[5]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fifo_push  <= 1'b0;
      fifo_pop   <= 1'b0;
      clr_status <= 1'b0;
      flush      <= 1'b0;
    end else begin
      fifo_push  <= wr_stb && idx == 5'd24 && wr_data[0];
      fifo_pop   <= wr_stb && idx == 5'd24 && wr_data[1];
      clr_status <= wr_stb && idx == 5'd24 && wr_data[2];
      flush      <= wr_stb && idx == 5'd24 && wr_data[3];
    end
  end

  always_comb begin
    unique case (idx)
      5'd0:  rd_data = cfg[0];
      5'd1:  rd_data = cfg[1];
      5'd2:  rd_data = cfg[2];
      5'd3:  rd_data = cfg[3];
      5'd4:  rd_data = status0;
      5'd5:  rd_data = status1;
      5'd6:  rd_data = bc[7:0];
      5'd7:  rd_data = {4'h0, bc[11:8]};
      5'd8:  rd_data = ec[7:0];
      5'd9:  rd_data = ec[15:8];
      5'd10: rd_data = ec[23:16];
      5'd11: rd_data = n_null[7:0];
      5'd12: rd_data = n_null[15:8];
      5'd13: rd_data = (n_lost > 16'd255) ? 8'hFF : n_lost[7:0];
      5'd14: rd_data = id_fuses[7:0];
      5'd15: rd_data = id_fuses[15:8];
      5'd16: rd_data = cfg[4];
      5'd17: rd_data = cfg[5];
      5'd18: rd_data = cfg[6];
      5'd19: rd_data = cfg[7];
      5'd20: rd_data = cfg[8];
      5'd21: rd_data = fifo_rdata[7:0];
      5'd22: rd_data = fifo_rdata[15:8];
      5'd23: rd_data = fifo_rdata[23:16];
      5'd24: rd_data = {5'd0, fifo_rdata[26:24]};
      default: rd_data = 8'h00;
    endcase
  end

endmodule
