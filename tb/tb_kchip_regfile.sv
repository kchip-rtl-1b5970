// Testbench for kchip_regfile: checks reset values, write and read-back of
// every configuration register and the decoded configuration outputs, that
// read-only registers show their status inputs and ignore writes, the
// assembly of the 27-bit FIFO write word and the FIFO read bytes, and the
// one-cycle push, pop, clear and flush pulses of FIFO_CMD.
module tb_kchip_regfile;
  import kchip_pkg::*;
  logic clk = 0, rst_n = 0, wr_stb = 0;
  logic [4:0] idx = 0;
  logic [7:0] wr_data = 0, rd_data;
  logic test_mode, inhibit_en, cal_trig_en, out_en;
  logic [3:0] pace_en, cal_step;
  logic [7:0] cal_width_m1, cal_latency;
  logic [7:0] status0 = 8'h3C, status1 = 8'hC3;
  logic [BC_W-1:0] bc = 12'hABC;
  logic [EC_W-1:0] ec = 24'h123456;
  logic [15:0] n_null = 16'h0789, n_lost = 16'h0300, id_fuses = 16'hBEEF;
  logic [2:0] fifo_sel;
  logic [CTRL_W-1:0] fifo_wdata, fifo_rdata = 27'h5ABCDEF;
  logic fifo_push, fifo_pop, clr_status, flush;
  int checks = 0, failures = 0;

  kchip_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic wr(int i, logic [7:0] v);
    @(negedge clk); idx = 5'(i); wr_data = v; wr_stb = 1;
    @(negedge clk); wr_stb = 0;
  endtask

  // combinational read: returns the byte of register i
  logic [7:0] rv [25];
  task automatic rd_all();
    for (int i = 0; i < 25; i++) begin
      idx = 5'(i);
      #1;
      rv[i] = rd_data;
    end
  endtask

  initial begin
    logic [7:0] exp_ro [25];
    #12 rst_n = 1;
    @(negedge clk);
    rd_all();
    chk(rv[0] == 8'hFE && rv[3] == 8'd128 && rv[1] == 0 && rv[16] == 0, "reset values");
    chk(!test_mode && inhibit_en && cal_trig_en && out_en && pace_en == 4'hF, "reset configuration");
    // configuration registers
    for (int n = 0; n < 40; n++) begin
      int regs [9] = '{0, 1, 2, 3, 16, 17, 18, 19, 20};
      int r;
      logic [7:0] v;
      r = regs[$urandom % 9]; v = 8'($urandom);
      wr(r, v);
      rd_all();
      chk(rv[r] == v, $sformatf("read back reg %0d", r));
      case (r)
        0: chk({pace_en, out_en, cal_trig_en, inhibit_en, test_mode} == v, "CTRL fields");
        1: chk(cal_width_m1 == v, "CAL_WIDTH");
        2: chk(cal_step == v[3:0], "CAL_DELAY");
        3: chk(cal_latency == v, "CAL_LATENCY");
        16: chk(fifo_sel == v[2:0], "FIFO_SEL");
        default: ;
      endcase
    end
    wr(17, 8'hEF); wr(18, 8'hCD); wr(19, 8'hAB); wr(20, 8'hFD);
    chk(fifo_wdata == 27'h5ABCDEF, "FIFO write word");
    // read-only registers
    exp_ro[4] = 8'h3C; exp_ro[5] = 8'hC3; exp_ro[6] = 8'hBC; exp_ro[7] = 8'h0A;
    exp_ro[8] = 8'h56; exp_ro[9] = 8'h34; exp_ro[10] = 8'h12; exp_ro[11] = 8'h89;
    exp_ro[12] = 8'h07; exp_ro[13] = 8'hFF; exp_ro[14] = 8'hEF; exp_ro[15] = 8'hBE;
    exp_ro[21] = 8'hEF; exp_ro[22] = 8'hCD; exp_ro[23] = 8'hAB; exp_ro[24] = 8'h05;
    rd_all();
    for (int r = 4; r <= 24; r++) if (r <= 15 || r >= 21) begin
      chk(rv[r] == exp_ro[r], $sformatf("status reg %0d = %h want %h", r, rv[r], exp_ro[r]));
    end
    for (int r = 4; r <= 15; r++) begin
      wr(r, 8'h00);
      rd_all();
      chk(rv[r] == exp_ro[r], "read-only register unchanged by a write");
    end
    // command pulses
    for (int b = 0; b < 4; b++) begin
      int seen;
      seen = 0;
      @(negedge clk); idx = 5'd24; wr_data = 8'(1 << b); wr_stb = 1;
      @(negedge clk); wr_stb = 0;
      if ({flush, clr_status, fifo_pop, fifo_push} == 4'(1 << b)) seen++;
      @(negedge clk);
      if ({flush, clr_status, fifo_pop, fifo_push} == 4'b0) seen++;
      chk(seen == 2, $sformatf("command bit %0d pulse", b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
