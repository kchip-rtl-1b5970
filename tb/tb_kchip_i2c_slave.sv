// Testbench for kchip_i2c_slave with the bus master tb_i2c_master at
// 3.33 Mbit/s (6 system clocks per half period). Random single-byte writes
// and reads to all 32 registers of the chip's address: each write must give
// one wr_stb with the right index and data, each read must return the byte
// the register side supplies. Transfers to another chip address must not be
// acknowledged and must not write.
module tb_kchip_i2c_slave;
  logic clk = 0, rst_n = 0;
  logic [1:0] chip_addr = 2'b10;
  logic scl, sda, sda_oe, wr_stb, rd_stb;
  logic [4:0] reg_idx;
  logic [7:0] wr_data, rd_data;
  int checks = 0, failures = 0, n_wr = 0;
  logic [4:0] last_idx;
  logic [7:0] last_data;

  kchip_i2c_slave dut (.clk, .rst_n, .chip_addr, .scl, .sda_in(sda), .sda_oe, .reg_idx,
                       .wr_stb, .wr_data, .rd_stb, .rd_data);
  tb_i2c_master #(.HALF(6)) m (.clk, .sda_oe, .scl, .sda);

  assign rd_data = {reg_idx, 3'b000} ^ 8'hA5;

  always #5 clk = ~clk;

  always @(posedge clk) if (wr_stb) begin
    n_wr++; last_idx = reg_idx; last_data = wr_data;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #12 rst_n = 1;
    repeat (10) @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      logic [4:0] idx;
      logic [7:0] v, r;
      bit ok;
      int w0;
      idx = 5'($urandom); v = 8'($urandom);
      w0 = n_wr;
      if ($urandom % 2) begin
        m.write_byte({chip_addr, idx}, v, ok);
        chk(ok, "write acknowledged");
        chk(n_wr == w0 + 1 && last_idx == idx && last_data == v,
            $sformatf("write idx %0d data %h got idx %0d data %h", idx, v, last_idx, last_data));
      end else begin
        m.read_byte({chip_addr, idx}, r, ok);
        chk(ok, "read acknowledged");
        chk(r == ({idx, 3'b000} ^ 8'hA5), $sformatf("read idx %0d got %h", idx, r));
        chk(n_wr == w0, "read does not write");
      end
    end
    begin
      bit ok;
      int w0;
      w0 = n_wr;
      m.write_byte({2'b01, 5'd3}, 8'h55, ok);
      chk(!ok && n_wr == w0, "other chip address ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
