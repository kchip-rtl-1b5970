// I2C bus master for testbenches: single-byte writes and reads with 7-bit
// addresses. HALF is the number of system clocks per half SCL period
// (6 at 40 MHz gives 3.33 Mbit/s). The bus is modelled with wired-AND: the
// slave pulls SDA low through sda_oe.
module tb_i2c_master #(
  parameter int HALF = 6
) (
  input  logic clk,
  input  logic sda_oe,     // from the slave
  output logic scl,
  output logic sda         // bus level seen by everyone
);
  logic m_sda = 1;
  assign sda = m_sda && !sda_oe;
  initial scl = 1;

  task automatic wait_clk(int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic start_c();
    m_sda = 1; scl = 1; wait_clk(HALF);
    m_sda = 0; wait_clk(HALF);
    scl = 0; wait_clk(HALF / 2);
  endtask

  task automatic stop_c();
    scl = 0; m_sda = 0; wait_clk(HALF / 2);
    scl = 1; wait_clk(HALF);
    m_sda = 1; wait_clk(HALF);
  endtask

  // send 8 bits, return the acknowledge (1 = ACK)
  task automatic put_byte(input logic [7:0] b, output bit ack);
    for (int i = 7; i >= 0; i--) begin
      m_sda = b[i]; wait_clk(HALF - HALF / 2);
      scl = 1; wait_clk(HALF);
      scl = 0; wait_clk(HALF / 2);
    end
    m_sda = 1; wait_clk(HALF - HALF / 2);
    scl = 1; wait_clk(HALF / 2);
    ack = !sda;
    wait_clk(HALF - HALF / 2);
    scl = 0; wait_clk(HALF / 2);
  endtask

  task automatic get_byte(output logic [7:0] b, input bit ack);
    m_sda = 1;
    for (int i = 7; i >= 0; i--) begin
      wait_clk(HALF - HALF / 2);
      scl = 1; wait_clk(HALF / 2);
      b[i] = sda;
      wait_clk(HALF - HALF / 2);
      scl = 0; wait_clk(HALF / 2);
    end
    m_sda = !ack; wait_clk(HALF - HALF / 2);
    scl = 1; wait_clk(HALF);
    scl = 0; wait_clk(HALF / 2);
    m_sda = 1;
  endtask

  task automatic write_byte(input logic [6:0] addr, input logic [7:0] data, output bit ok);
    bit a1, a2;
    start_c();
    put_byte({addr, 1'b0}, a1);
    a2 = 0;
    if (a1) put_byte(data, a2);
    stop_c();
    ok = a1 && a2;
  endtask

  task automatic read_byte(input logic [6:0] addr, output logic [7:0] data, output bit ok);
    bit a1;
    start_c();
    put_byte({addr, 1'b1}, a1);
    data = 8'h00;
    if (a1) get_byte(data, 0);
    stop_c();
    ok = a1;
  endtask
endmodule
