// Testbench for kchip_trig_decoder: sends random sequences of the four
// three-bit codes separated by random idle gaps and checks that exactly the
// matching strobe pulses, one cycle after the last bit of each command, and
// that nothing is decoded from an idle line.
module tb_kchip_trig_decoder;
  logic clk = 0, rst_n = 0, trig_in = 0;
  logic l1a, calib, resync, cmd_err;
  int checks = 0, failures = 0;
  int n_seen [4];

  kchip_trig_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected strobe vector {cmd_err, resync, calib, l1a} for a code
  function automatic logic [3:0] expect_of(logic [2:0] c);
    case (c)
      3'b100:  return 4'b0001;
      3'b110:  return 4'b0010;
      3'b101:  return 4'b0100;
      default: return 4'b1000;
    endcase
  endfunction

  initial begin
    logic [2:0] codes [4] = '{3'b100, 3'b110, 3'b101, 3'b111};
    #12 rst_n = 1;
    repeat (5) begin
      @(negedge clk);
      checks++;
      if ({cmd_err, resync, calib, l1a} != 0) failures++;
    end
    for (int n = 0; n < 400; n++) begin
      int k;
      k = $urandom % 4;
      for (int b = 2; b >= 0; b--) begin
        @(negedge clk); trig_in = codes[k][b];
        checks++;
        if ({cmd_err, resync, calib, l1a} != 0) begin
          failures++; $display("early strobe during code %b", codes[k]);
        end
      end
      @(negedge clk); trig_in = 0;
      checks++;
      if ({cmd_err, resync, calib, l1a} != expect_of(codes[k])) begin
        failures++;
        $display("code %b: strobes %b", codes[k], {cmd_err, resync, calib, l1a});
      end else n_seen[k]++;
      repeat ($urandom % 4) begin
        @(negedge clk);
        checks++;
        if ({cmd_err, resync, calib, l1a} != 0) failures++;
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_seen[k] == 0) begin failures++; $display("code %0d never decoded", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
