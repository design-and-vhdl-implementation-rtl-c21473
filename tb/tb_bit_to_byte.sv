// tb_bit_to_byte: sends random bits with random gaps between strobes. Every
// cycle it checks that pdh_ena is high exactly in the cycle after each eighth
// strobe, and that pdh_dat then holds those eight bits, first bit as MSB.
module tb_bit_to_byte;
  logic clk = 1'b0, rst_n = 1'b0;
  logic e1_rx_dat = 1'b0, e1_rx_ena = 1'b0;
  logic [7:0] pdh_dat;
  logic pdh_ena;
  int checks = 0, failures = 0;

  bit_to_byte dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: count strobes seen at each rising edge
  int         nbits = 0, nbytes = 0;
  logic [7:0] acc = '0, exp_byte = '0;
  logic       exp_pulse = 1'b0;
  always @(posedge clk) begin
    exp_pulse <= 1'b0;
    if (rst_n && e1_rx_ena) begin
      acc = {acc[6:0], e1_rx_dat};
      nbits++;
      if (nbits % 8 == 0) begin
        exp_pulse <= 1'b1;
        exp_byte  <= acc;
      end
    end
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (pdh_ena !== exp_pulse) begin
      failures++;
      $display("pdh_ena=%b expected %b at bit %0d", pdh_ena, exp_pulse, nbits);
    end
    if (exp_pulse) begin
      nbytes++;
      checks++;
      if (pdh_dat !== exp_byte) begin
        failures++;
        $display("byte mismatch got %02x exp %02x", pdh_dat, exp_byte);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 2400; n++) begin
      repeat ($urandom_range(0, 3)) begin
        e1_rx_ena <= 1'b0;
        @(posedge clk);
      end
      e1_rx_ena <= 1'b1;
      e1_rx_dat <= 1'($urandom);
      @(posedge clk);
    end
    e1_rx_ena <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (nbytes != 300) begin
      failures++;
      $display("%0d bytes delivered, expected 300", nbytes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
