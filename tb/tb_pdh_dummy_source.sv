// tb_pdh_dummy_source: ticks the source at random intervals, rebuilds the
// bytes of each flow from e1_dat/e1_ena, and checks the counting pattern
// (k + 64 f), one strobe per tick in the following cycle, silence while
// disabled, and the restart at byte 0 after enable is dropped.
module tb_pdh_dummy_source;
  import cea_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0, t3_tick = 1'b0;
  logic [NUM_FLOWS-1:0] e1_dat, e1_ena;
  int checks = 0, failures = 0;

  pdh_dummy_source dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // reference
  logic       exp_ena = 1'b0;
  logic [7:0] acc [NUM_FLOWS];
  int         nb [NUM_FLOWS], kexp [NUM_FLOWS];
  initial for (int f = 0; f < NUM_FLOWS; f++) begin acc[f] = 0; nb[f] = 0; kexp[f] = 0; end

  always @(posedge clk) exp_ena <= rst_n && enable && t3_tick;

  always @(negedge clk) if (rst_n) begin
    check(e1_ena === {NUM_FLOWS{exp_ena}}, "e1_ena");
    for (int f = 0; f < NUM_FLOWS; f++) if (e1_ena[f]) begin
      acc[f] = {acc[f][6:0], e1_dat[f]};
      nb[f]++;
      if (nb[f] % 8 == 0) begin
        check(acc[f] == 8'(kexp[f] + 64 * f), $sformatf("flow %0d byte %0d = %02x", f, kexp[f], acc[f]));
        kexp[f]++;
      end
    end
  end

  task automatic run(input int nbits);
    for (int i = 0; i < nbits; i++) begin
      repeat ($urandom_range(0, 3)) begin t3_tick <= 1'b0; @(posedge clk); end
      t3_tick <= 1'b1;
      @(posedge clk);
    end
    t3_tick <= 1'b0;
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    run(40);                     // disabled: no output
    enable <= 1'b1;
    @(posedge clk);
    run(8 * 300);                // wraps the 8-bit pattern
    enable <= 1'b0;
    repeat (3) @(posedge clk);
    for (int f = 0; f < NUM_FLOWS; f++) begin
      check(kexp[f] == 300 && nb[f] == 2400, "byte count");
      kexp[f] = 0; nb[f] = 0;
    end
    enable <= 1'b1;
    @(posedge clk);
    run(8 * 20);                 // restarts at byte 0
    repeat (3) @(posedge clk);
    check(kexp[0] == 20, "restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
