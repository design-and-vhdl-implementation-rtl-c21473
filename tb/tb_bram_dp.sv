// tb_bram_dp: random reads and byte-lane writes on both ports of the dual-port
// RAM against a reference array. It checks the one-cycle read latency, byte
// enables, read-before-write on the same port and cross-port visibility.
module tb_bram_dp;
  localparam int DEPTH = 64;
  localparam int AW = 6;
  logic clk = 1'b0;
  logic a_en = 0, b_en = 0;
  logic [3:0] a_we = 0, b_we = 0;
  logic [AW-1:0] a_addr = 0, b_addr = 0;
  logic [31:0] a_din = 0, b_din = 0, a_dout, b_dout;
  int checks = 0, failures = 0;

  bram_dp #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] ref_mem [DEPTH];
  logic [31:0] exp_a, exp_b;
  logic        chk_a, chk_b;

  initial begin
    // fill through port A
    for (int i = 0; i < DEPTH; i++) begin
      ref_mem[i] = $urandom;
      a_en <= 1; a_we <= 4'hf; a_addr <= AW'(i); a_din <= ref_mem[i];
      @(posedge clk);
    end
    a_en <= 0; a_we <= 0;
    @(posedge clk);
    chk_a = 0; chk_b = 0;
    for (int n = 0; n < 4000; n++) begin
      logic [AW-1:0] aa, ba;
      logic [3:0] aw, bw;
      logic [31:0] ad, bd;
      aa = AW'($urandom); ba = AW'($urandom);
      while (ba == aa) ba = AW'($urandom);
      aw = ($urandom_range(0, 1) == 1) ? 4'($urandom) : 4'h0;
      bw = ($urandom_range(0, 1) == 1) ? 4'($urandom) : 4'h0;
      ad = $urandom; bd = $urandom;
      a_en <= 1; a_addr <= aa; a_we <= aw; a_din <= ad;
      b_en <= 1; b_addr <= ba; b_we <= bw; b_din <= bd;
      @(posedge clk);
      #1;
      // read-first: dout holds the old word
      checks += 2;
      if (a_dout !== ref_mem[aa]) begin failures++; $display("A read %0d got %08x exp %08x", aa, a_dout, ref_mem[aa]); end
      if (b_dout !== ref_mem[ba]) begin failures++; $display("B read %0d got %08x exp %08x", ba, b_dout, ref_mem[ba]); end
      for (int i = 0; i < 4; i++) begin
        if (aw[i]) ref_mem[aa][8*i +: 8] = ad[8*i +: 8];
        if (bw[i]) ref_mem[ba][8*i +: 8] = bd[8*i +: 8];
      end
      // hold: disabled port keeps its output
      if (n % 50 == 0) begin
        logic [31:0] hold;
        hold = a_dout;
        a_en <= 0; b_en <= 0;
        @(posedge clk); #1;
        checks++;
        if (a_dout !== hold) begin failures++; $display("A output changed while disabled"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
