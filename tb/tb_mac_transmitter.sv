// tb_mac_transmitter: fills models of the Header and Data Block RAMs with
// random words, starts frames of random flow, half and length (0..256 bytes),
// and plays the MAC wrapper: it answers mac_req with mac_start after a random
// delay and takes bytes with mac_ena, either on every clock or with random
// gaps. Each byte taken is compared with the frame built independently from
// the RAM models (14 header words, 14 dynamic bytes, payload). The testbench
// also checks mac_end on the last byte, the start latency (mac_req sampled high
// 5 edges after tx_start), one byte per clock at full rate, and an abort by
// mac_err with its mac_rst pulse.
module tb_mac_transmitter;
  import cea_pkg::*;
  localparam int H_AW = 9, D_AW = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tx_start = 1'b0;
  tx_req_t tx_req = '0;
  logic tx_busy;
  logic h_en, d_en;
  logic [H_AW-1:0] h_addr;
  logic [D_AW-1:0] d_addr;
  logic [31:0] h_dout, d_dout;
  logic mac_req, mac_start = 1'b0, mac_ena = 1'b0, mac_end, mac_err = 1'b0, mac_rst;
  logic [7:0] mac_dat;
  logic [15:0] frames_sent, frames_aborted;
  int checks = 0, failures = 0;

  mac_transmitter #(.H_AW(H_AW), .D_AW(D_AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  logic [31:0] hmem [1 << H_AW];
  logic [31:0] dmem [1 << D_AW];
  always @(posedge clk) begin
    if (h_en) h_dout <= hmem[h_addr];
    if (d_en) d_dout <= dmem[d_addr];
  end

  function automatic logic [7:0] wbyte(input logic [31:0] w, input int k);
    return w[31 - 8 * k -: 8];
  endfunction

  // expected frame
  logic [7:0] exp_f [$];
  task automatic build(input tx_req_t r);
    exp_f = {};
    for (int i = 0; i < STATIC_BYTES; i++)
      exp_f.push_back(wbyte(hmem[int'(r.flow) * HDR_SLOT_WORDS + i / 4], i % 4));
    for (int i = 0; i < DYN_BYTES; i++)
      exp_f.push_back(wbyte(dmem[DYN_BASE + int'(r.flow) * 4 + i / 4], i % 4));
    for (int i = 0; i < int'(r.len); i++)
      exp_f.push_back(wbyte(dmem[(int'(r.flow) * 2 + int'(r.half)) * HALF_WORDS + i / 4], i % 4));
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  // send one frame; gaps=0 means mac_ena on every clock; abort_at>=0 raises mac_err
  task automatic run_frame(input tx_req_t r, input int gaps, input int abort_at);
    int t0, got, t_first, t_last;
    build(r);
    tx_req   <= r;
    tx_start <= 1'b1;
    @(posedge clk);
    t0 = cyc;
    tx_start <= 1'b0;
    while (!mac_req) @(posedge clk);
    check(cyc - t0 == 5, $sformatf("mac_req latency %0d", cyc - t0));
    repeat ($urandom_range(0, 4)) @(posedge clk);
    mac_start <= 1'b1;
    @(posedge clk);
    mac_start <= 1'b0;
    got = 0; t_first = 0; t_last = 0;
    while (got < exp_f.size()) begin
      if (gaps > 0) repeat ($urandom_range(0, gaps)) begin mac_ena <= 1'b0; @(posedge clk); end
      if (got == abort_at) begin
        mac_ena <= 1'b0;
        mac_err <= 1'b1;
        @(posedge clk);
        mac_err <= 1'b0;
        @(posedge clk);
        @(negedge clk);
        check(mac_rst === 1'b1, "mac_rst after abort");
        @(posedge clk);
        @(negedge clk);
        check(mac_rst === 1'b0 && !tx_busy, "idle after abort");
        @(posedge clk);
        return;
      end
      mac_ena <= 1'b1;
      @(posedge clk);
      if (got == 0) t_first = cyc;
      t_last = cyc;
      check(mac_dat === exp_f[got], $sformatf("byte %0d got %02x exp %02x (flow %0d len %0d)", got, mac_dat, exp_f[got], r.flow, r.len));
      check(mac_end === (got == exp_f.size() - 1), $sformatf("mac_end at byte %0d", got));
      got++;
    end
    mac_ena <= 1'b0;
    if (gaps == 0) check(t_last - t_first == exp_f.size() - 1, "not one byte per clock");
    @(posedge clk);
    check(!tx_busy, "busy after frame");
  endtask

  initial begin
    tx_req_t r;
    int sent = 0, aborted = 0;
    foreach (hmem[i]) hmem[i] = $urandom;
    foreach (dmem[i]) dmem[i] = $urandom;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 60; n++) begin
      r.flow = FLOW_W'($urandom);
      r.half = 1'($urandom);
      case (n % 5)
        0: r.len = 9'd256;
        1: r.len = 9'd255;
        2: r.len = 9'd0;
        default: r.len = 9'($urandom_range(1, 256));
      endcase
      if (n == 15 || n == 40) begin
        run_frame(r, 2, 50);
        aborted++;
      end else begin
        run_frame(r, (n % 2) ? 3 : 0, -1);
        sent++;
      end
      repeat ($urandom_range(1, 5)) @(posedge clk);
    end
    check(int'(frames_sent) == sent, $sformatf("frames_sent %0d exp %0d", frames_sent, sent));
    check(int'(frames_aborted) == aborted, "frames_aborted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
