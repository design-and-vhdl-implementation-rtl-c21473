// tb_data_packager: four flows send PDH bytes at random times. IP_T0 pulses
// come at random intervals, and a simple model of the MAC transmitter raises
// tx_busy for a while after each tx_start. A reference model, running on the
// same clock edges, works out for each pulse which flow is served, the payload
// it owns, the time stamp, the packet and byte counters, and the half used. At
// each tx_start (6 edges after the pulse, 7 when a byte taken before the
// switch is still held) the testbench compares tx_req and the RAM contents (payload
// bytes and the four dynamic words) with that model. It also checks
// pulses missed while busy, and bytes
// dropped when a half is full (a heavy-traffic phase forces overflow).
module tb_data_packager;
  import cea_pkg::*;
  localparam int D_AW = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] pdh_dat [NUM_FLOWS];
  logic [NUM_FLOWS-1:0] pdh_ena = '0;
  logic [31:0] ip_t0_dat = '0;
  logic ip_t0_sig = 1'b0;
  logic d_en;
  logic [3:0] d_we;
  logic [D_AW-1:0] d_addr;
  logic [31:0] d_din;
  logic tx_busy = 1'b0, tx_start;
  tx_req_t tx_req;
  logic [FLOW_W-1:0] flow_id;
  logic [15:0] missed_sync_cnt, overflow_cnt;
  int checks = 0, failures = 0;

  data_packager #(.D_AW(D_AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  // RAM model
  logic [31:0] mem [1 << D_AW];
  always @(posedge clk)
    if (d_en) for (int i = 0; i < 4; i++) if (d_we[i]) mem[d_addr][8*i +: 8] <= d_din[8*i +: 8];

  function automatic logic [7:0] mem_byte(input int baddr);
    return mem[baddr >> 2][31 - 8 * (baddr % 4) -: 8];
  endfunction

  // reference model
  logic [7:0] cur [NUM_FLOWS][$];
  typedef struct { int flow; int half; logic [31:0] ts; logic [7:0] bytes[$]; int sync_cyc; } frame_t;
  frame_t exp_q[$];
  int ref_flow = 0, ref_missed = 0, ref_over = 0, cyc = 0, busy_until = -1;
  int ref_half [NUM_FLOWS], ref_pkts [NUM_FLOWS], ref_bytes [NUM_FLOWS];
  int frames = 0;
  int lat_hist [int];
  initial for (int f = 0; f < NUM_FLOWS; f++) begin ref_half[f] = 0; ref_pkts[f] = 0; ref_bytes[f] = 0; end

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      for (int f = 0; f < NUM_FLOWS; f++)
        if (pdh_ena[f]) begin
          if (cur[f].size() < MAX_PAYLOAD) cur[f].push_back(pdh_dat[f]);
          else ref_over++;
        end
      if (ip_t0_sig) begin
        if (tx_busy || cyc <= busy_until) ref_missed++;
        else begin
          frame_t fr;
          fr.flow = ref_flow; fr.half = ref_half[ref_flow]; fr.ts = ip_t0_dat;
          fr.bytes = cur[ref_flow]; fr.sync_cyc = cyc;
          exp_q.push_back(fr);
          cur[ref_flow] = {};
          ref_half[ref_flow] ^= 1;
          busy_until = cyc + 6;
        end
        ref_flow = (ref_flow + 1) % NUM_FLOWS;
      end
      if (tx_start) begin
        frame_t fr;
        int base;
        check(exp_q.size() > 0, "tx_start without a pulse");
        if (exp_q.size() > 0) begin
          fr = exp_q.pop_front();
          frames++;
          lat_hist[cyc - fr.sync_cyc]++;
          check(cyc - fr.sync_cyc inside {6, 7}, $sformatf("latency %0d", cyc - fr.sync_cyc));
          check(int'(tx_req.flow) == fr.flow, $sformatf("flow %0d exp %0d", tx_req.flow, fr.flow));
          check(int'(tx_req.half) == fr.half, "half");
          check(int'(tx_req.len) == fr.bytes.size(), $sformatf("len %0d exp %0d", tx_req.len, fr.bytes.size()));
          base = ((fr.flow * 2 + fr.half) * HALF_WORDS) * 4;
          for (int i = 0; i < fr.bytes.size(); i++)
            check(mem_byte(base + i) == fr.bytes[i], $sformatf("payload byte %0d of flow %0d", i, fr.flow));
          check(mem[DYN_BASE + fr.flow * 4 + 0] == 32'(ref_pkts[fr.flow]), "packet counter");
          check(mem[DYN_BASE + fr.flow * 4 + 1] == fr.ts, "time stamp");
          check(mem[DYN_BASE + fr.flow * 4 + 2] == 32'(ref_bytes[fr.flow]), "byte counter");
          check(mem[DYN_BASE + fr.flow * 4 + 3] == {16'(fr.bytes.size()), 16'h0}, "packet length");
          ref_pkts[fr.flow]++;
          ref_bytes[fr.flow] += fr.bytes.size();
        end
      end
    end
  end

  // time stamp source
  always @(posedge clk) ip_t0_dat <= ip_t0_dat + 32'd3;

  // transmitter model: busy for a while after each start
  int busy_len = 80;
  always @(posedge clk) begin
    static int left = 0;
    if (tx_start) left = busy_len;
    else if (left > 0) left--;
    tx_busy <= (left > 0) || tx_start;
  end

  // PDH byte sources
  int gap_min = 8, gap_max = 40;
  bit run_src = 1'b0;
  for (genvar g = 0; g < NUM_FLOWS; g++) begin : g_src
    initial begin
      pdh_dat[g] = '0;
      wait (run_src);
      forever begin
        repeat ($urandom_range(gap_min, gap_max) - 1) @(posedge clk);
        pdh_dat[g] <= 8'($urandom);
        pdh_ena[g] <= 1'b1;
        @(posedge clk);
        pdh_ena[g] <= 1'b0;
      end
    end
  end

  task automatic pulse();
    ip_t0_sig <= 1'b1;
    @(posedge clk);
    ip_t0_sig <= 1'b0;
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    run_src = 1'b1;
    // normal traffic
    for (int n = 0; n < 40; n++) begin
      repeat ($urandom_range(150, 400)) @(posedge clk);
      pulse();
    end
    // a pulse while the transmitter is busy
    wait (tx_start);
    repeat (20) @(posedge clk);
    pulse();
    // heavy traffic: halves overflow
    gap_min = 8; gap_max = 8;
    for (int n = 0; n < 12; n++) begin
      repeat (700) @(posedge clk);
      pulse();
    end
    gap_min = 8; gap_max = 40;
    repeat (300) @(posedge clk);
    run_src = 1'b0;
    check(exp_q.size() == 0, "frames never started");
    check(int'(missed_sync_cnt) == ref_missed, $sformatf("missed %0d exp %0d", missed_sync_cnt, ref_missed));
    check(int'(overflow_cnt) == ref_over, $sformatf("overflow %0d exp %0d", overflow_cnt, ref_over));
    check(ref_missed > 0, "no missed pulse happened");
    check(ref_over > 0, "no overflow happened");
    check(lat_hist[6] > 0, "no frame started with the short latency");
    check(frames >= 50, $sformatf("only %0d frames", frames));
    check(int'(flow_id) == ref_flow, "flow id");
    $display("frames=%0d missed=%0d overflow=%0d", frames, ref_missed, ref_over);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
