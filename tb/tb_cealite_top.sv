// tb_cealite_top: end-to-end test of CEALite at its default sizes. Transmit
// frames are looped back into the receive path.
//
// Models around the design: four E1 sources (one bit strobe every 4 clocks per
// line; byte k of flow f is (k + 64 f) mod 256). An IP_T0 source gives a time
// stamp that counts clocks and a transmission-ready pulse about every 2044
// clocks, so each flow gets a 255- or 256-byte payload per round. A MicroBlaze
// model writes the header and config RAMs during reset and reads every new
// receive record named by idx_ptr. A MAC loopback model answers mac_req, takes
// the frame, appends an FCS and replays it on the receive side.
//
// Checked: the static header of every frame against what was configured; the
// payload bytes of every frame (consecutive pattern values, first byte given
// by the byte counter); packet and byte counters per flow; the payload port
// output; every receive record (flow, counters, length, both time stamps,
// status). Mechanisms that must each happen at least once: a missed pulse, a
// half overflow with the resynchronised stream after it, a transmit abort, a
// frame with a bad FCS, frames dropped by the header analyzer (unknown port,
// foreign MAC), the wrap of the 256-record ring, and the switch from the E1
// lines to the built-in dummy traffic source (whose pattern is checked the
// same way).
module tb_cealite_top;
  import cea_pkg::*;
  localparam int H_AW = 9, C_AW = 9, R_AW = 11;
  localparam int PERIOD = 2044;
  localparam int N_PULSES = 360;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NUM_FLOWS-1:0] e1_rx_dat = '0, e1_rx_ena = '0;
  logic t3_tick = 1'b0, use_dummy = 1'b0;
  logic [31:0] ip_t0_dat = '0;
  logic ip_t0_sig = 1'b0;
  logic mb_h_en = 0, mb_c_en = 0, mb_r_en = 0;
  logic [3:0] mb_h_we = 0, mb_c_we = 0;
  logic [H_AW-1:0] mb_h_addr = '0;
  logic [C_AW-1:0] mb_c_addr = '0;
  logic [R_AW-1:0] mb_r_addr = '0;
  logic [31:0] mb_h_din = '0, mb_c_din = '0, mb_h_dout, mb_c_dout, mb_r_dout;
  logic [R_AW-4:0] idx_ptr;
  logic mac_req, mac_start = 0, mac_ena = 0, mac_end, mac_err = 0, mac_rst;
  logic [7:0] mac_dat;
  logic rx_ena = 0, rx_crc_err = 0;
  logic [7:0] rx_dat = '0;
  logic pay_valid;
  logic [7:0] pay_dat;
  logic [FLOW_W-1:0] pay_flow;
  logic [8:0] pay_idx;
  logic [31:0] pay_pkt_cnt;
  logic [FLOW_W-1:0] flow_id;
  logic [15:0] missed_sync_cnt, overflow_cnt, frames_sent, frames_aborted, rx_admitted_cnt, rx_dropped_cnt;
  int checks = 0, failures = 0;

  cealite_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (N_PULSES * PERIOD + 200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s", msg);
    end
  endtask

  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    ip_t0_dat <= ip_t0_dat + 32'd1;
  end

  // ---------------- configuration ----------------
  localparam logic [47:0] BOARD_MAC = 48'h02_00_5E_10_20_30;
  localparam logic [47:0] PEER_MAC  = 48'h02_00_5E_40_50_60;
  localparam logic [31:0] BOARD_IP  = 32'hC0A8_0A02;
  localparam logic [31:0] PEER_IP   = 32'hC0A8_0A01;
  function automatic logic [15:0] port_of(input int f);
    return 16'(16'd5000 + f);
  endfunction
  // flow 3's port is disabled in the receive table: its frames are dropped
  function automatic bit port_enabled(input int f);
    return f != 3;
  endfunction

  logic [7:0] static_hdr [NUM_FLOWS][STATIC_BYTES];
  task automatic build_headers();
    for (int f = 0; f < NUM_FLOWS; f++) begin
      logic [7:0] h [STATIC_BYTES];
      foreach (h[i]) h[i] = 8'(i * 13 + f);
      for (int i = 0; i < 6; i++) h[i] = BOARD_MAC[47 - 8*i -: 8];
      for (int i = 0; i < 6; i++) h[6 + i] = PEER_MAC[47 - 8*i -: 8];
      for (int i = 0; i < 4; i++) h[34 + i] = PEER_IP[31 - 8*i -: 8];
      for (int i = 0; i < 4; i++) h[OFS_DST_IP + i] = BOARD_IP[31 - 8*i -: 8];
      h[42] = port_of(f)[15:8]; h[43] = port_of(f)[7:0];
      h[OFS_UDP_DPORT] = port_of(f)[15:8]; h[OFS_UDP_DPORT + 1] = port_of(f)[7:0];
      foreach (h[i]) static_hdr[f][i] = h[i];
    end
  endtask

  task automatic mb_write_h(input int a, input logic [31:0] d);
    mb_h_en <= 1; mb_h_we <= 4'hf; mb_h_addr <= H_AW'(a); mb_h_din <= d;
    @(posedge clk);
  endtask
  task automatic mb_write_c(input int a, input logic [31:0] d);
    mb_c_en <= 1; mb_c_we <= 4'hf; mb_c_addr <= C_AW'(a); mb_c_din <= d;
    @(posedge clk);
  endtask

  // ---------------- E1 sources ----------------
  bit run_e1 = 0;
  bit hold_e1 = 0;                 // lines pause at the next byte boundary
  bit [NUM_FLOWS-1:0] e1_held = '0;
  for (genvar g = 0; g < NUM_FLOWS; g++) begin : g_e1
    initial begin
      int k = 0;
      logic [7:0] b;
      wait (run_e1);
      repeat (g) @(posedge clk);
      forever begin
        if (hold_e1) begin
          e1_held[g] = 1'b1;
          wait (0);
        end
        b = 8'(k + 64 * g);
        for (int i = 7; i >= 0; i--) begin
          e1_rx_ena[g] <= 1'b1;
          e1_rx_dat[g] <= b[i];
          @(posedge clk);
          e1_rx_ena[g] <= 1'b0;
          repeat (3) @(posedge clk);
        end
        k++;
      end
    end
  end

  // ---------------- transmit-side checks (on the frames the MAC takes) ----------------
  int last_pc [NUM_FLOWS], next_bc [NUM_FLOWS], offs [NUM_FLOWS];
  bit prev_full [NUM_FLOWS], seen [NUM_FLOWS];
  int after_switch [NUM_FLOWS];   // frames still to pass after the source switch
  int n_switch_resync = 0;
  int n_resync = 0, n_abort = 0, n_crc = 0, n_foreign = 0, n_frames = 0, n_wrap = 0, n_full = 0;
  int lost_len [NUM_FLOWS];
  initial for (int f = 0; f < NUM_FLOWS; f++) begin
    after_switch[f] = 0;
    last_pc[f] = -1; next_bc[f] = 0; offs[f] = 0; prev_full[f] = 0; seen[f] = 0; lost_len[f] = 0;
  end

  typedef struct {
    int flow; logic [31:0] pc, ts, bc; int len; bit crc; logic [7:0] pay[$];
  } rec_t;
  rec_t exp_rec[$];     // records the receive path must produce
  rec_t exp_pay[$];     // frames whose payload must come out of the payload port

  function automatic logic [31:0] be32(input logic [7:0] fr[$], input int o);
    return {fr[o], fr[o+1], fr[o+2], fr[o+3]};
  endfunction

  task automatic check_tx_frame(input logic [7:0] fr[$], output int flow, output rec_t r);
    int len;
    flow = -1;
    len = fr.size() - HDR_BYTES;
    for (int f = 0; f < NUM_FLOWS; f++)
      if (fr[OFS_UDP_DPORT] == port_of(f)[15:8] && fr[OFS_UDP_DPORT+1] == port_of(f)[7:0]) flow = f;
    check(flow >= 0, "frame with unknown port");
    if (flow < 0) return;
    for (int i = 0; i < STATIC_BYTES; i++) check(fr[i] == static_hdr[flow][i], $sformatf("static header byte %0d", i));
    r.flow = flow;
    r.pc   = be32(fr, 56);
    r.ts   = be32(fr, 60);
    r.bc   = be32(fr, 64);
    r.len  = len;
    r.crc  = 0;
    check({fr[68], fr[69]} == 16'(len), "packet length field");
    check(len >= 0 && len <= MAX_PAYLOAD, "payload length range");
    check(int'(r.pc) == last_pc[flow] + 1, $sformatf("packet counter flow %0d: %0d after %0d", flow, r.pc, last_pc[flow]));
    check(int'(r.bc) == next_bc[flow], $sformatf("byte counter flow %0d", flow));
    last_pc[flow] = int'(r.pc);
    next_bc[flow] = int'(r.bc) + len;
    for (int i = 0; i < len; i++) r.pay.push_back(fr[HDR_BYTES + i]);
    // payload: consecutive pattern, first byte from the byte counter
    if (after_switch[flow] == 2) begin
      // this frame holds bytes of both sources: only the next one can be checked
      after_switch[flow] = 1;
    end else if (len > 0) begin
      logic [7:0] exp0;
      if (after_switch[flow] == 1) begin
        offs[flow] = int'(fr[HDR_BYTES]) - int'(r.bc) - 64 * flow;
        after_switch[flow] = 0;
        n_switch_resync++;
      end
      exp0 = 8'(int'(r.bc) + offs[flow] + 64 * flow);
      if (fr[HDR_BYTES] != exp0 && prev_full[flow]) begin
        // bytes were dropped at the end of the previous (full) half
        offs[flow] = int'(fr[HDR_BYTES]) - int'(r.bc) - 64 * flow;
        n_resync++;
        exp0 = fr[HDR_BYTES];
      end
      if (seen[flow]) check(fr[HDR_BYTES] == exp0, $sformatf("first payload byte flow %0d", flow));
      for (int i = 1; i < len; i++)
        check(fr[HDR_BYTES + i] == 8'(fr[HDR_BYTES] + i), $sformatf("payload byte %0d flow %0d", i, flow));
    end
    seen[flow] = 1;
    prev_full[flow] = (len == MAX_PAYLOAD);
    if (len == MAX_PAYLOAD) n_full++;
  endtask

  // ---------------- MAC loopback model ----------------
  int abort_frame = 40, crc_frame = 77, foreign_frame = 120;
  initial begin
    logic [7:0] fr[$];
    int flow, tx_n = 0;
    rec_t r;
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (!mac_req) continue;
      repeat ($urandom_range(0, 3)) @(posedge clk);
      mac_start <= 1'b1;
      @(posedge clk);
      mac_start <= 1'b0;
      fr = {};
      tx_n++;
      if (tx_n == abort_frame) begin
        // the wrapper gives up after the header; the frame is lost, and its
        // packet number and payload leave a gap in the counters of its flow
        repeat (HDR_BYTES) begin
          mac_ena <= 1'b1;
          @(posedge clk);
          fr.push_back(mac_dat);
        end
        mac_ena <= 1'b0;
        mac_err <= 1'b1;
        @(posedge clk);
        mac_err <= 1'b0;
        n_abort++;
        for (int f = 0; f < NUM_FLOWS; f++)
          if (fr[OFS_UDP_DPORT] == port_of(f)[15:8] && fr[OFS_UDP_DPORT+1] == port_of(f)[7:0]) begin
            last_pc[f] = last_pc[f] + 1;
            next_bc[f] = next_bc[f] + int'({fr[68], fr[69]});
          end
        continue;
      end
      forever begin
        mac_ena <= 1'b1;
        @(posedge clk);
        fr.push_back(mac_dat);
        if (mac_end) break;
      end
      mac_ena <= 1'b0;
      n_frames++;
      check_tx_frame(fr, flow, r);
      if (flow < 0) continue;
      r.crc = (tx_n == crc_frame);
      if (r.crc) n_crc++;
      if (port_enabled(flow)) begin
        exp_rec.push_back(r);
        exp_pay.push_back(r);
      end
      // replay on the receive side, FCS appended
      repeat (12) @(posedge clk);
      for (int i = 0; i < fr.size() + FCS_BYTES; i++) begin
        rx_ena <= 1'b1;
        rx_dat <= (i < fr.size()) ? fr[i] : 8'($urandom);
        @(posedge clk);
      end
      rx_ena     <= 1'b0;
      rx_crc_err <= r.crc;
      @(posedge clk);
      rx_crc_err <= 1'b0;
      if (tx_n == foreign_frame) begin
        // a frame for another station
        repeat (20) @(posedge clk);
        fr[0] ^= 8'h01;
        for (int i = 0; i < fr.size() + FCS_BYTES; i++) begin
          rx_ena <= 1'b1;
          rx_dat <= (i < fr.size()) ? fr[i] : 8'h00;
          @(posedge clk);
        end
        rx_ena <= 1'b0;
        n_foreign++;
      end
    end
  end

  // ---------------- payload port ----------------
  rec_t cur_pay;
  bit   have_pay = 0;
  int   pay_pos = 0, pay_frames = 0;
  always @(negedge clk) if (rst_n && pay_valid) begin
    if (!have_pay || pay_pos >= cur_pay.len) begin
      check(exp_pay.size() > 0, "payload without frame");
      if (exp_pay.size() > 0) begin
        cur_pay = exp_pay.pop_front();
        pay_frames++;
      end
      have_pay = 1;
      pay_pos = 0;
    end
    check(int'(pay_flow) == cur_pay.flow && pay_pkt_cnt == cur_pay.pc && int'(pay_idx) == pay_pos &&
          pay_dat == cur_pay.pay[pay_pos], $sformatf("payload port byte %0d", pay_pos));
    pay_pos++;
  end

  // ---------------- MicroBlaze model: reads each new record ----------------
  int n_rec = 0;
  initial begin
    logic [R_AW-4:0] last;
    logic [31:0] w [REC_WORDS];
    rec_t e;
    wait (rst_n);
    last = '1;
    forever begin
      @(posedge clk);
      if (idx_ptr == last) continue;
      check(idx_ptr == last + 1'b1, "idx_ptr skipped a record");
      if (idx_ptr == 0 && n_rec > 0) n_wrap++;
      last = idx_ptr;
      for (int k = 0; k < REC_WORDS; k++) begin
        mb_r_en <= 1'b1;
        mb_r_addr <= {last, 3'(k)};
        @(posedge clk);
        mb_r_en <= 1'b0;
        @(negedge clk);
        w[k] = mb_r_dout;
      end
      n_rec++;
      check(exp_rec.size() > 0, "record without frame");
      if (exp_rec.size() == 0) continue;
      e = exp_rec.pop_front();
      check(w[REC_FLOW_ID] == 32'(e.flow), "record flow");
      check(w[REC_PKT_CNT] == e.pc, "record packet counter");
      check(w[REC_BYTE_CNT] == e.bc, "record byte counter");
      check(w[REC_PKT_LEN] == 32'(e.len), "record packet length");
      check(w[REC_TX_TSTAMP] == e.ts, "record send time stamp");
      check(w[REC_RX_TSTAMP] > e.ts && w[REC_RX_TSTAMP] - e.ts < 32'd1000, "record receive time stamp");
      check(w[REC_STATUS] == {30'd0, 1'b0, e.crc}, "record status");
    end
  end

  // ---------------- IP_T0 pulses ----------------
  int pulses = 0, missed_at = 150, switch_at = 300;
  // station clock tick for the dummy source: one bit every 4 clocks
  always @(posedge clk) t3_tick <= (cyc % 4 == 1);
  initial begin
    build_headers();
    // the MicroBlaze configures the RAMs while the logic is held in reset
    for (int f = 0; f < NUM_FLOWS; f++)
      for (int w = 0; w < STATIC_BYTES / 4; w++)
        mb_write_h(f * HDR_SLOT_WORDS + w, {static_hdr[f][4*w], static_hdr[f][4*w+1], static_hdr[f][4*w+2], static_hdr[f][4*w+3]});
    mb_h_en <= 0; mb_h_we <= 0;
    mb_write_c(CFG_MAC_HI, BOARD_MAC[47:16]);
    mb_write_c(CFG_MAC_LO, {BOARD_MAC[15:0], 16'h0});
    mb_write_c(CFG_IP, BOARD_IP);
    for (int f = 0; f < NUM_FLOWS; f++) mb_write_c(CFG_PORT0 + f, {port_enabled(f), 15'd0, port_of(f)});
    @(posedge clk);
    mb_c_en <= 0; mb_c_we <= 0;
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    run_e1 = 1;
    for (int n = 0; n < N_PULSES; n++) begin
        if (n == switch_at) begin
          // from here on the forward path sends its own dummy traffic
          // the E1 lines go idle at a byte boundary, then the source changes
          repeat (1000) @(posedge clk);
          hold_e1 = 1;
          wait (e1_held == '1);
          @(posedge clk);
          use_dummy <= 1'b1;
          for (int f = 0; f < NUM_FLOWS; f++) after_switch[f] = 2;
          repeat (PERIOD - 1000 - 40) @(posedge clk);
        end else
          repeat (PERIOD - 1 + ((n % 2) ? 4 : -4)) @(posedge clk);
      ip_t0_sig <= 1'b1;
      @(posedge clk);
      ip_t0_sig <= 1'b0;
      pulses++;
      if (n == missed_at) begin
        // a second pulse while the frame is still being sent
        repeat (50) @(posedge clk);
        ip_t0_sig <= 1'b1;
        @(posedge clk);
        ip_t0_sig <= 1'b0;
        pulses++;
      end
    end
    repeat (3000) @(posedge clk);
    check(exp_rec.size() == 0, $sformatf("%0d records never written", exp_rec.size()));
    check(exp_pay.size() == 0 && pay_pos == cur_pay.len, "payload port incomplete");
    check(int'(frames_sent) == n_frames, "frames_sent counter");
    check(int'(frames_aborted) == n_abort, "frames_aborted counter");
    check(int'(rx_admitted_cnt) == n_rec, "admitted counter");
    // mechanisms
    check(missed_sync_cnt == 1, $sformatf("missed pulses %0d", missed_sync_cnt));
    check(overflow_cnt > 0, "no half overflow");
    check(n_resync > 0, "no stream resynchronisation after overflow");
    check(n_abort == 1, "no transmit abort");
    check(n_crc == 1, "no bad-FCS frame");
    check(n_foreign == 1 && rx_dropped_cnt > 16'(n_foreign), "no dropped frames");
    check(n_wrap > 0, "record ring never wrapped");
    check(n_full > 0, "no full 256-byte payload");
    check(n_switch_resync == NUM_FLOWS, "dummy-traffic payloads not checked after the switch");
    $display("switch resyncs=%0d", n_switch_resync);
    $display("pulses=%0d frames=%0d records=%0d missed=%0d overflow=%0d resync=%0d abort=%0d crc=%0d dropped=%0d wraps=%0d full=%0d",
             pulses, n_frames, n_rec, missed_sync_cnt, overflow_cnt, n_resync, n_abort, n_crc, rx_dropped_cnt, n_wrap, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
