// data_packager: central controller of the forward (transmit) path.
//
// It buffers the PDH bytes of NUM_FLOWS interfaces in the Data Block RAM and,
// on every transmission-ready pulse of the IP_T0 synchronisation clock
// (ip_t0_sig), hands one flow's buffer to the MAC transmitter. Each flow owns
// two buffer halves of 256 bytes: one is filled from the PDH side while the
// other is being transmitted (the document's double buffer). The flow served
// by a pulse comes from a Flow ID counter that advances on every pulse, so
// the flows are served round robin.
//
// On a pulse for flow f the packager, all in one cycle, latches the time stamp
// ip_t0_dat, takes the fill level of f's current half as the packet length and
// switches f to its other half. It then writes the four dynamic header words
// for f into the Data Block RAM (packet counter, time stamp, byte counter,
// {packet length, 16'h0}). It waits until f's last PDH byte is written, then
// pulses tx_start with tx_req = {flow, half, length}, and updates f's packet
// counter (+1) and byte counter (+length). The byte counter field therefore
// holds the number of payload bytes the flow sent before this frame.
// tx_start is high at the 6th clock edge after the edge that samples the pulse,
// or the 7th when a byte of the served flow, taken before the switch, is still
// waiting to be written.
//
// PDH bytes (pdh_ena[f] pulses) are placed in a one-byte holding register per
// flow together with their RAM address. Each cycle one held byte is written,
// lowest flow first, except while dynamic words are being written. A half
// holds at most 256 bytes: further bytes are dropped and counted in
// overflow_cnt. A pulse that comes while a frame is still being prepared or
// transmitted (tx_busy) is counted in missed_sync_cnt. The Flow ID still
// advances, so the skipped flow keeps filling its half.
//
// From the document: the double buffer per flow, the four dynamic fields kept
// by this block and stored in the Data Block RAM, the Flow ID counter advanced
// by the transmission-ready signal, and the single-state structure. This
// design's own choices: the RAM word map (cea_pkg), the holding registers and
// the write priority, the big-endian byte lanes, and the counters for missed
// pulses and overflow.
module data_packager
  import cea_pkg::*;
#(
  parameter int unsigned D_AW = 10                    // Data Block RAM address width (1024 words)
) (
  input  logic                clk,
  input  logic                rst_n,
  // bytes from the bit-to-byte converters
  input  logic [7:0]          pdh_dat [NUM_FLOWS],
  input  logic [NUM_FLOWS-1:0] pdh_ena,
  // IP_T0 synchronisation clock
  input  logic [31:0]         ip_t0_dat,              // time stamp
  input  logic                ip_t0_sig,              // transmission ready (one-cycle pulse)
  // Data Block RAM, port A (write only)
  output logic                d_en,
  output logic [3:0]          d_we,
  output logic [D_AW-1:0]     d_addr,
  output logic [31:0]         d_din,
  // MAC transmitter
  input  logic                tx_busy,
  output logic                tx_start,
  output tx_req_t             tx_req,
  // status
  output logic [FLOW_W-1:0]   flow_id,                // flow served by the next pulse
  output logic [15:0]         missed_sync_cnt,
  output logic [15:0]         overflow_cnt
);

  typedef enum logic [2:0] {P_IDLE, P_DYN0, P_DYN1, P_DYN2, P_DYN3, P_WAIT} pstate_e;

  pstate_e              state;
  logic                 half_w   [NUM_FLOWS];   // half currently being filled
  logic [8:0]           fill     [NUM_FLOWS];   // bytes in that half
  logic [31:0]          pkt_cnt  [NUM_FLOWS];
  logic [31:0]          byte_cnt [NUM_FLOWS];
  logic [NUM_FLOWS-1:0] pend_v;
  logic [7:0]           pend_dat [NUM_FLOWS];
  logic [D_AW+1:0]      pend_bad [NUM_FLOWS];   // byte address of the held byte
  logic [31:0]          ts;
  tx_req_t              sw;                     // frame being prepared

  // switch requested this cycle
  logic       sync_go;
  assign sync_go = ip_t0_sig && state == P_IDLE && !tx_busy;

  // byte address of the next byte of flow f
  function automatic logic [D_AW+1:0] byte_addr(input int f, input logic h, input logic [8:0] n);
    return (D_AW+2)'((((f * 2) + int'(h)) * HALF_WORDS * 4) + int'(n));
  endfunction

  // a held byte of the flow being prepared that still belongs to its old half
  logic old_pend;
  assign old_pend = pend_v[sw.flow] && (pend_bad[sw.flow][8] == sw.half);

  // choose the held byte to write: the prepared flow's old-half byte first,
  // otherwise the lowest flow
  logic                 pick_v;
  logic [FLOW_W-1:0]    pick_f;
  always_comb begin
    pick_v = 1'b0;
    pick_f = '0;
    for (int f = NUM_FLOWS - 1; f >= 0; f--)
      if (pend_v[f]) begin
        pick_v = 1'b1;
        pick_f = FLOW_W'(f);
      end
    if (state == P_WAIT && old_pend) pick_f = sw.flow;
  end

  logic dyn_phase;
  assign dyn_phase = state inside {P_DYN0, P_DYN1, P_DYN2, P_DYN3};

  // RAM port A
  always_comb begin
    d_en   = 1'b0;
    d_we   = 4'b0000;
    d_addr = '0;
    d_din  = '0;
    if (dyn_phase) begin
      d_en   = 1'b1;
      d_we   = 4'b1111;
      d_addr = D_AW'(DYN_BASE + int'(sw.flow) * DYN_WORDS + (int'(state) - int'(P_DYN0)));
      unique case (state)
        P_DYN0:  d_din = pkt_cnt[sw.flow];
        P_DYN1:  d_din = ts;
        P_DYN2:  d_din = byte_cnt[sw.flow];
        default: d_din = {7'd0, sw.len, 16'h0000};
      endcase
    end else if (pick_v) begin
      d_en   = 1'b1;
      d_addr = pend_bad[pick_f][D_AW+1:2];
      d_we   = 4'b1000 >> pend_bad[pick_f][1:0];
      d_din  = {4{pend_dat[pick_f]}};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    logic [2:0] ovf;     // bytes dropped this cycle
    if (!rst_n) begin
      state           <= P_IDLE;
      flow_id         <= '0;
      ts              <= '0;
      sw              <= '0;
      tx_start        <= 1'b0;
      tx_req          <= '0;
      pend_v          <= '0;
      missed_sync_cnt <= '0;
      overflow_cnt    <= '0;
      for (int f = 0; f < NUM_FLOWS; f++) begin
        half_w[f]   <= 1'b0;
        fill[f]     <= '0;
        pkt_cnt[f]  <= '0;
        byte_cnt[f] <= '0;
        pend_dat[f] <= '0;
        pend_bad[f] <= '0;
      end
    end else begin
      tx_start <= 1'b0;

      // held byte written this cycle
      if (!dyn_phase && pick_v) pend_v[pick_f] <= 1'b0;

      // PDH side: accept bytes, switch halves
      ovf = '0;
      for (int f = 0; f < NUM_FLOWS; f++) begin
        logic       h;
        logic [8:0] n;
        h = half_w[f];
        n = fill[f];
        if (pdh_ena[f]) begin
          if (n < 9'(MAX_PAYLOAD)) begin
            pend_v[f]   <= 1'b1;
            pend_dat[f] <= pdh_dat[f];
            pend_bad[f] <= byte_addr(f, h, n);
            n = n + 9'd1;
          end else begin
            ovf = ovf + 3'd1;
          end
        end
        if (sync_go && flow_id == FLOW_W'(f)) begin
          sw.flow <= FLOW_W'(f);
          sw.half <= h;
          sw.len  <= n;
          h = ~h;
          n = '0;
        end
        half_w[f] <= h;
        fill[f]   <= n;
      end

      overflow_cnt <= overflow_cnt + 16'(ovf);

      if (ip_t0_sig) begin
        flow_id <= flow_id + 1'b1;
        if (!sync_go) missed_sync_cnt <= missed_sync_cnt + 16'd1;
      end

      unique case (state)
        P_IDLE: if (sync_go) begin
          ts    <= ip_t0_dat;
          state <= P_DYN0;
        end
        P_DYN0: state <= P_DYN1;
        P_DYN1: state <= P_DYN2;
        P_DYN2: state <= P_DYN3;
        P_DYN3: state <= P_WAIT;
        P_WAIT: if (!old_pend) begin
          tx_start            <= 1'b1;
          tx_req              <= sw;
          pkt_cnt[sw.flow]    <= pkt_cnt[sw.flow] + 32'd1;
          byte_cnt[sw.flow]   <= byte_cnt[sw.flow] + 32'(sw.len);
          state               <= P_IDLE;
        end
        default: state <= P_IDLE;
      endcase
    end
  end

  // only one byte per flow may wait: a second one before the first is written is lost
  for (genvar g = 0; g < NUM_FLOWS; g++) begin : g_chk
    a_no_pend_overrun: assert property (@(posedge clk) disable iff (!rst_n)
      pdh_ena[g] |-> !pend_v[g] || (!dyn_phase && pick_v && pick_f == FLOW_W'(g)));
  end

endmodule
