// header_analyzer: admission control at the head of the backward (receive)
// path.
//
// Received bytes come from the MAC receive wrapper, one per clock while
// rx_ena is high; rx_ena covers the whole frame, FCS included. The analyzer
// compares the destination MAC address (bytes 0..5) and the destination IPv4
// address (bytes 38..41) with the board's own, and looks up the UDP
// destination port (bytes 44..45) in a NUM_FLOWS-entry port-to-Flow_ID table.
// A frame that fails any of the three checks is discarded. For an admitted
// frame, bytes 56 up to the end of the frame, minus the 4-byte FCS, are passed
// on with out_ena high and out_flow set. Because the end of the frame is only
// known when rx_ena drops, bytes go through a 4-byte delay line, so the FCS
// is never sent on. out_dat trails rx_dat by 5 cycles. One cycle after out_ena
// drops, out_end pulses with out_crc_err, the MAC wrapper's FCS verdict
// (rx_crc_err, valid in the first cycle after rx_ena falls).
//
// The own MAC and IP addresses and the port table live in Config_BLK_RAM,
// which the MicroBlaze writes. After reset and after every frame, the analyzer
// reads them again into local registers. This takes CFG_WORDS + 1 = 8 cycles,
// well inside the Ethernet inter-frame gap plus preamble. Config word map: see
// cea_pkg. The checks, the lookup, the start at byte 56, the dropped trailer
// and the refresh once per frame follow the document. The field offsets, the
// table format with a valid bit, the delay line and the counters are this
// design's choices. Only the low 4 bits of c_addr ever change: the
// configuration is 7 words at the bottom of the RAM.
module header_analyzer
  import cea_pkg::*;
#(
  parameter int unsigned C_AW = 9                 // Config_BLK_RAM address width
) (
  input  logic              clk,
  input  logic              rst_n,
  // MAC receive wrapper
  input  logic              rx_ena,
  input  logic [7:0]        rx_dat,
  input  logic              rx_crc_err,
  // Config_BLK_RAM read port
  output logic              c_en,
  output logic [C_AW-1:0]   c_addr,
  input  logic [31:0]       c_dout,
  // to the info extractor
  output logic              out_ena,
  output logic [7:0]        out_dat,
  output logic [FLOW_W-1:0] out_flow,
  output logic              out_end,
  output logic              out_crc_err,
  // status
  output logic [15:0]       admitted_cnt,
  output logic [15:0]       dropped_cnt
);

  // configuration registers
  logic [47:0] my_mac;
  logic [31:0] my_ip;
  logic [15:0] port_tab [NUM_FLOWS];
  logic        port_v   [NUM_FLOWS];

  // refresh sequencer
  logic             ref_busy, ref_rv;
  logic [3:0]       ref_a, ref_ra;

  // frame state
  logic             rx_ena_q;
  logic [10:0]      pos;
  logic             mac_ok, ip_ok, port_hit;
  logic [FLOW_W-1:0] flow;
  logic [7:0]       port_hi;
  logic [7:0]       dl [4];
  logic             fwd_any;

  assign c_en   = ref_busy;
  assign c_addr = C_AW'(ref_a);

  // port lookup on the second port byte
  logic              lk_hit;
  logic [FLOW_W-1:0] lk_flow;
  always_comb begin
    lk_hit  = 1'b0;
    lk_flow = '0;
    for (int f = NUM_FLOWS - 1; f >= 0; f--)
      if (port_v[f] && port_tab[f] == {port_hi, rx_dat}) begin
        lk_hit  = 1'b1;
        lk_flow = FLOW_W'(f);
      end
  end

  logic admit;
  assign admit = mac_ok && ip_ok && port_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      my_mac       <= '0;
      my_ip        <= '0;
      for (int f = 0; f < NUM_FLOWS; f++) begin
        port_tab[f] <= '0;
        port_v[f]   <= 1'b0;
      end
      ref_busy     <= 1'b1;        // load the configuration after reset
      ref_a        <= '0;
      ref_rv       <= 1'b0;
      ref_ra       <= '0;
      rx_ena_q     <= 1'b0;
      pos          <= '0;
      mac_ok       <= 1'b1;
      ip_ok        <= 1'b1;
      port_hit     <= 1'b0;
      flow         <= '0;
      port_hi      <= '0;
      for (int i = 0; i < 4; i++) dl[i] <= '0;
      fwd_any      <= 1'b0;
      out_ena      <= 1'b0;
      out_dat      <= '0;
      out_flow     <= '0;
      out_end      <= 1'b0;
      out_crc_err  <= 1'b0;
      admitted_cnt <= '0;
      dropped_cnt  <= '0;
    end else begin
      rx_ena_q <= rx_ena;
      out_end  <= 1'b0;
      out_ena  <= 1'b0;

      // ---- configuration refresh ----
      ref_rv <= ref_busy;
      ref_ra <= ref_a;
      if (ref_busy) begin
        if (ref_a == 4'(CFG_WORDS - 1)) ref_busy <= 1'b0;
        else                            ref_a    <= ref_a + 4'd1;
      end
      if (ref_rv) begin
        if (ref_ra == 4'(CFG_MAC_HI)) my_mac[47:16] <= c_dout;
        if (ref_ra == 4'(CFG_MAC_LO)) my_mac[15:0]  <= c_dout[31:16];
        if (ref_ra == 4'(CFG_IP))     my_ip         <= c_dout;
        for (int f = 0; f < NUM_FLOWS; f++)
          if (ref_ra == 4'(CFG_PORT0 + f)) begin
            port_tab[f] <= c_dout[15:0];
            port_v[f]   <= c_dout[31];
          end
      end

      // ---- frame ----
      if (rx_ena) begin
        dl  <= '{rx_dat, dl[0], dl[1], dl[2]};
        if (pos != '1) pos <= pos + 11'd1;
        if (pos < 11'(OFS_DST_MAC + 6) &&
            rx_dat != my_mac[47 - 8*(int'(pos) - OFS_DST_MAC) -: 8]) mac_ok <= 1'b0;
        if (pos >= 11'(OFS_DST_IP) && pos < 11'(OFS_DST_IP + 4) &&
            rx_dat != my_ip[31 - 8*(int'(pos) - OFS_DST_IP) -: 8])  ip_ok <= 1'b0;
        if (pos == 11'(OFS_UDP_DPORT)) port_hi <= rx_dat;
        if (pos == 11'(OFS_UDP_DPORT + 1)) begin
          port_hit <= lk_hit;
          flow     <= lk_flow;
        end
        // byte pos-4 leaves the delay line
        if (pos >= 11'(STATIC_BYTES + FCS_BYTES) && admit) begin
          out_ena  <= 1'b1;
          out_dat  <= dl[3];
          out_flow <= flow;
          fwd_any  <= 1'b1;
        end
      end else if (rx_ena_q) begin
        // first cycle after the frame
        out_end     <= fwd_any;
        out_crc_err <= rx_crc_err;
        if (fwd_any) admitted_cnt <= admitted_cnt + 16'd1;
        else         dropped_cnt  <= dropped_cnt + 16'd1;
        pos      <= '0;
        mac_ok   <= 1'b1;
        ip_ok    <= 1'b1;
        port_hit <= 1'b0;
        fwd_any  <= 1'b0;
        ref_busy <= 1'b1;
        ref_a    <= '0;
      end
    end
  end

  a_no_frame_during_refresh: assert property (@(posedge clk) disable iff (!rst_n)
    rx_ena && !rx_ena_q |-> !ref_busy && !ref_rv);

endmodule
