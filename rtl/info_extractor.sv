// info_extractor: second stage of the backward path. It turns each admitted
// frame into an 8-word record in Data_BLK_RAM for the MicroBlaze and streams
// out the payload.
//
// In the first cycle of in_ena (the first forwarded byte, frame byte 56) it
// takes the receive time stamp from the IP_T0 clock (ip_t0_dat) and the
// Flow_ID. It then parses the dynamic header, stream bytes 0..13: packet
// counter, send time stamp, byte counter, packet length (cea_pkg). Every later
// byte goes out on the payload port (pay_valid, pay_dat, pay_flow, pay_idx =
// byte position in the payload, pay_pkt_cnt). This carries enough to drive a
// block RAM of a later data distributor directly. When out_end arrives from the
// header analyzer, the record is frozen and written in 8 consecutive cycles, one
// field per 32-bit word:
//   0 Flow_ID  1 receive time stamp  2 packet counter  3 byte counter
//   4 packet length  5 send time stamp  6 status {len_err, crc_err}  7 zero
// Record n sits at word 8*n, so a 2048-word RAM holds 256 records used as a
// ring. After the last word, idx_ptr (the MicroBlaze's index register) takes
// the number of the record just written. It starts at all ones, so a reader
// whose own counter starts there too sees no new record.
//
// From the document: the time stamp at the start of the frame, one word per
// field, 8-word records in a 2048 x 32 RAM, the index pointer to the latest
// record, the payload output. This design's choices: the field order, the
// status word (CRC result and a length check), and that frames with a bad FCS
// are still recorded, flagged in the status word.
module info_extractor
  import cea_pkg::*;
#(
  parameter int unsigned R_AW = 11                // Data_BLK_RAM address width (2048 words)
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the header analyzer
  input  logic              in_ena,
  input  logic [7:0]        in_dat,
  input  logic [FLOW_W-1:0] in_flow,
  input  logic              in_end,
  input  logic              in_crc_err,
  // IP_T0 clock
  input  logic [31:0]       ip_t0_dat,
  // Data_BLK_RAM write port
  output logic              r_en,
  output logic [3:0]        r_we,
  output logic [R_AW-1:0]   r_addr,
  output logic [31:0]       r_din,
  // MicroBlaze index register
  output logic [R_AW-4:0]   idx_ptr,
  // payload output
  output logic              pay_valid,
  output logic [7:0]        pay_dat,
  output logic [FLOW_W-1:0] pay_flow,
  output logic [8:0]        pay_idx,
  output logic [31:0]       pay_pkt_cnt
);

  logic              in_ena_q;
  logic [10:0]       cnt;           // stream bytes received in this frame
  logic [31:0]       f_rx_ts, f_pkt, f_tx_ts, f_bytes;
  logic [15:0]       f_len;
  logic [FLOW_W-1:0] f_flow;

  logic [31:0]       rec [REC_WORDS];
  logic              wr_busy;
  logic [2:0]        wr_k;
  logic [R_AW-4:0]   set;

  assign r_en   = wr_busy;
  assign r_we   = {4{wr_busy}};
  assign r_addr = {set, wr_k};
  assign r_din  = rec[wr_k];

  // received payload length
  logic [10:0] pay_len;
  assign pay_len = (cnt > 11'(DYN_BYTES)) ? cnt - 11'(DYN_BYTES) : 11'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_ena_q    <= 1'b0;
      cnt         <= '0;
      f_rx_ts     <= '0;
      f_pkt       <= '0;
      f_tx_ts     <= '0;
      f_bytes     <= '0;
      f_len       <= '0;
      f_flow      <= '0;
      for (int i = 0; i < REC_WORDS; i++) rec[i] <= '0;
      wr_busy     <= 1'b0;
      wr_k        <= '0;
      set         <= '0;
      idx_ptr     <= '1;
      pay_valid   <= 1'b0;
      pay_dat     <= '0;
      pay_flow    <= '0;
      pay_idx     <= '0;
      pay_pkt_cnt <= '0;
    end else begin
      in_ena_q  <= in_ena;
      pay_valid <= 1'b0;

      if (in_ena) begin
        if (!in_ena_q) begin
          f_rx_ts <= ip_t0_dat;
          f_flow  <= in_flow;
        end
        if (cnt != '1) cnt <= cnt + 11'd1;
        unique case (cnt)
          11'd0:  f_pkt[31:24]   <= in_dat;
          11'd1:  f_pkt[23:16]   <= in_dat;
          11'd2:  f_pkt[15:8]    <= in_dat;
          11'd3:  f_pkt[7:0]     <= in_dat;
          11'd4:  f_tx_ts[31:24] <= in_dat;
          11'd5:  f_tx_ts[23:16] <= in_dat;
          11'd6:  f_tx_ts[15:8]  <= in_dat;
          11'd7:  f_tx_ts[7:0]   <= in_dat;
          11'd8:  f_bytes[31:24] <= in_dat;
          11'd9:  f_bytes[23:16] <= in_dat;
          11'd10: f_bytes[15:8]  <= in_dat;
          11'd11: f_bytes[7:0]   <= in_dat;
          11'd12: f_len[15:8]    <= in_dat;
          11'd13: f_len[7:0]     <= in_dat;
          default: begin
            pay_valid   <= 1'b1;
            pay_dat     <= in_dat;
            pay_flow    <= f_flow;
            pay_idx     <= 9'(cnt - 11'(DYN_BYTES));
            pay_pkt_cnt <= f_pkt;
          end
        endcase
      end

      if (in_end) begin
        rec[REC_FLOW_ID]   <= 32'(f_flow);
        rec[REC_RX_TSTAMP] <= f_rx_ts;
        rec[REC_PKT_CNT]   <= f_pkt;
        rec[REC_BYTE_CNT]  <= f_bytes;
        rec[REC_PKT_LEN]   <= 32'(f_len);
        rec[REC_TX_TSTAMP] <= f_tx_ts;
        rec[REC_STATUS]    <= {30'd0, (cnt < 11'(DYN_BYTES)) || (pay_len != 11'(f_len)), in_crc_err};
        rec[REC_SPARE]     <= '0;
        wr_busy            <= 1'b1;
        wr_k               <= '0;
        cnt                <= '0;
      end else if (wr_busy) begin
        wr_k <= wr_k + 3'd1;
        if (wr_k == 3'(REC_WORDS - 1)) begin
          wr_busy <= 1'b0;
          idx_ptr <= set;
          set     <= set + 1'b1;
        end
      end
    end
  end

  a_end_not_while_writing: assert property (@(posedge clk) disable iff (!rst_n)
    in_end |-> !wr_busy);

endmodule
