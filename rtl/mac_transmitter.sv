// mac_transmitter: sends one CEALite frame to the Ethernet MAC transmit
// wrapper, byte by byte, without ever holding the whole frame.
//
// A frame is 70 header bytes plus the payload. Bytes 0..55 come from the
// flow's slot in the Header Block RAM (16 words per flow, 14 used). Bytes
// 56..69 are the four dynamic words in the Data Block RAM (the last word only
// gives its upper two bytes). The payload comes from the flow's buffer half in
// the Data Block RAM. The frame is thus a list of 32-bit words alternating
// between the two RAMs. A fetch unit reads one word per cycle (one cycle RAM
// latency) into a three-entry word queue as long as there is room. The byte
// unit loads the next byte into the output register mac_dat one cycle before
// the wrapper takes it, so a byte can go out on every clock.
//
// Handshake with the MAC wrapper (signal names from the document, directions
// and timing this design's choice):
//   mac_req   out  a frame is ready; the first byte is on mac_dat
//   mac_start in   wrapper accepts the frame (one cycle); mac_req drops
//   mac_ena   in   wrapper takes the byte on mac_dat this cycle
//   mac_dat   out  current byte
//   mac_end   out  the byte on mac_dat is the last of the frame
//   mac_err   in   wrapper aborts the frame
//   mac_rst   out  one-cycle reset to the wrapper after an abort or underrun
// tx_start/tx_req (from the data packager) start a frame while tx_busy is low.
// mac_req (with the first byte on mac_dat) is high at the 5th clock edge
// after the edge that samples tx_start. After that, bytes can go out on every clock.
// The document's transmitter walks this word sequence with 13 hand-made states.
// Here a word counter and a table of word sources do the same walk.
module mac_transmitter
  import cea_pkg::*;
#(
  parameter int unsigned H_AW = 9,     // Header Block RAM address width
  parameter int unsigned D_AW = 10     // Data Block RAM address width
) (
  input  logic            clk,
  input  logic            rst_n,
  // from the data packager
  input  logic            tx_start,
  input  tx_req_t         tx_req,
  output logic            tx_busy,
  // Header Block RAM read port
  output logic            h_en,
  output logic [H_AW-1:0] h_addr,
  input  logic [31:0]     h_dout,
  // Data Block RAM read port
  output logic            d_en,
  output logic [D_AW-1:0] d_addr,
  input  logic [31:0]     d_dout,
  // MAC transmit wrapper
  output logic            mac_req,
  input  logic            mac_start,
  input  logic            mac_ena,
  output logic [7:0]      mac_dat,
  output logic            mac_end,
  input  logic            mac_err,
  output logic            mac_rst,
  // status
  output logic [15:0]     frames_sent,
  output logic [15:0]     frames_aborted
);

  localparam int unsigned HDR_WORDS = STATIC_BYTES / 4;         // 14
  localparam int unsigned PAY_W0    = HDR_WORDS + DYN_WORDS;     // 18: first payload word
  localparam int unsigned QDEPTH    = 3;

  typedef enum logic [2:0] {T_IDLE, T_FILL, T_REQ, T_SEND, T_ABORT} tstate_e;

  tstate_e     state;
  tx_req_t     req;
  logic [7:0]  n_words;     // words in this frame
  logic [7:0]  rd_w;        // next word to fetch
  logic [9:0]  total;       // bytes in this frame
  logic [9:0]  out_idx;     // index of the byte on mac_dat
  logic [9:0]  ld_idx;      // index of the next byte to load
  logic        out_v;

  // fetch pipeline
  logic        inf_v;       // a read was issued last cycle
  logic        inf_src;     // 0: header RAM, 1: data RAM
  logic [2:0]  inf_nb;      // valid bytes in that word

  // word queue
  logic [31:0] q_word [QDEPTH];
  logic [2:0]  q_nb   [QDEPTH];
  logic [1:0]  q_rd, q_wr, q_cnt;
  logic [1:0]  bp;          // byte pointer inside the head word

  logic active;
  assign active = state inside {T_FILL, T_REQ, T_SEND};
  assign tx_busy = state != T_IDLE;

  // word source table
  logic        issue;
  logic [2:0]  nb_w;
  logic        src_w;
  always_comb begin
    int p;
    p      = int'(rd_w) - int'(PAY_W0);
    issue  = active && (rd_w < n_words) && (int'(q_cnt) + int'(inf_v) < QDEPTH);
    h_en   = 1'b0;
    d_en   = 1'b0;
    h_addr = H_AW'(int'(req.flow) * HDR_SLOT_WORDS + int'(rd_w));
    d_addr = '0;
    src_w  = 1'b0;
    nb_w   = 3'd4;
    if (rd_w < 8'(HDR_WORDS)) begin
      h_en = issue;
    end else if (rd_w < 8'(PAY_W0)) begin
      src_w  = 1'b1;
      d_en   = issue;
      d_addr = D_AW'(DYN_BASE + int'(req.flow) * DYN_WORDS + int'(rd_w) - int'(HDR_WORDS));
      if (rd_w == 8'(PAY_W0 - 1)) nb_w = 3'd2;
    end else begin
      src_w  = 1'b1;
      d_en   = issue;
      d_addr = D_AW'(((int'(req.flow) * 2) + int'(req.half)) * HALF_WORDS + p);
      if (rd_w == n_words - 8'd1) nb_w = 3'(int'(req.len) - 4 * p);
    end
  end

  logic consume, load, q_pop, q_push;
  assign consume = state == T_SEND && mac_ena && out_v;
  assign load    = !out_v || consume;
  assign q_pop   = load && q_cnt != 0 && (bp == 2'(q_nb[q_rd] - 3'd1));
  assign q_push  = active && inf_v;

  assign mac_req = state == T_REQ;
  assign mac_end = state == T_SEND && out_v && out_idx == total - 10'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= T_IDLE;
      req            <= '0;
      n_words        <= '0;
      rd_w           <= '0;
      total          <= '0;
      out_idx        <= '0;
      ld_idx         <= '0;
      out_v          <= 1'b0;
      mac_dat        <= '0;
      mac_rst        <= 1'b0;
      inf_v          <= 1'b0;
      inf_src        <= 1'b0;
      inf_nb         <= '0;
      q_rd           <= '0;
      q_wr           <= '0;
      q_cnt          <= '0;
      bp             <= '0;
      frames_sent    <= '0;
      frames_aborted <= '0;
      for (int i = 0; i < QDEPTH; i++) begin
        q_word[i] <= '0;
        q_nb[i]   <= '0;
      end
    end else begin
      mac_rst <= 1'b0;

      // fetch
      inf_v   <= issue;
      inf_src <= src_w;
      inf_nb  <= nb_w;
      if (issue) rd_w <= rd_w + 8'd1;

      // queue push (RAM data arrives one cycle after the read)
      if (q_push) begin
        q_word[q_wr] <= inf_src ? d_dout : h_dout;
        q_nb[q_wr]   <= inf_nb;
        q_wr         <= (q_wr == 2'(QDEPTH - 1)) ? 2'd0 : q_wr + 2'd1;
      end

      // byte unit: big-endian, byte 0 of a word in bits 31:24
      if (active && load) begin
        if (q_cnt != 0) begin
          mac_dat <= q_word[q_rd][31 - 8*bp -: 8];
          out_v   <= 1'b1;
          out_idx <= ld_idx;
          ld_idx  <= ld_idx + 10'd1;
          bp      <= q_pop ? 2'd0 : bp + 2'd1;
        end else begin
          out_v   <= 1'b0;
        end
      end
      if (q_pop) q_rd <= (q_rd == 2'(QDEPTH - 1)) ? 2'd0 : q_rd + 2'd1;
      q_cnt <= q_cnt + 2'(q_push) - 2'(q_pop);

      unique case (state)
        T_IDLE: if (tx_start) begin
          req     <= tx_req;
          n_words <= 8'(PAY_W0 + (int'(tx_req.len) + 3) / 4);
          total   <= 10'(HDR_BYTES + int'(tx_req.len));
          rd_w    <= '0;
          out_idx <= '0;
          ld_idx  <= '0;
          state   <= T_FILL;
        end
        T_FILL: if (out_v) state <= T_REQ;
        T_REQ: begin
          if (mac_err)        state <= T_ABORT;
          else if (mac_start) state <= T_SEND;
        end
        T_SEND: begin
          if (mac_err || (mac_ena && !out_v)) state <= T_ABORT;
          else if (consume && out_idx == total - 10'd1) begin
            state       <= T_IDLE;
            frames_sent <= frames_sent + 16'd1;
          end
        end
        T_ABORT: state <= T_IDLE;
        default: state <= T_IDLE;
      endcase

      if (state == T_ABORT) begin
        mac_rst        <= 1'b1;
        frames_aborted <= frames_aborted + 16'd1;
      end
      // leaving the frame: empty the pipeline
      if (state == T_ABORT || (state == T_SEND && consume && out_idx == total - 10'd1)) begin
        out_v <= 1'b0;
        q_rd  <= '0;
        q_wr  <= '0;
        q_cnt <= '0;
        bp    <= '0;
        rd_w  <= '0;
        n_words <= '0;
      end
    end
  end

  a_ena_only_when_sending: assert property (@(posedge clk) disable iff (!rst_n)
    mac_ena |-> state == T_SEND || state == T_ABORT || state == T_IDLE);

endmodule
