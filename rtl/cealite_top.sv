// cealite_top: CEALite, the FPGA logic of a circuit emulation adaptor. It
// carries NUM_FLOWS E1 (PDH) voice streams over Ethernet as SAToP/RTP/UDP/IPv4
// frames, and time-stamps sent and received frames for a clock
// synchronisation algorithm running elsewhere.
//
// Forward path: one bit_to_byte per E1 line feeds the data_packager. With
// use_dummy high, the lines are replaced by a pdh_dummy_source ticked by the
// station clock (t3_tick), which sends a counting pattern on every flow.
// Change use_dummy only in reset or while no E1 byte is half received: the
// converters keep a partial byte across the switch, and the byte borders
// would then shift. The packager double-buffers the payload in the Data Block RAM and, on each
// IP_T0 transmission-ready pulse, writes the frame's dynamic header fields and
// starts the mac_transmitter. The transmitter builds the frame on the fly from
// the Header Block RAM (static header, written by the MicroBlaze) and the Data
// Block RAM, and drives the MAC transmit wrapper.
// Backward path: the header_analyzer admits frames addressed to this board
// (MAC, IP, UDP port -> Flow_ID, from Config_BLK_RAM) and passes bytes 56..end
// to the info_extractor. The extractor time-stamps the frame, writes an 8-word
// record per frame into Data_BLK_RAM, updates the MicroBlaze index register
// and outputs the payload.
//
// Outside this module, brought out as ports: the IP_T0 clock module (time
// stamp and transmission-ready pulse, shared by both paths), the MicroBlaze
// (ports of the three RAMs it reads or writes, and the index register), the
// MAC transmit and receive wrappers, and the E1 line interfaces. A single clock
// drives everything. The E1 bit strobes and the IP_T0 pulse are taken to be
// already synchronous to it.
module cealite_top
  import cea_pkg::*;
#(
  parameter int unsigned H_DEPTH = 512,    // Header Block RAM words (2 KB)
  parameter int unsigned D_DEPTH = 1024,   // forward Data Block RAM words
  parameter int unsigned C_DEPTH = 512,    // Config_BLK_RAM words
  parameter int unsigned R_DEPTH = 2048,   // backward Data_BLK_RAM words
  localparam int unsigned H_AW = $clog2(H_DEPTH),
  localparam int unsigned D_AW = $clog2(D_DEPTH),
  localparam int unsigned C_AW = $clog2(C_DEPTH),
  localparam int unsigned R_AW = $clog2(R_DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // E1 line interfaces
  input  logic [NUM_FLOWS-1:0] e1_rx_dat,
  input  logic [NUM_FLOWS-1:0] e1_rx_ena,
  // dummy traffic: station clock tick and source select (1 = dummy traffic)
  input  logic                 t3_tick,
  input  logic                 use_dummy,
  // IP_T0 synchronisation clock
  input  logic [31:0]          ip_t0_dat,
  input  logic                 ip_t0_sig,
  // MicroBlaze: Header Block RAM port
  input  logic                 mb_h_en,
  input  logic [3:0]           mb_h_we,
  input  logic [H_AW-1:0]      mb_h_addr,
  input  logic [31:0]          mb_h_din,
  output logic [31:0]          mb_h_dout,
  // MicroBlaze: Config_BLK_RAM port
  input  logic                 mb_c_en,
  input  logic [3:0]           mb_c_we,
  input  logic [C_AW-1:0]      mb_c_addr,
  input  logic [31:0]          mb_c_din,
  output logic [31:0]          mb_c_dout,
  // MicroBlaze: Data_BLK_RAM port and index register
  input  logic                 mb_r_en,
  input  logic [R_AW-1:0]      mb_r_addr,
  output logic [31:0]          mb_r_dout,
  output logic [R_AW-4:0]      idx_ptr,
  // MAC transmit wrapper
  output logic                 mac_req,
  input  logic                 mac_start,
  input  logic                 mac_ena,
  output logic [7:0]           mac_dat,
  output logic                 mac_end,
  input  logic                 mac_err,
  output logic                 mac_rst,
  // MAC receive wrapper
  input  logic                 rx_ena,
  input  logic [7:0]           rx_dat,
  input  logic                 rx_crc_err,
  // payload output
  output logic                 pay_valid,
  output logic [7:0]           pay_dat,
  output logic [FLOW_W-1:0]    pay_flow,
  output logic [8:0]           pay_idx,
  output logic [31:0]          pay_pkt_cnt,
  // status
  output logic [FLOW_W-1:0]    flow_id,
  output logic [15:0]          missed_sync_cnt,
  output logic [15:0]          overflow_cnt,
  output logic [15:0]          frames_sent,
  output logic [15:0]          frames_aborted,
  output logic [15:0]          rx_admitted_cnt,
  output logic [15:0]          rx_dropped_cnt
);

  // ---------------- forward path ----------------
  logic [7:0]           pdh_dat [NUM_FLOWS];
  logic [NUM_FLOWS-1:0] pdh_ena;
  logic [NUM_FLOWS-1:0] gen_dat, gen_ena, b2b_dat, b2b_ena;

  pdh_dummy_source u_dummy (
    .clk, .rst_n,
    .enable (use_dummy), .t3_tick,
    .e1_dat (gen_dat), .e1_ena (gen_ena)
  );

  assign b2b_dat = use_dummy ? gen_dat : e1_rx_dat;
  assign b2b_ena = use_dummy ? gen_ena : e1_rx_ena;

  for (genvar f = 0; f < NUM_FLOWS; f++) begin : g_b2b
    bit_to_byte u_b2b (
      .clk, .rst_n,
      .e1_rx_dat (b2b_dat[f]),
      .e1_rx_ena (b2b_ena[f]),
      .pdh_dat   (pdh_dat[f]),
      .pdh_ena   (pdh_ena[f])
    );
  end

  logic            dp_en;
  logic [3:0]      dp_we;
  logic [D_AW-1:0] dp_addr;
  logic [31:0]     dp_din;
  logic            tx_busy, tx_start;
  tx_req_t         tx_req;

  data_packager #(.D_AW(D_AW)) u_pack (
    .clk, .rst_n,
    .pdh_dat, .pdh_ena,
    .ip_t0_dat, .ip_t0_sig,
    .d_en (dp_en), .d_we (dp_we), .d_addr (dp_addr), .d_din (dp_din),
    .tx_busy, .tx_start, .tx_req,
    .flow_id, .missed_sync_cnt, .overflow_cnt
  );

  logic            th_en, td_en;
  logic [H_AW-1:0] th_addr;
  logic [D_AW-1:0] td_addr;
  logic [31:0]     th_dout, td_dout, dp_dout_unused;

  mac_transmitter #(.H_AW(H_AW), .D_AW(D_AW)) u_tx (
    .clk, .rst_n,
    .tx_start, .tx_req, .tx_busy,
    .h_en (th_en), .h_addr (th_addr), .h_dout (th_dout),
    .d_en (td_en), .d_addr (td_addr), .d_dout (td_dout),
    .mac_req, .mac_start, .mac_ena, .mac_dat, .mac_end, .mac_err, .mac_rst,
    .frames_sent, .frames_aborted
  );

  // Header Block RAM: A = transmitter, B = MicroBlaze
  bram_dp #(.DEPTH(H_DEPTH)) u_hdr_ram (
    .clk,
    .a_en (th_en), .a_we (4'b0000), .a_addr (th_addr), .a_din ('0), .a_dout (th_dout),
    .b_en (mb_h_en), .b_we (mb_h_we), .b_addr (mb_h_addr), .b_din (mb_h_din), .b_dout (mb_h_dout)
  );

  // Data Block RAM: A = packager (write), B = transmitter (read)
  bram_dp #(.DEPTH(D_DEPTH)) u_data_ram (
    .clk,
    .a_en (dp_en), .a_we (dp_we), .a_addr (dp_addr), .a_din (dp_din), .a_dout (dp_dout_unused),
    .b_en (td_en), .b_we (4'b0000), .b_addr (td_addr), .b_din ('0), .b_dout (td_dout)
  );

  // ---------------- backward path ----------------
  logic              ca_en;
  logic [C_AW-1:0]   ca_addr;
  logic [31:0]       ca_dout;
  logic              ha_ena, ha_end, ha_crc_err;
  logic [7:0]        ha_dat;
  logic [FLOW_W-1:0] ha_flow;

  header_analyzer #(.C_AW(C_AW)) u_ha (
    .clk, .rst_n,
    .rx_ena, .rx_dat, .rx_crc_err,
    .c_en (ca_en), .c_addr (ca_addr), .c_dout (ca_dout),
    .out_ena (ha_ena), .out_dat (ha_dat), .out_flow (ha_flow),
    .out_end (ha_end), .out_crc_err (ha_crc_err),
    .admitted_cnt (rx_admitted_cnt), .dropped_cnt (rx_dropped_cnt)
  );

  // Config_BLK_RAM: A = header analyzer, B = MicroBlaze
  bram_dp #(.DEPTH(C_DEPTH)) u_cfg_ram (
    .clk,
    .a_en (ca_en), .a_we (4'b0000), .a_addr (ca_addr), .a_din ('0), .a_dout (ca_dout),
    .b_en (mb_c_en), .b_we (mb_c_we), .b_addr (mb_c_addr), .b_din (mb_c_din), .b_dout (mb_c_dout)
  );

  logic            ri_en;
  logic [3:0]      ri_we;
  logic [R_AW-1:0] ri_addr;
  logic [31:0]     ri_din, ri_dout_unused;

  info_extractor #(.R_AW(R_AW)) u_ie (
    .clk, .rst_n,
    .in_ena (ha_ena), .in_dat (ha_dat), .in_flow (ha_flow),
    .in_end (ha_end), .in_crc_err (ha_crc_err),
    .ip_t0_dat,
    .r_en (ri_en), .r_we (ri_we), .r_addr (ri_addr), .r_din (ri_din),
    .idx_ptr,
    .pay_valid, .pay_dat, .pay_flow, .pay_idx, .pay_pkt_cnt
  );

  // Data_BLK_RAM: A = info extractor (write), B = MicroBlaze (read)
  bram_dp #(.DEPTH(R_DEPTH)) u_rec_ram (
    .clk,
    .a_en (ri_en), .a_we (ri_we), .a_addr (ri_addr), .a_din (ri_din), .a_dout (ri_dout_unused),
    .b_en (mb_r_en), .b_we (4'b0000), .b_addr (mb_r_addr), .b_din ('0), .b_dout (mb_r_dout)
  );

endmodule
