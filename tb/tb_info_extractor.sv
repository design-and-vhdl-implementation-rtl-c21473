// tb_info_extractor: feeds stream frames as the header analyzer sends them
// (14 dynamic header bytes, then the payload; out_end one cycle after the
// enable drops). Some frames carry a packet length that does not match their
// payload, and some carry the FCS error flag. It checks every payload byte on
// the payload port with its flow, index and packet counter. Against a RAM model
// it checks the 8-word record of each frame (receive time stamp = IP_T0 value
// at the first byte), and that idx_ptr names the new record once its 8 writes
// are done. 300 frames make the 256-record ring wrap around.
module tb_info_extractor;
  import cea_pkg::*;
  localparam int R_AW = 11;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_ena = 1'b0, in_end = 1'b0, in_crc_err = 1'b0;
  logic [7:0] in_dat = '0;
  logic [FLOW_W-1:0] in_flow = '0;
  logic [31:0] ip_t0_dat = '0;
  logic r_en;
  logic [3:0] r_we;
  logic [R_AW-1:0] r_addr;
  logic [31:0] r_din;
  logic [R_AW-4:0] idx_ptr;
  logic pay_valid;
  logic [7:0] pay_dat;
  logic [FLOW_W-1:0] pay_flow;
  logic [8:0] pay_idx;
  logic [31:0] pay_pkt_cnt;
  int checks = 0, failures = 0;

  info_extractor #(.R_AW(R_AW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) ip_t0_dat <= ip_t0_dat + 32'd7;

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

  logic [31:0] rmem [1 << R_AW];
  int nwrites = 0;
  always @(posedge clk) if (r_en) begin
    for (int i = 0; i < 4; i++) if (r_we[i]) rmem[r_addr][8*i +: 8] <= r_din[8*i +: 8];
    nwrites++;
  end

  // IP_T0 value at the edge that samples the first byte of a frame
  logic [31:0] mon_rxts = '0;
  logic        ena_q = 1'b0;
  always @(posedge clk) begin
    if (in_ena && !ena_q) mon_rxts <= ip_t0_dat;
    ena_q <= in_ena;
  end

  // expected payload stream
  typedef struct { logic [7:0] d; int idx; int flow; logic [31:0] pc; } pb_t;
  pb_t pay_q[$];
  always @(negedge clk) if (rst_n && pay_valid) begin
    pb_t e;
    check(pay_q.size() > 0, "unexpected payload byte");
    if (pay_q.size() > 0) begin
      e = pay_q.pop_front();
      check(pay_dat === e.d && int'(pay_idx) == e.idx && int'(pay_flow) == e.flow && pay_pkt_cnt === e.pc,
            $sformatf("payload byte %0d", e.idx));
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    @(negedge clk);
    check(idx_ptr == '1, "idx_ptr after reset");
    for (int n = 0; n < 300; n++) begin
      logic [31:0] pc, txts, bc, rxts;
      logic [15:0] len_field;
      int plen, flow, set;
      bit crc, lenerr;
      pc = $urandom; txts = $urandom; bc = $urandom;
      plen = (n % 4 == 0) ? 256 : $urandom_range(0, 40);
      lenerr = ($urandom_range(0, 9) == 0);
      len_field = lenerr ? 16'(plen + 1) : 16'(plen);
      crc = ($urandom_range(0, 9) == 0);
      flow = $urandom_range(0, NUM_FLOWS - 1);
      for (int i = 0; i < DYN_BYTES + plen; i++) begin
        logic [7:0] b;
        case (i)
          0, 1, 2, 3:    b = pc[31 - 8*i -: 8];
          4, 5, 6, 7:    b = txts[31 - 8*(i-4) -: 8];
          8, 9, 10, 11:  b = bc[31 - 8*(i-8) -: 8];
          12:            b = len_field[15:8];
          13:            b = len_field[7:0];
          default: begin
            b = 8'($urandom);
            pay_q.push_back('{b, i - DYN_BYTES, flow, pc});
          end
        endcase
        in_ena  <= 1'b1;
        in_dat  <= b;
        in_flow <= FLOW_W'(flow);
        @(posedge clk);
      end
      in_ena <= 1'b0;
      @(posedge clk);
      in_end     <= 1'b1;
      in_crc_err <= crc;
      @(posedge clk);
      in_end     <= 1'b0;
      in_crc_err <= 1'b0;
      set = n % 256;
      // record written in the next 8 cycles
      repeat (8) @(posedge clk);
      @(negedge clk);
      check(int'(idx_ptr) == set, $sformatf("idx_ptr %0d exp %0d", idx_ptr, set));
      check(rmem[set*8 + REC_FLOW_ID]   == 32'(flow), "rec flow");
      rxts = mon_rxts;
      check(rmem[set*8 + REC_RX_TSTAMP] == rxts, "rec rx time stamp");
      check(rmem[set*8 + REC_PKT_CNT]   == pc, "rec packet counter");
      check(rmem[set*8 + REC_BYTE_CNT]  == bc, "rec byte counter");
      check(rmem[set*8 + REC_PKT_LEN]   == 32'(len_field), "rec packet length");
      check(rmem[set*8 + REC_TX_TSTAMP] == txts, "rec tx time stamp");
      check(rmem[set*8 + REC_STATUS]    == {30'd0, lenerr, crc}, "rec status");
      check(rmem[set*8 + REC_SPARE]     == 32'd0, "rec spare");
      repeat ($urandom_range(0, 10)) @(posedge clk);
    end
    check(nwrites == 300 * 8, "number of RAM writes");
    check(pay_q.size() == 0, "payload bytes missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
