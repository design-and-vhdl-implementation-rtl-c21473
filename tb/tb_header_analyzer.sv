// tb_header_analyzer: sends random frames, some addressed to the board and some
// not (wrong MAC, wrong IP, unknown or disabled UDP port), with random
// lengths, some flagged with a bad FCS. The configuration in the Config RAM
// model changes between frames to exercise the per-frame refresh. For each
// frame the testbench works out whether it must be admitted, the Flow_ID, and
// the byte stream 56..end-4. It checks out_ena/out_dat/out_flow byte by byte,
// the 5-cycle delay from rx_dat to out_dat, the out_end pulse with the FCS
// verdict, and the admitted/dropped counters.
module tb_header_analyzer;
  import cea_pkg::*;
  localparam int C_AW = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rx_ena = 1'b0, rx_crc_err = 1'b0;
  logic [7:0] rx_dat = '0;
  logic c_en;
  logic [C_AW-1:0] c_addr;
  logic [31:0] c_dout;
  logic out_ena, out_end, out_crc_err;
  logic [7:0] out_dat;
  logic [FLOW_W-1:0] out_flow;
  logic [15:0] admitted_cnt, dropped_cnt;
  int checks = 0, failures = 0;

  header_analyzer #(.C_AW(C_AW)) dut (.*);

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

  logic [31:0] cmem [1 << C_AW];
  always @(posedge clk) if (c_en) c_dout <= cmem[c_addr];

  logic [47:0] my_mac;
  logic [31:0] my_ip;
  logic [15:0] ports [NUM_FLOWS];
  logic        pv    [NUM_FLOWS];

  task automatic set_cfg();
    my_mac = {16'($urandom), 32'($urandom)};
    my_ip  = $urandom;
    for (int f = 0; f < NUM_FLOWS; f++) begin
      ports[f] = 16'(16'h1000 + 16'h100 * f + 16'($urandom_range(0, 255)));
      pv[f]    = ($urandom_range(0, 5) != 0);
    end
    cmem[CFG_MAC_HI] = my_mac[47:16];
    cmem[CFG_MAC_LO] = {my_mac[15:0], 16'h0};
    cmem[CFG_IP]     = my_ip;
    for (int f = 0; f < NUM_FLOWS; f++) cmem[CFG_PORT0 + f] = {pv[f], 15'd0, ports[f]};
  endtask

  // expected output stream
  logic [7:0] exp_q[$];
  int exp_flow, cyc = 0;
  int exp_admit = 0, exp_drop = 0, ends = 0;
  bit exp_crc;
  int in_cyc [$];   // cycle at which each expected byte was on rx_dat
  always @(posedge clk) cyc++;

  // monitor
  always @(negedge clk) if (rst_n) begin
    if (out_ena) begin
      check(exp_q.size() > 0, "unexpected out_ena");
      if (exp_q.size() > 0) begin
        check(out_dat === exp_q.pop_front(), "out_dat");
        check(int'(out_flow) == exp_flow, "out_flow");
        check(cyc - in_cyc.pop_front() == 5, "delay rx_dat -> out_dat");
      end
    end
    if (out_end) begin
      ends++;
      check(exp_q.size() == 0, $sformatf("%0d bytes missing at out_end", exp_q.size()));
      check(out_crc_err === exp_crc, "out_crc_err");
    end
  end

  task automatic send(input int kind, input int plen, input bit bad_crc);
    logic [7:0] fr [];
    int flow, n;
    bit admit;
    n = HDR_BYTES + plen + FCS_BYTES;
    fr = new[n];
    foreach (fr[i]) fr[i] = 8'($urandom);
    flow = $urandom_range(0, NUM_FLOWS - 1);
    for (int i = 0; i < 6; i++) fr[i] = my_mac[47 - 8*i -: 8];
    for (int i = 0; i < 4; i++) fr[OFS_DST_IP + i] = my_ip[31 - 8*i -: 8];
    fr[OFS_UDP_DPORT] = ports[flow][15:8];
    fr[OFS_UDP_DPORT + 1] = ports[flow][7:0];
    case (kind)
      1: fr[$urandom_range(0, 5)] ^= 8'h10;                 // wrong MAC
      2: fr[OFS_DST_IP + $urandom_range(0, 3)] ^= 8'h01;    // wrong IP
      3: fr[OFS_UDP_DPORT] = 8'hEE;                         // unknown port
      default: ;
    endcase
    admit = (kind == 0) && pv[flow];
    if (admit) begin
      exp_flow = flow;
      exp_crc  = bad_crc;
      for (int i = STATIC_BYTES; i < n - FCS_BYTES; i++) exp_q.push_back(fr[i]);
      exp_admit++;
    end else exp_drop++;
    for (int i = 0; i < n; i++) begin
      rx_ena <= 1'b1;
      rx_dat <= fr[i];
      @(posedge clk);
      if (admit && i >= STATIC_BYTES && i < n - FCS_BYTES) in_cyc.push_back(cyc);
    end
    rx_ena     <= 1'b0;
    rx_crc_err <= bad_crc;
    @(posedge clk);
    rx_crc_err <= 1'b0;
    repeat (12 + $urandom_range(0, 8)) @(posedge clk);
  endtask

  initial begin
    set_cfg();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (20) @(posedge clk);
    for (int n = 0; n < 150; n++) begin
      int kind;
      kind = ($urandom_range(0, 2) == 0) ? $urandom_range(1, 3) : 0;
      send(kind, (n % 3 == 0) ? 256 : $urandom_range(0, 256), $urandom_range(0, 7) == 0);
      // new configuration: takes effect after the refresh that follows the next frame
      if (n % 25 == 24) begin
        set_cfg();
        send(3, 10, 1'b0);  // dropped frame that triggers the refresh
      end
    end
    repeat (10) @(posedge clk);
    check(int'(admitted_cnt) == exp_admit, $sformatf("admitted %0d exp %0d", admitted_cnt, exp_admit));
    check(int'(dropped_cnt) == exp_drop, $sformatf("dropped %0d exp %0d", dropped_cnt, exp_drop));
    check(ends == exp_admit, "out_end count");
    check(exp_admit > 20 && exp_drop > 20, "too few admitted or dropped frames");
    $display("admitted=%0d dropped=%0d", exp_admit, exp_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
