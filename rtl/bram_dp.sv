// bram_dp: true dual-port synchronous block RAM, 32-bit words with byte write
// enables, one clock cycle of read latency on both ports.
//
// It models the FPGA block RAMs of the design: the forward Header Block RAM
// (MicroBlaze writes on port B, MAC transmitter reads on port A), the forward
// Data Block RAM (data packager writes on A, MAC transmitter reads on B), the
// backward Config_BLK_RAM and the backward Data_BLK_RAM. The document gives
// a 32-bit data bus and the two-port organisation; the byte write enables,
// the read-first behaviour on a same-port write and the absence of parity
// bits are this design's choices. Each port: en qualifies the access, we[i]
// writes byte lane i, dout holds the word read at the previous enabled cycle.
// Same-address writes from both ports in one cycle are not resolved.
module bram_dp #(
  parameter int unsigned DEPTH = 512,               // words (512 x 32 = 2 KB)
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A
  input  logic          a_en,
  input  logic [3:0]    a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [31:0]   a_din,
  output logic [31:0]   a_dout,
  // port B
  input  logic          b_en,
  input  logic [3:0]    b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [31:0]   b_din,
  output logic [31:0]   b_dout
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_dout <= mem[a_addr];
      for (int i = 0; i < 4; i++)
        if (a_we[i]) mem[a_addr][8*i +: 8] <= a_din[8*i +: 8];
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      b_dout <= mem[b_addr];
      for (int i = 0; i < 4; i++)
        if (b_we[i]) mem[b_addr][8*i +: 8] <= b_din[8*i +: 8];
    end
  end

endmodule
