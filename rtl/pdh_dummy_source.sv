// pdh_dummy_source: test traffic in place of real telephony. It drives the
// E1 bit interface of every flow from the station clock.
//
// Each t3_tick (a one-cycle strobe derived from the external station clock,
// one per bit period) while enable is high sends the next bit of every
// flow's stream, MSB first, with e1_ena high for that cycle. Byte k of flow f
// is (k + 64 f) mod 256: a counting pattern in which each flow starts at a
// different value. A receiver can thus check order and loss from the
// payload alone. Dropping enable stops the streams; raising it again restarts
// every stream at byte 0. The document says only that the forward path takes
// the station clock and generates dummy traffic. The pattern and the
// interface are this design's choices.
module pdh_dummy_source
  import cea_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  logic                 t3_tick,
  output logic [NUM_FLOWS-1:0] e1_dat,
  output logic [NUM_FLOWS-1:0] e1_ena
);

  logic [7:0] k;       // byte number (shared by all flows)
  logic [2:0] bitn;    // bit within the byte, 0 = MSB

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k      <= '0;
      bitn   <= '0;
      e1_dat <= '0;
      e1_ena <= '0;
    end else begin
      e1_ena <= '0;
      if (!enable) begin
        k    <= '0;
        bitn <= '0;
      end else if (t3_tick) begin
        for (int f = 0; f < NUM_FLOWS; f++) begin
          logic [7:0] b;
          b = k + 8'(64 * f);
          e1_dat[f] <= b[3'd7 - bitn];
        end
        e1_ena <= '1;
        bitn   <= bitn + 3'd1;
        if (bitn == 3'd7) k <= k + 8'd1;
      end
    end
  end

endmodule
