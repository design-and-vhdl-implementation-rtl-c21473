// bit_to_byte: serial-to-parallel converter between a PDH (E1) receive
// interface and the data packager.
//
// Each cycle with e1_rx_ena high, e1_rx_dat is shifted in; after 8 such
// bits the completed byte appears on pdh_dat together with a one-cycle
// pdh_ena pulse (the cycle after the eighth bit). As in the document the
// converter has a single state and does nothing while the enable is low.
// Choices of this design: the first received bit becomes the MSB of the byte
// (G.703/G.704 transmit order), and pdh_dat holds its value until the next
// byte completes.
module bit_to_byte (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       e1_rx_dat,   // PDH data bit
  input  logic       e1_rx_ena,   // bit strobe, one per received bit
  output logic [7:0] pdh_dat,     // assembled byte
  output logic       pdh_ena      // one-cycle pulse: pdh_dat is new
);

  logic [6:0] shreg;
  logic [2:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg   <= '0;
      cnt     <= '0;
      pdh_dat <= '0;
      pdh_ena <= 1'b0;
    end else begin
      pdh_ena <= 1'b0;
      if (e1_rx_ena) begin
        cnt <= cnt + 3'd1;
        if (cnt == 3'd7) begin
          pdh_dat <= {shreg, e1_rx_dat};
          pdh_ena <= 1'b1;
        end else begin
          shreg <= {shreg[5:0], e1_rx_dat};
        end
      end
    end
  end

endmodule
