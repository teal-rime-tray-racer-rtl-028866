// uart_tx: serial transmitter (8 data bits, 1 start, 1 stop, no parity, LSB first) used by
// the XMODEM receiver to send its ACK and NAK bytes to the host.
//
// A byte is taken when start is high and busy is low; the line is then driven low for one
// bit period, followed by the 8 data bits and a high stop bit, each CLKS_PER_BIT cycles long.
// busy stays high for the whole frame. The report only says that the FPGA sends NAK and ACK;
// the transmitter itself is this design's own.
module uart_tx #(
  parameter int CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] data,
  output logic       busy,
  output logic       tx
);
  logic [9:0]  frame;
  logic [3:0]  nbits;
  logic [15:0] cnt;

  assign busy = (nbits != 0) || (cnt != 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      frame <= '1;
      nbits <= '0;
      cnt   <= '0;
      tx    <= 1'b1;
    end else if (!busy) begin
      tx <= 1'b1;
      if (start) begin
        frame <= {1'b1, data, 1'b0};
        nbits <= 4'd10;
        cnt   <= '0;
      end
    end else if (cnt == 0) begin
      tx    <= frame[0];
      frame <= {1'b1, frame[9:1]};
      cnt   <= 16'(CLKS_PER_BIT - 1);
      nbits <= nbits - 1'b1;
    end else begin
      cnt <= cnt - 1'b1;
    end
  end
endmodule
