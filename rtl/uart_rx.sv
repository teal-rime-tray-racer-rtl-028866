// uart_rx: bit-level receiver of the serial link (8 data bits, 1 start bit, 1 stop bit,
// no parity, LSB first), the lowest of the three XMODEM state machines.
//
// The input pin is first passed through two flip-flops against metastability. A falling
// edge while idle starts a byte; the receiver then waits half a bit period and checks that
// the line is still low (start bit), and samples each following bit in the middle of its
// period, every CLKS_PER_BIT cycles. After the eighth data bit it samples the stop bit and,
// if it is high, pulses byte_valid for one cycle with the byte. A low stop bit drops the
// byte (framing error). The report gives the frame format, the baud rate, the two-flop
// synchroniser and the mid-bit sampling; CLKS_PER_BIT = 434 is 50 MHz / 115200.
module uart_rx #(
  parameter int CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  output logic       byte_valid,
  output logic [7:0] byte_data
);
  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;

  state_t      state;
  logic [2:0]  sync;
  logic [15:0] cnt;
  logic [2:0]  bit_idx;
  logic [7:0]  shreg;
  logic        rxs;

  assign rxs = sync[2];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync       <= 3'b111;
      state      <= IDLE;
      cnt        <= '0;
      bit_idx    <= '0;
      shreg      <= '0;
      byte_valid <= 1'b0;
      byte_data  <= '0;
    end else begin
      sync       <= {sync[1:0], rx};
      byte_valid <= 1'b0;
      case (state)
        IDLE: if (sync[2] && !sync[1]) begin   // falling edge
          state <= START;
          cnt   <= 16'(CLKS_PER_BIT / 2 - 1);
        end
        START: if (cnt == 0) begin
          if (!rxs) begin
            state   <= DATA;
            cnt     <= 16'(CLKS_PER_BIT - 1);
            bit_idx <= '0;
          end else state <= IDLE;
        end else cnt <= cnt - 1'b1;
        DATA: if (cnt == 0) begin
          shreg <= {rxs, shreg[7:1]};
          cnt   <= 16'(CLKS_PER_BIT - 1);
          if (bit_idx == 3'd7) state <= STOP;
          bit_idx <= bit_idx + 1'b1;
        end else cnt <= cnt - 1'b1;
        STOP: if (cnt == 0) begin
          state <= IDLE;
          if (rxs) begin
            byte_valid <= 1'b1;
            byte_data  <= shreg;
          end
        end else cnt <= cnt - 1'b1;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
