// xmodem: XMODEM receiver that turns the serial scene download into a stream of message bytes.
//
// Three levels of state machine: the bit level (uart_rx / uart_tx), the block level, which
// parses SOH (0x01), block number, inverted block number, 128 data bytes and an 8-bit
// checksum (sum of the data bytes, carries dropped), and the protocol level, which sends NAK
// (0x15) every NAK_PERIOD cycles until the first block starts, answers each block with ACK
// (0x06) or NAK, and ends on EOT (0x04) with an ACK.
//
// Data bytes are passed on as they arrive (msg_valid pulses with msg_byte); whether they were
// good is only known at the checksum, so each block ends with exactly one pulse of
// block_good (new block, number and checksum correct) or block_bad (corrupted block, wrong
// number, or a repeat of the previous block, which is acknowledged but must not be stored
// twice). The scene loader rolls back to its checkpoint on block_bad. done rises after EOT and
// stays high. Block numbers count 1, 2, ... BLK_MAX and then wrap to 1, as the report
// describes. Time-outs inside a block are not handled: a sender that stops mid-block leaves
// the receiver waiting for the rest of it.
module xmodem #(
  parameter int CLKS_PER_BIT = 434,
  parameter int NAK_PERIOD   = 50_000_000,
  parameter int BLK_MAX      = 127
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  output logic       tx,
  output logic       msg_valid,
  output logic [7:0] msg_byte,
  output logic       block_good,
  output logic       block_bad,
  output logic       done
);
  localparam logic [7:0] SOH = 8'h01, EOT = 8'h04, ACK = 8'h06, NAK = 8'h15;

  typedef enum logic [2:0] {S_SOH, S_BLK, S_NBLK, S_DATA, S_CSUM} bstate_t;

  logic       rx_valid;
  logic [7:0] rx_byte;
  logic       tx_start, tx_busy;
  logic [7:0] tx_data;

  bstate_t    st;
  logic [7:0] blk, nblk, csum, expected;
  logic [7:0] dcount;
  logic       started;
  logic       had_good;
  logic [31:0] nak_timer;
  logic       reply_pend;
  logic [7:0] reply_byte;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst, .rx, .byte_valid(rx_valid), .byte_data(rx_byte));

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst, .start(tx_start), .data(tx_data), .busy(tx_busy), .tx);

  function automatic logic [7:0] next_blk(logic [7:0] b);
    return (b == 8'(BLK_MAX)) ? 8'd1 : b + 8'd1;
  endfunction

  function automatic logic [7:0] prev_blk(logic [7:0] b);
    return (b == 8'd1) ? 8'(BLK_MAX) : b - 8'd1;
  endfunction

  assign tx_start = reply_pend && !tx_busy;
  assign tx_data  = reply_byte;

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= S_SOH;
      blk        <= '0;
      nblk       <= '0;
      csum       <= '0;
      dcount     <= '0;
      expected   <= 8'd1;
      started    <= 1'b0;
      had_good   <= 1'b0;
      nak_timer  <= '0;
      reply_pend <= 1'b0;
      reply_byte <= NAK;
      msg_valid  <= 1'b0;
      msg_byte   <= '0;
      block_good <= 1'b0;
      block_bad  <= 1'b0;
      done       <= 1'b0;
    end else begin
      msg_valid  <= 1'b0;
      block_good <= 1'b0;
      block_bad  <= 1'b0;
      if (tx_start) reply_pend <= 1'b0;

      // protocol level: invite the sender with NAKs until it starts
      if (!started && !done) begin
        if (nak_timer == 0) begin
          nak_timer  <= 32'(NAK_PERIOD - 1);
          reply_pend <= 1'b1;
          reply_byte <= NAK;
        end else nak_timer <= nak_timer - 1'b1;
      end

      // block level
      if (rx_valid && !done) begin
        case (st)
          S_SOH: begin
            if (rx_byte == SOH) begin
              st      <= S_BLK;
              started <= 1'b1;
            end else if (rx_byte == EOT && started) begin
              done       <= 1'b1;
              reply_pend <= 1'b1;
              reply_byte <= ACK;
            end
          end
          S_BLK:  begin blk  <= rx_byte; st <= S_NBLK; end
          S_NBLK: begin
            nblk   <= rx_byte;
            st     <= S_DATA;
            dcount <= '0;
            csum   <= '0;
          end
          S_DATA: begin
            msg_valid <= 1'b1;
            msg_byte  <= rx_byte;
            csum      <= csum + rx_byte;
            dcount    <= dcount + 1'b1;
            if (dcount == 8'd127) st <= S_CSUM;
          end
          S_CSUM: begin
            st         <= S_SOH;
            reply_pend <= 1'b1;
            if (rx_byte == csum && nblk == ~blk && blk == expected) begin
              block_good <= 1'b1;
              reply_byte <= ACK;
              expected   <= next_blk(expected);
              had_good   <= 1'b1;
            end else begin
              block_bad  <= 1'b1;
              // a repeat of the last good block is acknowledged, anything else refused
              reply_byte <= (rx_byte == csum && nblk == ~blk && blk == prev_blk(expected)
                             && had_good) ? ACK : NAK;
            end
          end
          default: st <= S_SOH;
        endcase
      end
    end
  end
endmodule
