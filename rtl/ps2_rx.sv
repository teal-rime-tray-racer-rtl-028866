// ps2_rx: PS/2 keyboard receiver and key event decoder.
//
// The keyboard drives ps2_clk and ps2_data; both are synchronised with two flip-flops. On
// each falling edge of ps2_clk one bit of an 11-bit frame is taken: start bit (0), 8 data
// bits LSB first, odd parity, stop bit (1). A frame with a bad start, parity or stop bit is
// dropped. Scan code set 2 is decoded: the prefix F0 marks the next code as a key release,
// the prefix E0 (extended keys) is skipped. Each complete key event pulses key_valid for one
// cycle with key_code and key_pressed (1 = make, 0 = break). The report only says that these
// modules tell the design when a key is pressed or released; the frame checks and the
// prefix handling are this design's own. Mouse input is not handled.
module ps2_rx (
  input  logic       clk,
  input  logic       rst,
  input  logic       ps2_clk,
  input  logic       ps2_data,
  output logic       key_valid,
  output logic [7:0] key_code,
  output logic       key_pressed
);
  logic [2:0]  clk_sync;
  logic [1:0]  dat_sync;
  logic [10:0] frame;
  logic [3:0]  nbits;
  logic        brk;
  logic        fall;
  logic [10:0] full;

  assign fall = clk_sync[2] && !clk_sync[1];
  assign full = {dat_sync[1], frame[10:1]};

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_sync    <= 3'b111;
      dat_sync    <= 2'b11;
      frame       <= '0;
      nbits       <= '0;
      brk         <= 1'b0;
      key_valid   <= 1'b0;
      key_code    <= '0;
      key_pressed <= 1'b0;
    end else begin
      clk_sync  <= {clk_sync[1:0], ps2_clk};
      dat_sync  <= {dat_sync[0], ps2_data};
      key_valid <= 1'b0;
      if (fall) begin
        frame <= full;
        if (nbits == 4'd10) begin
          nbits <= '0;
          // full = {stop, parity, data[7:0], start}
          if (!full[0] && full[10] && (^full[9:1])) begin
            if (full[8:1] == 8'hF0) brk <= 1'b1;
            else if (full[8:1] != 8'hE0) begin
              key_valid   <= 1'b1;
              key_code    <= full[8:1];
              key_pressed <= !brk;
              brk         <= 1'b0;
            end
          end
        end else begin
          nbits <= nbits + 1'b1;
        end
      end
    end
  end
endmodule
