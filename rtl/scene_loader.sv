// scene_loader: writes the downloaded scene file into the scene memories, one byte at a time.
//
// The scene file is five sections in a fixed order: k-d tree nodes (6 bytes each), leaf
// triangle-ID lists (2 bytes each), unit-triangle transforms (36 bytes: twelve 24-bit
// floats), triangle colour/normal/specular records (20 bytes) and the scene bounding box
// (24 bytes: six 32-bit floats, min x,y,z then max x,y,z). Each section starts with its byte
// count in 4 bytes. All multi-byte values are sent least significant byte first, an element
// being one little-endian integer of its packed layout (see rt_pkg).
//
// Bytes arrive from the XMODEM receiver (msg_valid/msg_byte). A completed element is written
// to its memory (tc_we, lc_we, ic_we, sc_we with wr_addr = element index and wr_data
// right-aligned), or, for the bounding box, into the bbox registers, keeping the upper 24
// bits of each 32-bit float. Because a block can turn out bad after its bytes were used, the
// whole state is one packed struct that is copied into a checkpoint register on block_good
// and restored from it on block_bad; memory writes of a rolled-back block are simply redone
// when the block is resent. loaded rises after the last section. The section order, the
// byte counts and the checkpoint scheme follow the report; the byte order and element
// layouts are this design's choice.
module scene_loader
  import rt_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         msg_valid,
  input  logic [7:0]   msg_byte,
  input  logic         block_good,
  input  logic         block_bad,
  output logic         tc_we,
  output logic         lc_we,
  output logic         ic_we,
  output logic         sc_we,
  output logic [15:0]  wr_addr,
  output logic [287:0] wr_data,
  output vec3_t        bbox_min,
  output vec3_t        bbox_max,
  output logic         loaded
);
  localparam int NSECT = 5;

  typedef struct packed {
    logic [2:0]   section;    // 0..4, 5 = finished
    logic         in_hdr;     // receiving the 4-byte count
    logic [1:0]   hdr_cnt;
    logic [31:0]  size;       // bytes in this section
    logic [31:0]  byte_cnt;   // bytes of this section received
    logic [5:0]   elem_byte;  // bytes of the current element received
    logic [15:0]  elem_idx;
    logic [287:0] buffer;     // bytes shift in from the top
  } sl_state_t;

  sl_state_t st, ckpt, nx;

  function automatic logic [5:0] elem_bytes(logic [2:0] s);
    case (s)
      3'd0:    return 6'd6;
      3'd1:    return 6'd2;
      3'd2:    return 6'd36;
      3'd3:    return 6'd20;
      default: return 6'd4;
    endcase
  endfunction

  logic         elem_done;
  logic [287:0] elem;

  always_comb begin
    nx        = st;
    elem_done = 1'b0;
    elem      = '0;
    if (msg_valid && st.section < 3'(NSECT)) begin
      if (st.in_hdr) begin
        nx.size    = {msg_byte, st.size[31:8]};
        nx.hdr_cnt = st.hdr_cnt + 1'b1;
        if (st.hdr_cnt == 2'd3) begin
          nx.in_hdr    = 1'b0;
          nx.byte_cnt  = '0;
          nx.elem_byte = '0;
          nx.elem_idx  = '0;
          if (nx.size == 0) begin
            nx.section = st.section + 1'b1;
            nx.in_hdr  = 1'b1;
          end
        end
      end else begin
        nx.buffer    = {msg_byte, st.buffer[287:8]};
        nx.byte_cnt  = st.byte_cnt + 1'b1;
        nx.elem_byte = st.elem_byte + 1'b1;
        if (nx.elem_byte == elem_bytes(st.section)) begin
          elem_done    = 1'b1;
          elem         = nx.buffer >> (288 - 8 * int'(elem_bytes(st.section)));
          nx.elem_byte = '0;
          nx.elem_idx  = st.elem_idx + 1'b1;
        end
        if (nx.byte_cnt == st.size) begin
          nx.section = st.section + 1'b1;
          nx.in_hdr  = 1'b1;
          nx.hdr_cnt = '0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= '0;
      st.in_hdr  <= 1'b1;
      ckpt       <= '0;
      ckpt.in_hdr <= 1'b1;
      tc_we      <= 1'b0;
      lc_we      <= 1'b0;
      ic_we      <= 1'b0;
      sc_we      <= 1'b0;
      wr_addr    <= '0;
      wr_data    <= '0;
      bbox_min   <= '0;
      bbox_max   <= '0;
    end else begin
      tc_we <= 1'b0;
      lc_we <= 1'b0;
      ic_we <= 1'b0;
      sc_we <= 1'b0;
      if (block_bad) begin
        st <= ckpt;
      end else begin
        st <= nx;
        if (block_good) ckpt <= st;
      end
      if (elem_done && !block_bad) begin
        wr_addr <= st.elem_idx;
        wr_data <= elem;
        case (st.section)
          3'd0: tc_we <= 1'b1;
          3'd1: lc_we <= 1'b1;
          3'd2: ic_we <= 1'b1;
          3'd3: sc_we <= 1'b1;
          default: case (st.elem_idx)
            16'd0: bbox_min.x <= elem[31:8];
            16'd1: bbox_min.y <= elem[31:8];
            16'd2: bbox_min.z <= elem[31:8];
            16'd3: bbox_max.x <= elem[31:8];
            16'd4: bbox_max.y <= elem[31:8];
            default: bbox_max.z <= elem[31:8];
          endcase
        endcase
      end
    end
  end

  assign loaded = (st.section == 3'(NSECT));

  a_one_verdict: assert property (@(posedge clk) disable iff (rst) !(block_good && block_bad));
endmodule
