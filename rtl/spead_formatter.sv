// spead_formatter: wraps payload heaps into SPEAD packets.
//
// SPEAD (Streaming Protocol for Exchanging Astronomical Data) is the packet
// format of the output data; each packet here carries one whole heap. The
// formatter takes a ready/valid stream of 64-bit payload words, where the first
// word of a heap comes with in_sop and its descriptors (heap counter, payload
// length in 64-bit words, source kind, beam or FPGA index, frame number), and
// the last with in_eop. It emits, on a ready/valid stream, the SPEAD header
// followed by the payload; out_last marks the packet's last word. The packets
// then go to the UDP/Ethernet interface, which is not part of this module.
//
// Header (SPEAD-64-48, one 64-bit word per line, HDR_WORDS = 7):
//   0x5304_0206_0000_0006            magic, version 4, 2-byte item id, 6-byte
//                                    address, 6 item pointers
//   0x8001 : heap counter            immediate items: 1 bit flag, 15 bit id,
//   0x8002 : heap size (bytes)       48 bit value
//   0x8003 : heap offset (0)
//   0x8004 : payload length (bytes)
//   0x9600 : frame number
//   0x9011 : {source kind, index}
// Timing: the header words leave on the clocks after the first payload word is
// offered (in_ready low meanwhile), then payload words pass through one per
// clock with out_ready. Words offered between packets without in_sop are
// dropped.
// The use of SPEAD follows the document; the choice of items and the custom
// item ids 0x9600 / 0x9011 are this design's own.
module spead_formatter
  import pharos2_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [63:0]  in_data,
  input  logic         in_sop,
  input  logic         in_eop,
  input  logic [47:0]  in_heap_cnt,
  input  logic [15:0]  in_len_words,
  input  logic [7:0]   in_kind,
  input  logic [7:0]   in_index,
  input  logic [31:0]  in_frame,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [63:0]  out_data,
  output logic         out_last
);
  localparam int unsigned HDR_WORDS = 7;

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_PAY} state_e;
  state_e      state;
  logic [2:0]  hidx;
  logic [47:0] heap_cnt_q;
  logic [47:0] len_bytes_q;
  logic [7:0]  kind_q, index_q;
  logic [31:0] frame_q;
  logic [63:0] hdr_word;

  always_comb begin
    case (hidx)
      3'd0:    hdr_word = 64'h5304_0206_0000_0006;
      3'd1:    hdr_word = {16'h8001, heap_cnt_q};
      3'd2:    hdr_word = {16'h8002, len_bytes_q};
      3'd3:    hdr_word = {16'h8003, 48'd0};
      3'd4:    hdr_word = {16'h8004, len_bytes_q};
      3'd5:    hdr_word = {16'h9600, 16'd0, frame_q};
      default: hdr_word = {16'h9011, 32'd0, kind_q, index_q};
    endcase
  end

  always_comb begin
    in_ready  = 1'b0;
    out_valid = 1'b0;
    out_data  = hdr_word;
    out_last  = 1'b0;
    case (state)
      S_IDLE: in_ready = in_valid && !in_sop;     // drop stray words
      S_HDR:  out_valid = 1'b1;
      S_PAY: begin
        out_valid = in_valid;
        in_ready  = out_ready;
        out_data  = in_data;
        out_last  = in_eop;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      hidx        <= '0;
      heap_cnt_q  <= '0;
      len_bytes_q <= '0;
      kind_q      <= '0;
      index_q     <= '0;
      frame_q     <= '0;
    end else begin
      case (state)
        S_IDLE: if (in_valid && in_sop) begin
          state       <= S_HDR;
          hidx        <= '0;
          heap_cnt_q  <= in_heap_cnt;
          len_bytes_q <= {29'd0, in_len_words, 3'd0};
          kind_q      <= in_kind;
          index_q     <= in_index;
          frame_q     <= in_frame;
        end
        S_HDR: if (out_ready) begin
          if (hidx == 3'(HDR_WORDS-1)) state <= S_PAY;
          else hidx <= hidx + 1'b1;
        end
        S_PAY: if (in_valid && out_ready && in_eop) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
