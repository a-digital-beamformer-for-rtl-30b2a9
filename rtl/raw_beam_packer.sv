// raw_beam_packer: packs the voltages of one selected beam into heaps.
//
// When enable is high, the 8+8 bit samples of beam `sel` are gathered four
// channels to a 64-bit payload word (channel 4k in bits 63..48) and written,
// with start/end-of-heap marks, into a FIFO that feeds a SPEAD formatter. One
// heap holds one frame, NSEL/4 words; heap counter and frame number count the
// frames packed. Source kind 2, index = beam.
// Timing: a word enters the FIFO the clock after its fourth sample; the FIFO
// (FIFO_DEPTH words) absorbs the header time of the formatter. Packing starts
// only at a start of frame, so heaps are always whole; overflow is sticky.
// Sending one selectable raw beam follows the document; the packing is this
// design's own choice.
module raw_beam_packer
  import pharos2_pkg::*;
#(
  parameter int unsigned NSEL       = N_SEL,
  parameter int unsigned FIFO_DEPTH = 256
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         enable,
  input  logic [$clog2(N_BEAMS)-1:0]   sel,
  input  logic                         in_valid,
  input  chan_tag_t                    in_tag,
  input  cplx8_t [N_BEAMS-1:0]         in_beam,
  output logic                         overflow,
  output logic                         out_valid,
  input  logic                         out_ready,
  output logic [63:0]                  out_data,
  output logic                         out_sop,
  output logic                         out_eop,
  output logic [47:0]                  out_heap_cnt,
  output logic [15:0]                  out_len_words,
  output logic [7:0]                   out_kind,
  output logic [7:0]                   out_index,
  output logic [31:0]                  out_frame
);
  localparam int unsigned WORDS = NSEL / 4;

  typedef struct packed {
    logic [63:0] data;
    logic        sop;
    logic        eop;
    logic [31:0] frame;
    logic [7:0]  beam;
  } ent_t;

  logic        active;
  logic [47:0] shreg;
  logic [31:0] frame_cnt;
  logic [7:0]  beam_q;
  logic        wr;
  ent_t        wr_ent, rd_ent;
  logic        emp, ful, unf;
  logic [$clog2(FIFO_DEPTH):0] lvl;

  logic take;
  assign take = in_valid && (in_tag.sof ? enable : active);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      shreg     <= '0;
      frame_cnt <= '0;
      beam_q    <= '0;
      wr        <= 1'b0;
      wr_ent    <= '0;
    end else begin
      wr <= 1'b0;
      if (in_valid && in_tag.sof) begin
        active <= enable;
        if (enable) beam_q <= 8'(sel);
      end
      if (take) begin
        shreg <= {shreg[31:0], in_beam[in_tag.sof ? sel : beam_q[$clog2(N_BEAMS)-1:0]]};
        if (in_tag.chan[1:0] == 2'd3) begin
          wr           <= 1'b1;
          wr_ent.data  <= {shreg, in_beam[beam_q[$clog2(N_BEAMS)-1:0]]};
          wr_ent.sop   <= (in_tag.chan == CHAN_W'(3));
          wr_ent.eop   <= (in_tag.chan == CHAN_W'(NSEL-1));
          wr_ent.frame <= frame_cnt;
          wr_ent.beam  <= beam_q;
          if (in_tag.chan == CHAN_W'(NSEL-1)) frame_cnt <= frame_cnt + 1;
        end
      end
    end
  end

  sync_fifo #(.T(ent_t), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(wr), .wr_data(wr_ent),
    .rd_en(out_valid && out_ready), .rd_data(rd_ent),
    .empty(emp), .full(ful), .count(lvl),
    .overflow, .underflow(unf)
  );

  assign out_valid     = !emp;
  assign out_data      = rd_ent.data;
  assign out_sop       = rd_ent.sop;
  assign out_eop       = rd_ent.eop;
  assign out_heap_cnt  = {16'd0, rd_ent.frame};
  assign out_len_words = 16'(WORDS);
  assign out_kind      = 8'd2;
  assign out_index     = rd_ent.beam;
  assign out_frame     = rd_ent.frame;
endmodule
