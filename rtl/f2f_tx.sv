// f2f_tx: sends FPGA1's four partial beams to FPGA0 over the 36-lane F2F bus.
//
// The 36 LVDS lanes run at up to 1.6 Gb/s each; at the logic clock each lane
// is fed through a 4:1 serialiser, so every clock hands F2F_SER = 4 bits per
// lane, i.e. four 36-bit beats, to the serialisers: 144 bits, enough for one
// partial-beam word (four complex 16+16 bit beams plus the 10-bit channel
// tag) per clock. Beat k (lanes[k]) carries beam k on lanes 31..0; lane 32 is
// set on beat 0 only and marks a word; lanes 35..33 carry the tag three bits
// at a time: channel bits 2..0, 5..3, 8..6, then {0, 0, start-of-frame}.
// A clock with no word sends all-zero beats.
// Interface: in_valid/in_word, no back-pressure: a word may come every clock.
// Timing: the beats of a word leave on lanes the clock after in_valid.
// The serialisers themselves (vendor I/O primitives) are outside this module.
// The 36 LVDS lanes and their rate follow the document; the 4:1 ratio and
// the beat format are this design's own, since the document does not
// describe the link protocol.
module f2f_tx
  import pharos2_pkg::*;
(
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  in_valid,
  input  pbeam_word_t                           in_word,
  output logic [F2F_SER-1:0][F2F_LANES-1:0]     lanes
);
  function automatic logic [2:0] tag_bits(input chan_tag_t t, input int unsigned b);
    case (b)
      0:       return t.chan[2:0];
      1:       return t.chan[5:3];
      2:       return t.chan[8:6];
      default: return {2'b00, t.sof};
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lanes <= '0;
    else begin
      for (int k = 0; k < F2F_SER; k++)
        lanes[k] <= in_valid ? {tag_bits(in_word.tag, k), k == 0, in_word.beam[k]} : '0;
    end
  end

  initial begin
    assert (N_BEAMS == F2F_SER && CHAN_W == 9 && F2F_LANES == 36)
      else $fatal(1, "f2f_tx: beat format is laid out for 4 beams, 9-bit channels, 36 lanes, 4:1 serialisation");
  end
endmodule
