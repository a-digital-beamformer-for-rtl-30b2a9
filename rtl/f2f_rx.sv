// f2f_rx: receives the partial-beam words that f2f_tx sends over the F2F bus.
//
// Each clock brings four 36-bit beats from the 4:1 deserialisers of the 36
// lanes (beat k in lanes[k], format in f2f_tx). A word is present when lane 32
// of beat 0 is set; the four beams and the tag fragments are then put back
// together and presented on out_word with out_valid for one clock.
// frame_err (sticky until reset) flags a broken beat pattern: lane 32 set on
// a later beat, or data on the lanes without a start mark.
// Timing: out_valid follows the beats by one clock.
// The beat format is this design's own choice.
module f2f_rx
  import pharos2_pkg::*;
(
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic [F2F_SER-1:0][F2F_LANES-1:0]     lanes,
  output logic                                  out_valid,
  output pbeam_word_t                           out_word,
  output logic                                  frame_err
);
  logic start, bad;

  assign start = lanes[0][32];
  always_comb begin
    bad = !start && (lanes != '0);
    for (int k = 1; k < F2F_SER; k++) bad |= lanes[k][32];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_word  <= '0;
      frame_err <= 1'b0;
    end else begin
      out_valid <= start;
      if (start) begin
        for (int k = 0; k < N_BEAMS; k++) out_word.beam[k] <= lanes[k][31:0];
        out_word.tag.chan <= {lanes[2][35:33], lanes[1][35:33], lanes[0][35:33]};
        out_word.tag.sof  <= lanes[3][33];
      end
      if (bad) frame_err <= 1'b1;
    end
  end
endmodule
