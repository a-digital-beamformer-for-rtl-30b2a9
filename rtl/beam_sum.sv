// beam_sum: forms the final beams in FPGA0 from the two partial beams.
//
// FPGA0's own partial beams (all four beams of a channel in one word) are
// written into a FIFO as soon as they are made. FPGA1's partial beams arrive
// later over the F2F link; each arriving word pops the oldest local word, and
// the two are added beam by beam. The FIFO therefore absorbs whatever delay the
// link adds, up to FIFO_DEPTH channel samples.
// The sum (PB_W+1 bits) is shifted right by out_shift and saturated to the
// 8+8 bit raw-beam format; beam_sat flags a sample whose value was clipped.
// Timing: out_valid is high the clock after the remote word arrives.
// Errors, all sticky until reset: misalign (the two words carry different
// channel tags), fifo_overflow, fifo_underflow (remote word with no local one).
// fifo_level shows the current FIFO occupancy.
// FIFO, link and beam sum follow the document; widths, rescaling and error
// flags are this design's own choices.
module beam_sum
  import pharos2_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 64
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [3:0]                    out_shift,
  input  logic                          local_valid,
  input  pbeam_word_t                   local_word,
  input  logic                          remote_valid,
  input  pbeam_word_t                   remote_word,
  output logic                          out_valid,
  output chan_tag_t                     out_tag,
  output cplx8_t [N_BEAMS-1:0]          out_beam,
  output logic   [N_BEAMS-1:0]          beam_sat,
  output logic                          misalign,
  output logic                          fifo_overflow,
  output logic                          fifo_underflow,
  output logic [$clog2(FIFO_DEPTH):0]   fifo_level
);
  localparam int unsigned SW = PB_W + 1;
  localparam logic signed [SW-1:0] OMAX = SW'((1 <<< (SMP_W-1)) - 1);
  localparam logic signed [SW-1:0] OMIN = -OMAX - 1;

  pbeam_word_t fifo_out;
  logic        fifo_empty, fifo_full;

  sync_fifo #(.T(pbeam_word_t), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(local_valid), .wr_data(local_word),
    .rd_en(remote_valid), .rd_data(fifo_out),
    .empty(fifo_empty), .full(fifo_full), .count(fifo_level),
    .overflow(fifo_overflow), .underflow(fifo_underflow)
  );

  function automatic logic signed [SMP_W-1:0] requant(input logic signed [SW-1:0] x,
                                                     input logic [3:0] sh, output logic sat);
    logic signed [SW-1:0] y;
    y   = x >>> sh;
    sat = 1'b1;
    if (y > OMAX)      return OMAX[SMP_W-1:0];
    else if (y < OMIN) return OMIN[SMP_W-1:0];
    sat = 1'b0;
    return y[SMP_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      out_beam  <= '0;
      beam_sat  <= '0;
      misalign  <= 1'b0;
    end else begin
      out_valid <= remote_valid && !fifo_empty;
      if (remote_valid && !fifo_empty) begin
        out_tag <= fifo_out.tag;
        if (fifo_out.tag != remote_word.tag) misalign <= 1'b1;
        for (int b = 0; b < N_BEAMS; b++) begin
          logic s_re, s_im;
          out_beam[b].re <= requant(SW'(fifo_out.beam[b].re) + SW'(remote_word.beam[b].re), out_shift, s_re);
          out_beam[b].im <= requant(SW'(fifo_out.beam[b].im) + SW'(remote_word.beam[b].im), out_shift, s_im);
          beam_sat[b]    <= s_re | s_im;
        end
      end
    end
  end
endmodule
