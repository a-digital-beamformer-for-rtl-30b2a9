// beam_integrator: power spectrum of one beam, integrated over many frames.
//
// For every kept channel the power re^2 + im^2 of the 8+8 bit beam sample is
// added into a 32-bit accumulator, one accumulator per channel in a RAM. An
// integration spans int_frames consecutive frames (int_frames is latched at
// the start of each integration; 0 counts as 1). In the first frame the power
// is written instead of added, so no clearing pass is needed; in the last frame
// the finished sum is sent out on dump_* instead of being written back, one
// channel per input sample, with the channel tag of the sample. Sums that would
// pass 2^32-1 stick at 2^32-1.
// At one spectrum per 1.234 us, 50 us to 1.28 s is 41 to 1,037,000 frames;
// INT_W = 21 (up to 2,097,151 frames) leaves room for spectra as fast as one
// per 0.62 us.
// Timing: a sample is read, added and written back or dumped over two clocks
// (read, then add); dump_valid is high two clocks after the sample.
// The dump at the end of each integration period and the integration range
// follow the document; the power formula, saturation, widths and the dump
// format are this design's own choices.
module beam_integrator
  import pharos2_pkg::*;
#(
  parameter int unsigned NSEL  = N_SEL,
  parameter int unsigned INT_W = 21
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [INT_W-1:0]  int_frames,
  input  logic              in_valid,
  input  chan_tag_t         in_tag,
  input  cplx8_t            in_smp,
  output logic              dump_valid,
  output chan_tag_t         dump_tag,
  output logic [POW_W-1:0]  dump_data,
  output logic              dump_frame_end   // with the last kept channel of a dump
);
  logic [POW_W-1:0] acc_mem [2**CHAN_W];

  logic [INT_W-1:0] frames_q;      // length of the running integration
  logic [INT_W-1:0] fcnt;          // frame index within it
  logic             started;
  logic             first_f, last_f;

  // frame position of the current sample
  logic [INT_W-1:0] fcnt_now;
  logic [INT_W-1:0] frames_now;
  always_comb begin
    fcnt_now   = fcnt;
    frames_now = frames_q;
    if (in_tag.sof) begin
      if (!started || fcnt + 1'b1 >= frames_q) begin
        fcnt_now   = '0;
        frames_now = (int_frames == '0) ? INT_W'(1) : int_frames;
      end else begin
        fcnt_now = fcnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fcnt     <= '0;
      frames_q <= INT_W'(1);
      started  <= 1'b0;
    end else if (in_valid && in_tag.sof) begin
      fcnt     <= fcnt_now;
      frames_q <= frames_now;
      started  <= 1'b1;
    end
  end

  assign first_f = (fcnt_now == '0);
  assign last_f  = (fcnt_now + 1'b1 >= frames_now);

  // stage 1: power and accumulator read
  logic             s1_valid, s1_first, s1_last;
  chan_tag_t        s1_tag;
  logic [16:0]      s1_pow;
  logic [POW_W-1:0] s1_acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_first <= 1'b0;
      s1_last  <= 1'b0;
      s1_tag   <= '0;
      s1_pow   <= '0;
    end else begin
      s1_valid <= in_valid && (started || in_tag.sof);
      s1_first <= first_f;
      s1_last  <= last_f;
      s1_tag   <= in_tag;
      s1_pow   <= 17'(in_smp.re * in_smp.re) + 17'(in_smp.im * in_smp.im);
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) s1_acc <= acc_mem[in_tag.chan];
  end

  // stage 2: add, write back or dump
  logic [POW_W:0]   sum_w;
  logic [POW_W-1:0] sum_sat;
  assign sum_w   = (s1_first ? '0 : {1'b0, s1_acc}) + (POW_W+1)'(s1_pow);
  assign sum_sat = sum_w[POW_W] ? '1 : sum_w[POW_W-1:0];

  always_ff @(posedge clk) begin
    if (s1_valid && !s1_last) acc_mem[s1_tag.chan] <= sum_sat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dump_valid     <= 1'b0;
      dump_tag       <= '0;
      dump_data      <= '0;
      dump_frame_end <= 1'b0;
    end else begin
      dump_valid     <= s1_valid && s1_last;
      dump_tag       <= s1_tag;
      dump_data      <= sum_sat;
      dump_frame_end <= s1_valid && s1_last && (s1_tag.chan == CHAN_W'(NSEL-1));
    end
  end
endmodule
