// itpm_fpga: the signal-processing firmware of one of the two board FPGAs.
//
// Both FPGAs run this same firmware; fpga_id (0 or 1) picks the role. Each
// aligns its ADC streams (the aligned samples go to the channelizers, which are
// outside this RTL), takes the channelized stream of its 12 signals, and runs
// four beamformer engines on it, one per beam, each giving a partial beam of
// 12 antennas. FPGA1 sends its partial beams to FPGA0 over the F2F lanes.
// FPGA0 buffers its own partial beams in a FIFO until FPGA1's arrive, adds
// them into the four final beams and then either integrates them into four
// power spectra or packs one selected raw beam (out_mode, taken at the start of
// each frame), and emits SPEAD packets on beam_out_*. With raw_all set, the
// other three raw beams leave as well, one per further 10 GbE link on
// aux_out_* (link k carries beam raw_beam_sel + k). Both FPGAs can record raw
// channelized voltages of selected channel pairs on raw_out_*.
// Stream timing: the channelized input may carry a channel every clock (the
// F2F lanes move one partial-beam word per clock through 4:1 serialisers).
// The partial beam of a channel leaves the engines 6 clocks after it entered;
// FPGA1's copy reaches FPGA0's beam sum 2 clocks plus the bus latency later.
// For integrated output at one channel per clock, integrations must be at
// least 4 frames long: the packer spends 2 clocks per word, so the four
// spectra of 202 words plus headers take about 1650 clocks to leave.
// Everything up to the output packets follows the document's block diagrams;
// the control ports (plain signals instead of the board's register bus), the
// role pin and the packet arbitration are this design's own choices.
module itpm_fpga
  import pharos2_pkg::*;
#(
  parameter int unsigned MAX_DELAY  = 64,
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned INT_W      = 21
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         fpga_id,
  // ADC streams and their alignment
  input  logic                         adc_valid,
  input  logic signed [ADC_W-1:0]      adc_smp     [N_SIG_FPGA],
  input  logic [$clog2(MAX_DELAY)-1:0] adc_delay   [N_SIG_FPGA],
  output logic                         algn_valid,
  output logic signed [ADC_W-1:0]      algn_smp    [N_SIG_FPGA],
  // channelized stream (from the channelizers)
  input  logic                         ch_valid,
  input  chan_tag_t                    ch_tag,
  input  cplx8_t                       ch_smp      [N_SIG_FPGA],
  // beamformer control
  input  logic [CHAN_W-1:0]            start_chan,
  input  logic [N_BEAMS-1:0]           coef_wr_en,
  input  logic [$clog2(N_SIG_FPGA)-1:0] coef_wr_sig,
  input  logic [CHAN_W-1:0]            coef_wr_chan,
  input  coef_t                        coef_wr_data,
  input  logic                         coef_swap,
  output logic [N_BEAMS-1:0]           coef_swap_pending,
  input  logic [3:0]                   out_shift,
  input  logic [INT_W-1:0]             int_frames,
  input  out_mode_e                    out_mode,
  input  logic [$clog2(N_BEAMS)-1:0]   raw_beam_sel,
  input  logic                         raw_all,
  // raw channelized capture control
  input  logic                         cap_start,
  input  logic                         cap_stop,
  input  logic [3:0]                   cap_pairs,
  input  logic [CHAN_W-1:0]            cap_pair_start [MAX_PAIRS],
  input  logic [31:0]                  cap_frames,
  output logic                         cap_busy,
  // F2F lanes
  output logic [F2F_SER-1:0][F2F_LANES-1:0] f2f_out,
  input  logic [F2F_SER-1:0][F2F_LANES-1:0] f2f_in,
  // beam output (FPGA0), SPEAD packets
  output logic                         beam_out_valid,
  input  logic                         beam_out_ready,
  output logic [63:0]                  beam_out_data,
  output logic                         beam_out_last,
  // further 10 GbE links (FPGA0): raw beams raw_beam_sel+1..+3 when raw_all
  output logic [N_BEAMS-2:0]           aux_out_valid,
  input  logic [N_BEAMS-2:0]           aux_out_ready,
  output logic [63:0]                  aux_out_data [N_BEAMS-1],
  output logic [N_BEAMS-2:0]           aux_out_last,
  // raw channelized output, SPEAD packets
  output logic                         raw_out_valid,
  input  logic                         raw_out_ready,
  output logic [63:0]                  raw_out_data,
  output logic                         raw_out_last,
  // status (sticky errors, levels)
  output logic                         err_f2f_frame,
  output logic                         err_misalign,
  output logic                         err_fifo,
  output logic                         err_out_overflow,
  output logic [$clog2(FIFO_DEPTH):0]  pb_fifo_level,
  output logic [N_BEAMS-1:0]           beam_sat
);
  localparam int unsigned BB = $clog2(N_BEAMS);

  // ---------------- input alignment ----------------
  input_align #(.N_SIG(N_SIG_FPGA), .W(ADC_W), .MAX_DELAY(MAX_DELAY)) u_align (
    .clk, .rst_n,
    .in_valid(adc_valid), .in_smp(adc_smp), .delay(adc_delay),
    .out_valid(algn_valid), .out_smp(algn_smp)
  );

  // ---------------- beamformer engines ----------------
  logic [N_BEAMS-1:0] pb_valid;
  chan_tag_t          pb_tag [N_BEAMS];
  pbeam_word_t        pb_word;
  logic [N_BEAMS-1:0] coef_active;

  for (genvar b = 0; b < N_BEAMS; b++) begin : g_bf
    beamformer_engine u_bf (
      .clk, .rst_n, .start_chan,
      .in_valid(ch_valid), .in_tag(ch_tag), .in_smp(ch_smp),
      .coef_wr_en(coef_wr_en[b]), .coef_wr_sig, .coef_wr_chan, .coef_wr_data,
      .coef_swap, .coef_swap_pending(coef_swap_pending[b]), .coef_active_bank(coef_active[b]),
      .pb_valid(pb_valid[b]), .pb_tag(pb_tag[b]), .pb_smp(pb_word.beam[b])
    );
  end
  assign pb_word.tag = pb_tag[0];

  // ---------------- F2F link ----------------
  f2f_tx u_f2f_tx (
    .clk, .rst_n,
    .in_valid(pb_valid[0] && fpga_id), .in_word(pb_word),
    .lanes(f2f_out)
  );

  logic        rem_valid;
  pbeam_word_t rem_word;
  f2f_rx u_f2f_rx (
    .clk, .rst_n, .lanes(f2f_in),
    .out_valid(rem_valid), .out_word(rem_word), .frame_err(err_f2f_frame)
  );

  // ---------------- beam sum (FPGA0) ----------------
  logic                 bm_valid;
  chan_tag_t            bm_tag;
  cplx8_t [N_BEAMS-1:0] bm_beam;
  logic                 fifo_ovf, fifo_unf;

  beam_sum #(.FIFO_DEPTH(FIFO_DEPTH)) u_sum (
    .clk, .rst_n, .out_shift,
    .local_valid(pb_valid[0] && !fpga_id), .local_word(pb_word),
    .remote_valid(rem_valid && !fpga_id), .remote_word(rem_word),
    .out_valid(bm_valid), .out_tag(bm_tag), .out_beam(bm_beam), .beam_sat,
    .misalign(err_misalign), .fifo_overflow(fifo_ovf), .fifo_underflow(fifo_unf),
    .fifo_level(pb_fifo_level)
  );
  assign err_fifo = fifo_ovf | fifo_unf;

  // output mode, changed only at a frame boundary
  out_mode_e mode_q;
  out_mode_e mode_now;
  assign mode_now = (bm_valid && bm_tag.sof) ? out_mode : mode_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mode_q <= OUT_INTEGRATED;
    else        mode_q <= mode_now;
  end

  // ---------------- integrators ----------------
  logic [N_BEAMS-1:0]            dmp_valid;
  logic [N_BEAMS-1:0][POW_W-1:0] dmp_data;

  for (genvar b = 0; b < N_BEAMS; b++) begin : g_int
    chan_tag_t dmp_tag;
    logic      dmp_end;
    beam_integrator #(.INT_W(INT_W)) u_int (
      .clk, .rst_n, .int_frames,
      .in_valid(bm_valid), .in_tag(bm_tag), .in_smp(bm_beam[b]),
      .dump_valid(dmp_valid[b]), .dump_tag(dmp_tag), .dump_data(dmp_data[b]),
      .dump_frame_end(dmp_end)
    );
  end

  // ---------------- packet sources ----------------
  typedef struct packed {
    logic        valid;
    logic [63:0] data;
    logic        sop;
    logic        eop;
    logic [47:0] heap_cnt;
    logic [15:0] len_words;
    logic [7:0]  kind;
    logic [7:0]  index;
    logic [31:0] frame;
  } pkt_src_t;

  pkt_src_t src_int, src_raw, src_sel;
  logic     int_ready, raw_ready, fmt_ready;
  logic     int_ovf, raw_ovf;

  // the integrated dump of a frame is packed only if the frame was in that mode
  logic mode_int_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mode_int_d <= 1'b1;
    else        mode_int_d <= (mode_now == OUT_INTEGRATED);
  end

  integ_packer u_ipack (
    .clk, .rst_n, .enable(mode_int_d),
    .dump_valid(dmp_valid), .dump_data(dmp_data), .overflow(int_ovf),
    .out_valid(src_int.valid), .out_ready(int_ready), .out_data(src_int.data),
    .out_sop(src_int.sop), .out_eop(src_int.eop), .out_heap_cnt(src_int.heap_cnt),
    .out_len_words(src_int.len_words), .out_kind(src_int.kind), .out_index(src_int.index),
    .out_frame(src_int.frame)
  );

  raw_beam_packer u_rpack (
    .clk, .rst_n, .enable(out_mode == OUT_RAW_BEAM), .sel(raw_beam_sel),
    .in_valid(bm_valid), .in_tag(bm_tag), .in_beam(bm_beam), .overflow(raw_ovf),
    .out_valid(src_raw.valid), .out_ready(raw_ready), .out_data(src_raw.data),
    .out_sop(src_raw.sop), .out_eop(src_raw.eop), .out_heap_cnt(src_raw.heap_cnt),
    .out_len_words(src_raw.len_words), .out_kind(src_raw.kind), .out_index(src_raw.index),
    .out_frame(src_raw.frame)
  );

  // all four raw beams: link k (1..3) carries beam raw_beam_sel + k
  logic [N_BEAMS-2:0] aux_ovf;
  for (genvar k = 1; k < N_BEAMS; k++) begin : g_aux
    pkt_src_t src_aux;
    logic     aux_ready;
    raw_beam_packer u_apack (
      .clk, .rst_n, .enable(out_mode == OUT_RAW_BEAM && raw_all), .sel(raw_beam_sel + BB'(k)),
      .in_valid(bm_valid), .in_tag(bm_tag), .in_beam(bm_beam), .overflow(aux_ovf[k-1]),
      .out_valid(src_aux.valid), .out_ready(aux_ready), .out_data(src_aux.data),
      .out_sop(src_aux.sop), .out_eop(src_aux.eop), .out_heap_cnt(src_aux.heap_cnt),
      .out_len_words(src_aux.len_words), .out_kind(src_aux.kind), .out_index(src_aux.index),
      .out_frame(src_aux.frame)
    );
    spead_formatter u_fmt_aux (
      .clk, .rst_n,
      .in_valid(src_aux.valid), .in_ready(aux_ready), .in_data(src_aux.data),
      .in_sop(src_aux.sop), .in_eop(src_aux.eop), .in_heap_cnt(src_aux.heap_cnt),
      .in_len_words(src_aux.len_words), .in_kind(src_aux.kind), .in_index(src_aux.index),
      .in_frame(src_aux.frame),
      .out_valid(aux_out_valid[k-1]), .out_ready(aux_out_ready[k-1]), .out_data(aux_out_data[k-1]),
      .out_last(aux_out_last[k-1])
    );
  end

  // packet arbiter: the source changes only between packets
  logic in_pkt, use_raw;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt  <= 1'b0;
      use_raw <= 1'b0;
    end else begin
      if (src_sel.valid && fmt_ready) begin
        if (src_sel.eop)      in_pkt <= 1'b0;
        else if (src_sel.sop) in_pkt <= 1'b1;
      end
      if (!in_pkt && !(src_sel.valid && fmt_ready && src_sel.sop && !src_sel.eop)) begin
        if (use_raw && !src_raw.valid && src_int.valid)      use_raw <= 1'b0;
        else if (!use_raw && !src_int.valid && src_raw.valid) use_raw <= 1'b1;
      end
    end
  end

  assign src_sel   = use_raw ? src_raw : src_int;
  assign int_ready = !use_raw && fmt_ready;
  assign raw_ready =  use_raw && fmt_ready;

  spead_formatter u_fmt_beam (
    .clk, .rst_n,
    .in_valid(src_sel.valid), .in_ready(fmt_ready), .in_data(src_sel.data),
    .in_sop(src_sel.sop), .in_eop(src_sel.eop), .in_heap_cnt(src_sel.heap_cnt),
    .in_len_words(src_sel.len_words), .in_kind(src_sel.kind), .in_index(src_sel.index),
    .in_frame(src_sel.frame),
    .out_valid(beam_out_valid), .out_ready(beam_out_ready), .out_data(beam_out_data),
    .out_last(beam_out_last)
  );

  // ---------------- raw channelized capture ----------------
  pkt_src_t src_cap;
  logic     cap_ready, cap_ovf;

  raw_capture u_cap (
    .clk, .rst_n, .fpga_id({7'd0, fpga_id}),
    .start(cap_start), .stop(cap_stop), .n_pairs(cap_pairs), .pair_start(cap_pair_start),
    .n_frames(cap_frames), .busy(cap_busy), .overflow(cap_ovf),
    .in_valid(ch_valid), .in_tag(ch_tag), .in_smp(ch_smp),
    .out_valid(src_cap.valid), .out_ready(cap_ready), .out_data(src_cap.data),
    .out_sop(src_cap.sop), .out_eop(src_cap.eop), .out_heap_cnt(src_cap.heap_cnt),
    .out_len_words(src_cap.len_words), .out_kind(src_cap.kind), .out_index(src_cap.index),
    .out_frame(src_cap.frame)
  );

  spead_formatter u_fmt_raw (
    .clk, .rst_n,
    .in_valid(src_cap.valid), .in_ready(cap_ready), .in_data(src_cap.data),
    .in_sop(src_cap.sop), .in_eop(src_cap.eop), .in_heap_cnt(src_cap.heap_cnt),
    .in_len_words(src_cap.len_words), .in_kind(src_cap.kind), .in_index(src_cap.index),
    .in_frame(src_cap.frame),
    .out_valid(raw_out_valid), .out_ready(raw_out_ready), .out_data(raw_out_data),
    .out_last(raw_out_last)
  );

  assign err_out_overflow = int_ovf | raw_ovf | cap_ovf | (|aux_ovf);
endmodule
