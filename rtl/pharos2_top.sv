// pharos2_top: the digital beamformer of the PHAROS2 phased array feed on one
// ADU board: two FPGAs running the same firmware, joined by the F2F bus.
//
// 24 single-polarisation antenna signals, 12 per FPGA (signals 0..11 on FPGA0,
// 12..23 on FPGA1), are aligned in time, channelized into 512 channels, and
// combined with per-signal, per-channel complex weights into four beams over
// the 404 channels of the 275 MHz band. Each FPGA forms partial beams of its 12
// signals; FPGA1 sends its partial beams to FPGA0, which adds them and
// delivers either four integrated power spectra or raw voltage beams as
// SPEAD packets: one selected beam on beam_out_*, and with raw_all the other
// three on aux_out_*, one per 10 GbE link. Each FPGA can also record raw channelized voltages of a few
// channel pairs for calibration.
//
// The channelizers (polyphase filter banks) are not part of this RTL: the
// aligned ADC samples leave on algn_*, and the channelized streams enter on
// ch_*. The F2F bus is modelled as F2F_DELAY register stages on the 36 lanes
// (four bits per lane per clock, as at the 4:1 serialisers).
// The UDP/IP and 10 GbE layers that carry the SPEAD packets are outside too.
// Coefficients are written per FPGA (coef_wr_fpga) and per beam; coef_swap
// applies new coefficients on both FPGAs at their next frame start.
// Timing: see itpm_fpga; the beam output of a channel follows its FPGA1 input
// by 6 clocks of engine, 1 of transmit, F2F_DELAY of link, 1 of receive and
// 1 of sum.
// Architecture and sizes follow the document; the interface, the link model
// and the control ports are this design's own choices.
module pharos2_top
  import pharos2_pkg::*;
#(
  parameter int unsigned MAX_DELAY  = 64,
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned F2F_DELAY  = 8,
  parameter int unsigned INT_W      = 21
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // ADC samples and alignment delays, signal s on FPGA s/12
  input  logic                          adc_valid,
  input  logic signed [ADC_W-1:0]       adc_smp   [N_SIG_TOTAL],
  input  logic [$clog2(MAX_DELAY)-1:0]  adc_delay [N_SIG_TOTAL],
  output logic [1:0]                    algn_valid,
  output logic signed [ADC_W-1:0]       algn_smp  [N_SIG_TOTAL],
  // channelized streams, one per FPGA
  input  logic [1:0]                    ch_valid,
  input  chan_tag_t                     ch_tag    [2],
  input  cplx8_t                        ch_smp    [N_SIG_TOTAL],
  // beamformer control
  input  logic [CHAN_W-1:0]             start_chan,
  input  logic                          coef_wr_fpga,
  input  logic [N_BEAMS-1:0]            coef_wr_en,
  input  logic [$clog2(N_SIG_FPGA)-1:0] coef_wr_sig,
  input  logic [CHAN_W-1:0]             coef_wr_chan,
  input  coef_t                         coef_wr_data,
  input  logic                          coef_swap,
  output logic [N_BEAMS-1:0]            coef_swap_pending,
  input  logic [3:0]                    out_shift,
  input  logic [INT_W-1:0]              int_frames,
  input  out_mode_e                     out_mode,
  input  logic [$clog2(N_BEAMS)-1:0]    raw_beam_sel,
  input  logic                          raw_all,
  // raw channelized capture control (both FPGAs)
  input  logic                          cap_start,
  input  logic                          cap_stop,
  input  logic [3:0]                    cap_pairs,
  input  logic [CHAN_W-1:0]             cap_pair_start [MAX_PAIRS],
  input  logic [31:0]                   cap_frames,
  output logic [1:0]                    cap_busy,
  // beam packets (FPGA0 10 GbE lane 0)
  output logic                          beam_out_valid,
  input  logic                          beam_out_ready,
  output logic [63:0]                   beam_out_data,
  output logic                          beam_out_last,
  // FPGA0 10 GbE lanes 1..3: raw beams raw_beam_sel+1..+3 when raw_all
  output logic [N_BEAMS-2:0]            aux_out_valid,
  input  logic [N_BEAMS-2:0]            aux_out_ready,
  output logic [63:0]                   aux_out_data [N_BEAMS-1],
  output logic [N_BEAMS-2:0]            aux_out_last,
  // raw channelized packets, one stream per FPGA
  output logic [1:0]                    raw_out_valid,
  input  logic [1:0]                    raw_out_ready,
  output logic [63:0]                   raw_out_data [2],
  output logic [1:0]                    raw_out_last,
  // status
  output logic                          err_f2f_frame,
  output logic                          err_misalign,
  output logic                          err_fifo,
  output logic                          err_out_overflow,
  output logic [$clog2(FIFO_DEPTH):0]   pb_fifo_level,
  output logic [N_BEAMS-1:0]            beam_sat
);
  logic [F2F_SER-1:0][F2F_LANES-1:0] f2f_out [2];
  logic [F2F_SER-1:0][F2F_LANES-1:0] f2f_in  [2];
  logic [N_BEAMS-1:0]   swp_pend [2];
  logic [1:0]           e_frm, e_mis, e_fifo, e_oo;
  logic [$clog2(FIFO_DEPTH):0] lvl [2];
  logic [N_BEAMS-1:0]   sat [2];
  logic                 bo_valid [2];
  logic [63:0]          bo_data [2];
  logic                 bo_last [2];
  logic [N_BEAMS-2:0]   ax_valid [2], ax_last [2];
  logic [63:0]          ax_data [2][N_BEAMS-1];

  for (genvar f = 0; f < 2; f++) begin : g_fpga
    logic signed [ADC_W-1:0]      a_smp  [N_SIG_FPGA];
    logic [$clog2(MAX_DELAY)-1:0] a_dly  [N_SIG_FPGA];
    logic signed [ADC_W-1:0]      al_smp [N_SIG_FPGA];
    cplx8_t                       c_smp  [N_SIG_FPGA];

    for (genvar s = 0; s < N_SIG_FPGA; s++) begin : g_map
      assign a_smp[s] = adc_smp[f*N_SIG_FPGA + s];
      assign a_dly[s] = adc_delay[f*N_SIG_FPGA + s];
      assign c_smp[s] = ch_smp[f*N_SIG_FPGA + s];
      assign algn_smp[f*N_SIG_FPGA + s] = al_smp[s];
    end

    itpm_fpga #(.MAX_DELAY(MAX_DELAY), .FIFO_DEPTH(FIFO_DEPTH), .INT_W(INT_W)) u_fpga (
      .clk, .rst_n, .fpga_id(1'(f)),
      .adc_valid, .adc_smp(a_smp), .adc_delay(a_dly),
      .algn_valid(algn_valid[f]), .algn_smp(al_smp),
      .ch_valid(ch_valid[f]), .ch_tag(ch_tag[f]), .ch_smp(c_smp),
      .start_chan,
      .coef_wr_en(coef_wr_en & {N_BEAMS{coef_wr_fpga == 1'(f)}}),
      .coef_wr_sig, .coef_wr_chan, .coef_wr_data, .coef_swap,
      .coef_swap_pending(swp_pend[f]),
      .out_shift, .int_frames, .out_mode, .raw_beam_sel, .raw_all,
      .cap_start, .cap_stop, .cap_pairs, .cap_pair_start, .cap_frames,
      .cap_busy(cap_busy[f]),
      .f2f_out(f2f_out[f]), .f2f_in(f2f_in[f]),
      .beam_out_valid(bo_valid[f]), .beam_out_ready(f == 0 ? beam_out_ready : 1'b1),
      .beam_out_data(bo_data[f]), .beam_out_last(bo_last[f]),
      .aux_out_valid(ax_valid[f]), .aux_out_ready(f == 0 ? aux_out_ready : '1),
      .aux_out_data(ax_data[f]), .aux_out_last(ax_last[f]),
      .raw_out_valid(raw_out_valid[f]), .raw_out_ready(raw_out_ready[f]),
      .raw_out_data(raw_out_data[f]), .raw_out_last(raw_out_last[f]),
      .err_f2f_frame(e_frm[f]), .err_misalign(e_mis[f]), .err_fifo(e_fifo[f]),
      .err_out_overflow(e_oo[f]), .pb_fifo_level(lvl[f]), .beam_sat(sat[f])
    );
  end

  // F2F bus: FPGA1 -> FPGA0, F2F_DELAY register stages; nothing flows back.
  logic [F2F_SER-1:0][F2F_LANES-1:0] link [F2F_DELAY+1];
  assign link[0] = f2f_out[1];
  for (genvar d = 0; d < F2F_DELAY; d++) begin : g_link
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) link[d+1] <= '0;
      else        link[d+1] <= link[d];
    end
  end
  assign f2f_in[0] = link[F2F_DELAY];
  assign f2f_in[1] = f2f_out[0];

  assign coef_swap_pending = swp_pend[0] | swp_pend[1];
  assign beam_out_valid    = bo_valid[0];
  assign beam_out_data     = bo_data[0];
  assign beam_out_last     = bo_last[0];
  assign aux_out_valid     = ax_valid[0];
  assign aux_out_data      = ax_data[0];
  assign aux_out_last      = ax_last[0];
  assign err_f2f_frame     = e_frm[0];
  assign err_misalign      = e_mis[0];
  assign err_fifo          = e_fifo[0];
  assign err_out_overflow  = |e_oo;
  assign pb_fifo_level     = lvl[0];
  assign beam_sat          = sat[0];
endmodule
