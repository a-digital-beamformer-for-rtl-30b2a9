// raw_capture: raw channelized-voltage mode, used for array calibration.
//
// A few channels of every channelizer output are recorded so that the host can
// cross-correlate the signals and work out the beamforming coefficients.
// Channels are chosen as n_pairs pairs of adjacent channels (1 to 15 pairs,
// 2 to 30 channels); pair i covers channels pair_start[i] and pair_start[i]+1
// anywhere in the band. Recording starts at the first start of frame after
// start is pulsed and lasts n_frames frames (0: until stop is pulsed; the
// frame under way when stop arrives is completed).
// For every selected channel the 12 complex 8+8 bit samples of the FPGA's
// signals (192 bits) go into a FIFO, and are read out as three 64-bit payload
// words (signal 0 in bits 63..48 of the first word). One heap per frame, with
// 6 * n_pairs words; heap counter and frame number count the recorded frames,
// source kind 3, index = fpga_id.
// Timing: an entry is written the clock after its channel sample; reading
// takes three clocks per entry with out_ready. busy is high while recording.
// Pairs must not overlap and must be given in ascending channel order.
// Pair selection, the 2..30 channel range and the programmable recording time
// follow the document; the frame-count stop, the packing and the FIFO are this
// design's own choices.
module raw_capture
  import pharos2_pkg::*;
#(
  parameter int unsigned N_SIG      = N_SIG_FPGA,
  parameter int unsigned FIFO_DEPTH = 64
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [7:0]                   fpga_id,
  input  logic                         start,
  input  logic                         stop,
  input  logic [3:0]                   n_pairs,
  input  logic [CHAN_W-1:0]            pair_start [MAX_PAIRS],
  input  logic [31:0]                  n_frames,
  output logic                         busy,
  output logic                         overflow,
  input  logic                         in_valid,
  input  chan_tag_t                    in_tag,
  input  cplx8_t                       in_smp [N_SIG],
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
  localparam int unsigned EW = N_SIG * 2 * SMP_W;     // 192 bits per channel
  localparam int unsigned NW = (EW + 63) / 64;        // payload words per channel

  typedef struct packed {
    logic [NW*64-1:0] data;
    logic             sop;
    logic             eop;
    logic [31:0]      frame;
    logic [3:0]       pairs;
  } ent_t;

  logic        armed, rec;
  logic        stop_q;         // stop seen, applied at the next frame start
  logic [31:0] fcnt;           // frames recorded
  logic [31:0] nfr_q;
  logic [3:0]  np_q;
  logic [4:0]  sel_cnt;        // selected channels so far in this frame
  logic        hit;

  // recording state for the current sample, updated at each start of frame
  logic        rec_now, begin_now;
  logic [31:0] fcnt_now;
  logic [3:0]  np_now;
  logic [4:0]  sel_now;
  always_comb begin
    rec_now   = rec;
    begin_now = 1'b0;
    fcnt_now  = fcnt;
    np_now    = np_q;
    sel_now   = sel_cnt;
    if (in_valid && in_tag.sof) begin
      sel_now = '0;
      if (rec && (stop || stop_q || (nfr_q != '0 && fcnt + 1 == nfr_q))) begin
        rec_now = 1'b0;
      end else if (rec) begin
        fcnt_now = fcnt + 1;
      end else if (armed && !stop) begin
        rec_now   = 1'b1;
        begin_now = 1'b1;
        fcnt_now  = '0;
        np_now    = (n_pairs == '0) ? 4'd1 : n_pairs;   // 4 bits: at most 15 pairs
      end
    end
  end

  always_comb begin
    hit = 1'b0;
    for (int i = 0; i < MAX_PAIRS; i++) begin
      if (4'(i) < np_now && (in_tag.chan == pair_start[i] || in_tag.chan == pair_start[i] + 1'b1))
        hit = 1'b1;
    end
  end

  logic wr;
  ent_t wr_ent, rd_ent;
  logic emp, ful, unf;
  logic [$clog2(FIFO_DEPTH):0] lvl;
  logic [EW-1:0] flat;
  logic [1:0]    widx;

  always_comb begin
    for (int s = 0; s < N_SIG; s++) flat[EW-1-16*s -: 16] = in_smp[s];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed   <= 1'b0;
      rec     <= 1'b0;
      stop_q  <= 1'b0;
      fcnt    <= '0;
      nfr_q   <= '0;
      np_q    <= '0;
      sel_cnt <= '0;
      wr      <= 1'b0;
      wr_ent  <= '0;
    end else begin
      wr <= 1'b0;
      if (start) armed <= 1'b1;
      if (stop)  armed <= 1'b0;
      if (stop && rec) stop_q <= 1'b1;
      if (in_valid && in_tag.sof) begin
        rec     <= rec_now;
        if (!rec_now) stop_q <= 1'b0;
        fcnt    <= fcnt_now;
        np_q    <= np_now;
        sel_cnt <= '0;
        if (begin_now) begin
          armed <= 1'b0;
          nfr_q <= n_frames;
        end
      end
      if (in_valid && rec_now && hit) begin
        wr           <= 1'b1;
        wr_ent.data  <= (NW*64)'(flat) << (NW*64 - EW);
        wr_ent.sop   <= (sel_now == 5'd0);
        wr_ent.eop   <= (sel_now == {np_now, 1'b0} - 5'd1);
        wr_ent.frame <= fcnt_now;
        wr_ent.pairs <= np_now;
        sel_cnt      <= sel_now + 1'b1;
      end
    end
  end

  assign busy = rec;

  sync_fifo #(.T(ent_t), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(wr), .wr_data(wr_ent),
    .rd_en(out_valid && out_ready && (widx == 2'(NW-1))), .rd_data(rd_ent),
    .empty(emp), .full(ful), .count(lvl),
    .overflow, .underflow(unf)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) widx <= '0;
    else if (out_valid && out_ready) widx <= (widx == 2'(NW-1)) ? '0 : widx + 1'b1;
  end

  assign out_valid     = !emp;
  assign out_data      = rd_ent.data[NW*64-1-64*widx -: 64];
  assign out_sop       = rd_ent.sop && (widx == '0);
  assign out_eop       = rd_ent.eop && (widx == 2'(NW-1));
  assign out_heap_cnt  = {16'd0, rd_ent.frame};
  assign out_len_words = 16'(NW) * 16'({rd_ent.pairs, 1'b0});
  assign out_kind      = 8'd3;
  assign out_index     = fpga_id;
  assign out_frame     = rd_ent.frame;
endmodule
