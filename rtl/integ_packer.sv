// integ_packer: gathers the integrated spectra of the four beams into heaps.
//
// Each integrator dumps one 32-bit power per kept channel at the end of its
// integration, all four at once. The dumps are written (when enable is high)
// into one FIFO per beam, deep enough for a whole spectrum. The packer then
// reads the FIFOs beam after beam, two channels per 64-bit payload word (the
// even channel in bits 63..32), NSEL/2 words per heap, and offers them to a
// SPEAD formatter with heap descriptors: heap counter = {integration count,
// beam}, source kind 1, index = beam, frame = integration count.
// Timing: a word is offered whenever the current beam's FIFO holds two
// entries; a heap is not interleaved with another.
// Sending the four integrated beams follows the document; the packing and the
// descriptors are this design's own choices.
module integ_packer
  import pharos2_pkg::*;
#(
  parameter int unsigned NSEL = N_SEL
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         enable,
  input  logic [N_BEAMS-1:0]           dump_valid,
  input  logic [N_BEAMS-1:0][POW_W-1:0] dump_data,
  output logic                         overflow,
  // to spead_formatter
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
  localparam int unsigned WORDS = NSEL / 2;
  localparam int unsigned DEPTH = 2 ** $clog2(NSEL);
  localparam int unsigned BB    = $clog2(N_BEAMS);

  logic [N_BEAMS-1:0][POW_W-1:0] rd_data;
  logic [N_BEAMS-1:0]            rd_en, ovf, unf, emp, ful;
  logic [$clog2(DEPTH):0]        cnt [N_BEAMS];

  logic [BB-1:0]          beam;
  logic [15:0]            widx;
  logic                   phase;      // 0: take even channel, 1: take odd channel
  logic [POW_W-1:0]       even_q;
  logic [31:0]            icount [N_BEAMS];

  for (genvar b = 0; b < N_BEAMS; b++) begin : g_fifo
    sync_fifo #(.T(logic [POW_W-1:0]), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en(enable && dump_valid[b]), .wr_data(dump_data[b]),
      .rd_en(rd_en[b]), .rd_data(rd_data[b]),
      .empty(emp[b]), .full(ful[b]), .count(cnt[b]),
      .overflow(ovf[b]), .underflow(unf[b])
    );
  end

  assign overflow = |ovf;

  // even channel is popped into even_q, the odd one is popped with the word
  logic have_even, have_odd;
  assign have_even = !emp[beam] && !phase;
  assign have_odd  = !emp[beam] && phase;

  always_comb begin
    rd_en       = '0;
    rd_en[beam] = have_even || (have_odd && out_ready);
  end

  assign out_valid     = have_odd;
  assign out_data      = {even_q, rd_data[beam]};
  assign out_sop       = (widx == '0);
  assign out_eop       = (widx == 16'(WORDS-1));
  assign out_heap_cnt  = {14'd0, icount[beam], 2'(beam)};
  assign out_len_words = 16'(WORDS);
  assign out_kind      = 8'd1;
  assign out_index     = 8'(beam);
  assign out_frame     = icount[beam];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beam   <= '0;
      widx   <= '0;
      phase  <= 1'b0;
      even_q <= '0;
      for (int b = 0; b < N_BEAMS; b++) icount[b] <= '0;
    end else begin
      if (have_even) begin
        even_q <= rd_data[beam];
        phase  <= 1'b1;
      end else if (have_odd && out_ready) begin
        phase <= 1'b0;
        if (widx == 16'(WORDS-1)) begin
          widx         <= '0;
          icount[beam] <= icount[beam] + 1;
          beam         <= beam + 1'b1;
        end else begin
          widx <= widx + 1'b1;
        end
      end
    end
  end
endmodule
