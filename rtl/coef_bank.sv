// coef_bank: double-buffered beamforming coefficients of one beam.
//
// One complex coefficient per signal and per kept channel. The control host
// writes new coefficients into the inactive half while the engine reads the
// active half; a swap command then makes the new set active. The swap is
// applied at the next start of frame seen on the read side, so every spectrum
// is weighted by one consistent set.
//
// Storage: one RAM per signal of 2 * 2**CHAN_W words, address {bank, channel}
// (block RAM in the FPGA). Write port: wr_en/wr_sig/wr_chan/wr_coef, always to
// the inactive bank. Read port: rd_en with rd_chan and rd_sof; rd_coef holds
// the coefficients of all signals one clock later. swap_req is a one-clock
// pulse; swap_pending stays high until the swap has taken place, and
// active_bank shows the bank in use.
// The double buffer in block RAM and the apply command follow the document;
// the write-port shape and swap-at-frame-start are this design's own choices.
module coef_bank
  import pharos2_pkg::*;
#(
  parameter int unsigned N_SIG = N_SIG_FPGA
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host write side
  input  logic                     wr_en,
  input  logic [$clog2(N_SIG)-1:0] wr_sig,
  input  logic [CHAN_W-1:0]        wr_chan,
  input  coef_t                    wr_coef,
  input  logic                     swap_req,
  output logic                     swap_pending,
  output logic                     active_bank,
  // engine read side
  input  logic                     rd_en,
  input  logic [CHAN_W-1:0]        rd_chan,
  input  logic                     rd_sof,
  output coef_t                    rd_coef [N_SIG]
);
  logic rd_bank;
  logic do_swap;

  assign do_swap = rd_en && rd_sof && swap_pending;
  assign rd_bank = do_swap ? ~active_bank : active_bank;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_bank  <= 1'b0;
      swap_pending <= 1'b0;
    end else begin
      if (do_swap) active_bank <= ~active_bank;
      if (swap_req) swap_pending <= 1'b1;
      else if (do_swap) swap_pending <= 1'b0;
    end
  end

  for (genvar s = 0; s < N_SIG; s++) begin : g_ram
    coef_t mem [2**(CHAN_W+1)];
    always_ff @(posedge clk) begin
      if (wr_en && wr_sig == s) mem[{~active_bank, wr_chan}] <= wr_coef;
      if (rd_en) rd_coef[s] <= mem[{rd_bank, rd_chan}];
    end
  end
endmodule
