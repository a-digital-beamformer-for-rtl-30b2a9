// channel_select: keeps N_SEL contiguous channels out of the N_CHAN that a
// channelizer produces.
//
// The channelizer covers 350 MHz in 512 channels; the warm section delivers
// 275 MHz, i.e. 404 contiguous channels, and only those are beamformed. The
// first kept channel is programmable (start_chan). Kept samples leave one clock
// later, renumbered 0..N_SEL-1, with sof set on the first kept channel.
// Other channels are dropped (out_valid low).
// The 512/404 numbers follow the document; the programmable start channel and
// the renumbering are this design's own choices.
module channel_select
  import pharos2_pkg::*;
#(
  parameter int unsigned N_SIG  = N_SIG_FPGA,
  parameter int unsigned NCHAN  = N_CHAN,
  parameter int unsigned NSEL   = N_SEL
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CHAN_W-1:0] start_chan,   // first channel kept, start_chan+NSEL <= NCHAN
  input  logic              in_valid,
  input  chan_tag_t         in_tag,
  input  cplx8_t            in_smp  [N_SIG],
  output logic              out_valid,
  output chan_tag_t         out_tag,
  output cplx8_t            out_smp [N_SIG]
);
  logic [CHAN_W:0] rel;   // channel relative to start, one extra bit for the sign
  logic            keep;

  assign rel  = {1'b0, in_tag.chan} - {1'b0, start_chan};
  assign keep = in_valid && !rel[CHAN_W] && (rel < (CHAN_W+1)'(NSEL));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
    end else begin
      out_valid <= keep;
      if (keep) begin
        out_tag.chan <= rel[CHAN_W-1:0];
        out_tag.sof  <= (rel == '0);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (keep) out_smp <= in_smp;
  end

  // The channelizer must present the channels in order.
  property p_chan_order;
    @(posedge clk) disable iff (!rst_n)
      in_valid && !in_tag.sof |-> in_tag.chan != '0;
  endproperty
  assert property (p_chan_order);

  // the kept band must lie inside the spectrum
  a_range: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> 32'(start_chan) + NSEL <= NCHAN)
    else $error("channel_select: start_chan %0d leaves the %0d-channel spectrum", start_chan, NCHAN);
endmodule
