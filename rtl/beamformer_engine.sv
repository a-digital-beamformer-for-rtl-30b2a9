// beamformer_engine: one beam's share of the work on one FPGA.
//
// Chain: channel select (keep 404 of 512 channels) -> complex coefficient
// multiplication, one coefficient per signal and channel, read from a double
// buffer -> sum over the FPGA's signals -> partial beam. Four engines, one per
// beam, share the channelizer outputs.
//
// Timing: a kept channel leaves as a partial-beam sample LATENCY = 6 clocks
// after it entered (select 1, coefficient read 1, multiply 2, sum 1, scale 1).
// The engine accepts a sample on every clock. The partial beam is the sum of
// the products (sample x coefficient, coefficient 1.0 = 2**COEF_FRAC) shifted
// right by PB_SHIFT and saturated to PB_W bits per part; with the default one
// input count at unity weight becomes 16 partial-beam counts.
// Chain and double buffer follow the document; the widths, scaling, truncation
// and saturation are this design's own choices.
module beamformer_engine
  import pharos2_pkg::*;
#(
  parameter int unsigned N_SIG    = N_SIG_FPGA,
  parameter int unsigned NCHAN    = N_CHAN,
  parameter int unsigned NSEL     = N_SEL,
  parameter int unsigned PB_SHIFT = COEF_FRAC - 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [CHAN_W-1:0]        start_chan,
  // channelizer stream
  input  logic                     in_valid,
  input  chan_tag_t                in_tag,
  input  cplx8_t                   in_smp [N_SIG],
  // coefficient host port
  input  logic                     coef_wr_en,
  input  logic [$clog2(N_SIG)-1:0] coef_wr_sig,
  input  logic [CHAN_W-1:0]        coef_wr_chan,
  input  coef_t                    coef_wr_data,
  input  logic                     coef_swap,
  output logic                     coef_swap_pending,
  output logic                     coef_active_bank,
  // partial beam
  output logic                     pb_valid,
  output chan_tag_t                pb_tag,
  output cplx16_t                  pb_smp
);
  localparam int unsigned PW = SMP_W + COEF_W + 1;        // product width
  localparam int unsigned SW = PW + $clog2(N_SIG);        // sum width

  // ---- channel select ----
  logic      sel_valid;
  chan_tag_t sel_tag;
  cplx8_t    sel_smp [N_SIG];

  channel_select #(.N_SIG(N_SIG), .NCHAN(NCHAN), .NSEL(NSEL)) u_sel (
    .clk, .rst_n, .start_chan,
    .in_valid, .in_tag, .in_smp,
    .out_valid(sel_valid), .out_tag(sel_tag), .out_smp(sel_smp)
  );

  // ---- coefficient read (1 clock), data delayed alongside ----
  coef_t     coef [N_SIG];
  cplx8_t    smp_d [N_SIG];

  coef_bank #(.N_SIG(N_SIG)) u_coef (
    .clk, .rst_n,
    .wr_en(coef_wr_en), .wr_sig(coef_wr_sig), .wr_chan(coef_wr_chan), .wr_coef(coef_wr_data),
    .swap_req(coef_swap), .swap_pending(coef_swap_pending), .active_bank(coef_active_bank),
    .rd_en(sel_valid), .rd_chan(sel_tag.chan), .rd_sof(sel_tag.sof), .rd_coef(coef)
  );

  always_ff @(posedge clk) smp_d <= sel_smp;

  // ---- multiply (2 clocks) ----
  logic signed [PW-1:0] prod_re [N_SIG];
  logic signed [PW-1:0] prod_im [N_SIG];

  for (genvar s = 0; s < N_SIG; s++) begin : g_mul
    cmult #(.AW(SMP_W), .CW(COEF_W)) u_mul (
      .clk, .en(1'b1),
      .a_re(smp_d[s].re), .a_im(smp_d[s].im),
      .c_re(coef[s].re),  .c_im(coef[s].im),
      .p_re(prod_re[s]),  .p_im(prod_im[s])
    );
  end

  // ---- sum (1 clock) ----
  logic signed [SW-1:0] sum_re, sum_im;

  signal_sum #(.N(N_SIG), .IW(PW)) u_sum (
    .clk, .en(1'b1),
    .in_re(prod_re), .in_im(prod_im),
    .sum_re, .sum_im
  );

  // ---- tag pipeline: select output -> scale output is 5 clocks ----
  localparam int unsigned TDLY = 4;
  logic      v_pipe [TDLY];
  chan_tag_t t_pipe [TDLY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TDLY; i++) begin
        v_pipe[i] <= 1'b0;
        t_pipe[i] <= '0;
      end
    end else begin
      v_pipe[0] <= sel_valid;
      t_pipe[0] <= sel_tag;
      for (int i = 1; i < TDLY; i++) begin
        v_pipe[i] <= v_pipe[i-1];
        t_pipe[i] <= t_pipe[i-1];
      end
    end
  end

  // ---- scale and saturate (1 clock) ----
  localparam logic signed [SW-1:0] PMAX = SW'((1 <<< (PB_W-1)) - 1);
  localparam logic signed [SW-1:0] PMIN = -PMAX - 1;

  function automatic logic signed [PB_W-1:0] sat_shift(input logic signed [SW-1:0] x);
    logic signed [SW-1:0] y;
    y = x >>> PB_SHIFT;
    if (y > PMAX)      return PMAX[PB_W-1:0];
    else if (y < PMIN) return PMIN[PB_W-1:0];
    else               return y[PB_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pb_valid <= 1'b0;
      pb_tag   <= '0;
      pb_smp   <= '0;
    end else begin
      pb_valid  <= v_pipe[TDLY-1];
      pb_tag    <= t_pipe[TDLY-1];
      pb_smp.re <= sat_shift(sum_re);
      pb_smp.im <= sat_shift(sum_im);
    end
  end
endmodule
