// input_align: per-signal programmable delay that lines up the ADC streams.
//
// Cables of different lengths make the antenna signals reach the board with
// different delays; each signal is delayed by a whole number of sample
// periods, set per signal, before it enters its channelizer. The same
// mechanism lets a known delay be applied to one input to test the phase
// correction of the beamformer.
//
// How it works: one circular buffer of MAX_DELAY samples per signal, written
// every clock with in_valid; the output is read delay[i] samples behind the
// write pointer. delay[i] = 0 gives one clock of latency (the output register).
// One sample per signal per clock; the real 700 MS/s stream, which arrives
// several samples per FPGA clock, is abstracted to one sample per clock.
// The delay in sample periods follows the document; MAX_DELAY and the
// zero-filled start-up after reset are this design's own choices.
module input_align #(
  parameter int unsigned N_SIG     = 24,
  parameter int unsigned W         = 8,
  parameter int unsigned MAX_DELAY = 64
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic signed [W-1:0]          in_smp  [N_SIG],
  input  logic [$clog2(MAX_DELAY)-1:0] delay   [N_SIG],
  output logic                         out_valid,
  output logic signed [W-1:0]          out_smp [N_SIG]
);
  localparam int unsigned AW = $clog2(MAX_DELAY);

  logic [AW-1:0] wptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) wptr <= wptr + 1'b1;
    end
  end

  for (genvar s = 0; s < N_SIG; s++) begin : g_sig
    logic signed [W-1:0] buf_q [MAX_DELAY];
    logic [AW-1:0]       rptr;
    logic signed [W-1:0] rd;

    // delay d: sample written d valid cycles ago (d = 0: the one being written)
    assign rptr = wptr - delay[s];
    assign rd   = (delay[s] == '0) ? in_smp[s] : buf_q[rptr];

    always_ff @(posedge clk) begin
      if (in_valid) buf_q[wptr] <= in_smp[s];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) out_smp[s] <= '0;
      else if (in_valid) out_smp[s] <= rd;
    end
  end
endmodule
