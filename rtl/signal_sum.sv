// signal_sum: adds the weighted signals of one FPGA into a partial beam.
//
// Sums N complex terms of IW bits per part into IW+clog2(N) bits, so nothing
// can overflow, and registers the result: one clock of latency, advanced by en.
// The document gives the function (the weighted signals are summed into a
// partial beam of 12 antennas per FPGA); the single registered adder chain,
// which synthesis turns into a tree, is this design's own choice.
module signal_sum #(
  parameter int unsigned N  = 12,
  parameter int unsigned IW = 25
) (
  input  logic                              clk,
  input  logic                              en,
  input  logic signed [IW-1:0]              in_re [N],
  input  logic signed [IW-1:0]              in_im [N],
  output logic signed [IW+$clog2(N)-1:0]    sum_re,
  output logic signed [IW+$clog2(N)-1:0]    sum_im
);
  localparam int unsigned OW = IW + $clog2(N);

  logic signed [OW-1:0] acc_re, acc_im;

  always_comb begin
    acc_re = '0;
    acc_im = '0;
    for (int i = 0; i < N; i++) begin
      acc_re += OW'(in_re[i]);
      acc_im += OW'(in_im[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      sum_re <= acc_re;
      sum_im <= acc_im;
    end
  end
endmodule
