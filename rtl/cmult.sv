// cmult: pipelined complex multiplier, channel sample times coefficient.
//
// p = a * c with a 8+8 bit sample and c a 16+16 bit coefficient; the full
// precision product (SMP_W+COEF_W+1 bits per part) leaves two clocks after the
// inputs: one register stage on the four real products and one on their sums,
// the shape that maps onto FPGA DSP blocks. en advances the pipeline.
// This structure is this design's own; the document only says that complex
// coefficients are applied to every signal and channel.
module cmult
  import pharos2_pkg::*;
#(
  parameter int unsigned AW = SMP_W,
  parameter int unsigned CW = COEF_W
) (
  input  logic                    clk,
  input  logic                    en,
  input  logic signed [AW-1:0]    a_re,
  input  logic signed [AW-1:0]    a_im,
  input  logic signed [CW-1:0]    c_re,
  input  logic signed [CW-1:0]    c_im,
  output logic signed [AW+CW:0]   p_re,
  output logic signed [AW+CW:0]   p_im
);
  logic signed [AW+CW-1:0] rr, ii, ri, ir;

  always_ff @(posedge clk) begin
    if (en) begin
      rr   <= a_re * c_re;
      ii   <= a_im * c_im;
      ri   <= a_re * c_im;
      ir   <= a_im * c_re;
      p_re <= (AW+CW+1)'(rr) - (AW+CW+1)'(ii);
      p_im <= (AW+CW+1)'(ri) + (AW+CW+1)'(ir);
    end
  end
endmodule
