// sync_fifo: single-clock first-in first-out buffer.
//
// DEPTH entries of type T in a RAM with a read pointer; the oldest entry is
// always visible on rd_data while empty is low (first-word fall-through), and
// rd_en removes it. count gives the occupancy. Writing while full or reading
// while empty is ignored and sets the sticky overflow / underflow flag, which
// only reset clears.
// Used as the partial-beam buffer that absorbs the FPGA-to-FPGA transfer delay
// and as the packet buffers in front of the SPEAD formatters. The buffer's
// role follows the document; its organisation is this design's own.
module sync_fifo #(
  parameter type         T     = logic [31:0],
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  T                         wr_data,
  input  logic                     rd_en,
  output T                         rd_data,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     overflow,
  output logic                     underflow
);
  localparam int unsigned AW = $clog2(DEPTH);

  T              mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rd_data = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      rptr      <= '0;
      count     <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      if (wr_en && full)  overflow  <= 1'b1;
      if (rd_en && empty) underflow <= 1'b1;
    end
  end
endmodule
