// tb_sync_fifo: random writes and reads against a queue model, including
// writing when full and reading when empty (the sticky flags must rise and the
// contents stay intact).
module tb_sync_fifo;
  localparam int D = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en, rd_en, empty, full, overflow, underflow;
  logic [31:0] wr_data, rd_data;
  logic [$clog2(D):0] count;
  sync_fifo #(.T(logic [31:0]), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0, n_full = 0;
  logic [31:0] q [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      checks++;
      if (count != q.size() || empty != (q.size() == 0) || full != (q.size() == D)) begin
        failures++; $display("t=%0d count %0d model %0d", t, count, q.size());
      end
      if (q.size() > 0) begin
        checks++;
        if (rd_data !== q[0]) begin failures++; $display("t=%0d data %h exp %h", t, rd_data, q[0]); end
      end
      // phases: fill, drain, random
      case ((t / 500) % 3)
        0: begin wr_en = ($urandom_range(0, 3) != 0); rd_en = ($urandom_range(0, 3) == 0); end
        1: begin wr_en = ($urandom_range(0, 3) == 0); rd_en = ($urandom_range(0, 3) != 0); end
        default: begin wr_en = $urandom_range(0, 1); rd_en = $urandom_range(0, 1); end
      endcase
      if (t == 4000) begin wr_en = 0; rd_en = 0; end
      wr_data = $urandom;
      if (full) n_full++;
      @(posedge clk);
      begin
        bit fb, eb;
        fb = (q.size() == D); eb = (q.size() == 0);
        if (rd_en && !eb) void'(q.pop_front());
        if (wr_en && !fb) q.push_back(wr_data);
      end
    end
    checks++;
    if (!overflow || !underflow) begin failures++; $display("flags %b %b", overflow, underflow); end
    checks++;
    if (n_full == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
