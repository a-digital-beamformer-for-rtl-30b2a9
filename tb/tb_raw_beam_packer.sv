// tb_raw_beam_packer: beams of NSEL = 8 channels; the packer is enabled in the
// middle of a frame (it must wait for the next frame start), the selected beam
// changes between frames, and each heap must hold 2 words of 4 channels of the
// selected beam (channel 4k in bits 63..48), with the frame count.
module tb_raw_beam_packer;
  import pharos2_pkg::*;
  localparam int NS = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic enable, in_valid, overflow, out_valid, out_ready, out_sop, out_eop;
  logic [1:0] sel;
  chan_tag_t in_tag;
  cplx8_t [N_BEAMS-1:0] in_beam;
  logic [63:0] out_data;
  logic [47:0] out_heap_cnt;
  logic [15:0] out_len_words;
  logic [7:0] out_kind, out_index;
  logic [31:0] out_frame;

  raw_beam_packer #(.NSEL(NS)) dut (.*);

  int checks = 0, failures = 0, words = 0;
  logic [63:0] exp_q [$];
  int exp_beam [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 2) != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int w;
    w = words % (NS / 4);
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("extra word"); end
    else if (out_data !== exp_q.pop_front() || out_sop != (w == 0) || out_eop != (w == NS/4 - 1)
             || out_frame != 32'(words / (NS / 4)) || out_index != 8'(exp_beam.pop_front()) || out_kind != 2) begin
      failures++; if (failures < 10) $display("word %0d wrong %h", words, out_data);
    end
    words++;
  end

  initial begin
    enable = 0; in_valid = 0; in_tag = '0; in_beam = '0; sel = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 8; f++) begin
      logic [63:0] acc;
      bit packing;
      sel = 2'(f % 4);
      packing = (f > 0);
      for (int c = 0; c < NS; c++) begin
        @(negedge clk);
        if (f == 0 && c == 3) enable = 1;        // mid-frame: no effect until next frame
        in_valid = 1; in_tag.chan = CHAN_W'(c); in_tag.sof = (c == 0);
        in_beam = {$urandom, $urandom};
        if (packing) begin
          acc = {acc[47:0], 16'(in_beam[sel])};
          if (c % 4 == 3) begin exp_q.push_back(acc); exp_beam.push_back(int'(sel)); end
        end
        @(negedge clk); in_valid = 0;
        @(negedge clk);
      end
    end
    repeat (50) @(posedge clk);
    checks++; if (words != 7 * NS / 4) begin failures++; $display("words %0d", words); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
