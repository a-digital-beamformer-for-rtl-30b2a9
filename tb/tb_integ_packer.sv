// tb_integ_packer: the four integrators dump NSEL = 8 channels at once, three
// times, with random back-pressure. The packer must send, beam after beam, 4
// words of two channels each (even channel high), sop on the first and eop on
// the last, with heap counter {integration, beam}. A dump while disabled must
// be ignored.
module tb_integ_packer;
  import pharos2_pkg::*;
  localparam int NS = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic enable, overflow, out_valid, out_ready, out_sop, out_eop;
  logic [N_BEAMS-1:0] dump_valid;
  logic [N_BEAMS-1:0][31:0] dump_data;
  logic [63:0] out_data;
  logic [47:0] out_heap_cnt;
  logic [15:0] out_len_words;
  logic [7:0] out_kind, out_index;
  logic [31:0] out_frame;

  integ_packer #(.NSEL(NS)) dut (.*);

  int checks = 0, failures = 0, words = 0;
  logic [31:0] vals [3][N_BEAMS][NS];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 2) != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int i, b, w;
    i = words / (N_BEAMS * NS / 2); b = (words / (NS / 2)) % N_BEAMS; w = words % (NS / 2);
    checks++;
    if (out_data !== {vals[i][b][2*w], vals[i][b][2*w+1]} || out_sop != (w == 0) || out_eop != (w == NS/2 - 1)
        || out_heap_cnt != {14'd0, 32'(i), 2'(b)} || out_index != 8'(b) || out_len_words != 16'(NS/2) || out_kind != 1) begin
      failures++; if (failures < 10) $display("word %0d wrong: %h", words, out_data);
    end
    words++;
  end

  initial begin
    enable = 1; dump_valid = 0; dump_data = '0;
    foreach (vals[i, b, c]) vals[i][b][c] = $urandom;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      enable = (i != 2);                       // third dump is while disabled
      for (int c = 0; c < NS; c++) begin
        @(negedge clk);
        dump_valid = '1;
        for (int b = 0; b < N_BEAMS; b++) dump_data[b] = vals[i == 3 ? 2 : i][b][c];
        @(negedge clk); dump_valid = '0;
      end
      repeat (60) @(negedge clk);
    end
    repeat (50) @(posedge clk);
    checks++; if (words != 3 * N_BEAMS * NS / 2) begin failures++; $display("words %0d", words); end
    checks++; if (overflow) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
