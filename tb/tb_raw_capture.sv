// tb_raw_capture: two recordings from a stream of 512-channel frames.
// First 3 pairs (channels 10/11, 100/101, 300/301) for 2 frames; then 15 pairs
// until stop is pulsed after 3 frames. Every heap must contain, in channel
// order, the 12 samples of each selected channel as three 64-bit words, with
// sop/eop, the heap counter counting recorded frames, and the payload length
// descriptor 6 x pairs words. Nothing may be recorded outside the two windows.
module tb_raw_capture;
  import pharos2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, stop, busy, overflow, in_valid, out_valid, out_ready, out_sop, out_eop;
  logic [3:0] n_pairs;
  logic [CHAN_W-1:0] pair_start [MAX_PAIRS];
  logic [31:0] n_frames;
  chan_tag_t in_tag;
  cplx8_t in_smp [N_SIG_FPGA];
  logic [63:0] out_data;
  logic [47:0] out_heap_cnt;
  logic [15:0] out_len_words;
  logic [7:0] out_kind, out_index;
  logic [31:0] out_frame;

  raw_capture dut (.fpga_id(8'd1), .*);

  int checks = 0, failures = 0, words = 0;
  typedef struct { logic [63:0] d; bit sop; bit eop; int frame; int len; } exp_t;
  exp_t q [$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("extra word"); end
    else begin
      e = q.pop_front();
      if (out_data !== e.d || out_sop != e.sop || out_eop != e.eop || out_frame != 32'(e.frame)
          || out_len_words != 16'(e.len) || out_index != 8'd1 || out_kind != 3) begin
        failures++; if (failures < 10) $display("word %0d wrong %h exp %h", words, out_data, e.d);
      end
    end
    words++;
  end

  // stream frames; selected channels recorded when rec says so
  task automatic frames(input int n, input int np, input bit rec, input int first_frame);
    for (int f = 0; f < n; f++) begin
      int nsel = 0;
      for (int c = 0; c < N_CHAN; c++) begin
        bit hit = 0;
        @(negedge clk);
        in_valid = 1; in_tag.chan = CHAN_W'(c); in_tag.sof = (c == 0);
        foreach (in_smp[s]) in_smp[s] = cplx8_t'($urandom);
        for (int i = 0; i < np; i++) if (c == pair_start[i] || c == pair_start[i] + 1) hit = 1;
        if (rec && hit) begin
          logic [191:0] flat;
          for (int s = 0; s < N_SIG_FPGA; s++) flat[191 - 16*s -: 16] = in_smp[s];
          for (int w = 0; w < 3; w++) begin
            exp_t e;
            e.d = flat[191 - 64*w -: 64]; e.sop = (nsel == 0 && w == 0); e.eop = (nsel == 2*np - 1 && w == 2);
            e.frame = first_frame + f; e.len = 6 * np;
            q.push_back(e);
          end
          nsel++;
        end
        @(negedge clk); in_valid = 0;
      end
    end
  endtask

  initial begin
    start = 0; stop = 0; in_valid = 0; in_tag = '0; n_pairs = 3; n_frames = 2;
    foreach (in_smp[s]) in_smp[s] = '0;
    foreach (pair_start[i]) pair_start[i] = CHAN_W'(20 * i + 1);
    pair_start[0] = 10; pair_start[1] = 100; pair_start[2] = 300;
    repeat (3) @(posedge clk);
    rst_n = 1;
    frames(1, 3, 0, 0);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    frames(2, 3, 1, 0);
    frames(2, 3, 0, 0);                 // recording over
    checks++; if (busy) begin failures++; $display("still busy"); end
    // second recording: 15 pairs, stopped by hand
    n_pairs = 15; n_frames = 0;
    foreach (pair_start[i]) pair_start[i] = CHAN_W'(20 * i + 1);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    frames(3, 15, 1, 0);
    checks++; if (!busy) begin failures++; $display("not busy"); end
    @(negedge clk); stop = 1; @(negedge clk); stop = 0;
    frames(1, 15, 0, 0);
    repeat (300) @(posedge clk);
    checks++; if (q.size() != 0 || busy || overflow) begin failures++; $display("left %0d busy %b ovf %b", q.size(), busy, overflow); end
    $display("words %0d", words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
