// tb_spead_formatter: heaps of random length and descriptors, with random
// gaps on the input and random back-pressure on the output. Each packet must
// be the 7-word SPEAD header built here from the descriptors, then the payload
// unchanged, out_last on its final word; stray words before a heap start are
// dropped.
module tb_spead_formatter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, in_sop, in_eop, out_valid, out_ready, out_last;
  logic [63:0] in_data, out_data;
  logic [47:0] in_heap_cnt;
  logic [15:0] in_len_words;
  logic [7:0]  in_kind, in_index;
  logic [31:0] in_frame;

  spead_formatter dut (.*);

  int checks = 0, failures = 0, packets = 0;
  logic [63:0] exp_q [$];
  bit          last_q [$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    logic [63:0] e; bit l;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("extra word"); end
    else begin
      e = exp_q.pop_front(); l = last_q.pop_front();
      if (out_data !== e || out_last !== l) begin
        failures++; if (failures < 10) $display("got %h/%b exp %h/%b", out_data, out_last, e, l);
      end
      if (l) packets++;
    end
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 4) != 0);

  initial begin
    in_valid = 0; in_sop = 0; in_eop = 0; in_data = 0; in_heap_cnt = 0; in_len_words = 0;
    in_kind = 0; in_index = 0; in_frame = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // a stray word, to be dropped
    @(negedge clk); in_valid = 1; in_data = 64'hDEAD; in_sop = 0;
    @(posedge clk); while (!in_ready) @(posedge clk);
    @(negedge clk); in_valid = 0;
    for (int p = 0; p < 60; p++) begin
      int len;
      len = $urandom_range(1, 40);
      in_heap_cnt = {16'd0, 32'($urandom)}; in_len_words = 16'(len);
      in_kind = 8'($urandom); in_index = 8'($urandom); in_frame = $urandom;
      exp_q.push_back(64'h5304_0206_0000_0006);           last_q.push_back(0);
      exp_q.push_back({16'h8001, in_heap_cnt});            last_q.push_back(0);
      exp_q.push_back({16'h8002, 29'd0, in_len_words, 3'd0}); last_q.push_back(0);
      exp_q.push_back({16'h8003, 48'd0});                  last_q.push_back(0);
      exp_q.push_back({16'h8004, 29'd0, in_len_words, 3'd0}); last_q.push_back(0);
      exp_q.push_back({16'h9600, 16'd0, in_frame});        last_q.push_back(0);
      exp_q.push_back({16'h9011, 32'd0, in_kind, in_index}); last_q.push_back(0);
      for (int w = 0; w < len; w++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_data = {$urandom, $urandom}; in_sop = (w == 0); in_eop = (w == len - 1);
        exp_q.push_back(in_data); last_q.push_back(w == len - 1);
        @(posedge clk); while (!in_ready) @(posedge clk);
      end
      @(negedge clk); in_valid = 0;
    end
    repeat (100) @(posedge clk);
    checks++; if (packets != 60 || exp_q.size() != 0) begin failures++; $display("packets %0d left %0d", packets, exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
