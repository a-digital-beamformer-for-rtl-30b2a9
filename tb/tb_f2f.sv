// tb_f2f: f2f_tx -> two register stages (the board link) -> f2f_rx.
//
// Random partial-beam words are offered on random clocks, with long runs of
// back-to-back words (one per clock, the full stream rate) and idle gaps in
// between. Every word must come out unchanged, in order, exactly 4 clocks
// after it was offered (tx register, 2 link stages, rx register), and the
// receiver's frame_err must stay low. At the end one corrupted beat (a start
// marker on beat 2) is forced onto the link and frame_err must rise and stay.
module tb_f2f;
  import pharos2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid, frame_err;
  pbeam_word_t in_word, out_word;
  logic [F2F_SER-1:0][F2F_LANES-1:0] tx_lanes, l1, l2;
  logic corrupt;

  f2f_tx u_tx (.clk, .rst_n, .in_valid, .in_word, .lanes(tx_lanes));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1 <= '0;
      l2 <= '0;
    end else begin
      l1 <= tx_lanes;
      l2 <= l1;
      if (corrupt) l2[2][32] <= 1'b1;
    end
  end
  f2f_rx u_rx (.clk, .rst_n, .lanes(l2), .out_valid, .out_word, .frame_err);

  int checks = 0, failures = 0, received = 0, sent = 0;
  pbeam_word_t q [$];
  int t_sent [$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    pbeam_word_t e; int ts;
    received++;
    checks++;
    if (q.size() == 0) begin
      failures++; $display("word %0d not sent", received);
    end else begin
      e = q.pop_front(); ts = t_sent.pop_front();
      if (out_word !== e) begin failures++; if (failures < 10) $display("word %0d mismatch", received); end
      checks++;
      if (cyc - ts != 4) begin failures++; if (failures < 10) $display("latency %0d", cyc - ts); end
    end
  end

  initial begin
    in_valid = 0; in_word = '0; corrupt = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // bursts of back-to-back words, then idle gaps
      in_valid = ((n / 64) % 2 == 0) ? 1'b1 : ($urandom_range(0, 2) == 0);
      in_word = pbeam_word_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      if (n % 50 == 0) in_word.tag.sof = 1;
      if (in_valid) begin
        q.push_back(in_word);
        t_sent.push_back(cyc + 1);
        sent++;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(posedge clk);
    checks++; if (received != sent) begin failures++; $display("received %0d of %0d", received, sent); end
    checks++; if (frame_err) begin failures++; $display("frame error on a clean link"); end
    @(negedge clk); corrupt = 1;
    @(negedge clk); corrupt = 0;
    repeat (5) @(posedge clk);
    checks++; if (!frame_err) begin failures++; $display("corrupted beat not flagged"); end
    $display("words %0d", received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
