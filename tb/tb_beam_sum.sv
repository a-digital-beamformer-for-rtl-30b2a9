// tb_beam_sum: local partial-beam words arrive at once, remote words for the
// same channels a random 5..40 clocks later. Each output must be the saturated
// (local + remote) >>> out_shift for all four beams, with the local tag, one
// clock after the remote word. The FIFO level must follow the backlog. Last, a
// remote word with a different tag must raise misalign, and a remote word with
// the FIFO empty must raise fifo_underflow.
module tb_beam_sum;
  import pharos2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] out_shift;
  logic local_valid, remote_valid, out_valid, misalign, fifo_overflow, fifo_underflow;
  pbeam_word_t local_word, remote_word;
  chan_tag_t out_tag;
  cplx8_t [N_BEAMS-1:0] out_beam;
  logic [N_BEAMS-1:0] beam_sat;
  logic [6:0] fifo_level;

  beam_sum dut (.*);

  int checks = 0, failures = 0, nsat = 0, maxlvl = 0;
  pbeam_word_t lq [$], rq [$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  function automatic int rq8(input int x, input int sh, output bit s);
    int y = x >>> sh;
    s = 0;
    if (y > 127) begin s = 1; return 127; end
    if (y < -128) begin s = 1; return -128; end
    return y;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // remote side: resend each local word's partner after a delay
  pbeam_word_t pend [$];
  int          pend_t [$];

  always @(posedge clk) if (rst_n && out_valid) begin
    pbeam_word_t l, r;
    l = lq.pop_front(); r = rq.pop_front();
    checks++;
    if (out_tag !== l.tag) begin failures++; $display("tag"); end
    for (int b = 0; b < N_BEAMS; b++) begin
      bit s1, s2; int er, ei;
      er = rq8(int'(l.beam[b].re) + int'(r.beam[b].re), int'(out_shift), s1);
      ei = rq8(int'(l.beam[b].im) + int'(r.beam[b].im), int'(out_shift), s2);
      if (s1 | s2) nsat++;
      checks++;
      if (int'(out_beam[b].re) != er || int'(out_beam[b].im) != ei || beam_sat[b] != (s1 | s2)) begin
        failures++; if (failures < 10) $display("beam %0d got %0d,%0d exp %0d,%0d", b, out_beam[b].re, out_beam[b].im, er, ei);
      end
    end
  end

  always @(posedge clk) if (rst_n && int'(fifo_level) > maxlvl) maxlvl = int'(fifo_level);

  initial begin
    local_valid = 0; remote_valid = 0; local_word = '0; remote_word = '0; out_shift = 4;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      // local producer: 300 words, one per 4 clocks
      for (int n = 0; n < 300; n++) begin
        pbeam_word_t w;
        w = pbeam_word_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
        w.tag.chan = CHAN_W'(n % N_SEL); w.tag.sof = (n % N_SEL == 0);
        if (n > 150) for (int b = 0; b < N_BEAMS; b++) begin
          w.beam[b].re = PB_W'($signed(w.beam[b].re) >>> 5);
          w.beam[b].im = PB_W'($signed(w.beam[b].im) >>> 5);
        end
        @(negedge clk); local_valid = 1; local_word = w;
        @(negedge clk); local_valid = 0;
        lq.push_back(w);
        pend.push_back(w); pend_t.push_back(cyc + 5 + (n % 9) * 4);
        repeat (2) @(negedge clk);
      end
      // remote producer
      for (int n = 0; n < 300; n++) begin
        pbeam_word_t w, r;
        wait (pend.size() > 0);
        while (cyc < pend_t[0]) @(negedge clk);
        w = pend.pop_front(); void'(pend_t.pop_front());
        r = pbeam_word_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
        r.tag = w.tag;
        for (int b = 0; b < N_BEAMS; b++) begin
          r.beam[b].re = PB_W'($signed(r.beam[b].re) >>> (n > 150 ? 5 : 0));
          r.beam[b].im = PB_W'($signed(r.beam[b].im) >>> (n > 150 ? 5 : 0));
        end
        @(negedge clk); remote_valid = 1; remote_word = r; rq.push_back(r);
        @(negedge clk); remote_valid = 0;
      end
    join
    repeat (5) @(negedge clk);
    checks++; if (misalign || fifo_overflow || fifo_underflow) begin failures++; $display("spurious error"); end
    checks++; if (maxlvl < 2) begin failures++; $display("fifo never filled"); end
    checks++; if (nsat == 0 || nsat > 1200) begin failures++; $display("nsat %0d", nsat); end
    // misaligned pair
    @(negedge clk); local_valid = 1; local_word = '0; local_word.tag.chan = 9'd5; lq.push_back(local_word);
    @(negedge clk); local_valid = 0;
    @(negedge clk); remote_valid = 1; remote_word = '0; remote_word.tag.chan = 9'd6; rq.push_back(remote_word);
    @(negedge clk); remote_valid = 0;
    @(negedge clk);
    checks++; if (!misalign) begin failures++; $display("misalign not flagged"); end
    // remote word with nothing buffered
    @(negedge clk); remote_valid = 1;
    @(negedge clk); remote_valid = 0;
    @(negedge clk);
    checks++; if (!fifo_underflow) begin failures++; $display("underflow not flagged"); end
    $display("max fifo level %0d, saturated %0d", maxlvl, nsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
